// tb_lsw_fifo: random pushes and pops against a queue model, including
// writes while full (must be dropped and counted).
module tb_lsw_fifo;
  import slt_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  lsw_entry_t wr_data = '0, rd_data;
  logic empty, full;
  logic [$clog2(DEPTH):0] count;
  logic [15:0] drop_cnt;
  int checks = 0, failures = 0, drops = 0, fulls = 0;
  lsw_entry_t q [$];

  lsw_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH) || int'(count) != q.size()) begin
        failures++; $display("flags t=%0d count=%0d model=%0d", t, count, q.size());
      end
      if (!empty) begin
        checks++;
        if (rd_data != q[0]) begin failures++; $display("data t=%0d", t); end
      end
      // phases: fill-heavy then drain-heavy
      wr_en = ($urandom % 100) < ((t / 200) % 2 ? 30 : 70);
      rd_en = !empty && (($urandom % 100) < ((t / 200) % 2 ? 70 : 30));
      wr_data = {$urandom, $urandom};
      @(posedge clk);
      begin
        bit was_full;
        was_full = (q.size() == DEPTH);
        if (rd_en) void'(q.pop_front());
        if (wr_en) begin
          if (!was_full) q.push_back(wr_data);
          else drops++;
        end
      end
      if (q.size() == DEPTH) fulls++;
    end
    checks++;
    if (int'(drop_cnt) != drops) begin failures++; $display("drop_cnt %0d exp %0d", drop_cnt, drops); end
    checks++;
    if (drops == 0 || fulls == 0) begin failures++; $display("full never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
