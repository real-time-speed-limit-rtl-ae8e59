// tb_area_lum: checks the sliding area sum against a directly summed
// history of accepted column sums, with random enables.
module tb_area_lum;
  localparam int AW = 5, ADD_W = 10, SUM_W = 13;
  logic clk = 0, rst_n = 0, en = 0;
  logic [ADD_W-1:0] s_add = '0;
  logic [SUM_W-1:0] sum;
  int checks = 0, failures = 0;
  int hist [$];

  area_lum #(.AW(AW), .ADD_W(ADD_W), .SUM_W(SUM_W)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_sum;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < AW; i++) hist.push_back(0);
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      s_add = ADD_W'($urandom % 1024);
      @(posedge clk);
      if (en) begin
        hist.push_back(int'(s_add));
        void'(hist.pop_front());
      end
      #1;
      exp_sum = 0;
      foreach (hist[i]) exp_sum += hist[i];
      checks++;
      if (int'(sum) != exp_sum) begin
        failures++;
        if (failures < 5) $display("mismatch t=%0d sum=%0d exp=%0d", t, sum, exp_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
