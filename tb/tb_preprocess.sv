// tb_preprocess: streams frames in each mode (with random input gaps) and
// compares the kept pixels and the frame start marker with the selection
// rule applied to known pixel positions.
module tb_preprocess;
  import slt_pkg::*;
  localparam int IW = 12, IH = 9;
  logic clk = 0, rst_n = 0;
  pp_mode_t mode = PP_BYPASS;
  logic field = 0, in_valid = 0, in_sof = 0;
  logic [11:0] in_width = 12'(IW);
  logic [7:0] in_pix = 0;
  logic out_valid, out_sof;
  logic [7:0] out_pix;
  int checks = 0, failures = 0;
  int expq [$];
  int n_out, n_sof;

  preprocess #(.IN_X_W(12)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor.
  always @(posedge clk) if (rst_n && out_valid) begin
    int e;
    checks++;
    if (expq.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = expq.pop_front();
      if (int'(out_pix) != (e & 255)) begin
        failures++; $display("pix %0d exp %0d", out_pix, e & 255);
      end
      if (out_sof != (e >= 256)) begin failures++; $display("sof mismatch"); end
    end
  end

  task automatic run_frame(pp_mode_t md, bit fld);
    bit first = 1;
    mode = md; field = fld;
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) begin
        bit keep;
        @(negedge clk);
        while (($urandom % 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_sof = (x == 0 && y == 0);
        in_pix = 8'((y * IW + x) * 7);
        case (md)
          PP_DOWN3:   keep = (x % 3 == 0) && (y % 3 == 0);
          PP_DEINTER: keep = (x % 2 == int'(fld)) && (y % 2 == int'(fld));
          default:    keep = 1;
        endcase
        if (keep) begin
          expq.push_back(int'(in_pix) + ((first && x == 0 && y == 0) ? 256 : 0));
        end
      end
    @(negedge clk); in_valid = 0; in_sof = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(PP_BYPASS, 0);
    run_frame(PP_DOWN3, 0);
    run_frame(PP_DEINTER, 0);
    run_frame(PP_DEINTER, 1);
    run_frame(PP_DOWN3, 0);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d outputs missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
