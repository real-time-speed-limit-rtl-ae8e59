// tb_bim_pingpong: writes random bits into the write bank while reading
// back the other bank, swapping several times; checks every word read
// against a two-bank model.
module tb_bim_pingpong;
  import slt_pkg::*;
  localparam int W = 128, H = 6, WPL = 2;
  logic clk = 0, rst_n = 0, swap = 0, we = 0, wbit = 0, rd_en = 0;
  logic wbank;
  logic [X_W-1:0] wx = '0;
  logic [Y_W-1:0] wy = '0, rline = '0;
  logic [3:0] rword = '0;
  logic [63:0] rdata;
  int checks = 0, failures = 0;
  bit model [2][H][W];
  int mbank = 0;

  bim_pingpong #(.W(W), .H(H)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] exp_w;
    int ln, wd;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      // write a whole frame into the write bank
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          we = 1; wx = X_W'(x); wy = Y_W'(y); wbit = 1'($urandom);
          model[mbank][y][x] = wbit;
        end
      @(negedge clk); we = 0;
      checks++;
      if (int'(wbank) != mbank) begin failures++; $display("wbank"); end
      swap = 1; @(negedge clk); swap = 0; mbank = 1 - mbank;
      // read back the frame just written (now the read bank) while
      // writing junk into the other bank
      for (int i = 0; i < H * WPL; i++) begin
        ln = i / WPL; wd = i % WPL;
        rd_en = 1; rline = Y_W'(ln); rword = 4'(wd);
        we = 1; wx = X_W'($urandom % W); wy = Y_W'($urandom % H); wbit = 1'($urandom);
        model[mbank][wy][wx] = wbit;
        @(negedge clk);
        rd_en = 0; we = 0;
        for (int b = 0; b < 64; b++) exp_w[b] = model[1 - mbank][ln][wd * 64 + b];
        checks++;
        if (rdata !== exp_w) begin failures++; $display("f=%0d line %0d word %0d", f, ln, wd); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
