// tb_seb: streams a test image as columns and checks every binary pixel
// written (position and value) against the convolution reference; also
// checks that exactly the interior pixels are written.
module tb_seb;
  import slt_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 24, H = 20, CH = 5;
  localparam int THR = 110;
  logic clk = 0, rst_n = 0, col_valid = 0, col_sof = 0;
  logic [7:0] col [CH];
  logic [7:0] thr = 8'(THR);
  logic we, wbit;
  logic [X_W-1:0] wx;
  logic [Y_W-1:0] wy;
  int checks = 0, failures = 0, writes = 0, ones = 0;

  seb #(.W(W), .H(H), .CH(CH)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && we) begin
    checks++; writes++;
    if (wx < 1 || wy < 1 || wx > W - 2 || wy > H - 2) begin failures++; $display("border write"); end
    else if (wbit != seb_ref(int'(wx), int'(wy), THR)) begin
      failures++; $display("bit at %0d,%0d", wx, wy);
    end
    if (wbit) ones++;
  end

  initial begin
    for (int j = 0; j < CH; j++) col[j] = '0;
    make_image(W, H, 2, 1, 18, 0, 40);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        while (($urandom % 4) == 0) begin col_valid = 0; @(negedge clk); end
        col_valid = 1; col_sof = (x == 0 && y == 0);
        for (int j = 0; j < CH; j++)
          col[j] = (y - (CH - 1 - j) >= 0) ? 8'(img[y - (CH - 1 - j)][x]) : 8'd0;
      end
    @(negedge clk); col_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (writes != (W - 2) * (H - 2)) begin failures++; $display("writes %0d", writes); end
    checks++;
    if (ones == 0 || ones == writes) begin failures++; $display("degenerate image"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
