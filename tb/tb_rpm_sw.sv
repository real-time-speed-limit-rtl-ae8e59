// tb_rpm_sw: streams test images through one scan window size and checks
// the match flag at every window position against the direct area-sum
// reference: a painted sign with LED mode off, an LED-like (inverted) sign
// with LED mode on, and the inverted sign with LED mode off.
module tb_rpm_sw;
  import slt_pkg::*;
  import tb_ref_pkg::*;
  localparam int M = 20, CH = 22, W = 44, H = 36;
  localparam int THR = 20;
  logic clk = 0, rst_n = 0, en = 0, led = 0;
  logic [7:0] col [CH];
  logic [7:0] thr = 8'(THR);
  logic match;
  int checks = 0, failures = 0, pos [3];

  rpm_sw #(.M(M), .CH(CH)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int phase);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        while (($urandom % 4) == 0) begin en = 0; @(negedge clk); end
        en = 1;
        for (int j = 0; j < CH; j++)
          col[j] = (y - (CH - 1 - j) >= 0) ? 8'(img[y - (CH - 1 - j)][x]) : 8'd0;
        @(posedge clk); #1;
        en = 0;
        if (x >= M - 1 && y >= M - 1) begin
          bit e;
          e = rpm_ref(x, y, M, THR, led);
          checks++;
          if (match != e) begin
            failures++;
            if (failures < 6) $display("phase %0d (%0d,%0d) match=%0d exp=%0d", phase, x, y, match, e);
          end
          if (e) pos[phase]++;
        end
      end
  endtask

  initial begin
    for (int j = 0; j < CH; j++) col[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    make_image(W, H, 12, 9, M, 0, 10);
    led = 0; run(0);
    make_image(W, H, 17, 11, M, 1, 10);
    led = 1; run(1);
    led = 0; run(2);
    checks++;
    if (pos[0] == 0 || pos[1] == 0) begin failures++; $display("no positive window: %0d %0d", pos[0], pos[1]); end
    $display("positives painted=%0d led=%0d led-off=%0d", pos[0], pos[1], pos[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
