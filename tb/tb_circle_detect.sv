// tb_circle_detect: feeds candidate windows of binarized test images
// (round signs of several sizes, and random noise) row by row, with random
// gaps, and checks the vote count against the direct template reference,
// the circle decision against the vote range, and the latency of done.
module tb_circle_detect;
  import slt_pkg::*;
  import tb_ref_pkg::*;
  localparam int MAXM = 50;
  localparam int LO = 10, HI = 40;
  logic clk = 0, rst_n = 0, start = 0, row_valid = 0;
  logic [4:0] size_idx = '0;
  logic [MAXM+1:0] row = '1;
  logic [7:0] th_lo = 8'(LO), th_hi = 8'(HI);
  logic done, is_circle;
  logic [11:0] votes;
  int checks = 0, failures = 0, n_circ = 0, n_not = 0;

  circle_detect dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_window(int x0, int y0, int idx);
    int m, ev, lat;
    bit ec;
    m = SW_SIZES[idx];
    @(negedge clk);
    start = 1; size_idx = 5'(idx);
    @(negedge clk);
    start = 0;
    for (int r = -1; r <= m; r++) begin
      while (($urandom % 4) == 0) begin row_valid = 0; @(negedge clk); end
      row_valid = 1;
      row = '1;
      for (int i = 0; i < m + 2; i++) row[i] = getb(x0 - 1 + i, y0 + r);
      @(negedge clk);
    end
    row_valid = 0;
    lat = 1;
    while (!done && lat < 10) begin @(negedge clk); lat++; end
    ev = cd_votes(x0, y0, m);
    ec = (ev * 8 >= LO * m) && (ev * 8 <= HI * m);
    checks += 3;
    if (lat != 2) begin failures++; $display("latency %0d", lat); end
    if (int'(votes) != ev) begin failures++; $display("m=%0d votes %0d exp %0d", m, votes, ev); end
    if (is_circle != ec) begin failures++; $display("m=%0d circle %0d exp %0d", m, is_circle, ec); end
    if (ec) n_circ++; else n_not++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int idx = 0; idx < NUM_SW; idx++) begin
      int m;
      m = SW_SIZES[idx];
      make_image(m + 12, m + 12, 6, 6, m, 0, 20);
      binarize(110);
      run_window(6, 6, idx);       // window on the sign
      run_window(4, 7, idx);       // shifted window
      run_window(0, 0, idx);       // window touching the frame corner
    end
    // random binary noise
    iw = 60; ih = 60;
    for (int y = 0; y < 60; y++) for (int x = 0; x < 60; x++) bimg[y][x] = 1'($urandom);
    for (int idx = 0; idx < NUM_SW; idx += 3) run_window(3, 5, idx);
    checks++;
    if (n_circ == 0 || n_not == 0) begin failures++; $display("coverage circ=%0d not=%0d", n_circ, n_not); end
    $display("circle windows %0d, other %0d", n_circ, n_not);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
