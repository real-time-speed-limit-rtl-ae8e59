// seb: sign enhancement and binarization.
//
// Works on the same pixel columns as the RPM stage, in parallel with it.
// The bottom three pixels of each column (lines y-2..y) and the two previous
// columns form a 3x3 neighbourhood centred on (x-1, y-1).  It is smoothed
// with the 3x3 convolution kernel [1 2 1; 2 4 2; 1 2 1] and the result is
// compared with 16*thr: above gives 1 (white), otherwise 0 (black).  One
// binary pixel is written per accepted column into the binary image memory.
// The source names a convolution filter followed by binarization but gives
// neither kernel nor threshold rule; this kernel and the fixed threshold
// input are this design's choices.  Pixels of the first and last line and
// column have no complete neighbourhood and are not written.
//
// Timing: the write (we, wx, wy, wbit) is presented combinationally the
// clock after the column is accepted and lasts one clock.
module seb
  import slt_pkg::*;
#(
  parameter int W  = IMG_W,
  parameter int H  = IMG_H,
  parameter int CH = COL_H
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             col_valid,
  input  logic             col_sof,
  input  logic [PIX_W-1:0] col [CH],
  input  logic [PIX_W-1:0] thr,
  output logic             we,
  output logic [X_W-1:0]   wx,
  output logic [Y_W-1:0]   wy,
  output logic             wbit
);

  logic [PIX_W-1:0] nb [3][3];    // nb[column age][row], row 2 = line y
  logic [X_W-1:0]   x_cnt, cx, x_now;
  logic [Y_W-1:0]   y_cnt, cy, y_now;
  logic             pend;
  logic [PIX_W+3:0] conv;

  assign x_now = col_sof ? '0 : x_cnt;
  assign y_now = col_sof ? '0 : y_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_cnt <= '0; y_cnt <= '0; cx <= '0; cy <= '0; pend <= 1'b0;
      for (int a = 0; a < 3; a++) for (int r = 0; r < 3; r++) nb[a][r] <= '0;
    end else begin
      pend <= col_valid;
      if (col_valid) begin
        for (int r = 0; r < 3; r++) begin
          nb[0][r] <= col[CH-3+r];
          nb[1][r] <= nb[0][r];
          nb[2][r] <= nb[1][r];
        end
        cx <= x_now;
        cy <= y_now;
        if (int'(x_now) == W - 1) begin
          x_cnt <= '0;
          y_cnt <= (int'(y_now) == H - 1) ? '0 : y_now + 1'b1;
        end else begin
          x_cnt <= x_now + 1'b1;
          y_cnt <= y_now;
        end
      end
    end
  end

  always_comb begin
    conv = '0;
    for (int a = 0; a < 3; a++)
      for (int r = 0; r < 3; r++)
        conv += (PIX_W+4)'(nb[a][r]) << ((a == 1 ? 1 : 0) + (r == 1 ? 1 : 0));
    we   = pend && (cx >= 2) && (cy >= 2);
    wx   = cx - 1'b1;
    wy   = cy - 1'b1;
    wbit = conv > {thr, 4'b0000};
  end

endmodule
