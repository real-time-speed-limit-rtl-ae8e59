// rpm_sw: rectangle pattern matching (RPM) for one scan window size M x M.
//
// A window whose bottom-right pixel is the newest column is tested for the
// shared luminosity feature of round and rectangular signs: eight dark
// border areas B1..B8 must each be darker than the bright area W1..W8 just
// inside them, by more than a threshold.  The layout follows the published
// figure: B1,B2 / W1,W2 on top (left, right), B5,B6 / W5,W6 at the bottom
// (right, left), B3,B4 / W3,W4 on the right (upper, lower) and B8,B7 /
// W8,W7 on the left (upper, lower), B outermost.
//
// Computation reuse:
//  * local overlap - every area sum slides with the newest column using
//    area_lum (add the new column part, subtract the one leaving);
//  * global overlap - only the right-hand vertical areas are summed; the
//    W3/B3 (W4/B4) sums are delayed by M-2k columns to become B8/W8
//    (B7/W7) of a later window, and the horizontal area sums are delayed
//    to give the left areas (B1,W1,B6,W6) from the same sums as the right
//    ones.  The delay lines are the "Hor_tmp" and vertical shift registers
//    of the published datapath.
// Area sizes are this design's choice (the source gives only the layout):
// strip thickness k = M/10, area length h = M/5, centred on the window
// axes, so all 16 areas hold k*h pixels.
//
// Threshold: thr is a per-pixel luminosity step; a pair passes when
// I(W)-I(B) > thr*k*h.  With led high the absolute difference is used, so
// LED signs (bright ring, dark surround) also match.
//
// Interface: col/en as from column_buffer (col[CH-1] newest line).  After
// the clock edge that accepts column x, match refers to the window with
// bottom-right pixel (x, y).  match is combinational from registers and
// stays stable until the next en.  Windows that are not completely inside
// the frame are not masked here (see rpm_controller).
module rpm_sw
  import slt_pkg::*;
#(
  parameter int M  = 50,     // scan window side
  parameter int CH = COL_H   // column height delivered by the column buffer
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [PIX_W-1:0] col [CH],
  input  logic [PIX_W-1:0] thr,
  input  logic             led,
  output logic             match
);

  localparam int K     = M / 10;            // strip thickness
  localparam int H     = M / 5;             // area length
  localparam int MID   = M / 2;
  localparam int BASE  = CH - M;            // column index of window row 0
  localparam int ADD_W = $clog2(H * 255 + 1);
  localparam int SUM_W = $clog2(K * H * 255 + 1);
  localparam int D_R   = M - MID - H;       // delay of right horizontal areas
  localparam int D_L   = M - MID;           // delay of left horizontal areas
  localparam int HLEN  = D_L;               // horizontal delay line length
  localparam int VLEN  = M - K;             // vertical delay line length

  // Column segment sums: 0 top B, 1 top W, 2 bottom W, 3 bottom B,
  // 4 upper vertical, 5 lower vertical.
  localparam int NSEG = 6;
  logic [ADD_W-1:0] seg [NSEG];
  logic [SUM_W-1:0] area [NSEG];

  function automatic logic [ADD_W-1:0] colsum(input logic [PIX_W-1:0] c [CH],
                                              input int r0, input int r1);
    logic [ADD_W-1:0] s;
    s = '0;
    for (int r = r0; r < r1; r++) s += ADD_W'(c[BASE + r]);
    return s;
  endfunction

  always_comb begin
    seg[0] = colsum(col, 0,         K);
    seg[1] = colsum(col, K,         2 * K);
    seg[2] = colsum(col, M - 2 * K, M - K);
    seg[3] = colsum(col, M - K,     M);
    seg[4] = colsum(col, MID - H,   MID);
    seg[5] = colsum(col, MID,       MID + H);
  end

  for (genvar g = 0; g < NSEG; g++) begin : g_area
    area_lum #(.AW(g < 4 ? H : K), .ADD_W(ADD_W), .SUM_W(SUM_W)) u_area (
      .clk, .rst_n, .en, .s_add(seg[g]), .sum(area[g])
    );
  end

  // Delay lines of area sums (one entry per accepted column).
  logic [SUM_W-1:0] hdl [4][HLEN];
  logic [SUM_W-1:0] vdl [2][VLEN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < 4; a++) for (int i = 0; i < HLEN; i++) hdl[a][i] <= '0;
      for (int a = 0; a < 2; a++) for (int i = 0; i < VLEN; i++) vdl[a][i] <= '0;
    end else if (en) begin
      for (int a = 0; a < 4; a++) begin
        hdl[a][0] <= area[a];
        for (int i = 1; i < HLEN; i++) hdl[a][i] <= hdl[a][i-1];
      end
      for (int a = 0; a < 2; a++) begin
        vdl[a][0] <= area[4 + a];
        for (int i = 1; i < VLEN; i++) vdl[a][i] <= vdl[a][i-1];
      end
    end
  end

  // Area sum delayed by d columns (d = 0 is the sum of the newest position).
  function automatic logic [SUM_W-1:0] htap(input int a, input int d);
    return (d == 0) ? area[a] : hdl[a][d-1];
  endfunction
  function automatic logic [SUM_W-1:0] vtap(input int a, input int d);
    return (d == 0) ? area[4 + a] : vdl[a][d-1];
  endfunction

  logic [SUM_W-1:0] b [1:8];
  logic [SUM_W-1:0] w [1:8];

  always_comb begin
    b[1] = htap(0, D_L);  b[2] = htap(0, D_R);
    w[1] = htap(1, D_L);  w[2] = htap(1, D_R);
    w[6] = htap(2, D_L);  w[5] = htap(2, D_R);
    b[6] = htap(3, D_L);  b[5] = htap(3, D_R);
    b[3] = vtap(0, 0);    w[3] = vtap(0, K);
    w[8] = vtap(0, M - 2 * K);  b[8] = vtap(0, M - K);
    b[4] = vtap(1, 0);    w[4] = vtap(1, K);
    w[7] = vtap(1, M - 2 * K);  b[7] = vtap(1, M - K);
  end

  // Threshold comparison of the eight B/W pairs.
  logic [SUM_W:0]   thr_area;
  logic [8:1]       pass;
  logic signed [SUM_W+1:0] diff [1:8];
  logic [SUM_W:0]   mag [1:8];

  always_comb begin
    thr_area = (SUM_W + 1)'(thr) * (SUM_W + 1)'(K * H);
    for (int j = 1; j <= 8; j++) begin
      diff[j] = $signed({2'b00, w[j]}) - $signed({2'b00, b[j]});
      mag[j]  = diff[j][SUM_W+1] ? (SUM_W + 1)'(-diff[j]) : diff[j][SUM_W:0];
      if (led) pass[j] = mag[j] > thr_area;
      else     pass[j] = !diff[j][SUM_W+1] && (diff[j][SUM_W:0] > thr_area);
    end
    match = &pass;
  end

endmodule
