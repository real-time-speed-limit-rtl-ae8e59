// bim_pingpong: the two binary image memories (BIM 1 and BIM 2) with bank
// swapping.
//
// Each bank holds one W x H binary frame, stored as 64-bit words, ceil(W/64)
// words per line.  The sign enhancement stage writes single bits of the
// current frame into the write bank while the speed recognition stage reads
// whole 64-bit words of the previous frame from the other bank; a pulse on
// swap exchanges the roles (done at every frame start).  The two banks and
// the swap are the published scheme; the word organisation follows the
// 64-bit read path of the published block diagram, the rest (bit write,
// registered read, swap pulse) is this design's choice.
//
// Timing: writes take effect at the clock edge; rdata is registered, valid
// the clock after rd_en.
module bim_pingpong
  import slt_pkg::*;
#(
  parameter int W = IMG_W,
  parameter int H = IMG_H
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           swap,
  output logic           wbank,   // bank now written (0: BIM 1, 1: BIM 2)
  input  logic           we,
  input  logic [X_W-1:0] wx,
  input  logic [Y_W-1:0] wy,
  input  logic           wbit,
  input  logic           rd_en,
  input  logic [Y_W-1:0] rline,
  input  logic [3:0]     rword,
  output logic [63:0]    rdata
);

  localparam int WPL   = (W + 63) / 64;
  localparam int DEPTH = WPL * H;
  localparam int AW    = $clog2(DEPTH);

  logic [63:0] bank0 [DEPTH];
  logic [63:0] bank1 [DEPTH];
  logic [AW-1:0] waddr, raddr;

  assign waddr = AW'(wy * WPL + int'(wx[X_W-1:6]));
  assign raddr = AW'(rline * WPL + rword);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wbank <= 1'b0;
    else if (swap) wbank <= !wbank;
  end

  always_ff @(posedge clk) begin
    if (we && !wbank) bank0[waddr][wx[5:0]] <= wbit;
    if (we &&  wbank) bank1[waddr][wx[5:0]] <= wbit;
    if (rd_en) rdata <= wbank ? bank0[raddr] : bank1[raddr];
  end

endmodule
