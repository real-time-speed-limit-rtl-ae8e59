// lsw_fifo: the location and scan-window-flags FIFO between the RPM stage
// and the speed recognition stage (512 entries of 64 bits by default, as
// published).
//
// Synchronous FIFO with first-word fall-through: rd_data shows the oldest
// entry whenever empty is low, and rd_en pops it.  A write while full is
// refused and counted in drop_cnt; these are this design's choices, the
// source only names the FIFO and its size.
module lsw_fifo
  import slt_pkg::*;
#(
  parameter int DEPTH = 512
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  lsw_entry_t wr_data,
  input  logic       rd_en,
  output lsw_entry_t rd_data,
  output logic       empty,
  output logic       full,
  output logic [$clog2(DEPTH):0] count,
  output logic [15:0] drop_cnt
);

  localparam int AW = $clog2(DEPTH);

  lsw_entry_t    mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign empty   = (count == 0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; rptr <= '0; count <= '0; drop_cnt <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (wr_en && full && drop_cnt != '1) drop_cnt <= drop_cnt + 1'b1;
    end
  end

  // Pops only when there is data.
  assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty))
    else $error("lsw_fifo: read while empty");

endmodule
