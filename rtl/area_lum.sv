// area_lum: luminosity of a rectangular area that slides one column per
// accepted column, computed with the local-overlap recursion
//     S_t = (S_{t-1} - S_sub) + S_add
// where S_add is the sum of the area's pixels in the newest column and
// S_sub the sum that leaves the area, i.e. S_add of AW columns earlier.
// The old column sums are kept in an AW-deep FIFO (a shift register here),
// so each new position costs one addition and one subtraction regardless of
// the area width.  This is the published area luminosity datapath.
//
// Interface: on each clock with en high, s_add (the newest column sum) is
// accepted and sum becomes the total over the last AW accepted columns.
// sum is registered: it is valid the clock after en.  Reset clears the FIFO
// and the sum, so the recursion is exact from the first column on.
module area_lum #(
  parameter int AW    = 10,  // area width in columns (FIFO depth)
  parameter int ADD_W = 10,  // width of one column sum
  parameter int SUM_W = 14   // width of the area sum
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [ADD_W-1:0] s_add,
  output logic [SUM_W-1:0] sum
);

  logic [ADD_W-1:0] fifo [AW];
  logic [SUM_W-1:0] s_store;   // S_{t-1} - S_sub: the part kept from the previous area

  assign s_store = sum - SUM_W'(fifo[AW-1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum <= '0;
      for (int i = 0; i < AW; i++) fifo[i] <= '0;
    end else if (en) begin
      sum     <= s_store + SUM_W'(s_add);
      fifo[0] <= s_add;
      for (int i = 1; i < AW; i++) fifo[i] <= fifo[i-1];
    end
  end

endmodule
