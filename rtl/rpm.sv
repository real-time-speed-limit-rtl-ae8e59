// rpm: the complete rectangle pattern matching stage.
//
// One rpm_sw per configured scan window size works on the same pixel column
// in the same clock, so every window size is tested at every pixel position
// of the raster scan with no extra time (one pixel per clock).  The
// rpm_controller collects their flags and emits one location / SW-flag
// entry per position where at least one size matched.  The size list
// defaults to the 14 sizes of the main published configuration; any list
// of sizes up to the column height works.
//
// Interface: col/col_valid/col_sof from column_buffer; thr and led are the
// threshold (per pixel) and LED-sign mode of rpm_sw; roi is the region of
// interest of rpm_controller.  wr/entry go to the
// LSW FIFO, two clocks after the column.
module rpm
  import slt_pkg::*;
#(
  parameter int       W     = IMG_W,
  parameter int       H     = IMG_H,
  parameter int       CH    = COL_H,
  parameter int       NSW   = NUM_SW,
  parameter sw_list_t SIZES = SW_SIZES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             col_valid,
  input  logic             col_sof,
  input  logic [PIX_W-1:0] col [CH],
  input  logic [PIX_W-1:0] thr,
  input  logic             led,
  input  roi_t             roi,
  output logic             wr,
  output lsw_entry_t       entry,
  output logic [TAG_W-1:0] tag
);

  logic [NSW-1:0] flags;

  for (genvar i = 0; i < NSW; i++) begin : g_sw
    rpm_sw #(.M(SIZES[i]), .CH(CH)) u_sw (
      .clk, .rst_n, .en(col_valid), .col, .thr, .led, .match(flags[i])
    );
  end

  rpm_controller #(.W(W), .H(H), .NSW(NSW), .SIZES(SIZES)) u_ctrl (
    .clk, .rst_n, .col_valid, .col_sof, .flags, .roi, .wr, .entry, .tag
  );

endmodule
