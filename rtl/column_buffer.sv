// column_buffer: line FIFOs that turn the raster pixel stream into one
// vertical column of COL_H pixels per accepted pixel.
//
// When pixel (x,y) arrives, the column holds pixels (x,y-COL_H+1)..(x,y):
// col[COL_H-1] is the new pixel and col[j] the pixel COL_H-1-j lines above.
// The COL_H-1 older lines are kept in COL_H-1 line memories of IMG_W pixels,
// all addressed by the current column, so each memory behaves as a FIFO of
// one line length (the cascade of 640-entry FIFOs of the published design).
// Each memory is read and written once per pixel (read-before-write), which
// maps onto block or LUT RAM.
//
// Timing: col/col_valid/col_sof are registered, one clock after in_valid.  in_sof
// restarts the column address; lines above the top of the frame hold
// whatever the previous frame left there, so windows reaching above line 0
// must be ignored downstream.
module column_buffer
  import slt_pkg::*;
#(
  parameter int W  = IMG_W,   // pixels per line
  parameter int CH = COL_H    // pixels per column
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_sof,
  input  logic [PIX_W-1:0] in_pix,
  output logic             col_valid,
  output logic             col_sof,     // column of the first pixel of a frame
  output logic [PIX_W-1:0] col [CH]
);

  localparam int AW = $clog2(W);

  logic [PIX_W-1:0] lines [CH-1][W];
  logic [AW-1:0]    addr, cur_addr;

  assign cur_addr = in_sof ? '0 : addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr      <= '0;
      col_valid <= 1'b0;
      col_sof   <= 1'b0;
    end else begin
      col_valid <= in_valid;
      col_sof   <= in_valid && in_sof;
      if (in_valid)
        addr <= (cur_addr == AW'(W - 1)) ? '0 : cur_addr + 1'b1;
    end
  end

  // Line memories: line j holds the line j+1 above the current one.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      col[CH-1] <= in_pix;
      for (int j = 0; j < CH - 1; j++) begin
        col[CH-2-j] <= lines[j][cur_addr];
        lines[j][cur_addr] <= (j == 0) ? in_pix : lines[j-1][cur_addr];
      end
    end
  end

endmodule
