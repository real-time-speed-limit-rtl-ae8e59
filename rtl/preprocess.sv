// preprocess: optional front end that reduces a camera stream to the frame
// size the detector is built for.
//
// Modes (pp_mode_t):
//   PP_BYPASS  - every pixel is passed on.
//   PP_DOWN3   - only pixels whose column and line are both multiples of 3
//                are passed, so a 1920x1080 frame becomes 640x360.
//   PP_DEINTER - de-interlacing: only pixels on lines and columns of the
//                chosen parity (field) are passed.
// Taking every third (or every second) pixel, with no filtering, is the
// published method; the runtime mode input and the field select are this
// design's own interface.
//
// Interface: in_valid/in_sof/in_pix carry one pixel per clock in raster
// order, in_sof marking the first pixel of a frame; in_width is the camera
// line length.  Outputs are registered: a kept pixel appears one clock after
// it enters, with out_sof on the first kept pixel of the frame.
module preprocess
  import slt_pkg::*;
#(
  parameter int IN_X_W = 12        // width of the input column/line counters
) (
  input  logic              clk,
  input  logic              rst_n,
  input  pp_mode_t          mode,
  input  logic              field,     // parity kept in PP_DEINTER mode
  input  logic [IN_X_W-1:0] in_width,  // input pixels per line
  input  logic              in_valid,
  input  logic              in_sof,
  input  logic [PIX_W-1:0]  in_pix,
  output logic              out_valid,
  output logic              out_sof,
  output logic [PIX_W-1:0]  out_pix
);

  logic [IN_X_W-1:0] col, line;       // position of the incoming pixel
  logic [1:0]        col_m3, line_m3; // col mod 3, line mod 3
  logic [IN_X_W-1:0] cur_col, cur_line;
  logic [1:0]        cur_col_m3, cur_line_m3;
  logic              keep;

  // Position of the pixel now at the input (in_sof restarts the frame).
  always_comb begin
    if (in_sof) begin
      cur_col = '0; cur_line = '0; cur_col_m3 = '0; cur_line_m3 = '0;
    end else begin
      cur_col = col; cur_line = line; cur_col_m3 = col_m3; cur_line_m3 = line_m3;
    end
    unique case (mode)
      PP_DOWN3:   keep = (cur_col_m3 == 2'd0) && (cur_line_m3 == 2'd0);
      PP_DEINTER: keep = (cur_col[0] == field) && (cur_line[0] == field);
      default:    keep = 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0; line <= '0; col_m3 <= '0; line_m3 <= '0;
      out_valid <= 1'b0; out_sof <= 1'b0; out_pix <= '0;
    end else begin
      out_valid <= in_valid && keep;
      out_sof   <= in_valid && in_sof;
      if (in_valid) out_pix <= in_pix;
      if (in_valid) begin
        if (cur_col == in_width - 1'b1) begin
          col <= '0; col_m3 <= '0;
          line <= cur_line + 1'b1;
          line_m3 <= (cur_line_m3 == 2'd2) ? 2'd0 : cur_line_m3 + 2'd1;
        end else begin
          col <= cur_col + 1'b1;
          col_m3 <= (cur_col_m3 == 2'd2) ? 2'd0 : cur_col_m3 + 2'd1;
          line <= cur_line; line_m3 <= cur_line_m3;
        end
      end
    end
  end

endmodule
