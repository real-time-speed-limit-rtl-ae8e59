// rpm_controller: position counters and result writer of the RPM stage.
//
// It counts the column (col_cnt) and line (line_cnt) of every column the
// scan windows accept, and one clock later collects the match flags of all
// scan window sizes.  A flag only counts when its window lies completely
// inside the frame (x >= M-1 and y >= M-1) and inside the region of
// interest roi (x-M+1 >= roi.x0, x <= roi.x1, y-M+1 >= roi.y0,
// y <= roi.y1).  If any flag is left, one entry {frame tag, flags, y, x}
// is written to the location / SW-flag FIFO (wr).
// The counters and the flag collection are what the published controller
// holds, and restricting candidates to the image area where signs appear
// follows the published suggestion for cutting the work of the second
// stage; the edge masking, the rectangular form of the region and the
// 2-bit frame tag (incremented at every frame start, so that the second
// stage can tell which frame an entry belongs to) are this design's own
// choices.
//
// The entry's spare bits and the flag bits above NSW are always zero.
//
// Timing: col_valid/col_sof come with the column; flags must be valid the
// clock after (rpm_sw provides that).  roi is read in that same clock.
// wr/entry are registered, two clocks after the column.
module rpm_controller
  import slt_pkg::*;
#(
  parameter int       W      = IMG_W,
  parameter int       H      = IMG_H,
  parameter int       NSW    = NUM_SW,
  parameter sw_list_t SIZES  = SW_SIZES
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              col_valid,
  input  logic              col_sof,
  input  logic [NSW-1:0]    flags,
  input  roi_t              roi,        // region of interest
  output logic              wr,
  output lsw_entry_t        entry,
  output logic [TAG_W-1:0]  tag         // tag of the frame being scanned
);

  logic [X_W-1:0] col_cnt, cur_x, x_now;
  logic [Y_W-1:0] line_cnt, cur_y, y_now;
  logic           pend;
  logic [NSW-1:0] masked;

  assign x_now = col_sof ? '0 : col_cnt;
  assign y_now = col_sof ? '0 : line_cnt;

  always_comb begin
    for (int i = 0; i < NSW; i++)
      masked[i] = flags[i] &&
                  (int'(cur_x) >= int'(roi.x0) + SIZES[i] - 1) && (cur_x <= roi.x1) &&
                  (int'(cur_y) >= int'(roi.y0) + SIZES[i] - 1) && (cur_y <= roi.y1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_cnt <= '0; line_cnt <= '0; cur_x <= '0; cur_y <= '0;
      pend <= 1'b0; wr <= 1'b0; entry <= '0; tag <= '0;
    end else begin
      pend <= col_valid;
      if (col_valid) begin
        if (col_sof) tag <= tag + 1'b1;
        cur_x <= x_now;
        cur_y <= y_now;
        if (int'(x_now) == W - 1) begin
          col_cnt  <= '0;
          line_cnt <= (int'(y_now) == H - 1) ? '0 : y_now + 1'b1;
        end else begin
          col_cnt  <= x_now + 1'b1;
          line_cnt <= y_now;
        end
      end
      wr <= pend && (|masked);
      if (pend) begin
        entry       <= '0;
        entry.x     <= cur_x;
        entry.y     <= cur_y;
        entry.flags <= MAX_FLAGS'(masked);
        entry.tag   <= tag;
      end
    end
  end

endmodule
