// speed_recog: the second pipeline stage (speed recognition).
//
// It works on the frame the RPM stage finished last, while the RPM stage
// scans the next one.  Entries of the location / SW-flag FIFO carry a frame
// tag: entries of the frame being read (tag == wr_tag-1) are processed,
// entries of the frame being scanned (tag == wr_tag) are left waiting, and
// older ones (left over after an overrun) are dropped.  For each entry,
// every scan window size whose flag is set is a candidate window; for each
// candidate the m+2 binary image lines around the window are read from the
// binary image memory, two 64-bit words per line, and the window row
// (with one pixel of margin on each side) is passed to circle detection
// and number recognition in parallel (they share the input).  Both report
// two clocks after the last row, and judgement combines their results.
// When no entry of the read frame is left, frame_end is signalled.  If the
// RPM stage starts a new frame before that, overrun_cnt is incremented.
//
// Processing a candidate of side m takes 2*(m+2) clocks of memory reads
// plus a few clocks of start and finish, close to the two clocks per line
// of the published estimate.  The tag scheme, the row format and the
// control are this design's choices.
module speed_recog
  import slt_pkg::*;
#(
  parameter int       W     = IMG_W,
  parameter int       H     = IMG_H,
  parameter int       NSW   = NUM_SW,
  parameter sw_list_t SIZES = SW_SIZES,
  parameter int       NCLS  = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [TAG_W-1:0]        wr_tag,       // frame tag of the RPM stage
  // LSW FIFO read side
  input  logic                    fifo_empty,
  input  lsw_entry_t              fifo_data,
  output logic                    fifo_rd,
  // binary image memory read port (read bank)
  output logic                    bim_rd,
  output logic [Y_W-1:0]          bim_line,
  output logic [3:0]              bim_word,
  input  logic [63:0]             bim_data,
  // settings
  input  logic [7:0]              circ_lo,
  input  logic [7:0]              circ_hi,
  input  logic                    use_circle,
  input  logic                    cfg_we,
  input  logic [$clog2(NCLS)-1:0] cfg_idx,
  input  nr_class_t               cfg_data,
  // results
  output logic                    det_valid,
  output logic [7:0]              det_speed,
  output logic [X_W-1:0]          det_x,
  output logic [Y_W-1:0]          det_y,
  output logic [6:0]              det_size,
  output logic                    frame_valid,
  output logic [7:0]              frame_speed,
  output logic [15:0]             frame_dets,
  output logic                    cand_done,    // one candidate finished
  output logic                    cand_circle,  // its CD result
  output logic                    cand_nr,      // its NR result
  output logic [11:0]             cand_votes,   // its CD vote count
  output logic [15:0]             overrun_cnt,
  output logic [15:0]             drop_cnt
);

  localparam int WPL  = (W + 63) / 64;
  localparam int MAXM = MAX_SW;

  typedef enum logic [2:0] {S_IDLE, S_SELECT, S_READ, S_FLUSH, S_WAIT} state_t;
  state_t state;

  logic [TAG_W-1:0] rd_tag, tag_q;
  logic             rd_done, seen_frame;
  logic [MAX_FLAGS-1:0] flags;
  logic [X_W-1:0]   ex;
  logic [Y_W-1:0]   ey;
  logic [6:0]       m;
  logic signed [11:0] xs;              // first column read: x0 - 1
  logic signed [10:0] ys;              // first line read:   y0 - 1
  logic [6:0]       ri;                // row being read
  logic             phase;
  logic [63:0]      w0_q;
  logic             v0_q, v1_q, v0_p;   // words inside the frame
  logic [MAXM+1:0]  row;
  logic             row_valid, start;
  logic             cd_done, cd_circle, nr_done, nr_match;
  logic [7:0]       nr_speed;
  logic [6:0]       cand_size;

  assign rd_tag = wr_tag - 1'b1;

  function automatic logic [6:0] size_of(input logic [4:0] idx);
    logic [6:0] s;
    s = 7'(SIZES[0]);
    for (int i = 0; i < NSW; i++) if (int'(idx) == i) s = 7'(SIZES[i]);
    return s;
  endfunction

  function automatic logic [4:0] lowest(input logic [MAX_FLAGS-1:0] f);
    for (int i = 0; i < MAX_FLAGS; i++) if (f[i]) return 5'(i);
    return '0;
  endfunction

  // Address of the words of the current row.
  logic signed [11:0] wsel0;
  logic signed [11:0] line_s;
  logic               line_ok;
  logic [5:0]         sh;
  assign wsel0   = xs >>> 6;
  assign line_s  = 12'(ys) + 12'(ri);
  assign line_ok = (line_s >= 0) && (line_s < 12'(H));
  assign sh      = 6'(xs - (wsel0 <<< 6));

  // Row assembly from the two words of the previous row.
  logic [127:0] pair;
  always_comb begin
    pair = {v1_q ? bim_data : 64'hFFFF_FFFF_FFFF_FFFF, v0_p ? w0_q : 64'hFFFF_FFFF_FFFF_FFFF};
    row  = (MAXM+2)'(pair >> sh);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; tag_q <= '0; rd_done <= 1'b1; seen_frame <= 1'b0;
      flags <= '0; ex <= '0; ey <= '0; m <= '0; xs <= '0; ys <= '0;
      ri <= '0; phase <= 1'b0; w0_q <= '0; v0_q <= 1'b0; v1_q <= 1'b0;
      v0_p <= 1'b0; cand_size <= '0;
      overrun_cnt <= '0; drop_cnt <= '0;
    end else begin
      // New frame in the RPM stage: the read frame moves on.
      tag_q <= wr_tag;
      if (wr_tag != tag_q) begin
        if (!rd_done) overrun_cnt <= overrun_cnt + 1'b1;
        rd_done    <= !seen_frame;
        seen_frame <= 1'b1;
      end else if (state == S_IDLE && !rd_done &&
                   (fifo_empty || fifo_data.tag == wr_tag)) begin
        rd_done <= 1'b1;
      end
      unique case (state)
        S_IDLE: begin
          if (!fifo_empty && fifo_data.tag != wr_tag) begin
            if (fifo_data.tag == rd_tag) begin
              flags <= fifo_data.flags; ex <= fifo_data.x; ey <= fifo_data.y;
              state <= S_SELECT;
            end else begin
              drop_cnt <= drop_cnt + 1'b1;
            end
          end
        end
        S_SELECT: begin
          if (flags == '0) state <= S_IDLE;
          else begin
            flags <= flags & (flags - 1'b1);
            m     <= size_of(lowest(flags));
            cand_size <= size_of(lowest(flags));
            xs    <= 12'(ex) - 12'(size_of(lowest(flags)));       // x0 - 1
            ys    <= 11'(ey) - 11'(size_of(lowest(flags)));       // y0 - 1
            ri    <= '0;
            phase <= 1'b0;
            state <= S_READ;
          end
        end
        S_READ: begin
          phase <= !phase;
          if (!phase) begin
            v0_q <= line_ok && (wsel0 >= 0) && (wsel0 < 12'(WPL));
          end else begin
            v1_q <= line_ok && (wsel0 + 1 < 12'(WPL));
            ri   <= ri + 1'b1;
            if (ri == m + 7'd1) state <= S_FLUSH;
          end
          if (phase) begin
            w0_q <= bim_data;      // word 0 of the row read in this pair
            v0_p <= v0_q;
          end
        end
        S_FLUSH: state <= S_WAIT;
        S_WAIT:  if (cd_done) state <= S_SELECT;
        default: state <= S_IDLE;
      endcase
    end
  end

  // FIFO pop, memory reads, row hand-over (combinational decode of state).
  always_comb begin
    fifo_rd   = (state == S_IDLE) && !fifo_empty && (fifo_data.tag != wr_tag);
    bim_rd    = (state == S_READ);
    bim_line  = line_ok ? Y_W'(line_s) : '0;
    bim_word  = (!phase) ? ((wsel0 >= 0 && wsel0 < 12'(WPL)) ? 4'(wsel0) : 4'd0)
                         : ((wsel0 + 1 < 12'(WPL)) ? 4'(wsel0 + 1) : 4'd0);
    start     = (state == S_SELECT) && (flags != '0);
    // the second word of the previous row arrives in phase 0 (or in flush)
    row_valid = ((state == S_READ) && !phase && ri != 0) || (state == S_FLUSH);
  end

  circle_detect #(.MAXM(MAXM), .NSW(NSW), .SIZES(SIZES)) u_cd (
    .clk, .rst_n, .start, .size_idx(lowest(flags)), .row_valid, .row,
    .th_lo(circ_lo), .th_hi(circ_hi), .done(cd_done), .is_circle(cd_circle), .votes(cand_votes)
  );

  number_recog #(.MAXM(MAXM), .NSW(NSW), .SIZES(SIZES), .NCLS(NCLS)) u_nr (
    .clk, .rst_n, .cfg_we, .cfg_idx, .cfg_data, .start, .size_idx(lowest(flags)),
    .row_valid, .row, .done(nr_done), .match(nr_match), .speed(nr_speed),
    .row_max_bin(), .row_min_bin(), .col_max_bin(), .col_min_bin(), .area()
  );

  judgement u_judge (
    .clk, .rst_n, .use_circle, .res_valid(cd_done && nr_done), .is_circle(cd_circle),
    .nr_match, .nr_speed, .cand_x(ex), .cand_y(ey), .cand_size,
    .frame_end(state == S_IDLE && !rd_done && wr_tag == tag_q &&
               (fifo_empty || fifo_data.tag == wr_tag)),
    .det_valid, .det_speed, .det_x, .det_y, .det_size,
    .frame_valid, .frame_speed, .frame_dets
  );

  assign cand_done   = cd_done;
  assign cand_circle = cd_circle;
  assign cand_nr     = nr_match;

endmodule
