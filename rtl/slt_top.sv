// slt_top: real-time speed limit sign detector and recognizer for 8-bit
// grayscale video, one pixel per clock.
//
// Two-stage frame pipeline:
//   RPM stage - the (optionally down-sampled or de-interlaced) pixel
//     stream goes through the line FIFOs of column_buffer; every clock one
//     50-pixel column feeds, in parallel, rectangle pattern matching (rpm:
//     all scan window sizes at once) and sign enhancement / binarization
//     (seb).  RPM writes candidate locations and scan window flags into the
//     location / SW-flag FIFO (lsw_fifo); SEB writes the binary frame into
//     the write bank of the binary image memory (bim_pingpong).
//   NR stage - speed_recog reads the candidates of the previous frame from
//     the FIFO and their binary pixels from the read bank, runs circle
//     detection and number recognition side by side and judges the speed.
// The banks swap, and the RPM frame tag advances, on the first column of
// every frame, so frame n+1 is scanned while frame n is recognised.
//
// Interface: in_valid/in_sof/in_pix is the camera stream (in_sof on the
// first pixel of a frame, in_width the camera line length).  The remaining
// inputs are run-time settings: preprocessing mode, RPM threshold and LED
// mode, region of interest for candidate windows, binarization threshold,
// circle vote range, whether the circle
// result is required, and the number feature table (cfg_*).  Results:
// det_* per accepted sign, frame_* once per recognised frame, plus status
// counters.  Results of frame n appear while frame n+1 is being received.
module slt_top
  import slt_pkg::*;
#(
  parameter int       W         = IMG_W,
  parameter int       H         = IMG_H,
  parameter int       CH        = COL_H,
  parameter int       NSW       = NUM_SW,
  parameter sw_list_t SIZES     = SW_SIZES,
  parameter int       LSW_DEPTH = 512,
  parameter int       NCLS      = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // camera stream
  input  logic                    in_valid,
  input  logic                    in_sof,
  input  logic [PIX_W-1:0]        in_pix,
  input  logic [11:0]             in_width,
  // settings
  input  pp_mode_t                pp_mode,
  input  logic                    pp_field,
  input  logic [PIX_W-1:0]        rpm_thr,
  input  logic                    led,
  input  roi_t                    roi,        // region of interest for candidates
  input  logic [PIX_W-1:0]        seb_thr,
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
  // status
  output logic                    cand_wr,        // RPM wrote a candidate entry
  output logic                    cand_done,      // NR stage finished a candidate
  output logic                    cand_circle,
  output logic                    cand_nr,
  output logic [11:0]             cand_votes,
  output logic                    bim_bank,       // bank now written by SEB
  output logic [15:0]             lsw_drop_cnt,
  output logic [15:0]             overrun_cnt,
  output logic [15:0]             stale_drop_cnt
);

  // Preprocessing.
  logic             pp_valid, pp_sof;
  logic [PIX_W-1:0] pp_pix;

  preprocess #(.IN_X_W(12)) u_pp (
    .clk, .rst_n, .mode(pp_mode), .field(pp_field), .in_width,
    .in_valid, .in_sof, .in_pix,
    .out_valid(pp_valid), .out_sof(pp_sof), .out_pix(pp_pix)
  );

  // Line FIFOs.
  logic             col_valid, col_sof;
  logic [PIX_W-1:0] col [CH];

  column_buffer #(.W(W), .CH(CH)) u_colbuf (
    .clk, .rst_n, .in_valid(pp_valid), .in_sof(pp_sof), .in_pix(pp_pix),
    .col_valid, .col_sof, .col
  );

  // RPM stage: rectangle pattern matching and sign enhancement in parallel.
  logic             rpm_wr;
  lsw_entry_t       rpm_entry;
  logic [TAG_W-1:0] wr_tag;

  rpm #(.W(W), .H(H), .CH(CH), .NSW(NSW), .SIZES(SIZES)) u_rpm (
    .clk, .rst_n, .col_valid, .col_sof, .col, .thr(rpm_thr), .led, .roi,
    .wr(rpm_wr), .entry(rpm_entry), .tag(wr_tag)
  );

  logic           seb_we, seb_bit;
  logic [X_W-1:0] seb_x;
  logic [Y_W-1:0] seb_y;

  seb #(.W(W), .H(H), .CH(CH)) u_seb (
    .clk, .rst_n, .col_valid, .col_sof, .col, .thr(seb_thr),
    .we(seb_we), .wx(seb_x), .wy(seb_y), .wbit(seb_bit)
  );

  // Stage memories.
  logic       fifo_rd, fifo_empty, fifo_full;
  lsw_entry_t fifo_data;
  logic [$clog2(LSW_DEPTH):0] fifo_count;

  lsw_fifo #(.DEPTH(LSW_DEPTH)) u_lsw (
    .clk, .rst_n, .wr_en(rpm_wr), .wr_data(rpm_entry), .rd_en(fifo_rd),
    .rd_data(fifo_data), .empty(fifo_empty), .full(fifo_full), .count(fifo_count),
    .drop_cnt(lsw_drop_cnt)
  );

  logic           bim_rd;
  logic [Y_W-1:0] bim_line;
  logic [3:0]     bim_word;
  logic [63:0]    bim_data;

  bim_pingpong #(.W(W), .H(H)) u_bim (
    .clk, .rst_n, .swap(col_valid && col_sof), .wbank(bim_bank),
    .we(seb_we), .wx(seb_x), .wy(seb_y), .wbit(seb_bit),
    .rd_en(bim_rd), .rline(bim_line), .rword(bim_word), .rdata(bim_data)
  );

  // NR stage.
  speed_recog #(.W(W), .H(H), .NSW(NSW), .SIZES(SIZES), .NCLS(NCLS)) u_sr (
    .clk, .rst_n, .wr_tag,
    .fifo_empty, .fifo_data, .fifo_rd,
    .bim_rd, .bim_line, .bim_word, .bim_data,
    .circ_lo, .circ_hi, .use_circle, .cfg_we, .cfg_idx, .cfg_data,
    .det_valid, .det_speed, .det_x, .det_y, .det_size,
    .frame_valid, .frame_speed, .frame_dets,
    .cand_done, .cand_circle, .cand_nr, .cand_votes,
    .overrun_cnt, .drop_cnt(stale_drop_cnt)
  );

  assign cand_wr = rpm_wr;

endmodule
