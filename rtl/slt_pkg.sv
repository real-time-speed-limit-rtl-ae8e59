// slt_pkg: types and constants shared by the speed limit sign detector.
//
// The detector works on an 8-bit grayscale raster stream.  The default frame
// is 640x360 pixels and the scan windows (SW) are square, from 20x20 up to
// 50x50 pixels; the main configuration keeps 14 of the 31 possible sizes
// (20,21,23,24,26,28,30,32,34,36,38,42,46,50).  These numbers follow the
// published design.  The entry format of the location / SW-flag FIFO
// (64 bits wide) is this design's own packing: column, line, one flag per
// configured SW size and a 2-bit frame tag that lets the second pipeline
// stage tell frames apart.
package slt_pkg;

  localparam int PIX_W   = 8;     // grayscale pixel width
  localparam int IMG_W   = 640;   // frame width after preprocessing
  localparam int IMG_H   = 360;   // frame height after preprocessing
  localparam int COL_H   = 50;    // pixels per column fed to the scan windows
  localparam int MAX_SW  = 50;    // largest scan window side
  localparam int NUM_SW  = 14;    // number of scan window sizes built
  localparam int MAX_FLAGS = 31;  // flag field width: all sizes 20..50

  // Scan window sizes; entries from index NUM_SW on are unused (zero).
  typedef int sw_list_t [MAX_FLAGS];
  localparam sw_list_t SW_SIZES = '{20, 21, 23, 24, 26, 28, 30, 32, 34, 36, 38, 42, 46, 50,
                                    0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};

  localparam int X_W = 10;        // column coordinate width (640 -> 10 bits)
  localparam int Y_W = 9;         // line coordinate width (360 -> 9 bits)
  localparam int TAG_W = 2;       // frame tag width

  // One entry of the location and scan-window-flags FIFO (64 bits).
  typedef struct packed {
    logic [11:0]          rsvd;
    logic [TAG_W-1:0]     tag;    // frame the entry belongs to (mod 4)
    logic [MAX_FLAGS-1:0] flags;  // bit i: SW size index i matched
    logic [Y_W-1:0]       y;      // line of the bottom-right window pixel
    logic [X_W-1:0]       x;      // column of the bottom-right window pixel
  } lsw_entry_t;

  // Region of interest for candidate windows: a window is kept only if it
  // lies completely inside [x0,x1] x [y0,y1] (inclusive).  The whole frame
  // is {0, 0, W-1, H-1}.
  typedef struct packed {
    logic [X_W-1:0] x0;
    logic [Y_W-1:0] y0;
    logic [X_W-1:0] x1;
    logic [Y_W-1:0] y1;
  } roi_t;

  // Local pixel directions used by circle detection.  Each points from the
  // circle line toward the centre of the scan window.
  typedef enum logic [3:0] {
    DIR_NONE = 4'd0,
    DIR_S    = 4'd1,   // down
    DIR_N    = 4'd2,   // up
    DIR_W    = 4'd3,   // left
    DIR_E    = 4'd4,   // right
    DIR_SE   = 4'd5,   // down-right
    DIR_SW   = 4'd6,   // down-left
    DIR_NE   = 4'd7,   // up-right
    DIR_NW   = 4'd8    // up-left
  } dir_t;

  // Preprocessing modes.
  typedef enum logic [1:0] {
    PP_BYPASS    = 2'd0,  // pass every pixel
    PP_DOWN3     = 2'd1,  // keep every third column and line
    PP_DEINTER   = 2'd2   // keep odd or even lines and columns
  } pp_mode_t;

  // One entry of the number recognition feature table.
  typedef struct packed {
    logic       valid;
    logic [7:0] speed;        // speed limit reported for this class
    logic [2:0] row_max_bin;  // position of the fullest ROI row, in eighths
    logic [2:0] row_min_bin;  // position of the emptiest ROI row, in eighths
    logic [2:0] col_max_bin;  // position of the fullest ROI column, in eighths
    logic [2:0] col_min_bin;  // position of the emptiest ROI column, in eighths
    logic [5:0] area_lo;      // lower bound of black area, in 1/64 of the ROI
    logic [5:0] area_hi;      // upper bound of black area, in 1/64 of the ROI
  } nr_class_t;

  // Expected direction of a pixel by its third of the scan window
  // (row third rt, column third ct, each 0..2).
  function automatic dir_t expected_dir(input logic [1:0] rt, input logic [1:0] ct);
    case ({rt, ct})
      4'b0000: return DIR_SE;
      4'b0001: return DIR_S;
      4'b0010: return DIR_SW;
      4'b0100: return DIR_E;
      4'b0110: return DIR_W;
      4'b1000: return DIR_NE;
      4'b1001: return DIR_N;
      4'b1010: return DIR_NW;
      default: return DIR_NONE;
    endcase
  endfunction

endpackage
