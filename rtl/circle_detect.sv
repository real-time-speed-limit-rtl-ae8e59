// circle_detect: circle detection (CD) on the binary image of one candidate
// window, by voting on local pixel directions.
//
// The window (side m, one of the configured scan window sizes) is split into
// thirds along both axes.  In each outer ninth the pixels of a circle edge
// point toward the centre in one known direction: down-right, down,
// down-left in the upper third, right / left in the middle third, up-right,
// up, up-left in the lower third (the centre ninth is not used).  Each
// black pixel's 3x3 neighbourhood is matched against the 3x3 template of
// the direction expected where it lies; a match is one vote.  The window is
// a circle when the total vote count, relative to m, is in the range
// [th_lo/8, th_hi/8] votes per pixel of window side.
//
// Templates (1 = white, 0 = black; d is the expected direction):
//   inner edge of the ring, orthogonal d: centre and the cell behind it
//     (-d) black, the three cells on the +d side white;
//   inner edge, diagonal d: centre and -d corner black, +d corner white and
//     at least one of the two cells next to it (dx,0)/(0,dy) white;
//   outer edge of the ring: the same with +d and -d exchanged.
// The published design uses inner- and outer-circle templates of this kind
// and a range check of the vote count; the exact template cells, the
// per-side normalisation of the range and the row-parallel evaluation (one
// whole window row per input row, which keeps up with two memory reads per
// line) are this design's choices.
//
// Interface: start (with size_idx) begins a window.  Then m+2 rows arrive
// on row_valid/row, top to bottom, covering window rows -1..m; bit i of a
// row is window column i-1 (bits 0..m+1 used, pixels outside the frame must
// be given as white).  done pulses two clocks after the last row, with
// is_circle and votes valid until the next start.
module circle_detect
  import slt_pkg::*;
#(
  parameter int       MAXM  = MAX_SW,
  parameter int       NSW   = NUM_SW,
  parameter sw_list_t SIZES = SW_SIZES
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [4:0]             size_idx,
  input  logic                   row_valid,
  input  logic [MAXM+1:0]        row,
  input  logic [7:0]             th_lo,
  input  logic [7:0]             th_hi,
  output logic                   done,
  output logic                   is_circle,
  output logic [11:0]            votes
);

  logic [MAXM+1:0] r_above, r_mid;   // rows rr-1 and rr, the new row is rr+1
  logic [6:0]      ri;               // rows received so far
  logic [6:0]      m, t1, t2;        // window side and third boundaries
  logic [11:0]     acc;
  logic            fin;
  logic [MAXM-1:0] vote;
  logic [6:0]      rr;               // window row being evaluated
  logic [6:0]      row_sum;

  function automatic logic [6:0] size_of(input logic [4:0] idx);
    logic [6:0] s;
    s = 7'(SIZES[0]);
    for (int i = 0; i < NSW; i++) if (int'(idx) == i) s = 7'(SIZES[i]);
    return s;
  endfunction

  function automatic logic [1:0] third(input logic [6:0] p, input logic [6:0] b1,
                                       input logic [6:0] b2);
    return (p < b1) ? 2'd0 : (p < b2) ? 2'd1 : 2'd2;
  endfunction

  // nb[dy+1][dx+1]: 3x3 neighbourhood, dy down, dx right.
  function automatic logic dir_match(input logic nb [3][3], input dir_t d);
    int dx, dy;
    logic inner, outer;
    case (d)
      DIR_S:  begin dx =  0; dy =  1; end
      DIR_N:  begin dx =  0; dy = -1; end
      DIR_E:  begin dx =  1; dy =  0; end
      DIR_W:  begin dx = -1; dy =  0; end
      DIR_SE: begin dx =  1; dy =  1; end
      DIR_SW: begin dx = -1; dy =  1; end
      DIR_NE: begin dx =  1; dy = -1; end
      DIR_NW: begin dx = -1; dy = -1; end
      default: begin dx = 0; dy = 0; end
    endcase
    if (d == DIR_NONE) return 1'b0;
    if (nb[1][1]) return 1'b0;                       // centre must be black
    if (dx == 0 || dy == 0) begin
      // orthogonal: the side cells of the +d / -d row or column
      inner = !nb[1-dy][1-dx] &&
              nb[1+dy+(dx!=0 ? -1 : 0)][1+dx+(dy!=0 ? -1 : 0)] &&
              nb[1+dy][1+dx] &&
              nb[1+dy+(dx!=0 ? 1 : 0)][1+dx+(dy!=0 ? 1 : 0)];
      outer = !nb[1+dy][1+dx] &&
              nb[1-dy+(dx!=0 ? -1 : 0)][1-dx+(dy!=0 ? -1 : 0)] &&
              nb[1-dy][1-dx] &&
              nb[1-dy+(dx!=0 ? 1 : 0)][1-dx+(dy!=0 ? 1 : 0)];
    end else begin
      inner = !nb[1-dy][1-dx] && nb[1+dy][1+dx] && (nb[1][1+dx] || nb[1+dy][1]);
      outer = !nb[1+dy][1+dx] && nb[1-dy][1-dx] && (nb[1][1-dx] || nb[1-dy][1]);
    end
    return inner || outer;
  endfunction

  assign rr = ri - 7'd2;

  always_comb begin
    logic nb [3][3];
    for (int c = 0; c < MAXM; c++) begin
      for (int i = 0; i < 3; i++) begin
        nb[0][i] = r_above[c + i];
        nb[1][i] = r_mid[c + i];
        nb[2][i] = row[c + i];
      end
      vote[c] = (7'(c) < m) &&
                dir_match(nb, expected_dir(third(rr, t1, t2), third(7'(c), t1, t2)));
    end
    row_sum = '0;
    for (int c = 0; c < MAXM; c++) row_sum += 7'(vote[c]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_above <= '1; r_mid <= '1; ri <= '0; m <= '0; t1 <= '0; t2 <= '0;
      acc <= '0; fin <= 1'b0; done <= 1'b0; is_circle <= 1'b0; votes <= '0;
    end else begin
      done <= 1'b0;
      fin  <= 1'b0;
      if (start) begin
        m   <= size_of(size_idx);
        t1  <= 7'(int'(size_of(size_idx)) / 3);
        t2  <= 7'((2 * int'(size_of(size_idx))) / 3);
        ri  <= '0;
        acc <= '0;
      end else if (row_valid) begin
        r_above <= r_mid;
        r_mid   <= row;
        ri      <= ri + 1'b1;
        if (ri >= 7'd2) acc <= acc + 12'(row_sum);
        if (ri == m + 7'd1) fin <= 1'b1;
      end
      if (fin) begin
        done      <= 1'b1;
        votes     <= acc;
        is_circle <= (15'(acc) * 15'd8 >= 15'(th_lo) * 15'(m)) &&
                     (15'(acc) * 15'd8 <= 15'(th_hi) * 15'(m));
      end
    end
  end

endmodule
