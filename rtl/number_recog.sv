// number_recog: speed number recognition (NR) by block histogram features.
//
// The region of interest (ROI) is the centre of the candidate window,
// rows and columns q .. m-q-1 with q = m/4 (side L = m - 2q), where the
// digits of a round speed sign lie.  While the window rows stream in, NR
// counts black pixels per ROI row (row histogram), per ROI column (column
// histogram) and in total (area).  At the end of the window it extracts the
// features the source names for telling the numbers apart: the position of
// the maximum and the minimum of each histogram and the area.  Positions
// are normalised to eighths of the ROI side (bin = 8*pos/L, computed with a
// reciprocal constant per size), the area to 1/64 of the ROI.  They are
// compared with a table of predefined features, one entry per speed value,
// loaded through the cfg port; the first valid entry whose four position
// bins are equal and whose area range contains the area gives the speed.
// The feature set is the published one; the ROI, the normalisation, the
// table format and the matching rule are this design's choices, since the
// source refers elsewhere for them and gives no feature values.
//
// Interface: same row stream and start/size_idx as circle_detect (the two
// run side by side on shared input).  done pulses two clocks after the last
// row with match/speed and the features valid until the next start.
module number_recog
  import slt_pkg::*;
#(
  parameter int       MAXM  = MAX_SW,
  parameter int       NSW   = NUM_SW,
  parameter sw_list_t SIZES = SW_SIZES,
  parameter int       NCLS  = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cfg_we,
  input  logic [$clog2(NCLS)-1:0] cfg_idx,
  input  nr_class_t               cfg_data,
  input  logic                    start,
  input  logic [4:0]              size_idx,
  input  logic                    row_valid,
  input  logic [MAXM+1:0]         row,
  output logic                    done,
  output logic                    match,
  output logic [7:0]              speed,
  output logic [2:0]              row_max_bin,
  output logic [2:0]              row_min_bin,
  output logic [2:0]              col_max_bin,
  output logic [2:0]              col_min_bin,
  output logic [11:0]             area
);

  nr_class_t   table_q [NCLS];
  logic [MAXM+1:0] r_mid;
  logic [6:0]  ri, m, q, roi;
  logic [16:0] recip;                 // ceil(2^16 / L)
  logic [6:0]  colh [MAXM];
  logic [6:0]  rmax_v, rmin_v, rmax_p, rmin_p;
  logic [11:0] acc;
  logic        fin;
  logic [6:0]  rr, row_cnt;
  logic        in_roi_row;

  function automatic logic [6:0] size_of(input logic [4:0] idx);
    logic [6:0] s;
    s = 7'(SIZES[0]);
    for (int i = 0; i < NSW; i++) if (int'(idx) == i) s = 7'(SIZES[i]);
    return s;
  endfunction

  function automatic logic [16:0] recip_of(input logic [4:0] idx);
    int l;
    l = int'(size_of(idx)) - 2 * (int'(size_of(idx)) / 4);
    return 17'((65536 + l - 1) / l);
  endfunction

  function automatic logic [2:0] to_bin(input logic [6:0] pos, input logic [16:0] rcp);
    logic [26:0] p;
    p = 27'(pos) * 27'd8 * 27'(rcp);
    return p[18:16];
  endfunction

  // Row being evaluated is window row rr = ri - 2 (same alignment as CD).
  assign rr = ri - 7'd2;
  assign in_roi_row = (rr >= q) && (rr < m - q) && (ri >= 7'd2);

  always_comb begin
    row_cnt = '0;
    for (int c = 0; c < MAXM; c++)
      if (7'(c) >= q && 7'(c) < m - q) row_cnt += 7'(!r_mid[c + 1]);
  end

  // End-of-window features.
  logic [6:0]  cmax_v, cmin_v, cmax_p, cmin_p;
  logic        hit;
  logic [7:0]  hit_speed;
  logic [2:0]  b_rmax, b_rmin, b_cmax, b_cmin;
  logic [19:0] area64, roi2;

  always_comb begin
    cmax_v = '0; cmin_v = '1; cmax_p = '0; cmin_p = '0;
    for (int c = 0; c < MAXM; c++) begin
      if (7'(c) >= q && 7'(c) < m - q) begin
        if (colh[c] > cmax_v || 7'(c) == q) begin cmax_v = colh[c]; cmax_p = 7'(c) - q; end
        if (colh[c] < cmin_v || 7'(c) == q) begin cmin_v = colh[c]; cmin_p = 7'(c) - q; end
      end
    end
    b_rmax = to_bin(rmax_p, recip);
    b_rmin = to_bin(rmin_p, recip);
    b_cmax = to_bin(cmax_p, recip);
    b_cmin = to_bin(cmin_p, recip);
    area64 = 20'(acc) * 20'd64;
    roi2   = 20'(roi) * 20'(roi);
    hit = 1'b0; hit_speed = '0;
    for (int k = NCLS - 1; k >= 0; k--) begin
      if (table_q[k].valid &&
          table_q[k].row_max_bin == b_rmax && table_q[k].row_min_bin == b_rmin &&
          table_q[k].col_max_bin == b_cmax && table_q[k].col_min_bin == b_cmin &&
          area64 >= 20'(table_q[k].area_lo) * roi2 &&
          area64 <= 20'(table_q[k].area_hi) * roi2) begin
        hit = 1'b1; hit_speed = table_q[k].speed;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NCLS; k++) table_q[k] <= '0;
      for (int c = 0; c < MAXM; c++) colh[c] <= '0;
      r_mid <= '1; ri <= '0; m <= '0; q <= '0; roi <= 7'd1; recip <= '0;
      rmax_v <= '0; rmin_v <= '1; rmax_p <= '0; rmin_p <= '0; acc <= '0;
      fin <= 1'b0; done <= 1'b0; match <= 1'b0; speed <= '0; area <= '0;
      row_max_bin <= '0; row_min_bin <= '0; col_max_bin <= '0; col_min_bin <= '0;
    end else begin
      if (cfg_we) table_q[cfg_idx] <= cfg_data;
      done <= 1'b0;
      fin  <= 1'b0;
      if (start) begin
        m     <= size_of(size_idx);
        q     <= 7'(int'(size_of(size_idx)) / 4);
        roi   <= 7'(int'(size_of(size_idx)) - 2 * (int'(size_of(size_idx)) / 4));
        recip <= recip_of(size_idx);
        ri    <= '0;
        acc   <= '0;
        rmax_v <= '0; rmin_v <= '1; rmax_p <= '0; rmin_p <= '0;
        for (int c = 0; c < MAXM; c++) colh[c] <= '0;
      end else if (row_valid) begin
        r_mid <= row;
        ri    <= ri + 1'b1;
        if (in_roi_row) begin
          acc <= acc + 12'(row_cnt);
          if (row_cnt > rmax_v || rr == q) begin rmax_v <= row_cnt; rmax_p <= rr - q; end
          if (row_cnt < rmin_v || rr == q) begin rmin_v <= row_cnt; rmin_p <= rr - q; end
          for (int c = 0; c < MAXM; c++)
            if (7'(c) >= q && 7'(c) < m - q) colh[c] <= colh[c] + 7'(!r_mid[c + 1]);
        end
        if (ri == m + 7'd1) fin <= 1'b1;
      end
      if (fin) begin
        done        <= 1'b1;
        match       <= hit;
        speed       <= hit_speed;
        row_max_bin <= b_rmax;
        row_min_bin <= b_rmin;
        col_max_bin <= b_cmax;
        col_min_bin <= b_cmin;
        area        <= acc;
      end
    end
  end

endmodule
