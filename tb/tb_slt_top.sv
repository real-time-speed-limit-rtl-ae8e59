// tb_slt_top: end-to-end test of the detector on small frames (96x64, all
// 14 scan window sizes).  Test frames hold a round sign and a square sign
// on a flat background.  For every frame the testbench computes, from the
// image alone, the RPM candidate entries, the binary image, and for each
// candidate window the circle votes and number features, and from them the
// expected detections and frame decision; these are compared with what the
// pipeline reports one frame later.  Frame sequence:
//   F0      painted signs, no preprocessing
//   F1      the same image with a region of interest that leaves out the
//           square sign
//   F2      the F0 image at three times the size, down-sampled by 3
//   F3      more signs (round and square)
//   F4      LED-like (inverted) signs with LED mode on: in this scene the
//           absolute differences match at many positions, giving more
//           entries than the FIFO holds (overflow) and more candidates than
//           one frame time allows (overrun); its results are not compared
//   F5, F6  blank frames that flush the pipeline
// Each mechanism (entry write, bank swap, circle accepted and rejected,
// number match, detection, LED mode, down-sampling, region of interest,
// FIFO overflow, stage overrun) is counted and must occur at least once.
module tb_slt_top;
  import slt_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 96, H = 64, DEPTH = 128;
  localparam int RTHR = 20, STHR = 110, LO = 32, HI = 44;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0;
  logic [7:0] in_pix = '0;
  logic [11:0] in_width = 12'(W);
  pp_mode_t pp_mode = PP_BYPASS;
  logic pp_field = 0, led = 0, use_circle = 1, cfg_we = 0;
  logic [7:0] rpm_thr = 8'(RTHR), seb_thr = 8'(STHR), circ_lo = 8'(LO), circ_hi = 8'(HI);
  logic [2:0] cfg_idx = '0;
  nr_class_t cfg_data = '0;
  roi_t roi = '{x0: '0, y0: '0, x1: X_W'(W - 1), y1: Y_W'(H - 1)};
  logic det_valid, frame_valid, cand_wr, cand_done, cand_circle, cand_nr, bim_bank;
  logic [7:0] det_speed, frame_speed;
  logic [X_W-1:0] det_x;
  logic [Y_W-1:0] det_y;
  logic [6:0] det_size;
  logic [15:0] frame_dets, lsw_drop_cnt, overrun_cnt, stale_drop_cnt;
  logic [11:0] cand_votes;

  slt_top #(.W(W), .H(H), .LSW_DEPTH(DEPTH)) dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  int n_wr = 0, n_cand = 0, n_circ = 0, n_notcirc = 0, n_nr = 0, n_det = 0, n_swap = 0;
  int n_led_wr = 0, n_down_wr = 0, n_fv = 0;
  int cand_in_frame = 0, det_in_frame = 0;
  logic bank_q = 0;
  nr_class_t tbl0;

  typedef struct { int nwr; int ncand; int ndet; int speed; } fexp_t;
  fexp_t fexp [8];

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    bank_q <= bim_bank;
    if (bim_bank != bank_q) n_swap++;
    if (cand_wr) n_wr++;
    if (cand_done) begin
      n_cand++; cand_in_frame++;
      if (cand_circle) n_circ++; else n_notcirc++;
      if (cand_nr) n_nr++;
    end
    if (det_valid) begin n_det++; det_in_frame++; end
  end

  // Frame results, in order F0, F1, ...
  always @(posedge clk) if (rst_n && frame_valid) begin
    #1;
    if (n_fv <= 3) begin
      checks += 3;
      if (cand_in_frame != fexp[n_fv].ncand) begin
        failures++; $display("F%0d candidates %0d expected %0d", n_fv, cand_in_frame, fexp[n_fv].ncand); end
      if (det_in_frame != fexp[n_fv].ndet || int'(frame_dets) != fexp[n_fv].ndet) begin
        failures++; $display("F%0d detections %0d/%0d expected %0d", n_fv, det_in_frame, frame_dets, fexp[n_fv].ndet); end
      if (int'(frame_speed) != fexp[n_fv].speed) begin
        failures++; $display("F%0d speed %0d expected %0d", n_fv, frame_speed, fexp[n_fv].speed); end
    end
    $display("frame %0d: candidates %0d detections %0d speed %0d", n_fv, cand_in_frame, det_in_frame, frame_speed);
    n_fv++;
    cand_in_frame = 0; det_in_frame = 0;
  end

  // Drawing helpers on top of make_image.
  function automatic void square(int sx, int sy, int d, bit inv);
    int t = (d + 7) / 8;
    for (int y = sy; y < sy + d; y++)
      for (int x = sx; x < sx + d; x++)
        img[y][x] = (x < sx + t || x >= sx + d - t || y < sy + t || y >= sy + d - t) ? (inv ? 235 : 25) : (inv ? 20 : 230);
  endfunction

  int save [64][96];
  function automatic void scene(bit inv, bit many);
    make_image(W, H, 8, 10, 30, inv, 0);
    square(56, 30, 28, inv);
    if (many) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) save[y][x] = int'(img[y][x]);
      make_image(W, H, 58, 0, 26, inv, 0);
      for (int y = 0; y < 28; y++) for (int x = 56; x < 88; x++) save[y][x] = int'(img[y][x]);
      make_image(W, H, 30, 34, 28, inv, 0);
      for (int y = 32; y < 64; y++) for (int x = 0; x < 56; x++) if (x >= 28) save[y][x] = int'(img[y][x]);
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = save[y][x];
    end
  endfunction

  function automatic bit ref_det(int x0, int y0, int m, output bit circ);
    int ev;
    nr_feat_t f;
    ev = cd_votes(x0, y0, m);
    f = nr_ref(x0, y0, m);
    circ = (ev * 8 >= LO * m) && (ev * 8 <= HI * m);
    return circ && tbl0.valid &&
           int'(tbl0.row_max_bin) == f.rmax && int'(tbl0.row_min_bin) == f.rmin &&
           int'(tbl0.col_max_bin) == f.cmax && int'(tbl0.col_min_bin) == f.cmin &&
           f.area * 64 >= int'(tbl0.area_lo) * f.roi * f.roi &&
           f.area * 64 <= int'(tbl0.area_hi) * f.roi * f.roi;
  endfunction

  // Expected results of the current img (RPM on img, CD/NR on its binary image).
  function automatic fexp_t frame_ref(bit ledm);
    fexp_t e;
    int best;
    bit c;
    e = '{0, 0, 0, 0};
    best = 0;
    binarize(STHR);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        bit any = 0;
        for (int i = 0; i < NUM_SW; i++) begin
          int m = SW_SIZES[i];
          if (x - m + 1 >= int'(roi.x0) && x <= int'(roi.x1) && y - m + 1 >= int'(roi.y0) && y <= int'(roi.y1) &&
              rpm_ref(x, y, m, RTHR, ledm)) begin
            any = 1; e.ncand++;
            if (ref_det(x - m + 1, y - m + 1, m, c)) begin
              e.ndet++;
              if (m > best) begin best = m; e.speed = int'(tbl0.speed); end
            end
          end
        end
        if (any) e.nwr++;
      end
    return e;
  endfunction

  // Pick the number class: features of the largest circle candidate.
  function automatic void pick_class();
    int bm = 0, bx = 0, by = 0;
    bit c;
    binarize(STHR);
    tbl0 = '0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        for (int i = 0; i < NUM_SW; i++) begin
          int m = SW_SIZES[i];
          if (x >= m - 1 && y >= m - 1 && m > bm && rpm_ref(x, y, m, RTHR, 0)) begin
            void'(ref_det(x - m + 1, y - m + 1, m, c));
            if (c) begin bm = m; bx = x - m + 1; by = y - m + 1; end
          end
        end
    if (bm > 0) begin
      nr_feat_t f;
      int a64;
      f = nr_ref(bx, by, bm);
      a64 = f.area * 64 / (f.roi * f.roi);
      tbl0.valid = 1; tbl0.speed = 60;
      tbl0.row_max_bin = 3'(f.rmax); tbl0.row_min_bin = 3'(f.rmin);
      tbl0.col_max_bin = 3'(f.cmax); tbl0.col_min_bin = 3'(f.cmin);
      tbl0.area_lo = 6'(a64 > 2 ? a64 - 2 : 0); tbl0.area_hi = 6'(a64 + 3);
    end
  endfunction

  // Send the current img as one frame (scale 3: every pixel becomes a 3x3
  // block whose top-left copy carries the value, the others noise).
  task automatic send_frame(int scale);
    for (int y = 0; y < H * scale; y++)
      for (int x = 0; x < W * scale; x++) begin
        @(negedge clk);
        in_valid = 1; in_sof = (x == 0 && y == 0);
        if (x % scale == 0 && y % scale == 0) in_pix = 8'(img[y / scale][x / scale]);
        else in_pix = 8'($urandom);
      end
    @(negedge clk); in_valid = 0; in_sof = 0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    int wr0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    scene(0, 0);
    pick_class();
    checks++;
    if (!tbl0.valid) begin failures++; $display("no circle candidate in the test scene"); end
    @(negedge clk); cfg_we = 1; cfg_idx = 2; cfg_data = tbl0; @(negedge clk); cfg_we = 0;
    fexp[0] = frame_ref(0);
    // F1: same image, region of interest on the left part (drops the square sign)
    roi.x1 = X_W'(63);
    fexp[1] = frame_ref(0);
    roi.x1 = X_W'(W - 1);
    $display("painted frame: entries %0d candidates %0d detections %0d", fexp[0].nwr, fexp[0].ncand, fexp[0].ndet);
    for (int f = 0; f < 2; f++) begin
      if (f == 1) roi.x1 = X_W'(63);
      wr0 = n_wr; send_frame(1);
      roi.x1 = X_W'(W - 1);
      checks++;
      if (n_wr - wr0 != fexp[f].nwr) begin failures++; $display("F%0d entries %0d expected %0d", f, n_wr - wr0, fexp[f].nwr); end
    end
    // F2: three times larger input, down-sampled
    fexp[2] = fexp[0];
    pp_mode = PP_DOWN3; in_width = 12'(3 * W);
    wr0 = n_wr; send_frame(3);
    pp_mode = PP_BYPASS; in_width = 12'(W);
    n_down_wr = n_wr - wr0;
    checks++;
    if (n_down_wr != fexp[2].nwr) begin failures++; $display("F2 entries %0d expected %0d", n_down_wr, fexp[2].nwr); end
    // F3: crowded frame
    scene(0, 1);
    fexp[3] = frame_ref(0);
    $display("crowded frame: entries %0d candidates %0d detections %0d", fexp[3].nwr, fexp[3].ncand, fexp[3].ndet);
    wr0 = n_wr; send_frame(1);
    checks++;
    if (n_wr - wr0 != fexp[3].nwr) begin failures++; $display("F3 entries %0d expected %0d", n_wr - wr0, fexp[3].nwr); end
    // F4: LED-like signs with LED mode: more entries than the FIFO holds,
    // more candidates than one frame time allows
    scene(1, 0);
    fexp[4] = frame_ref(1);
    $display("LED frame: entries %0d candidates %0d", fexp[4].nwr, fexp[4].ncand);
    led = 1; wr0 = n_wr; send_frame(1); led = 0;
    n_led_wr = n_wr - wr0;
    checks++;
    if (n_led_wr != fexp[4].nwr) begin failures++; $display("F4 entries %0d expected %0d", n_led_wr, fexp[4].nwr); end
    // F5, F6: blank
    make_image(W, H, 0, 0, 0, 0, 0);
    send_frame(1);
    send_frame(1);
    repeat (200) @(negedge clk);
    $display("entries %0d candidates %0d circle %0d/%0d number %0d detections %0d swaps %0d",
             n_wr, n_cand, n_circ, n_notcirc, n_nr, n_det, n_swap);
    $display("LED entries %0d, down-sampled entries %0d, FIFO drops %0d, overruns %0d, stale drops %0d",
             n_led_wr, n_down_wr, lsw_drop_cnt, overrun_cnt, stale_drop_cnt);
    checks += 10;
    if (n_wr == 0)          begin failures++; $display("no entry written"); end
    if (n_swap < 6)         begin failures++; $display("bank swaps %0d", n_swap); end
    if (n_circ == 0)        begin failures++; $display("no circle accepted"); end
    if (n_notcirc == 0)     begin failures++; $display("no circle rejected"); end
    if (n_nr == 0)          begin failures++; $display("no number matched"); end
    if (n_det == 0)         begin failures++; $display("no detection"); end
    if (n_led_wr == 0)      begin failures++; $display("LED mode found nothing"); end
    if (n_down_wr == 0)     begin failures++; $display("down-sampled frame found nothing"); end
    if (lsw_drop_cnt == 0)  begin failures++; $display("FIFO never overflowed"); end
    if (overrun_cnt == 0)   begin failures++; $display("stage never overran"); end
    checks++;
    if (fexp[1].nwr >= fexp[0].nwr) begin failures++; $display("region of interest removed no entry"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
