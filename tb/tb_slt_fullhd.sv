// tb_slt_fullhd: the full HD workload.  A 1920x1080 camera stream enters
// the detector at its default size (640x360 frames, 14 scan window sizes,
// 512-entry FIFO) with the pre-processing set to down-sampling by 3.  The
// test scene is a 640x360 image with a round and a square sign; each of its
// pixels is placed at the full HD position (3x, 3y), and the 8 other pixels
// of every 3x3 block get random values, so only a correct decimation
// reproduces the scene.  As in tb_slt_full, the expected entries,
// candidates, detections and decision are computed from the scene, and the
// result of frame 0 must arrive while frame 1 (blank) is received.  One
// full HD frame is 2,073,600 input clocks.
module tb_slt_fullhd;
  import slt_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = IMG_W, H = IMG_H;
  localparam int RTHR = 20, STHR = 110, LO = 32, HI = 44;
  localparam int SX = 120, SY = 80, SD = 40, QX = 500, QY = 270, QD = 36;
  localparam int HW = 3 * W, HH = 3 * H;   // full HD input

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0;
  logic [7:0] in_pix = '0;
  logic [11:0] in_width = 12'(HW);
  pp_mode_t pp_mode = PP_DOWN3;
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

  slt_top dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0, cyc = 0;
  int n_wr = 0, n_cand = 0, n_circ = 0, n_notcirc = 0, n_det = 0, n_fv = 0, fv_cyc = -1;
  int exp_wr = 0, exp_cand = 0, exp_det = 0, exp_speed = 0;
  nr_class_t tbl0;

  initial begin
    repeat (4400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (cand_wr) n_wr++;
      if (cand_done) begin n_cand++; if (cand_circle) n_circ++; else n_notcirc++; end
      if (det_valid) n_det++;
      if (frame_valid) begin
        n_fv++; fv_cyc = cyc;
        checks += 3;
        if (n_cand != exp_cand) begin failures++; $display("candidates %0d expected %0d", n_cand, exp_cand); end
        if (n_det != exp_det || int'(frame_dets) != exp_det) begin failures++; $display("detections %0d expected %0d", n_det, exp_det); end
        if (int'(frame_speed) != exp_speed) begin failures++; $display("speed %0d expected %0d", frame_speed, exp_speed); end
      end
    end
  end

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

  // Expected results for window positions with x in [x0,x1), y in [y0,y1).
  function automatic void region_ref(int x0, int x1, int y0, int y1, bit pick, inout int bm, inout int bx, inout int by);
    bit c;
    for (int y = y0; y < y1 && y < H; y++)
      for (int x = x0; x < x1 && x < W; x++) begin
        bit any = 0;
        for (int i = 0; i < NUM_SW; i++) begin
          int m = SW_SIZES[i];
          if (x >= m - 1 && y >= m - 1 && rpm_ref(x, y, m, RTHR, 0)) begin
            any = 1;
            if (pick) begin
              void'(ref_det(x - m + 1, y - m + 1, m, c));
              if (c && m > bm) begin bm = m; bx = x - m + 1; by = y - m + 1; end
            end else begin
              exp_cand++;
              if (ref_det(x - m + 1, y - m + 1, m, c)) begin
                exp_det++;
                if (m > bm) begin bm = m; exp_speed = int'(tbl0.speed); end
              end
            end
          end
        end
        if (any && !pick) exp_wr++;
      end
  endfunction

  task automatic send_frame();
    for (int y = 0; y < HH; y++)
      for (int x = 0; x < HW; x++) begin
        @(negedge clk);
        in_valid = 1; in_sof = (x == 0 && y == 0);
        in_pix = (x % 3 == 0 && y % 3 == 0) ? 8'(img[y / 3][x / 3]) : 8'($urandom);
      end
    @(negedge clk); in_valid = 0; in_sof = 0;
    repeat (10) @(negedge clk);
  endtask

  initial begin
    int bm, bx, by, t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // scene: round sign, then a square sign drawn over the flat background
    make_image(W, H, SX, SY, SD, 0, 0);
    begin
      int t = (QD + 7) / 8;
      for (int y = QY; y < QY + QD; y++)
        for (int x = QX; x < QX + QD; x++)
          img[y][x] = (x < QX + t || x >= QX + QD - t || y < QY + t || y >= QY + QD - t) ? 25 : 230;
    end
    binarize(STHR);
    tbl0 = '0;
    bm = 0; bx = 0; by = 0;
    region_ref(SX - 2, SX + SD + 52, SY - 2, SY + SD + 52, 1, bm, bx, by);
    if (bm > 0) begin
      nr_feat_t f;
      int a64;
      f = nr_ref(bx, by, bm);
      a64 = f.area * 64 / (f.roi * f.roi);
      tbl0.valid = 1; tbl0.speed = 40;
      tbl0.row_max_bin = 3'(f.rmax); tbl0.row_min_bin = 3'(f.rmin);
      tbl0.col_max_bin = 3'(f.cmax); tbl0.col_min_bin = 3'(f.cmin);
      tbl0.area_lo = 6'(a64 > 2 ? a64 - 2 : 0); tbl0.area_hi = 6'(a64 + 3);
    end
    bm = 0;
    region_ref(SX - 2, SX + SD + 52, SY - 2, SY + SD + 52, 0, bm, bx, by);
    region_ref(QX - 2, QX + QD + 52, QY - 2, QY + QD + 52, 0, bm, bx, by);
    $display("expected: entries %0d candidates %0d detections %0d speed %0d", exp_wr, exp_cand, exp_det, exp_speed);
    @(negedge clk); cfg_we = 1; cfg_idx = 0; cfg_data = tbl0; @(negedge clk); cfg_we = 0;
    t0 = cyc;
    send_frame();
    checks++;
    if (n_wr != exp_wr) begin failures++; $display("entries %0d expected %0d", n_wr, exp_wr); end
    make_image(W, H, 0, 0, 0, 0, 0);
    t1 = cyc;
    send_frame();
    $display("frame 0 scanned in %0d clocks; result %0d clocks into frame 1", t1 - t0, fv_cyc - t1);
    $display("entries %0d candidates %0d circles %0d/%0d detections %0d speed %0d",
             n_wr, n_cand, n_circ, n_notcirc, n_det, frame_speed);
    checks += 5;
    if (n_fv != 1) begin failures++; $display("frame results %0d", n_fv); end
    if (fv_cyc < t1 || fv_cyc > t1 + HW * HH) begin failures++; $display("result not within the next frame"); end
    if (n_det == 0 || n_circ == 0 || n_notcirc == 0) begin failures++; $display("coverage"); end
    if (lsw_drop_cnt != 0 || overrun_cnt != 0) begin failures++; $display("drops or overrun"); end
    if (t1 - t0 > HW * HH + 20) begin failures++; $display("frame took %0d clocks", t1 - t0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
