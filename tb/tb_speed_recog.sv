// tb_speed_recog: the speed recognition stage with behavioural models of
// the location FIFO (a queue) and of the binary image memory read port
// (one-clock read of a binary test image).  Checks: entries of the frame
// being scanned wait, entries of the read frame are processed one window
// size at a time, stale entries are dropped, each candidate's vote count
// matches the reference, detections follow the reference decision, one
// frame result per frame, two memory reads per window line (2m+8 clocks
// per candidate) and the overrun counter.
module tb_speed_recog;
  import slt_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 128, H = 72, NCLS = 8;
  localparam int LO = 6, HI = 60;
  logic clk = 0, rst_n = 0;
  logic [TAG_W-1:0] wr_tag = '0;
  logic fifo_empty, fifo_rd;
  lsw_entry_t fifo_data;
  logic bim_rd;
  logic [Y_W-1:0] bim_line;
  logic [3:0] bim_word;
  logic [63:0] bim_data = '0;
  logic [7:0] circ_lo = 8'(LO), circ_hi = 8'(HI);
  logic use_circle = 1, cfg_we = 0;
  logic [2:0] cfg_idx = '0;
  nr_class_t cfg_data = '0;
  logic det_valid, frame_valid, cand_done, cand_circle, cand_nr;
  logic [7:0] det_speed, frame_speed;
  logic [X_W-1:0] det_x;
  logic [Y_W-1:0] det_y;
  logic [6:0] det_size;
  logic [15:0] frame_dets, overrun_cnt, drop_cnt;
  logic [11:0] cand_votes;
  int checks = 0, failures = 0, n_det = 0, n_frames = 0, n_cand = 0, last_done = -1, cyc = 0;
  lsw_entry_t q [$];
  int expc [$];        // expected candidates: packed x0,y0,m
  nr_class_t tbl0;

  speed_recog #(.W(W), .H(H), .NCLS(NCLS)) dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cyc++;

  // FIFO model (first-word fall-through)
  assign fifo_empty = (q.size() == 0);
  assign fifo_data  = fifo_empty ? '0 : q[0];
  always @(posedge clk) if (fifo_rd && q.size() > 0) void'(q.pop_front());

  // binary image memory model
  always @(posedge clk) if (bim_rd)
    for (int b = 0; b < 64; b++) bim_data[b] <= getb(int'(bim_word) * 64 + b, int'(bim_line));

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // candidate monitor
  int cur_m;
  always @(posedge clk) if (rst_n && cand_done) begin
    int e, x0, y0, m, ev;
    n_cand++;
    checks++;
    if (expc.size() == 0) begin failures++; $display("unexpected candidate"); end
    else begin
      e = expc.pop_front();
      x0 = e / 100000; y0 = (e / 100) % 1000; m = e % 100;
      ev = cd_votes(x0, y0, m);
      if (int'(cand_votes) != ev) begin failures++; $display("cand %0d,%0d m=%0d votes %0d exp %0d", x0, y0, m, cand_votes, ev); end
      if (last_done >= 0 && m == cur_m && cyc - last_done != 2 * m + 8) begin
        failures++; $display("candidate time %0d, expected %0d", cyc - last_done, 2 * m + 8);
      end
      checks++;
      cur_m = m;
    end
    last_done = cyc;
  end
  always @(posedge clk) if (rst_n && det_valid) n_det++;
  always @(posedge clk) if (rst_n && frame_valid) n_frames++;

  function automatic bit ref_det(int x0, int y0, int m);
    int ev;
    nr_feat_t f;
    ev = cd_votes(x0, y0, m);
    f = nr_ref(x0, y0, m);
    return (ev * 8 >= LO * m) && (ev * 8 <= HI * m) &&
           int'(tbl0.row_max_bin) == f.rmax && int'(tbl0.row_min_bin) == f.rmin &&
           int'(tbl0.col_max_bin) == f.cmax && int'(tbl0.col_min_bin) == f.cmin &&
           f.area * 64 >= int'(tbl0.area_lo) * f.roi * f.roi &&
           f.area * 64 <= int'(tbl0.area_hi) * f.roi * f.roi;
  endfunction

  task automatic push(int x, int y, logic [MAX_FLAGS-1:0] fl, int tg, bit expect_it);
    lsw_entry_t e;
    e = '0; e.x = X_W'(x); e.y = Y_W'(y); e.flags = fl; e.tag = TAG_W'(tg);
    q.push_back(e);
    if (expect_it)
      for (int i = 0; i < NUM_SW; i++)
        if (fl[i]) expc.push_back((x - SW_SIZES[i] + 1) * 100000 + (y - SW_SIZES[i] + 1) * 100 + SW_SIZES[i]);
  endtask

  initial begin
    int nexp;
    make_image(W, H, 40, 20, 30, 0, 20);
    binarize(110);
    // the feature class of the 30x30 sign window, speed 50
    begin
      nr_feat_t f;
      int a64;
      f = nr_ref(40, 20, 30);
      a64 = f.area * 64 / (f.roi * f.roi);
      tbl0 = '0; tbl0.valid = 1; tbl0.speed = 50;
      tbl0.row_max_bin = 3'(f.rmax); tbl0.row_min_bin = 3'(f.rmin);
      tbl0.col_max_bin = 3'(f.cmax); tbl0.col_min_bin = 3'(f.cmin);
      tbl0.area_lo = 6'(a64 - 2); tbl0.area_hi = 6'(a64 + 3);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); cfg_we = 1; cfg_idx = 0; cfg_data = tbl0; @(negedge clk); cfg_we = 0;
    // frame 1 scanned: its entries must wait
    wr_tag = 1;
    repeat (3) @(negedge clk);
    push(69, 49, 31'b1 << 6, 1, 1);                     // 30x30 on the sign
    push(70, 50, (31'b1 << 6) | (31'b1 << 5) | 31'b1, 1, 1);   // three sizes
    push(127, 71, 31'b1 << 13, 1, 1);                   // 50x50 at the frame corner
    push(49, 49, 31'b1 << 8, 1, 1);                     // 34x34 crossing a word boundary
    repeat (50) @(negedge clk);
    checks++;
    if (n_cand != 0 || q.size() != 4) begin failures++; $display("entries of the scanned frame were taken"); end
    // frame 2 starts: frame 1 is read; a frame-2 entry must wait
    wr_tag = 2;
    push(69, 49, 31'b1 << 6, 2, 0);
    nexp = 0;
    foreach (expc[i]) if (ref_det(expc[i] / 100000, (expc[i] / 100) % 1000, expc[i] % 100)) nexp++;
    while (expc.size() != 0 && cyc < 100000) @(negedge clk);
    repeat (10) @(negedge clk);
    checks += 3;
    if (n_frames != 1) begin failures++; $display("frames %0d", n_frames); end
    if (n_det != nexp || nexp == 0) begin failures++; $display("detections %0d expected %0d", n_det, nexp); end
    if (q.size() != 1) begin failures++; $display("frame-2 entry not left waiting"); end
    // frame 3 starts: the frame-2 entry is read; add a stale tag-1 entry first
    q.push_front(q[0]); q[0].tag = 1;
    push(70, 50, 31'b1 << 6, 2, 0);
    expc.push_back((69 - 29) * 100000 + (49 - 29) * 100 + 30);
    expc.push_back((70 - 29) * 100000 + (50 - 29) * 100 + 30);
    wr_tag = 3;
    // frame 4 starts before the stage finished: overrun
    repeat (40) @(negedge clk);
    wr_tag = 0;
    repeat (400) @(negedge clk);
    checks += 2;
    if (drop_cnt == 0) begin failures++; $display("stale entry not dropped"); end
    if (overrun_cnt != 1) begin failures++; $display("overrun_cnt %0d", overrun_cnt); end
    $display("candidates %0d detections %0d frames %0d", n_cand, n_det, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
