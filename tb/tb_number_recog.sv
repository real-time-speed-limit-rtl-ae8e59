// tb_number_recog: feeds candidate windows row by row and checks the
// histogram features (position bins, area) against the direct reference,
// then the table lookup: a table entry made from one window's reference
// features must match that window and give its speed.
module tb_number_recog;
  import slt_pkg::*;
  import tb_ref_pkg::*;
  localparam int MAXM = 50, NCLS = 8;
  logic clk = 0, rst_n = 0, start = 0, row_valid = 0, cfg_we = 0;
  logic [2:0] cfg_idx = '0;
  nr_class_t cfg_data = '0;
  logic [4:0] size_idx = '0;
  logic [MAXM+1:0] row = '1;
  logic done, match;
  logic [7:0] speed;
  logic [2:0] row_max_bin, row_min_bin, col_max_bin, col_min_bin;
  logic [11:0] area;
  int checks = 0, failures = 0, n_match = 0, n_miss = 0;
  nr_class_t tbl [NCLS];

  number_recog #(.NCLS(NCLS)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(int k, nr_class_t c);
    @(negedge clk);
    cfg_we = 1; cfg_idx = 3'(k); cfg_data = c; tbl[k] = c;
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic nr_class_t from_feat(nr_feat_t f, int spd);
    nr_class_t c;
    int a64;
    a64 = f.area * 64 / (f.roi * f.roi);
    c.valid = 1; c.speed = 8'(spd);
    c.row_max_bin = 3'(f.rmax); c.row_min_bin = 3'(f.rmin);
    c.col_max_bin = 3'(f.cmax); c.col_min_bin = 3'(f.cmin);
    c.area_lo = 6'(a64 > 2 ? a64 - 2 : 0); c.area_hi = 6'(a64 + 3 > 63 ? 63 : a64 + 3);
    return c;
  endfunction

  task automatic run_window(int x0, int y0, int idx);
    int m, es;
    bit em;
    nr_feat_t f;
    m = SW_SIZES[idx];
    @(negedge clk);
    start = 1; size_idx = 5'(idx);
    @(negedge clk);
    start = 0;
    for (int r = -1; r <= m; r++) begin
      while (($urandom % 4) == 0) begin row_valid = 0; @(negedge clk); end
      row_valid = 1;
      row = '1;
      for (int i = 0; i < m + 2; i++) row[i] = getb(x0 - 1 + i, y0 + r);
      @(negedge clk);
    end
    row_valid = 0;
    while (!done) @(negedge clk);
    f = nr_ref(x0, y0, m);
    checks += 5;
    if (int'(row_max_bin) != f.rmax || int'(row_min_bin) != f.rmin) begin
      failures++; $display("m=%0d row bins %0d %0d exp %0d %0d", m, row_max_bin, row_min_bin, f.rmax, f.rmin); end
    if (int'(col_max_bin) != f.cmax || int'(col_min_bin) != f.cmin) begin
      failures++; $display("m=%0d col bins %0d %0d exp %0d %0d", m, col_max_bin, col_min_bin, f.cmax, f.cmin); end
    if (int'(area) != f.area) begin failures++; $display("m=%0d area %0d exp %0d", m, area, f.area); end
    em = 0; es = 0;
    for (int k = 0; k < NCLS; k++)
      if (!em && tbl[k].valid && int'(tbl[k].row_max_bin) == f.rmax && int'(tbl[k].row_min_bin) == f.rmin &&
          int'(tbl[k].col_max_bin) == f.cmax && int'(tbl[k].col_min_bin) == f.cmin &&
          f.area * 64 >= int'(tbl[k].area_lo) * f.roi * f.roi &&
          f.area * 64 <= int'(tbl[k].area_hi) * f.roi * f.roi) begin
        em = 1; es = int'(tbl[k].speed);
      end
    if (match != em) begin failures++; $display("m=%0d match %0d exp %0d", m, match, em); end
    if (em && int'(speed) != es) begin failures++; $display("speed %0d exp %0d", speed, es); end
    if (em) n_match++; else n_miss++;
  endtask

  initial begin
    for (int k = 0; k < NCLS; k++) tbl[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // features of a 30x30 sign, loaded as class 5 (speed 60)
    make_image(44, 44, 6, 6, 30, 0, 20);
    binarize(110);
    load(5, from_feat(nr_ref(6, 6, 30), 60));
    begin
      nr_class_t other;
      other = from_feat(nr_ref(6, 6, 30), 80);
      other.row_max_bin = other.row_max_bin + 3'd3;
      load(1, other);
    end
    for (int idx = 0; idx < NUM_SW; idx++) begin
      int m;
      m = SW_SIZES[idx];
      make_image(m + 14, m + 14, 6, 6, m, 0, 20);
      binarize(110);
      run_window(6, 6, idx);
      run_window(5, 8, idx);
    end
    iw = 60; ih = 60;
    for (int y = 0; y < 60; y++) for (int x = 0; x < 60; x++) bimg[y][x] = 1'($urandom);
    for (int idx = 0; idx < NUM_SW; idx += 4) run_window(2, 3, idx);
    checks++;
    if (n_match == 0 || n_miss == 0) begin failures++; $display("coverage %0d %0d", n_match, n_miss); end
    $display("matched %0d, not matched %0d", n_match, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
