// tb_ref_pkg: reference models and test images shared by the testbenches.
//
// The models compute every result directly from the image, without the
// recursive sums, delay lines or row pipelines of the RTL:
//   rpm_ref  - the eight B/W area pairs summed pixel by pixel;
//   seb_ref  - the 3x3 [1 2 1;2 4 2;1 2 1] convolution and threshold;
//   cd_ref   - direction templates written with dot products;
//   nr_ref   - histograms and features with plain division.
// Images live in package arrays (img: grayscale, bimg: binary, 1 = white).
package tb_ref_pkg;

  localparam int MW = 640;
  localparam int MH = 390;

  int unsigned img  [MH][MW];
  bit          bimg [MH][MW];
  int          iw = 64, ih = 48;

  // Deterministic pseudo random numbers.
  int unsigned seed = 32'h1234_5678;
  function automatic int unsigned rnd();
    seed = seed * 1103515245 + 12345;
    return (seed >> 8) & 32'hFFFF;
  endfunction

  // Grayscale test image: flat background with small noise, and a round
  // sign of diameter d whose top-left corner is (sx, sy): dark ring of
  // thickness d/8, white inside, with dark "digit" bars.  inv swaps dark and
  // bright in ring and inside (LED-like sign).
  function automatic void make_image(int w, int h, int sx, int sy, int d, bit inv, int noise);
    real cx, cy, r, rad;
    int  v, rt;
    iw = w; ih = h;
    cx = sx + (d - 1) / 2.0; cy = sy + (d - 1) / 2.0; r = d / 2.0;
    rt = (d + 7) / 8;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        rad = $sqrt((x - cx) * (x - cx) + (y - cy) * (y - cy));
        v = 120;
        if (d > 0 && rad < r) begin
          if (rad >= r - rt) v = inv ? 235 : 25;     // ring
          else begin
            v = inv ? 20 : 230;                       // inside
            // two digit-like bars in the middle
            if ((x - cx) > -r / 2.2 && (x - cx) < -r / 8 && (y - cy) > -r / 2.5 && (y - cy) < r / 2.5 &&
                ((x - cx) < -r / 3 || (y - cy) < -r / 4 || (y - cy) > r / 6))
              v = inv ? 230 : 30;
            if ((x - cx) > r / 8 && (x - cx) < r / 2.2 && (y - cy) > -r / 2.5 && (y - cy) < r / 2.5 &&
                ((x - cx) < r / 4 || (x - cx) > r / 3))
              v = inv ? 230 : 30;
          end
        end
        if (noise > 0) v = v + int'(rnd() % noise) - noise / 2;
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        img[y][x] = v;
      end
  endfunction

  function automatic int area(int x0, int y0, int c0, int c1, int r0, int r1);
    int s = 0;
    for (int y = y0 + r0; y < y0 + r1; y++)
      for (int x = x0 + c0; x < x0 + c1; x++) s += int'(img[y][x]);
    return s;
  endfunction

  // RPM reference for the window with bottom-right pixel (x, y).
  function automatic bit rpm_ref(int x, int y, int m, int thr, bit led);
    int k, h, mid, x0, y0, t;
    int bs [8], ws [8];
    bit ok;
    k = m / 10; h = m / 5; mid = m / 2; x0 = x - m + 1; y0 = y - m + 1;
    if (x0 < 0 || y0 < 0) return 1'b0;
    // index 0..7 = pair 1..8; area(x0,y0, col0,col1, row0,row1)
    bs[0] = area(x0, y0, mid - h, mid,     0,     k);
    ws[0] = area(x0, y0, mid - h, mid,     k,     2 * k);
    bs[1] = area(x0, y0, mid,     mid + h, 0,     k);
    ws[1] = area(x0, y0, mid,     mid + h, k,     2 * k);
    bs[2] = area(x0, y0, m - k,   m,       mid - h, mid);
    ws[2] = area(x0, y0, m - 2*k, m - k,   mid - h, mid);
    bs[3] = area(x0, y0, m - k,   m,       mid,   mid + h);
    ws[3] = area(x0, y0, m - 2*k, m - k,   mid,   mid + h);
    bs[4] = area(x0, y0, mid,     mid + h, m - k, m);
    ws[4] = area(x0, y0, mid,     mid + h, m - 2*k, m - k);
    bs[5] = area(x0, y0, mid - h, mid,     m - k, m);
    ws[5] = area(x0, y0, mid - h, mid,     m - 2*k, m - k);
    bs[6] = area(x0, y0, 0,       k,       mid,   mid + h);
    ws[6] = area(x0, y0, k,       2 * k,   mid,   mid + h);
    bs[7] = area(x0, y0, 0,       k,       mid - h, mid);
    ws[7] = area(x0, y0, k,       2 * k,   mid - h, mid);
    t = thr * k * h;
    ok = 1'b1;
    for (int j = 0; j < 8; j++) begin
      int d;
      d = ws[j] - bs[j];
      if (led) begin if (d < 0) d = -d; end
      if (!(d > t)) ok = 1'b0;
    end
    return ok;
  endfunction

  // Binary pixel written by SEB for centre (x, y).
  function automatic bit seb_ref(int x, int y, int thr);
    int s = 0;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        s += int'(img[y + dy][x + dx]) * ((dx == 0) ? 2 : 1) * ((dy == 0) ? 2 : 1);
    return s > 16 * thr;
  endfunction

  // Fill bimg from img as SEB does (border pixels are set white).
  function automatic void binarize(int thr);
    for (int y = 0; y < ih; y++)
      for (int x = 0; x < iw; x++)
        bimg[y][x] = (x >= 1 && y >= 1 && x <= iw - 2 && y <= ih - 2) ? seb_ref(x, y, thr) : 1'b1;
  endfunction

  function automatic bit getb(int x, int y);
    if (x < 0 || y < 0 || x >= iw || y >= ih) return 1'b1;
    return bimg[y][x];
  endfunction

  // Does pixel (x, y) match direction (dx, dy) (pointing to the centre)?
  function automatic bit dir_ok(int x, int y, int dx, int dy);
    bit inner = 1'b1, outer = 1'b1;
    if (getb(x, y)) return 1'b0;
    if (dx == 0 || dy == 0) begin
      for (int py = -1; py <= 1; py++)
        for (int px = -1; px <= 1; px++) begin
          int dot = px * dx + py * dy;
          if (dot == 1  && !getb(x + px, y + py)) inner = 1'b0;
          if (dot == -1 && !getb(x + px, y + py)) outer = 1'b0;
        end
      if (getb(x - dx, y - dy)) inner = 1'b0;
      if (getb(x + dx, y + dy)) outer = 1'b0;
    end else begin
      inner = !getb(x - dx, y - dy) && getb(x + dx, y + dy) && (getb(x + dx, y) || getb(x, y + dy));
      outer = !getb(x + dx, y + dy) && getb(x - dx, y - dy) && (getb(x - dx, y) || getb(x, y - dy));
    end
    return inner || outer;
  endfunction

  // Circle vote count of the window with top-left corner (x0, y0).
  function automatic int cd_votes(int x0, int y0, int m);
    int v = 0, t1, t2, rt, ct, dx, dy;
    t1 = m / 3; t2 = (2 * m) / 3;
    for (int r = 0; r < m; r++)
      for (int c = 0; c < m; c++) begin
        rt = (r < t1) ? 0 : (r < t2) ? 1 : 2;
        ct = (c < t1) ? 0 : (c < t2) ? 1 : 2;
        if (rt == 1 && ct == 1) continue;
        dy = 1 - rt;     // upper third points down
        dx = 1 - ct;     // left third points right
        if (dir_ok(x0 + c, y0 + r, dx, dy)) v++;
      end
    return v;
  endfunction

  typedef struct {
    int rmax, rmin, cmax, cmin, area, roi;
  } nr_feat_t;

  function automatic nr_feat_t nr_ref(int x0, int y0, int m);
    nr_feat_t f;
    int q, l, best, worst, cnt;
    int colh [64];
    q = m / 4; l = m - 2 * q; f.roi = l; f.area = 0;
    for (int c = 0; c < 64; c++) colh[c] = 0;
    best = -1; worst = 1000; f.rmax = 0; f.rmin = 0;
    for (int r = 0; r < l; r++) begin
      cnt = 0;
      for (int c = 0; c < l; c++)
        if (!getb(x0 + q + c, y0 + q + r)) begin cnt++; colh[c]++; end
      f.area += cnt;
      if (cnt > best)  begin best = cnt;  f.rmax = r; end
      if (cnt < worst) begin worst = cnt; f.rmin = r; end
    end
    best = -1; worst = 1000; f.cmax = 0; f.cmin = 0;
    for (int c = 0; c < l; c++) begin
      if (colh[c] > best)  begin best = colh[c];  f.cmax = c; end
      if (colh[c] < worst) begin worst = colh[c]; f.cmin = c; end
    end
    f.rmax = f.rmax * 8 / l; f.rmin = f.rmin * 8 / l;
    f.cmax = f.cmax * 8 / l; f.cmin = f.cmin * 8 / l;
    return f;
  endfunction

endpackage
