// tb_rpm: two scan window sizes in parallel on a test image with two signs;
// the entries written must equal the list of (position, size flags)
// computed with the direct area-sum reference for every window position.
module tb_rpm;
  import slt_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 64, H = 44, CH = 24, NSW = 2;
  localparam int SZ [NSW] = '{20, 24};
  localparam int THR = 20;
  logic clk = 0, rst_n = 0, col_valid = 0, col_sof = 0, led = 0;
  logic [7:0] col [CH];
  logic [7:0] thr = 8'(THR);
  roi_t roi = '{x0: '0, y0: '0, x1: X_W'(W - 1), y1: Y_W'(H - 1)};
  logic wr;
  lsw_entry_t entry;
  logic [TAG_W-1:0] tag;
  int checks = 0, failures = 0, nwr = 0, multi = 0;
  lsw_entry_t expq [$];

  rpm #(.W(W), .H(H), .CH(CH), .NSW(NSW), .SIZES('{0: 20, 1: 24, default: 0})) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && wr) begin
    checks++; nwr++;
    if (expq.size() == 0) begin failures++; $display("unexpected entry %0d,%0d", entry.x, entry.y); end
    else begin
      lsw_entry_t e;
      e = expq.pop_front();
      if (entry != e) begin
        failures++;
        $display("entry x=%0d y=%0d f=%b exp x=%0d y=%0d f=%b",
                 entry.x, entry.y, entry.flags[1:0], e.x, e.y, e.flags[1:0]);
      end
    end
  end

  initial begin
    for (int j = 0; j < CH; j++) col[j] = '0;
    make_image(W, H, 4, 6, 21, 0, 8);
    // second, larger sign on the right
    begin
      int tmp [44][64];
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) tmp[y][x] = int'(img[y][x]);
      make_image(W, H, 36, 14, 24, 0, 8);
      for (int y = 0; y < H; y++) for (int x = 0; x < 32; x++) img[y][x] = tmp[y][x];
    end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        lsw_entry_t e;
        e = '0; e.x = X_W'(x); e.y = Y_W'(y); e.tag = 1;
        for (int i = 0; i < NSW; i++) e.flags[i] = rpm_ref(x, y, SZ[i], THR, 0);
        if (e.flags != 0) expq.push_back(e);
        if (e.flags[1:0] == 2'b11) multi++;
      end
    $display("expected entries: %0d", expq.size());
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        while (($urandom % 4) == 0) begin col_valid = 0; @(negedge clk); end
        col_valid = 1; col_sof = (x == 0 && y == 0);
        for (int j = 0; j < CH; j++)
          col[j] = (y - (CH - 1 - j) >= 0) ? 8'(img[y - (CH - 1 - j)][x]) : 8'd0;
      end
    @(negedge clk); col_valid = 0; col_sof = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (expq.size() != 0 || nwr == 0) begin failures++; $display("missing %0d entries, %0d written", expq.size(), nwr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
