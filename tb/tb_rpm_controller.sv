// tb_rpm_controller: drives two frames of columns with random match flags
// and checks the FIFO entries (position, edge-masked flags, frame tag)
// against the expected list built from the stimulus.  Frame 1 uses the
// whole frame as region of interest, frame 2 a smaller one.
module tb_rpm_controller;
  import slt_pkg::*;
  localparam int W = 30, H = 26, NSW = 2;
  localparam int SZ [NSW] = '{20, 24};
  logic clk = 0, rst_n = 0, col_valid = 0, col_sof = 0;
  logic [NSW-1:0] flags = '0;
  roi_t roi = '{x0: '0, y0: '0, x1: X_W'(W - 1), y1: Y_W'(H - 1)};
  int rx0 = 0, ry0 = 0, rx1 = W - 1, ry1 = H - 1, n_roi_cut = 0;
  logic wr;
  lsw_entry_t entry;
  logic [TAG_W-1:0] tag;
  int checks = 0, failures = 0, nwr = 0;
  lsw_entry_t expq [$];

  rpm_controller #(.W(W), .H(H), .NSW(NSW), .SIZES('{0: 20, 1: 24, default: 0})) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && wr) begin
    checks++; nwr++;
    if (expq.size() == 0) begin failures++; $display("unexpected entry"); end
    else begin
      lsw_entry_t e;
      e = expq.pop_front();
      if (entry != e) begin
        failures++;
        $display("entry x=%0d y=%0d f=%b t=%0d exp x=%0d y=%0d f=%b t=%0d",
                 entry.x, entry.y, entry.flags[1:0], entry.tag, e.x, e.y, e.flags[1:0], e.tag);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 1; f <= 2; f++) begin
      if (f == 2) begin
        rx0 = 3; ry0 = 2; rx1 = W - 4; ry1 = H - 3;
        roi = '{x0: X_W'(rx0), y0: Y_W'(ry0), x1: X_W'(rx1), y1: Y_W'(ry1)};
      end
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          lsw_entry_t e;
          logic [NSW-1:0] fl;
          @(negedge clk);
          while (($urandom % 3) == 0) begin col_valid = 0; @(negedge clk); end
          col_valid = 1; col_sof = (x == 0 && y == 0);
          @(negedge clk);
          col_valid = 0; col_sof = 0;
          fl = NSW'($urandom % 4);
          if (($urandom % 4) != 0) fl = '0;
          flags = fl;                       // flags valid the clock after the column
          e = '0; e.x = X_W'(x); e.y = Y_W'(y); e.tag = TAG_W'(f);
          for (int i = 0; i < NSW; i++) begin
            e.flags[i] = fl[i] && x - SZ[i] + 1 >= rx0 && x <= rx1 && y - SZ[i] + 1 >= ry0 && y <= ry1;
            if (fl[i] && x >= SZ[i] - 1 && y >= SZ[i] - 1 && !e.flags[i]) n_roi_cut++;
          end
          if (e.flags != 0) expq.push_back(e);
        end
    end
    repeat (4) @(negedge clk);
    checks++;
    if (expq.size() != 0 || nwr == 0) begin failures++; $display("missing %0d entries", expq.size()); end
    checks++;
    if (n_roi_cut == 0) begin failures++; $display("region of interest never removed a flag"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
