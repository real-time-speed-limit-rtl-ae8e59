// tb_column_buffer: streams two frames with random gaps and checks every
// column against the stored image (lines above the frame top are skipped).
module tb_column_buffer;
  import slt_pkg::*;
  localparam int W = 9, H = 7, CH = 5;
  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0;
  logic [7:0] in_pix = 0;
  logic col_valid, col_sof;
  logic [7:0] col [CH];
  int checks = 0, failures = 0;
  int pic [H][W];
  int cur_x, cur_y;

  column_buffer #(.W(W), .CH(CH)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && col_valid) begin
    #1;
    checks++;
    if (col_sof != (cur_x == 0 && cur_y == 0)) begin failures++; $display("sof"); end
    for (int j = 0; j < CH; j++) begin
      automatic int ly = cur_y - (CH - 1 - j);
      if (ly >= 0 && int'(col[j]) != pic[ly][cur_x]) begin
        failures++;
        if (failures < 5) $display("x=%0d y=%0d j=%0d got %0d exp %0d", cur_x, cur_y, j, col[j], pic[ly][cur_x]);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          while (($urandom % 4) == 0) begin in_valid = 0; @(negedge clk); end
          pic[y][x] = int'($urandom % 256);
          in_valid = 1; in_sof = (x == 0 && y == 0); in_pix = 8'(pic[y][x]);
          cur_x = x; cur_y = y;
        end
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
