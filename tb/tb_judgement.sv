// tb_judgement: random candidate results over several frames, with the
// circle requirement on and off; checks every detection pulse and the
// per-frame decision (largest accepted window) against a model.
module tb_judgement;
  import slt_pkg::*;
  logic clk = 0, rst_n = 0, use_circle = 1, res_valid = 0, is_circle = 0, nr_match = 0;
  logic [7:0] nr_speed = '0;
  logic [X_W-1:0] cand_x = '0;
  logic [Y_W-1:0] cand_y = '0;
  logic [6:0] cand_size = '0;
  logic frame_end = 0;
  logic det_valid, frame_valid;
  logic [7:0] det_speed, frame_speed;
  logic [X_W-1:0] det_x;
  logic [Y_W-1:0] det_y;
  logic [6:0] det_size;
  logic [15:0] frame_dets;
  int checks = 0, failures = 0, n_det = 0, n_rej_circle = 0;

  judgement dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best_size, best_speed, ndet;
    bit acc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      use_circle = (f % 3) != 2;
      best_size = 0; best_speed = 0; ndet = 0;
      for (int c = 0; c < 12; c++) begin
        @(negedge clk);
        res_valid = 1; is_circle = 1'($urandom); nr_match = ($urandom % 3) != 0;
        nr_speed = 8'(10 * ($urandom % 12)); cand_size = 7'(20 + $urandom % 31);
        cand_x = X_W'($urandom % 640); cand_y = Y_W'($urandom % 360);
        frame_end = (c == 11);
        acc = nr_match && (is_circle || !use_circle);
        if (nr_match && !is_circle && use_circle) n_rej_circle++;
        if (acc) begin
          ndet++;
          if (int'(cand_size) > best_size) begin best_size = int'(cand_size); best_speed = int'(nr_speed); end
        end
        @(posedge clk); #1;
        res_valid = 0; frame_end = 0;
        checks++;
        if (det_valid != acc) begin failures++; $display("det_valid"); end
        if (acc && (det_speed != nr_speed || det_x != cand_x || det_y != cand_y || det_size != cand_size)) begin
          failures++; $display("det fields");
        end
        if (acc) n_det++;
        if (c == 11) begin
          checks++;
          if (!frame_valid || int'(frame_speed) != best_speed || int'(frame_dets) != ndet) begin
            failures++; $display("frame %0d: speed %0d exp %0d dets %0d exp %0d", f, frame_speed, best_speed, frame_dets, ndet);
          end
        end else begin
          checks++;
          if (frame_valid) begin failures++; $display("spurious frame_valid"); end
        end
      end
    end
    checks++;
    if (n_det == 0 || n_rej_circle == 0) begin failures++; $display("coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
