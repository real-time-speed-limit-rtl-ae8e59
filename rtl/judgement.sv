// judgement: final decision of the speed recognition stage.
//
// For every candidate window, circle detection (CD) and number recognition
// (NR) report together (cd_done/nr_done in the same clock).  A candidate is
// accepted as a speed limit sign when NR found a speed and, with
// use_circle set, CD also found a circle: the circle result strengthens the
// decision as in the published design.  Each accepted candidate is reported
// on det_*; over a frame the largest accepted window (the nearest sign)
// wins, and at frame_end its speed is given on frame_speed (0: no sign).
// The rule for combining candidates of a frame is this design's choice.
//
// Timing: det_valid and frame_valid are registered one-clock pulses.
module judgement
  import slt_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           use_circle,
  input  logic           res_valid,      // CD and NR results of one candidate
  input  logic           is_circle,
  input  logic           nr_match,
  input  logic [7:0]     nr_speed,
  input  logic [X_W-1:0] cand_x,
  input  logic [Y_W-1:0] cand_y,
  input  logic [6:0]     cand_size,
  input  logic           frame_end,
  output logic           det_valid,
  output logic [7:0]     det_speed,
  output logic [X_W-1:0] det_x,
  output logic [Y_W-1:0] det_y,
  output logic [6:0]     det_size,
  output logic           frame_valid,
  output logic [7:0]     frame_speed,
  output logic [15:0]    frame_dets
);

  logic       accept;
  logic [6:0] best_size;
  logic [7:0] best_speed;
  logic [15:0] n_dets;

  assign accept = res_valid && nr_match && (is_circle || !use_circle);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      det_valid <= 1'b0; det_speed <= '0; det_x <= '0; det_y <= '0; det_size <= '0;
      frame_valid <= 1'b0; frame_speed <= '0; frame_dets <= '0;
      best_size <= '0; best_speed <= '0; n_dets <= '0;
    end else begin
      det_valid   <= accept;
      frame_valid <= frame_end;
      if (accept) begin
        det_speed <= nr_speed; det_x <= cand_x; det_y <= cand_y; det_size <= cand_size;
      end
      if (frame_end) begin
        frame_speed <= (accept && cand_size > best_size) ? nr_speed : best_speed;
        frame_dets  <= n_dets + 16'(accept);
        best_size <= '0; best_speed <= '0; n_dets <= '0;
      end else if (accept) begin
        n_dets <= n_dets + 1'b1;
        if (cand_size > best_size) begin best_size <= cand_size; best_speed <= nr_speed; end
      end
    end
  end

endmodule
