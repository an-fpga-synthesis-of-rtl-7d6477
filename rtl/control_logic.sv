// control_logic: frame-level sequencer of the detector (clk_b domain).
// One pass: on `cap_req` it clears the face list and starts the camera capture
// of one frame (`cap_sel` gives port B of the image buffer to the capture
// unit meanwhile). When the frame is in, it walks the strips of the frame,
// strip_y = 0, STEP_Y, ... , IMG_H - WIN: for each, the integral image
// generator builds the strip (ii_start .. ii_done) and then the sub-window
// array classifies every window of the strip (sw_start .. sw_done). After
// the last strip it raises `draw_req` until the face box painter acknowledges,
// then pulses `frame_done` and returns to idle, where `ready` is high.
// The published design names a control logic block but does not describe it;
// this schedule (capture, then detection, then drawing, one frame at a time)
// is this design's choice.
module control_logic
  import fd_pkg::*;
#(
  parameter int unsigned IMG_HEIGHT = IMG_H,
  parameter int unsigned STEP_Y     = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cap_req,
  output logic       ready,
  output logic       cap_start,
  output logic       cap_sel,
  input  logic       cap_done,
  output logic       face_clear,
  output logic       ii_start,
  input  logic       ii_done,
  output logic       sw_start,
  input  logic       sw_done,
  output logic [7:0] strip_y,
  output logic       draw_req,
  input  logic       draw_ack,
  output logic       frame_done
);
  typedef enum logic [2:0] {C_IDLE, C_CAP, C_II, C_SW, C_DRAW, C_DRAW_END} ctl_e;
  ctl_e state;

  localparam int unsigned LAST_Y = IMG_HEIGHT - WIN;

  assign ready    = (state == C_IDLE);
  assign cap_sel  = (state == C_CAP);
  assign draw_req = (state == C_DRAW);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= C_IDLE;
      strip_y    <= '0;
      cap_start  <= 1'b0;
      face_clear <= 1'b0;
      ii_start   <= 1'b0;
      sw_start   <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      cap_start  <= 1'b0;
      face_clear <= 1'b0;
      ii_start   <= 1'b0;
      sw_start   <= 1'b0;
      frame_done <= 1'b0;
      unique case (state)
        C_IDLE: if (cap_req) begin
          cap_start  <= 1'b1;
          face_clear <= 1'b1;
          state      <= C_CAP;
        end
        C_CAP: if (cap_done) begin
          strip_y  <= '0;
          ii_start <= 1'b1;
          state    <= C_II;
        end
        C_II: if (ii_done) begin
          sw_start <= 1'b1;
          state    <= C_SW;
        end
        C_SW: if (sw_done) begin
          if (32'(strip_y) + STEP_Y > LAST_Y) state <= C_DRAW;
          else begin
            strip_y  <= strip_y + 8'(STEP_Y);
            ii_start <= 1'b1;
            state    <= C_II;
          end
        end
        C_DRAW: if (draw_ack) state <= C_DRAW_END;
        C_DRAW_END: if (!draw_ack) begin
          frame_done <= 1'b1;
          state      <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
