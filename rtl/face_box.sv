// face_box: collects the detected windows of a frame and then paints a
// rectangle around each one into the image buffer, so that the VGA output
// shows the frame with its faces framed.
//
// Detector side (clk_b): `clear` empties the list; each `det_valid` appends
// the window's top-left corner (det_x, det_y). At most MAX_FACES entries are
// kept; further detections are dropped and `overflow` is set until the next
// clear. `draw_req` (a level) asks for the list to be painted; `draw_ack`
// follows it as a four-phase handshake once painting is over. The list must
// not change while draw_req is high.
//
// Painter side (clk_a, the clock of image-buffer port A): for every entry the
// outline of a WIN x WIN square (top, bottom, left and right edge, one pixel
// per clock, 4*WIN clocks per face) is written in BOX_COLOR through box_we,
// box_addr and box_data. Overlapping detections are all drawn.
//
// Drawing rectangles around all detected faces through image-buffer port A
// follows the published design; the list size, colour, handshake and drawing
// order are this design's choices.
module face_box
  import fd_pkg::*;
#(
  parameter int unsigned MAX_FACES = 128,
  parameter logic [11:0] BOX_COLOR = 12'hF00,
  parameter int unsigned IMG_WIDTH = IMG_W,
  parameter int unsigned CW        = $clog2(MAX_FACES + 1)
) (
  // detector side
  input  logic               clk_b,
  input  logic               rst_b_n,
  input  logic               clear,
  input  logic               det_valid,
  input  logic [8:0]         det_x,
  input  logic [7:0]         det_y,
  input  logic               draw_req,
  output logic               draw_ack,
  output logic [CW-1:0]      face_count,
  output logic               overflow,
  // painter side
  input  logic               clk_a,
  input  logic               rst_a_n,
  output logic               box_we,
  output logic [IMG_AW-1:0]  box_addr,
  output logic [PIX_W-1:0]   box_data
);
  localparam int unsigned IW = $clog2(MAX_FACES);

  logic [16:0] list [MAX_FACES];   // {x[8:0], y[7:0]}

  always_ff @(posedge clk_b) begin
    if (!rst_b_n) begin
      face_count <= '0;
      overflow   <= 1'b0;
    end else if (clear) begin
      face_count <= '0;
      overflow   <= 1'b0;
    end else if (det_valid) begin
      if (face_count < CW'(MAX_FACES)) face_count <= face_count + 1'b1;
      else                             overflow   <= 1'b1;
    end
  end
  always_ff @(posedge clk_b)
    if (det_valid && face_count < CW'(MAX_FACES))
      list[IW'(face_count)] <= {det_x, det_y};

  // ---- request into clk_a, acknowledge back into clk_b -----------------------
  logic req_s1, req_s2, ack_a, ack_s1;
  always_ff @(posedge clk_a) begin
    if (!rst_a_n) {req_s2, req_s1} <= '0;
    else          {req_s2, req_s1} <= {req_s1, draw_req};
  end
  always_ff @(posedge clk_b) begin
    if (!rst_b_n) {draw_ack, ack_s1} <= '0;
    else          {draw_ack, ack_s1} <= {ack_s1, ack_a};
  end

  // ---- painter ---------------------------------------------------------------
  typedef enum logic [1:0] {P_IDLE, P_DRAW, P_ACK} paint_e;
  paint_e     pstate;
  logic [CW-1:0] k;
  logic [4:0] i;
  logic [1:0] side;
  logic [8:0] fx, px;
  logic [7:0] fy, py;

  always_comb begin
    {fx, fy} = list[IW'(k)];
    unique case (side)
      2'd0: begin px = fx + 9'(i);       py = fy;                end
      2'd1: begin px = fx + 9'(i);       py = fy + 8'(WIN - 1);  end
      2'd2: begin px = fx;               py = fy + 8'(i);        end
      default: begin px = fx + 9'(WIN - 1); py = fy + 8'(i);     end
    endcase
  end

  always_ff @(posedge clk_a) begin
    if (!rst_a_n) begin
      pstate   <= P_IDLE;
      ack_a    <= 1'b0;
      k        <= '0;
      i        <= '0;
      side     <= '0;
      box_we   <= 1'b0;
      box_addr <= '0;
      box_data <= '0;
    end else begin
      box_we <= 1'b0;
      unique case (pstate)
        P_IDLE: if (req_s2) begin
          k <= '0; i <= '0; side <= '0;
          pstate <= P_DRAW;
        end
        P_DRAW: begin
          if (k == face_count) begin
            ack_a  <= 1'b1;
            pstate <= P_ACK;
          end else begin
            box_we   <= 1'b1;
            box_addr <= IMG_AW'(32'(py) * IMG_WIDTH + 32'(px));
            box_data <= BOX_COLOR;
            side     <= side + 2'd1;
            if (side == 2'd3) begin
              if (i == 5'(WIN - 1)) begin i <= '0; k <= k + 1'b1; end
              else i <= i + 5'd1;
            end
          end
        end
        P_ACK: if (!req_s2) begin
          ack_a  <= 1'b0;
          pstate <= P_IDLE;
        end
        default: pstate <= P_IDLE;
      endcase
    end
  end
endmodule
