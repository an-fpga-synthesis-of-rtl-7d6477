// ov7670_capture: receives one frame from the OV7670 camera and writes it to
// the image buffer. The camera runs in RGB444 ("xR GB") QVGA mode: per pixel
// it sends two bytes while HREF is high, the first carrying red in its low
// nibble, the second green and blue. Camera signals are synchronised into
// clk_b with two flip-flops and sampled on the detected rising edge of PCLK,
// so PCLK must be at most a quarter of clk_b (the controller sets the camera
// to XCLK/2 = 12.5 MHz against a 100 MHz clk_b).
// A `start` pulse arms the unit; it waits for the end of the current frame
// (VSYNC high), captures from the fall of VSYNC to its next rise, writing
// pixel n (row-major, 320 per line) at address n, then pulses `done`.
// The camera interface and the 12-bit 320x240 capture are the published
// design's; the byte order and the oversampling scheme are this design's.
module ov7670_capture
  import fd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              done,
  output logic              busy,
  input  logic              cam_pclk,
  input  logic              cam_vsync,
  input  logic              cam_href,
  input  logic [7:0]        cam_d,
  output logic              we,
  output logic [IMG_AW-1:0] addr,
  output logic [PIX_W-1:0]  wdata
);
  localparam int unsigned NPIX = IMG_W * IMG_H;

  logic [2:0] pclk_s;
  logic [1:0] vs_s, hr_s;
  logic [7:0] d_s1, d_s2;
  always_ff @(posedge clk) begin
    pclk_s <= {pclk_s[1:0], cam_pclk};
    vs_s   <= {vs_s[0], cam_vsync};
    hr_s   <= {hr_s[0], cam_href};
    d_s1   <= cam_d;
    d_s2   <= d_s1;
  end
  logic pclk_rise;
  assign pclk_rise = pclk_s[1] && !pclk_s[2];

  typedef enum logic [1:0] {K_IDLE, K_WAIT_HI, K_WAIT_LO, K_CAP} cap_e;
  cap_e        state;
  logic        second;
  logic [3:0]  red;
  logic [IMG_AW-1:0] count;

  assign busy = (state != K_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= K_IDLE;
      second <= 1'b0;
      red    <= '0;
      count  <= '0;
      we     <= 1'b0;
      addr   <= '0;
      wdata  <= '0;
      done   <= 1'b0;
    end else begin
      we   <= 1'b0;
      done <= 1'b0;
      unique case (state)
        K_IDLE:    if (start) state <= K_WAIT_HI;
        K_WAIT_HI: if (vs_s[1]) state <= K_WAIT_LO;
        K_WAIT_LO: if (!vs_s[1]) begin
          count  <= '0;
          second <= 1'b0;
          state  <= K_CAP;
        end
        K_CAP: begin
          if (vs_s[1]) begin
            done  <= 1'b1;
            state <= K_IDLE;
          end else if (!hr_s[1]) begin
            second <= 1'b0;
          end else if (pclk_rise) begin
            if (!second) begin
              red    <= d_s2[3:0];
              second <= 1'b1;
            end else begin
              second <= 1'b0;
              if (count < IMG_AW'(NPIX)) begin
                we    <= 1'b1;
                addr  <= count;
                wdata <= {red, d_s2};
                count <= count + 1'b1;
              end
            end
          end
        end
        default: state <= K_IDLE;
      endcase
    end
  end
endmodule
