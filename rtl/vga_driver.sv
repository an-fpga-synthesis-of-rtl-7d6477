// vga_driver: 640x480 at 60 Hz VGA timing from a 25 MHz pixel clock
// (800 x 525 clocks per frame, active-low HSync and VSync) and 12-bit colour
// output. The 320x240 frame in the image buffer is shown at twice its size:
// each stored pixel covers 2x2 screen pixels, read from address
// (v/2)*320 + h/2. The address is issued from the counters; the buffer
// answers one clock later, so sync and blanking are delayed by one clock to
// match, and all outputs are registered (two clocks from counters to pins).
// Outside the visible area the colour outputs are zero. The 12-bit RGB,
// HSync/VSync and VGA address interface is the published design's; the
// 640x480 mode and the 2x scaling are this design's choices.
module vga_driver
  import fd_pkg::*;
#(
  parameter int unsigned H_VIS  = 640,
  parameter int unsigned H_FP   = 16,
  parameter int unsigned H_SYNC = 96,
  parameter int unsigned H_BP   = 48,
  parameter int unsigned V_VIS  = 480,
  parameter int unsigned V_FP   = 10,
  parameter int unsigned V_SYNC = 2,
  parameter int unsigned V_BP   = 33
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [IMG_AW-1:0] vga_addr,
  input  logic [PIX_W-1:0]  vga_data,
  output logic [3:0]        red,
  output logic [3:0]        green,
  output logic [3:0]        blue,
  output logic              hsync,
  output logic              vsync
);
  localparam int unsigned H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SYNC + V_BP;

  logic [9:0] hc, vc;
  logic       act, hs, vs, act_q, hs_q, vs_q;

  always_comb begin
    act = (32'(hc) < H_VIS) && (32'(vc) < V_VIS);
    hs  = !((32'(hc) >= H_VIS + H_FP) && (32'(hc) < H_VIS + H_FP + H_SYNC));
    vs  = !((32'(vc) >= V_VIS + V_FP) && (32'(vc) < V_VIS + V_FP + V_SYNC));
    vga_addr = act ? IMG_AW'(32'(vc >> 1) * IMG_W + 32'(hc >> 1)) : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hc <= '0; vc <= '0;
      act_q <= 1'b0; hs_q <= 1'b1; vs_q <= 1'b1;
      red <= '0; green <= '0; blue <= '0; hsync <= 1'b1; vsync <= 1'b1;
    end else begin
      if (32'(hc) == H_TOT - 1) begin
        hc <= '0;
        vc <= (32'(vc) == V_TOT - 1) ? '0 : vc + 10'd1;
      end else hc <= hc + 10'd1;
      act_q <= act; hs_q <= hs; vs_q <= vs;
      hsync <= hs_q;
      vsync <= vs_q;
      {red, green, blue} <= act_q ? vga_data : 12'h000;
    end
  end
endmodule
