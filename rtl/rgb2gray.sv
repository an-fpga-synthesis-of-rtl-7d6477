// rgb2gray: converts one 12-bit RGB444 pixel to an 8-bit gray level.
// Each 4-bit channel is widened to 8 bits by repeating the nibble
// (v * 17), then weighted with the BT.601 luma factors in 8-bit fixed point,
// Y = (77 R + 150 G + 29 B) >> 8. The weights sum to 256, so a gray input
// (R = G = B) maps to exactly v * 17. The 12-bit-in, 8-bit-out conversion is
// the published design's; the luma weights are this design's choice.
// Purely combinational.
module rgb2gray (
  input  logic [11:0] rgb,    // {R[3:0], G[3:0], B[3:0]}
  output logic [7:0]  gray
);
  logic [7:0]  r8, g8, b8;
  logic [15:0] y;

  always_comb begin
    r8   = {rgb[11:8], rgb[11:8]};
    g8   = {rgb[7:4],  rgb[7:4]};
    b8   = {rgb[3:0],  rgb[3:0]};
    y    = 16'(8'd77 * r8) + 16'(8'd150 * g8) + 16'(8'd29 * b8);
    gray = y[15:8];
  end
endmodule
