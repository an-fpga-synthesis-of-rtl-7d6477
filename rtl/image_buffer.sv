// image_buffer: the 320x240 frame store, 12 bits per pixel, as a true
// dual-port RAM with one clock per port. Port A (clk_a, the VGA clock) is read
// by the VGA driver and written by the face-box painter; port B (clk_b, the
// detector clock) is written by the camera capture and read by the integral
// image generator. Both ports are read-first with a one-cycle registered read.
// The two ports and their users follow the published block diagram; the
// read-first behaviour is this design's choice. Both ports write the same
// array from different clocks, which lint tools report as a multiply driven
// signal; that is the nature of a true dual-port RAM. Writes to the same address
// from both ports in the same instant are not arbitrated.
module image_buffer #(
  parameter int unsigned DEPTH = fd_pkg::IMG_W * fd_pkg::IMG_H,
  parameter int unsigned DW    = fd_pkg::PIX_W,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk_a,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic          clk_b,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk_a) begin
    if (a_addr < AW'(DEPTH)) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end else begin
      a_rdata <= '0;
    end
  end

  always_ff @(posedge clk_b) begin
    if (b_addr < AW'(DEPTH)) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end else begin
      b_rdata <= '0;
    end
  end
endmodule
