// ii_data_mux: picks NUM_SW = 16 consecutive words out of a 32-word chunk read
// from an integral image buffer, starting at word `offset` (0..15), and
// registers them. Word i of the output goes to sub-window sw[i]. Because the
// chunk starts at column 16*blk, output i is the integral value at column
// 16*blk + offset + i: the same corner of 16 windows that sit side by side.
// One instance serves the sum buffer and one the squared-sum buffer, as in the
// published block diagram. Latency one clock.
module ii_data_mux #(
  parameter int unsigned DW     = fd_pkg::II_W,
  parameter int unsigned NUM_SW = fd_pkg::NUM_SW
) (
  input  logic                         clk,
  input  logic [2*NUM_SW-1:0][DW-1:0]  chunk,
  input  logic [$clog2(NUM_SW)-1:0]    offset,
  output logic [NUM_SW-1:0][DW-1:0]    words
);
  always_ff @(posedge clk) begin
    for (int i = 0; i < NUM_SW; i++)
      words[i] <= chunk[32'(offset) + i];
  end
endmodule
