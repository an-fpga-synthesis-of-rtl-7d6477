// ii_buffer: holds one strip of an integral image (used twice: for the sum of
// gray levels, 21-bit words, and for the sum of squared gray levels, 29-bit
// words). The strip is ROWS x COLS words, addressed by (row, column); row 0
// and column 0 hold zeros written by the generator, so a rectangle sum needs
// no boundary cases.
//
// Port A is a single-word read/write port used by the integral image
// generator (read the row above, write the new word). Port B returns a chunk
// of CHUNK = 32 consecutive words of one row, starting at column 16 * b_blk,
// so that a 16-word data mux can pick the 16 words that feed the 16 parallel
// sub-windows. To make that possible in one cycle the words are spread over
// 32 banks by column mod 32; each bank has its own read port for port B.
// Both ports have a one-cycle registered read; port A is read-first.
// The single-word port A and the 32-word port B follow the published block
// diagram; the banking is this design's choice.
module ii_buffer #(
  parameter int unsigned DW    = fd_pkg::II_W,
  parameter int unsigned ROWS  = fd_pkg::WIN + 1,
  parameter int unsigned COLS  = fd_pkg::IMG_W + 1,
  parameter int unsigned CHUNK = fd_pkg::CHUNK,
  parameter int unsigned RW    = $clog2(ROWS),
  parameter int unsigned CW    = $clog2(COLS + CHUNK),
  parameter int unsigned BW    = CW - 4
) (
  input  logic                      clk,
  // port A: one word
  input  logic [RW-1:0]             a_row,
  input  logic [CW-1:0]             a_col,
  input  logic                      a_we,
  input  logic [DW-1:0]             a_wdata,
  output logic [DW-1:0]             a_rdata,
  // port B: 32 words starting at column 16*b_blk
  input  logic [RW-1:0]             b_row,
  input  logic [BW-1:0]             b_blk,
  output logic [CHUNK-1:0][DW-1:0]  b_rdata
);
  localparam int unsigned BANK_COLS = (COLS + CHUNK - 1) / CHUNK + 1;
  localparam int unsigned BDEPTH    = ROWS * BANK_COLS;
  localparam int unsigned BAW       = $clog2(BDEPTH);
  localparam int unsigned SEL_W     = $clog2(CHUNK);

  logic [DW-1:0] bank [CHUNK][BDEPTH];
  logic [CHUNK-1:0][DW-1:0] bank_q;
  logic [SEL_W-1:0] a_bank_q;
  logic             blk_odd_q;

  // port A address split
  logic [SEL_W-1:0] a_bank;
  logic [BAW-1:0]   a_idx;
  always_comb begin
    a_bank = a_col[SEL_W-1:0];
    a_idx  = BAW'(a_row * BANK_COLS + (32'(a_col) >> SEL_W));
  end

  for (genvar k = 0; k < CHUNK; k++) begin : g_bank
    // column held by bank k inside the chunk [16*blk, 16*blk+31]
    logic [CW-1:0]  col_k;
    logic [BAW-1:0] idx_k;
    always_comb begin
      col_k = CW'({b_blk, 4'b0000}) + CW'(k[SEL_W-1:0] ^ {b_blk[0], 4'b0000});
      idx_k = BAW'(b_row * BANK_COLS + (32'(col_k) >> SEL_W));
    end
    always_ff @(posedge clk) begin
      bank_q[k] <= bank[k][idx_k];
      if (a_we && a_bank == SEL_W'(k)) bank[k][a_idx] <= a_wdata;
    end
  end

  // port A read: all banks are read at the port-A index, the addressed one kept
  logic [DW-1:0] a_word [CHUNK];
  for (genvar k = 0; k < CHUNK; k++) begin : g_aread
    always_ff @(posedge clk) a_word[k] <= bank[k][a_idx];
  end

  always_ff @(posedge clk) begin
    a_bank_q  <= a_bank;
    blk_odd_q <= b_blk[0];
  end

  always_comb begin
    a_rdata = a_word[a_bank_q];
    for (int j = 0; j < CHUNK; j++)
      b_rdata[j] = bank_q[SEL_W'(j) ^ {blk_odd_q, 4'b0000}];
  end
endmodule
