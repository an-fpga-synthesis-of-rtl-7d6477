// tb_ii_buffer: fills the whole strip buffer (including the padding columns
// read by the last chunks) through port A with random words, then reads every
// (row, block) chunk through port B and random words through port A, and
// compares with a model. Checks that port B chunk word j is column 16*blk+j.
module tb_ii_buffer;
  import fd_pkg::*;
  localparam int ROWS = WIN + 1, COLS = IMG_W + 1, CW = $clog2(COLS + CHUNK);
  localparam int NBLK = (COLS + 15) / 16;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [4:0]  a_row = 0, b_row = 0;
  logic [CW-1:0] a_col = 0;
  logic        a_we = 0;
  logic [II_W-1:0] a_wdata = 0, a_rdata;
  logic [CW-5:0] b_blk = 0;
  logic [CHUNK-1:0][II_W-1:0] b_rdata;
  logic [II_W-1:0] model [ROWS][NBLK*16 + 16];
  int checks = 0, failures = 0;

  ii_buffer dut (.*);

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < NBLK*16 + 16; c++) begin
        @(negedge clk);
        a_we = 1; a_row = 5'(r); a_col = CW'(c); a_wdata = II_W'($urandom);
        model[r][c] = a_wdata;
      end
    @(negedge clk) a_we = 0;
    for (int r = 0; r < ROWS; r++)
      for (int b = 0; b < NBLK; b++) begin
        @(negedge clk) begin b_row = 5'(r); b_blk = (CW-4)'(b); end
        @(negedge clk);
        for (int j = 0; j < CHUNK; j++) begin
          checks++;
          if (b_rdata[j] !== model[r][16*b + j]) begin
            failures++;
            if (failures < 10) $display("B r=%0d blk=%0d j=%0d got %h exp %h", r, b, j, b_rdata[j], model[r][16*b+j]);
          end
        end
      end
    for (int n = 0; n < 500; n++) begin
      int r = $urandom_range(ROWS - 1), c = $urandom_range(COLS - 1);
      @(negedge clk) begin a_row = 5'(r); a_col = CW'(c); end
      @(negedge clk);
      checks++;
      if (a_rdata !== model[r][c]) begin
        failures++;
        if (failures < 10) $display("A r=%0d c=%0d got %h exp %h", r, c, a_rdata, model[r][c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
