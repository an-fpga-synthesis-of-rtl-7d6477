// tb_ii_gen: the integral image generator with the two strip buffers and a
// behavioural image memory (one-clock read). For several strips of a random
// 320x240 RGB444 frame it checks every integral and squared-integral word,
// read back through port B, against sums computed directly from the pixels,
// and checks the strip time of (WIN+1)*(IMG_W+1) + WIN*IMG_W clocks.
module tb_ii_gen;
  import fd_pkg::*;
  localparam int CW = $clog2(IMG_W + 1 + CHUNK);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, done;
  logic [7:0] strip_y = 0;
  logic [IMG_AW-1:0] img_addr;
  logic [PIX_W-1:0]  img_rdata;
  logic [4:0] a_row, b_row = 0;
  logic [8:0] a_col;
  logic a_we;
  logic [II_W-1:0]   ii_wd, ii_rd;
  logic [IIX2_W-1:0] iix2_wd, iix2_rd;
  logic [CW-5:0] b_blk = 0;
  logic [CHUNK-1:0][II_W-1:0]   ii_chunk;
  logic [CHUNK-1:0][IIX2_W-1:0] iix2_chunk;
  logic [11:0] frame [IMG_W*IMG_H];
  int checks = 0, failures = 0;

  always_ff @(posedge clk) img_rdata <= frame[img_addr];

  ii_gen dut (.clk, .rst_n, .start, .strip_y, .done, .img_addr, .img_rdata,
              .a_row, .a_col, .a_we, .ii_wdata(ii_wd), .iix2_wdata(iix2_wd),
              .ii_rdata(ii_rd), .iix2_rdata(iix2_rd));
  ii_buffer #(.DW(II_W)) u_b1 (.clk, .a_row, .a_col, .a_we, .a_wdata(ii_wd), .a_rdata(ii_rd),
                               .b_row, .b_blk, .b_rdata(ii_chunk));
  ii_buffer #(.DW(IIX2_W)) u_b2 (.clk, .a_row, .a_col, .a_we, .a_wdata(iix2_wd), .a_rdata(iix2_rd),
                                 .b_row, .b_blk, .b_rdata(iix2_chunk));

  initial begin
    int ys [3] = '{0, 97, IMG_H - WIN};
    for (int p = 0; p < IMG_W*IMG_H; p++) begin
      frame[p] = 12'($urandom);
      fd_ref_pkg::gray[p / IMG_W][p % IMG_W] = fd_ref_pkg::gray_of(frame[p]);
    end
    // the brightest strip: all white in rows 120..143 (word-width limit)
    for (int p = 120*IMG_W; p < 144*IMG_W; p++) begin
      frame[p] = 12'hFFF;
      fd_ref_pkg::gray[p / IMG_W][p % IMG_W] = 255;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 4; n++) begin
      automatic int y = (n < 3) ? ys[n] : 120;
      automatic int cycles = 0;
      @(negedge clk) begin strip_y = 8'(y); start = 1; end
      @(negedge clk) start = 0;
      while (!done) begin @(negedge clk); cycles++; end
      checks++;
      if (cycles != (WIN+1)*(IMG_W+1) + WIN*IMG_W) begin
        failures++; $display("strip %0d took %0d clocks", y, cycles);
      end
      fd_ref_pkg::build_strip(y);
      for (int r = 0; r <= WIN; r++)
        for (int b = 0; b <= IMG_W / 16; b++) begin
          @(negedge clk) begin b_row = 5'(r); b_blk = (CW-4)'(b); end
          @(negedge clk);
          for (int j = 0; j < 16 && 16*b + j <= IMG_W; j++) begin
            checks += 2;
            if (longint'(ii_chunk[j]) != fd_ref_pkg::strip_s[r][16*b+j] ||
                longint'(iix2_chunk[j]) != fd_ref_pkg::strip_q[r][16*b+j]) begin
              failures++;
              if (failures < 10) $display("y=%0d r=%0d c=%0d got %0d/%0d exp %0d/%0d", y, r, 16*b+j,
                ii_chunk[j], iix2_chunk[j], fd_ref_pkg::strip_s[r][16*b+j], fd_ref_pkg::strip_q[r][16*b+j]);
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
