// ii_gen: builds the integral image and the squared integral image of one
// strip of the frame: WIN rows (24) by IMG_W columns (320), starting at image
// row `strip_y`. Entry S(r, c) is the sum of the gray levels of strip rows
// < r and columns < c, so row 0 and column 0 are zero; Q(r, c) is the same
// for the squared gray levels. The 21-bit and 29-bit words are just wide
// enough for a 24 x 320 strip of 8-bit pixels (1,958,400 and 499,392,000).
//
// Scan order is row by row, left to right. For each pixel the generator
// spends two clocks on the buffers' single-word port A:
//   read : image buffer address of the pixel, buffer address (r-1, c)
//   write: S(r,c) = S(r-1,c) + row_sum,  Q(r,c) = Q(r-1,c) + row_sq
// where row_sum and row_sq are running sums along the current row of the
// gray level (via rgb2gray) and of its square. Zero words of row 0 and of
// column 0 take one clock each. A strip takes
// (WIN+1)*(IMG_W+1) + WIN*IMG_W clocks (15,705 at the defaults); `done`
// pulses at the end.
//
// The use of integral and squared integral images, the 12-bit to 8-bit gray
// conversion before it, the word widths and the read-modify-write through
// port A are the published design's; the strip organisation and the two-clock
// schedule are this design's.
module ii_gen
  import fd_pkg::*;
#(
  parameter int unsigned IMG_WIDTH = IMG_W,
  parameter int unsigned ROWS      = WIN
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [7:0]          strip_y,
  output logic                done,
  // image buffer port B (read)
  output logic [IMG_AW-1:0]   img_addr,
  input  logic [PIX_W-1:0]    img_rdata,
  // integral buffers, port A (shared address)
  output logic [4:0]          a_row,
  output logic [8:0]          a_col,
  output logic                a_we,
  output logic [II_W-1:0]     ii_wdata,
  output logic [IIX2_W-1:0]   iix2_wdata,
  input  logic [II_W-1:0]     ii_rdata,
  input  logic [IIX2_W-1:0]   iix2_rdata
);
  typedef enum logic [1:0] {G_IDLE, G_ZERO, G_RD, G_WR} gen_e;
  gen_e        state;
  logic [4:0]  r;
  logic [8:0]  c;
  logic [II_W-1:0]   row_sum;
  logic [IIX2_W-1:0] row_sq;

  logic [GRAY_W-1:0] gray;
  rgb2gray u_gray (.rgb(img_rdata), .gray);

  logic [II_W-1:0]   sum_n;
  logic [IIX2_W-1:0] sq_n;
  always_comb begin
    sum_n = row_sum + II_W'(gray);
    sq_n  = row_sq + IIX2_W'(16'(gray) * 16'(gray));
  end

  always_comb begin
    a_row      = r;
    a_col      = c;
    a_we       = 1'b0;
    ii_wdata   = '0;
    iix2_wdata = '0;
    img_addr   = '0;
    unique case (state)
      G_ZERO: a_we = 1'b1;
      G_RD: begin
        a_row    = r - 5'd1;
        img_addr = IMG_AW'((32'(strip_y) + 32'(r) - 1) * IMG_WIDTH + 32'(c) - 1);
      end
      G_WR: begin
        a_we       = 1'b1;
        ii_wdata   = ii_rdata + sum_n;
        iix2_wdata = iix2_rdata + sq_n;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= G_IDLE;
      r       <= '0;
      c       <= '0;
      row_sum <= '0;
      row_sq  <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        G_IDLE: if (start) begin r <= '0; c <= '0; state <= G_ZERO; end
        G_ZERO: begin
          row_sum <= '0;
          row_sq  <= '0;
          if (r == 5'd0) begin
            if (c == 9'(IMG_WIDTH)) begin r <= 5'd1; c <= '0; end
            else c <= c + 9'd1;
          end else begin
            c     <= 9'd1;
            state <= G_RD;
          end
        end
        G_RD: state <= G_WR;
        G_WR: begin
          row_sum <= sum_n;
          row_sq  <= sq_n;
          if (c == 9'(IMG_WIDTH)) begin
            if (r == 5'(ROWS)) begin
              done  <= 1'b1;
              state <= G_IDLE;
            end else begin
              r     <= r + 5'd1;
              c     <= '0;
              state <= G_ZERO;
            end
          end else begin
            c     <= c + 9'd1;
            state <= G_RD;
          end
        end
        default: state <= G_IDLE;
      endcase
    end
  end
endmodule
