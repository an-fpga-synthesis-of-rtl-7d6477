// isqrt_seq: integer square root, one result bit per clock (digit-by-digit
// restoring method). A pulse on `start` loads `radicand`; IN_W/2 clocks later
// `done` pulses and `root` holds floor(sqrt(radicand)) until the next start.
// Used by every sub-window to turn its window variance into a standard
// deviation.
module isqrt_seq #(
  parameter int unsigned IN_W = 36
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [IN_W-1:0]   radicand,
  output logic [IN_W/2-1:0] root,
  output logic              busy,
  output logic              done
);
  localparam int unsigned OW = IN_W / 2;
  localparam int unsigned RW = OW + 2;

  logic [IN_W-1:0]      x_q;
  logic [RW-1:0]        rem_q;
  logic [$clog2(OW+1)-1:0] cnt_q;
  logic [RW-1:0]        rem_sh, trial;

  always_comb begin
    rem_sh = {rem_q[RW-3:0], x_q[IN_W-1 -: 2]};
    trial  = RW'({root, 2'b01});
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      root  <= '0;
      rem_q <= '0;
      x_q   <= '0;
      cnt_q <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy  <= 1'b1;
        x_q   <= radicand;
        rem_q <= '0;
        root  <= '0;
        cnt_q <= '0;
      end else if (busy) begin
        x_q <= x_q << 2;
        if (rem_sh >= trial) begin
          rem_q <= rem_sh - trial;
          root  <= {root[OW-2:0], 1'b1};
        end else begin
          rem_q <= rem_sh;
          root  <= {root[OW-2:0], 1'b0};
        end
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == ($clog2(OW+1))'(OW - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
