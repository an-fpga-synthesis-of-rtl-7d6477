// subwindow: one of the 16 parallel window classifiers (sw[i]). All 16 receive
// the same command stream from the sequencer, each with the integral-image
// words of its own window, and keep their own verdict.
//
// Per window group the commands are:
//   OP_START    load `valid` into `alive`, clear the accumulators
//   OP_VAR x4   signed sum of the four corners of the window, from the sum
//               and the squared-sum images: window sum S and square sum Q
//   OP_VAR_DONE start sqrt(N*Q - S*S) = N * (standard deviation), N = 576
//   OP_CORNER   feature accumulator += (+/-) weight * corner word
//   OP_FEAT     weak classifier: if  feature * 2^12 < thr * N*std  the vote
//               is `left`, else `right`; the vote is added to the stage sum
//   OP_STAGE    strong classifier: the window stays alive only if the stage
//               sum is greater than the stage threshold
// The decision of OP_FEAT is a 44-bit signed comparison. Each command takes
// effect one clock after it arrives; after OP_VAR_DONE the square root needs
// 18 clocks before the first OP_FEAT. A window is a face when it is still
// alive after the last stage.
//
// Weak/strong classifiers, the stage threshold test ("greater than") and the
// 44-bit signed comparator follow the published design; the normalisation by
// the window's standard deviation follows the original Viola-Jones method;
// the fixed-point formats and the command set are this design's choices.
module subwindow
  import fd_pkg::*;
#(
  parameter int unsigned N_AREA = WIN_AREA
) (
  input  logic              clk,
  input  logic              rst_n,
  input  sw_ctrl_t          ctrl,
  input  logic              valid,      // sampled on OP_START
  input  logic [II_W-1:0]   ii_word,
  input  logic [IIX2_W-1:0] iix2_word,
  output logic              alive,
  output logic [17:0]       stddev_n    // N * standard deviation of the window
);
  logic signed [II_W+2:0]   sum_q;      // window sum of gray levels
  logic signed [IIX2_W+2:0] sq_q;       // window sum of squared gray levels
  logic signed [31:0]       feat_q;     // weighted rectangle sum
  logic signed [23:0]       stage_q;    // sum of weak votes
  logic [35:0]              var_n;
  logic                     sqrt_start;

  // variance term N*Q - S*S, clamped at zero
  logic signed [47:0] nq, ss, vdiff;
  always_comb begin
    nq    = 48'(sq_q) * 48'(N_AREA);
    ss    = 48'(sum_q) * 48'(sum_q);
    vdiff = nq - ss;
    var_n = (vdiff < 0) ? '0 : vdiff[35:0];
  end

  isqrt_seq #(.IN_W(36)) u_sqrt (
    .clk, .rst_n, .start(sqrt_start), .radicand(var_n),
    .root(stddev_n), .busy(), .done()
  );

  // 44-bit signed comparator of the weak classifier
  logic signed [CMP_W-1:0] lhs, rhs;
  logic                    below;
  always_comb begin
    lhs   = CMP_W'(feat_q) <<< THR_FRAC;
    rhs   = CMP_W'(ctrl.thr) * $signed({1'b0, stddev_n});
    below = lhs < rhs;
  end

  logic signed [31:0] corner_term;
  always_comb begin
    corner_term = 32'($signed({1'b0, ii_word})) * 32'(ctrl.weight);
    if (ctrl.neg) corner_term = -corner_term;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      alive      <= 1'b0;
      sum_q      <= '0;
      sq_q       <= '0;
      feat_q     <= '0;
      stage_q    <= '0;
      sqrt_start <= 1'b0;
    end else begin
      sqrt_start <= 1'b0;
      unique case (ctrl.op)
        OP_START: begin
          alive   <= valid;
          sum_q   <= '0;
          sq_q    <= '0;
          feat_q  <= '0;
          stage_q <= '0;
        end
        OP_VAR: begin
          if (ctrl.neg) begin
            sum_q <= sum_q - $signed({3'b000, ii_word});
            sq_q  <= sq_q  - $signed({3'b000, iix2_word});
          end else begin
            sum_q <= sum_q + $signed({3'b000, ii_word});
            sq_q  <= sq_q  + $signed({3'b000, iix2_word});
          end
        end
        OP_VAR_DONE: sqrt_start <= 1'b1;
        OP_CORNER:   feat_q <= feat_q + corner_term;
        OP_FEAT: begin
          stage_q <= stage_q + 24'(below ? ctrl.left : ctrl.right);
          feat_q  <= '0;
        end
        OP_STAGE: begin
          if (!(stage_q > 24'(ctrl.thr))) alive <= 1'b0;
          stage_q <= '0;
        end
        default: ;
      endcase
    end
  end
endmodule
