// subwindow_top: runs the Haar cascade on NUM_SW = 16 neighbouring 24x24
// windows at once, for every window position of one integral-image strip.
//
// For a strip whose top image row is `strip_y`, the windows are taken in
// groups of 16: group g covers window columns 16g .. 16g+15, and windows that
// would run past the right image edge are marked invalid. For each group the
// sequencer reads, one corner per clock, the integral words it needs from
// port B of the two integral buffers: the buffer returns 32 words starting at
// column 16*(g + cx/16) and the data muxes pass on the 16 words starting at
// offset cx mod 16, so sw[i] receives the corner of its own window 16g+i.
// Every read is paired with a command (see subwindow.sv) that reaches the
// sub-windows together with the data, two clocks later.
//
// Order per group: OP_START; the four window corners (variance); OP_VAR_DONE
// and a wait for the square roots; then for every stage, for every feature,
// the four corners of each rectangle followed by OP_FEAT, and OP_STAGE. Three
// clocks after OP_STAGE the alive flags are inspected: if no window is left
// the rest of the cascade is skipped (early exit, `early_exit` pulses). After
// the last stage every surviving window is reported on det_* (one per clock)
// and the next group starts. `done` pulses after the last group.
//
// The 16 parallel sub-windows, the classifier ROM and the two data muxes are
// the published design's; the grouping, ordering, early exit and timing are
// this design's choices.
module subwindow_top
  import fd_pkg::*;
#(
  parameter int unsigned IMG_WIDTH = IMG_W,
  parameter int unsigned BW        = $clog2(IMG_W + 1 + CHUNK) - 4,
  parameter int unsigned SQRT_WAIT = 20
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic [7:0]                     strip_y,
  output logic                           done,
  // port B of the integral buffers
  output logic [4:0]                     b_row,
  output logic [BW-1:0]                  b_blk,
  input  logic [CHUNK-1:0][II_W-1:0]     ii_chunk,
  input  logic [CHUNK-1:0][IIX2_W-1:0]   iix2_chunk,
  // detections
  output logic                           det_valid,
  output logic [8:0]                     det_x,
  output logic [7:0]                     det_y,
  output logic                           early_exit
);
  localparam int unsigned POSITIONS = IMG_WIDTH - WIN + 1;
  localparam int unsigned GROUPS    = (POSITIONS + NUM_SW - 1) / NUM_SW;

  typedef enum logic [3:0] {
    S_IDLE, S_START, S_VAR, S_VDONE, S_SQRT, S_CORNER, S_FEAT, S_STAGE,
    S_CHECK, S_REPORT, S_NEXT
  } seq_e;

  seq_e        state;
  logic [4:0]  grp;
  logic [3:0]  stg;
  logic [7:0]  fk;          // feature number inside the stage
  logic [1:0]  rk;          // rectangle number
  logic [1:0]  ck;          // corner number
  logic [4:0]  cnt;
  logic [NUM_SW-1:0] found;

  stage_t   stage;
  feature_t feat;
  rect_t    rect;
  classifier_rom u_rom (.stage_idx(stg), .feat_idx(stage.first + fk), .stage, .feat);
  assign rect = feat.rect[rk];

  // ---- command and address of the current clock ------------------------------
  sw_ctrl_t    cmd;
  logic [4:0]  rd_row;
  logic [5:0]  rd_cx;       // corner column inside the window, 0..24
  logic [NUM_SW-1:0] valid_mask;

  always_comb begin
    for (int i = 0; i < NUM_SW; i++)
      valid_mask[i] = (32'(grp) * NUM_SW + i) < POSITIONS;
  end

  always_comb begin
    cmd    = '0;
    cmd.op = OP_NOP;
    rd_row = '0;
    rd_cx  = '0;
    unique case (state)
      S_START: cmd.op = OP_START;
      S_VAR: begin
        cmd.op  = OP_VAR;
        cmd.neg = ck[0] ^ ck[1];
        rd_row  = ck[1] ? 5'(WIN) : 5'd0;
        rd_cx   = ck[0] ? 6'(WIN) : 6'd0;
      end
      S_VDONE: cmd.op = OP_VAR_DONE;
      S_CORNER: begin
        cmd.op     = OP_CORNER;
        cmd.neg    = ck[0] ^ ck[1];
        cmd.weight = rect.weight;
        rd_row     = ck[1] ? rect.y + rect.h : rect.y;
        rd_cx      = ck[0] ? 6'(rect.x) + 6'(rect.w) : 6'(rect.x);
      end
      S_FEAT: begin
        cmd.op    = OP_FEAT;
        cmd.thr   = feat.thr;
        cmd.left  = feat.left;
        cmd.right = feat.right;
      end
      S_STAGE: begin
        cmd.op  = OP_STAGE;
        cmd.thr = stage.thr;
      end
      default: ;
    endcase
  end

  assign b_row = rd_row;
  assign b_blk = BW'(grp) + BW'(rd_cx >> 4);

  // ---- pipeline to the sub-windows: buffer (1 clk) + mux (1 clk) -------------
  sw_ctrl_t          cmd_q1, cmd_q2;
  logic [NUM_SW-1:0] mask_q1, mask_q2;
  logic [3:0]        off_q1;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cmd_q1 <= '0;
      cmd_q2 <= '0;
    end else begin
      cmd_q1 <= cmd;
      cmd_q2 <= cmd_q1;
    end
    mask_q1 <= valid_mask;
    mask_q2 <= mask_q1;
    off_q1  <= rd_cx[3:0];
  end

  logic [NUM_SW-1:0][II_W-1:0]   ii_words;
  logic [NUM_SW-1:0][IIX2_W-1:0] iix2_words;
  ii_data_mux #(.DW(II_W))   u_iix_mux  (.clk, .chunk(ii_chunk),   .offset(off_q1), .words(ii_words));
  ii_data_mux #(.DW(IIX2_W)) u_iix2_mux (.clk, .chunk(iix2_chunk), .offset(off_q1), .words(iix2_words));

  logic [NUM_SW-1:0] alive;
  for (genvar i = 0; i < NUM_SW; i++) begin : g_sw
    subwindow u_sw (
      .clk, .rst_n, .ctrl(cmd_q2), .valid(mask_q2[i]),
      .ii_word(ii_words[i]), .iix2_word(iix2_words[i]),
      .alive(alive[i]), .stddev_n()
    );
  end

  // ---- sequencer -------------------------------------------------------------
  logic last_rect, last_feat, last_stage;
  always_comb begin
    last_rect  = (rk == feat.nrect - 2'd1);
    last_feat  = (fk == stage.nfeat - 8'd1);
    last_stage = (32'(stg) == NUM_STAGES - 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      grp        <= '0;
      stg        <= '0;
      fk         <= '0;
      rk         <= '0;
      ck         <= '0;
      cnt        <= '0;
      found      <= '0;
      done       <= 1'b0;
      det_valid  <= 1'b0;
      det_x      <= '0;
      det_y      <= '0;
      early_exit <= 1'b0;
    end else begin
      done       <= 1'b0;
      det_valid  <= 1'b0;
      early_exit <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin grp <= '0; state <= S_START; end
        S_START: begin ck <= '0; state <= S_VAR; end
        S_VAR: begin
          ck <= ck + 2'd1;
          if (ck == 2'd3) state <= S_VDONE;
        end
        S_VDONE: begin cnt <= '0; state <= S_SQRT; end
        S_SQRT: begin
          cnt <= cnt + 5'd1;
          if (cnt == 5'(SQRT_WAIT - 1)) begin
            stg <= '0; fk <= '0; rk <= '0; ck <= '0;
            state <= S_CORNER;
          end
        end
        S_CORNER: begin
          ck <= ck + 2'd1;
          if (ck == 2'd3) begin
            rk <= rk + 2'd1;
            if (last_rect) state <= S_FEAT;
          end
        end
        S_FEAT: begin
          rk <= '0;
          if (last_feat) state <= S_STAGE;
          else begin fk <= fk + 8'd1; state <= S_CORNER; end
        end
        S_STAGE: begin cnt <= '0; state <= S_CHECK; end
        S_CHECK: begin
          cnt <= cnt + 5'd1;
          if (cnt == 5'd3) begin
            if (alive == '0) begin
              early_exit <= !last_stage;
              state      <= S_NEXT;
            end else if (last_stage) begin
              found <= alive;
              cnt   <= '0;
              state <= S_REPORT;
            end else begin
              stg <= stg + 4'd1; fk <= '0; rk <= '0; ck <= '0;
              state <= S_CORNER;
            end
          end
        end
        S_REPORT: begin
          det_valid <= found[cnt[3:0]];
          det_x     <= 9'(32'(grp) * NUM_SW + 32'(cnt[3:0]));
          det_y     <= strip_y;
          cnt       <= cnt + 5'd1;
          if (cnt == 5'(NUM_SW - 1)) state <= S_NEXT;
        end
        S_NEXT: begin
          if (32'(grp) == GROUPS - 1) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            grp   <= grp + 5'd1;
            state <= S_START;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
