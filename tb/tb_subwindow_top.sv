// tb_subwindow_top: the 16-wide classifier array on preloaded integral strips.
// A gray frame with noise and several drawn faces is built; for a few strips
// the testbench writes the reference integral images into two strip buffers,
// starts the array, and compares the reported windows with the reference
// verdict of every window position. Also requires that early exit and full
// passes both occur and that the partly valid last group is handled.
module tb_subwindow_top;
  import fd_pkg::*;
  localparam int CW = $clog2(IMG_W + 1 + CHUNK);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, done, det_valid, early_exit;
  logic [7:0] strip_y = 0, det_y;
  logic [8:0] det_x;
  logic [4:0] a_row = 0, b_row;
  logic [8:0] a_col = 0;
  logic a_we = 0;
  logic [II_W-1:0] ii_wd = 0;
  logic [IIX2_W-1:0] iix2_wd = 0;
  logic [CW-5:0] b_blk;
  logic [CHUNK-1:0][II_W-1:0]   ii_chunk;
  logic [CHUNK-1:0][IIX2_W-1:0] iix2_chunk;
  int checks = 0, failures = 0, n_early = 0, n_found = 0;

  subwindow_top dut (.*);
  ii_buffer #(.DW(II_W)) u_b1 (.clk, .a_row, .a_col, .a_we, .a_wdata(ii_wd), .a_rdata(),
                               .b_row, .b_blk, .b_rdata(ii_chunk));
  ii_buffer #(.DW(IIX2_W)) u_b2 (.clk, .a_row, .a_col, .a_we, .a_wdata(iix2_wd), .a_rdata(),
                                 .b_row, .b_blk, .b_rdata(iix2_chunk));

  classifier_rom u_rom_copy (.stage_idx(rom_s), .feat_idx(rom_f), .stage(rom_stage), .feat(rom_feat));
  logic [3:0] rom_s;
  logic [7:0] rom_f;
  stage_t rom_stage;
  feature_t rom_feat;

  bit got [IMG_W];
  always @(posedge clk) if (rst_n && det_valid) begin
    n_found++;
    checks++;
    if (det_y != strip_y || det_x > IMG_W - WIN) begin failures++; $display("bad report %0d,%0d", det_x, det_y); end
    else got[det_x] = 1;
  end
  always @(posedge clk) if (rst_n && early_exit) n_early++;

  initial begin
    int faces_x [5] = '{3, 50, 131, 200, 296};
    int faces_y [5] = '{10, 10, 40, 40, 40};
    int ys [3] = '{10, 40, 100};
    // cascade copy
    for (int s = 0; s < NUM_STAGES; s++) begin
      rom_s = 4'(s); #1;
      fd_ref_pkg::st_first[s] = rom_stage.first; fd_ref_pkg::st_nfeat[s] = rom_stage.nfeat;
      fd_ref_pkg::st_thr[s] = rom_stage.thr;
    end
    for (int f = 0; f < NUM_FEATS; f++) begin
      rom_f = 8'(f); #1;
      fd_ref_pkg::f_nrect[f] = rom_feat.nrect; fd_ref_pkg::f_thr[f] = rom_feat.thr;
      fd_ref_pkg::f_left[f] = rom_feat.left; fd_ref_pkg::f_right[f] = rom_feat.right;
      for (int r = 0; r < 3; r++) begin
        fd_ref_pkg::r_x[f][r] = rom_feat.rect[r].x; fd_ref_pkg::r_y[f][r] = rom_feat.rect[r].y;
        fd_ref_pkg::r_w[f][r] = rom_feat.rect[r].w; fd_ref_pkg::r_h[f][r] = rom_feat.rect[r].h;
        fd_ref_pkg::r_wt[f][r] = rom_feat.rect[r].weight;
      end
    end
    // image
    for (int j = 0; j < IMG_H; j++)
      for (int i = 0; i < IMG_W; i++)
        fd_ref_pkg::gray[j][i] = 17 * (5 + $urandom_range(4));
    for (int k = 0; k < 5; k++)
      for (int j = 0; j < WIN; j++)
        for (int i = 0; i < WIN; i++)
          fd_ref_pkg::gray[faces_y[k] + j][faces_x[k] + i] = 17 * fd_ref_pkg::face_nibble(i, j);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3; n++) begin
      automatic int nexp = 0;
      fd_ref_pkg::build_strip(ys[n]);
      for (int r = 0; r <= WIN; r++)
        for (int c = 0; c < IMG_W + 1 + CHUNK; c++) begin
          @(negedge clk);
          a_we = 1; a_row = 5'(r); a_col = 9'(c);
          ii_wd   = (c <= IMG_W) ? II_W'(fd_ref_pkg::strip_s[r][c]) : II_W'($urandom);
          iix2_wd = (c <= IMG_W) ? IIX2_W'(fd_ref_pkg::strip_q[r][c]) : IIX2_W'($urandom);
        end
      @(negedge clk) begin a_we = 0; strip_y = 8'(ys[n]); start = 1; got = '{default: 0}; end
      @(negedge clk) start = 0;
      wait (done);
      @(negedge clk);
      for (int x = 0; x <= IMG_W - WIN; x++) begin
        automatic int passed;
        automatic bit e = fd_ref_pkg::eval_window(x, passed);
        checks++;
        if (e) nexp++;
        if (got[x] != e) begin
          failures++;
          if (failures < 10) $display("y=%0d x=%0d got %0b exp %0b (stages %0d)", ys[n], x, got[x], e, passed);
        end
      end
      $display("strip y=%0d: %0d windows pass", ys[n], nexp);
    end
    checks += 2;
    if (n_early == 0) begin failures++; $display("no early exit seen"); end
    if (!got[296] && n_found == 0) begin failures++; $display("no detection seen"); end
    $display("early exits %0d, detections %0d", n_early, n_found);
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
