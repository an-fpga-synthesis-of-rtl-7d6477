// tb_subwindow: drives one sub-window with random command sequences: a window
// sum and square sum (built from random pixels), random weighted corners,
// weak thresholds and votes, and a stage threshold. Expected standard
// deviation, votes and survival are computed independently in the testbench.
module tb_subwindow;
  import fd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sw_ctrl_t          ctrl;
  logic              valid;
  logic [II_W-1:0]   ii_word;
  logic [IIX2_W-1:0] iix2_word;
  logic              alive;
  logic [17:0]       stddev_n;
  int checks = 0, failures = 0;
  int survived = 0, rejected = 0;

  subwindow dut (.*);

  task automatic op(sw_op_e o, bit neg = 0, int wt = 0, int thr = 0, int l = 0, int r = 0,
                    longint ii = 0, longint q = 0);
    @(negedge clk);
    ctrl = '0;
    ctrl.op = o; ctrl.neg = neg; ctrl.weight = 4'(wt); ctrl.thr = 16'(thr);
    ctrl.left = 16'(l); ctrl.right = 16'(r);
    ii_word = II_W'(ii); iix2_word = IIX2_W'(q);
  endtask

  initial begin
    ctrl = '0; valid = 0; ii_word = 0; iix2_word = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic longint s = 0, q = 0, x, vn, sd, stage_sum = 0;
      automatic bit v = ($urandom_range(9) != 0);
      automatic int base = $urandom_range(255), spread = $urandom_range(128);
      for (int p = 0; p < WIN_AREA; p++) begin
        automatic int g = base + $urandom_range(spread);
        if (g > 255) g = 255;
        s += g; q += g * g;
      end
      valid = v;
      op(OP_START);
      x = $urandom_range(100000);
      op(OP_VAR, 0, 0, 0, 0, 0, s + x, q + x);
      op(OP_VAR, 1, 0, 0, 0, 0, x, x);
      op(OP_VAR, 1, 0, 0, 0, 0, 0, 0);
      op(OP_VAR, 0, 0, 0, 0, 0, 0, 0);
      op(OP_VAR_DONE);
      repeat (22) op(OP_NOP);
      vn = longint'(WIN_AREA) * q - s * s;
      sd = fd_ref_pkg::isqrt_fast(vn);
      checks++;
      if (longint'(stddev_n) != sd) begin
        failures++;
        if (failures < 10) $display("t=%0d stddev %0d exp %0d", t, stddev_n, sd);
      end
      for (int f = 0; f < 3; f++) begin
        automatic longint fv = 0;
        automatic int thr = $urandom_range(600) - 300, l = $urandom_range(10) - 5, r = $urandom_range(10) - 5;
        for (int c = 0; c < 8; c++) begin
          automatic int wt = $urandom_range(6) - 3;
          automatic bit ng = $urandom_range(1);
          automatic longint w = $urandom_range(200000);
          op(OP_CORNER, ng, wt, 0, 0, 0, w);
          fv += (ng ? -1 : 1) * wt * w;
        end
        op(OP_FEAT, 0, 0, thr, l, r);
        stage_sum += (fv * 4096 < longint'(thr) * sd) ? l : r;
      end
      begin
        automatic int sthr = $urandom_range(8) - 4;
        automatic bit exp_alive = v && (stage_sum > sthr);
        op(OP_STAGE, 0, 0, sthr);
        op(OP_NOP);
        @(negedge clk);
        checks++;
        if (alive !== exp_alive) begin
          failures++;
          if (failures < 10) $display("t=%0d alive %0b exp %0b (sum %0d thr %0d)", t, alive, exp_alive, stage_sum, sthr);
        end
        if (exp_alive) survived++; else rejected++;
      end
    end
    checks++;
    if (survived == 0 || rejected == 0) begin failures++; $display("outcomes not both seen"); end
    $display("survived %0d rejected %0d", survived, rejected);
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
