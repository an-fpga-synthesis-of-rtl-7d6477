// tb_classifier_rom: checks the cascade tables for consistency: stages cover
// the features contiguously, every rectangle lies inside the 24x24 window,
// rectangle weights are non-zero, every feature is balanced (the weighted
// rectangle areas sum to zero, so a flat window gives a zero response) and
// each feature votes differently on its two sides. Also checks table values
// that the detector relies on.
module tb_classifier_rom;
  import fd_pkg::*;
  logic [3:0] stage_idx;
  logic [7:0] feat_idx;
  stage_t     stage;
  feature_t   feat;
  int checks = 0, failures = 0;

  classifier_rom dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int next_first = 0;
    for (int s = 0; s < NUM_STAGES; s++) begin
      stage_idx = 4'(s); #1;
      check(int'(stage.first) == next_first, $sformatf("stage %0d first", s));
      check(stage.nfeat > 0, $sformatf("stage %0d empty", s));
      next_first += int'(stage.nfeat);
    end
    check(next_first == NUM_FEATS, "feature count");
    stage_idx = 4'(NUM_STAGES); #1;
    check(stage.nfeat == 0, "no stage beyond the last");
    for (int f = 0; f < NUM_FEATS; f++) begin
      automatic int area = 0;
      feat_idx = 8'(f); #1;
      check(feat.nrect >= 2 && feat.nrect <= 3, $sformatf("feature %0d nrect", f));
      for (int r = 0; r < int'(feat.nrect); r++) begin
        automatic rect_t rc = feat.rect[r];
        check(rc.w > 0 && rc.h > 0, $sformatf("f%0d r%0d empty", f, r));
        check(int'(rc.x) + int'(rc.w) <= WIN && int'(rc.y) + int'(rc.h) <= WIN,
              $sformatf("f%0d r%0d outside window", f, r));
        check(rc.weight != 0, $sformatf("f%0d r%0d zero weight", f, r));
        area += int'(rc.weight) * int'(rc.w) * int'(rc.h);
      end
      check(area == 0, $sformatf("feature %0d unbalanced (%0d)", f, area));
      check(feat.left != feat.right, $sformatf("feature %0d votes", f));
    end
    // spot values
    feat_idx = 8'd1; #1;
    check(feat.rect[1].weight == 4'sd3 && feat.rect[1].x == 5'd9, "feature 1 centre rectangle");
    feat_idx = 8'd3; #1;
    check(feat.nrect == 2'd3 && feat.thr == 16'sd410, "feature 3 three rectangles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
