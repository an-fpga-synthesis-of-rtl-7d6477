// classifier_rom: the Haar cascade read by the sub-window sequencer. It is an
// asynchronous-read (LUT) ROM with two tables: a stage table (first feature,
// feature count, strong threshold) and a feature table (up to three weighted
// rectangles inside the 24x24 window, a weak threshold in Q4.12 scaled by the
// window's N*std, and the two votes).
//
// The published design reads its cascade from a classifier ROM but does not
// give its contents (a trained cascade). The table below is a small
// hand-written cascade of 3 stages and 4 features that responds to a bright
// window with a dark eye band, a bright nose bridge, a dark mouth and a bright
// forehead. It exercises every mechanism of the datapath (2- and 3-rectangle
// features, weights -1/2/3, early rejection per stage) but is not a trained
// face model; replace the two case tables to load a real cascade.
module classifier_rom
  import fd_pkg::*;
(
  input  logic [3:0] stage_idx,
  input  logic [7:0] feat_idx,
  output stage_t     stage,
  output feature_t   feat
);
  function automatic rect_t mk_rect(logic [4:0] x, logic [4:0] y, logic [4:0] w,
                                    logic [4:0] h, logic signed [3:0] wt);
    rect_t r;
    r.x = x; r.y = y; r.w = w; r.h = h; r.weight = wt;
    return r;
  endfunction

  always_comb begin
    stage = '0;
    unique case (stage_idx)
      4'd0:    begin stage.first = 8'd0; stage.nfeat = 8'd1; stage.thr = 16'sd0; end
      4'd1:    begin stage.first = 8'd1; stage.nfeat = 8'd2; stage.thr = 16'sd0; end
      4'd2:    begin stage.first = 8'd3; stage.nfeat = 8'd1; stage.thr = 16'sd0; end
      default: stage = '0;
    endcase
  end

  always_comb begin
    feat = '0;
    unique case (feat_idx)
      // eye band (rows 5-9) darker than cheeks (rows 10-14)
      8'd0: begin
        feat.rect[0] = mk_rect(2, 5, 20, 10, -1);
        feat.rect[1] = mk_rect(2, 10, 20, 5, 2);
        feat.nrect = 2'd2; feat.thr = 16'sd410; feat.left = -16'sd1; feat.right = 16'sd1;
      end
      // nose bridge brighter than the eye band around it, two rectangles
      8'd1: begin
        feat.rect[0] = mk_rect(3, 5, 18, 5, -1);
        feat.rect[1] = mk_rect(9, 5, 6, 5, 3);
        feat.nrect = 2'd2; feat.thr = 16'sd205; feat.left = -16'sd1; feat.right = 16'sd1;
      end
      // mouth (rows 15-17) darker than chin (rows 18-20)
      8'd2: begin
        feat.rect[0] = mk_rect(6, 15, 12, 6, -1);
        feat.rect[1] = mk_rect(6, 18, 12, 3, 2);
        feat.nrect = 2'd2; feat.thr = 16'sd205; feat.left = -16'sd1; feat.right = 16'sd1;
      end
      // middle of the forehead (rows 1-4) brighter than the two eyes (rows 5-8)
      8'd3: begin
        feat.rect[0] = mk_rect(3, 5, 6, 4, -1);
        feat.rect[1] = mk_rect(9, 1, 6, 4, 2);
        feat.rect[2] = mk_rect(15, 5, 6, 4, -1);
        feat.nrect = 2'd3; feat.thr = 16'sd410; feat.left = -16'sd1; feat.right = 16'sd1;
      end
      default: feat = '0;
    endcase
  end
endmodule
