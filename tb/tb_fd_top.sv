// tb_fd_top: end-to-end test of the whole detector at its full size
// (320x240 frame, 24x24 windows, 16 sub-windows, every parameter at its
// default). A behavioural OV7670 sends generated frames of gray noise with
// drawn faces. Frame 1 is taken in video mode (switch low) and holds a few
// faces; the switch is then set to snapshot mode and frame 2, with a dense
// grid of faces, is taken only after a button press. For each frame the
// testbench computes the expected detections with the reference model and
// checks the face list, its overflow flag, every pixel of the image buffer
// after the boxes are painted, and the VGA picture of that buffer.
// It also counts the design's mechanisms and fails if one never occurs:
// video-mode capture, snapshot capture after a debounced press, early exit of
// a window group, windows passing the whole cascade, the partly valid last
// group of a strip, face-list overflow, and face-box writes taking image
// port A from the VGA reader.
module tb_fd_top;
  import fd_pkg::*;
  logic clk_a = 0, clk_b = 0, rst_n = 0;
  always #20 clk_a = ~clk_a;     // 25 MHz
  always #5  clk_b = ~clk_b;     // 100 MHz

  logic sw15 = 0, btnc = 0;
  logic cam_xclk, cam_sioc, cam_siod_o, cam_siod_oe, cam_reset, cam_pwdn;
  logic cam_pclk, cam_vsync, cam_href;
  logic [7:0] cam_d;
  logic [3:0] vga_r, vga_g, vga_b;
  logic vga_hs, vga_vs, config_done, frame_done, face_overflow;
  logic [7:0] face_count;

  fd_top dut (.*);
  ov7670_model #(.PCLK_HALF(40)) cam (.pclk(cam_pclk), .vsync(cam_vsync), .href(cam_href), .d(cam_d));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---- mechanism counters --------------------------------------------------
  int m_video = 0, m_snapshot = 0, m_early = 0, m_pass = 0, m_partial = 0;
  int m_overflow = 0, m_portA = 0, frames_done = 0;
  always @(posedge clk_b) if (rst_n) begin
    if (dut.cap_req && !sw15) m_video++;
    if (dut.cap_req && sw15)  m_snapshot++;
    if (dut.u_subwindow_top.early_exit) m_early++;
    if (dut.det_valid) m_pass++;
    if (dut.u_subwindow_top.cmd.op == OP_START && dut.u_subwindow_top.valid_mask != '1) m_partial++;
    if (frame_done) frames_done++;
    if (dut.ii_start && dut.strip_y == 0) det_start = cyc;
    if (dut.draw_req && !draw_seen) begin
      draw_seen = 1;
      $display("detection of a frame took %0d clk_b clocks", cyc - det_start);
    end
    if (!dut.draw_req) draw_seen = 0;
    cyc++;
  end
  longint cyc = 0, det_start = 0;
  bit draw_seen = 0;
  always @(posedge clk_a) if (rst_n && dut.box_we && dut.u_vga.act) m_portA++;

  // ---- reference -----------------------------------------------------------
  logic [11:0] img [IMG_W*IMG_H];
  int ref_x [$], ref_y [$];

  function automatic void make_frame(bit dense);
    for (int p = 0; p < IMG_W*IMG_H; p++) begin
      automatic logic [3:0] v = 4'(5 + $urandom_range(4));
      img[p] = {v, v, v};
    end
    if (!dense) begin
      automatic int fx [4] = '{20, 100, 201, 296};
      automatic int fy [4] = '{30, 100, 61, 216};
      for (int k = 0; k < 4; k++)
        for (int j = 0; j < WIN; j++)
          for (int i = 0; i < WIN; i++) begin
            automatic logic [3:0] v = 4'(fd_ref_pkg::face_nibble(i, j));
            img[(fy[k]+j)*IMG_W + fx[k]+i] = {v, v, v};
          end
    end else begin
      for (int a = 0; a < 12; a++)
        for (int b = 0; b < 9; b++)
          for (int j = 0; j < WIN; j++)
            for (int i = 0; i < WIN; i++) begin
              automatic logic [3:0] v = 4'(fd_ref_pkg::face_nibble(i, j));
              img[(2+26*b+j)*IMG_W + 2+26*a+i] = {v, v, v};
            end
    end
    for (int p = 0; p < IMG_W*IMG_H; p++) begin
      cam.pix[p] = img[p];
      fd_ref_pkg::gray[p / IMG_W][p % IMG_W] = fd_ref_pkg::gray_of(img[p]);
    end
    ref_x.delete(); ref_y.delete();
    for (int y = 0; y <= IMG_H - WIN; y++) begin
      fd_ref_pkg::build_strip(y);
      for (int x = 0; x <= IMG_W - WIN; x++) begin
        automatic int passed;
        if (fd_ref_pkg::eval_window(x, passed)) begin ref_x.push_back(x); ref_y.push_back(y); end
      end
    end
  endfunction

  task automatic check_frame(string name);
    automatic int n = ref_x.size();
    automatic int kept = (n < 128) ? n : 128;
    automatic logic [11:0] expimg [IMG_W*IMG_H] = img;
    automatic int bad = 0;
    $display("%s: %0d reference detections, design reports %0d (overflow %0b)", name, n, face_count, face_overflow);
    check(int'(face_count) == kept, $sformatf("%s face count %0d exp %0d", name, face_count, kept));
    check(face_overflow == (n > 128), $sformatf("%s overflow flag", name));
    for (int k = 0; k < kept; k++) begin
      check(dut.u_face_box.list[k] == {9'(ref_x[k]), 8'(ref_y[k])},
            $sformatf("%s detection %0d = %0d,%0d exp %0d,%0d", name, k,
                      dut.u_face_box.list[k][16:8], dut.u_face_box.list[k][7:0], ref_x[k], ref_y[k]));
      for (int i = 0; i < WIN; i++) begin
        expimg[ref_y[k]*IMG_W + ref_x[k] + i] = 12'hF00;
        expimg[(ref_y[k]+WIN-1)*IMG_W + ref_x[k] + i] = 12'hF00;
        expimg[(ref_y[k]+i)*IMG_W + ref_x[k]] = 12'hF00;
        expimg[(ref_y[k]+i)*IMG_W + ref_x[k] + WIN - 1] = 12'hF00;
      end
    end
    for (int p = 0; p < IMG_W*IMG_H; p++)
      if (dut.u_img.mem[p] != expimg[p]) bad++;
    check(bad == 0, $sformatf("%s: %0d image buffer pixels differ", name, bad));
    // VGA picture: one full screen after drawing
    begin
      automatic int h = -1, v = -1, vbad = 0, vgood = 0;
      automatic logic hs_q = 1, vs_q = 1;
      @(negedge vga_vs);
      v = 490; h = 0;
      while (!(v == 489 && h == 799)) begin
        @(negedge clk_a);
        if (h < 640 && v < 480) begin
          if ({vga_r, vga_g, vga_b} == expimg[(v/2)*IMG_W + h/2]) vgood++; else vbad++;
        end
        h++;
        if (h == 800) begin h = 0; v = (v + 1) % 525; end
      end
      check(vbad == 0 && vgood == 640*480, $sformatf("%s VGA: %0d bad, %0d good pixels", name, vbad, vgood));
    end
  endtask

  initial begin
    #20;                      // let the cascade copy below load first
    make_frame(0);
    repeat (5) @(posedge clk_b);
    @(negedge clk_b) rst_n = 1;
    // frame 1: video mode; switch to snapshot mode once its capture is over
    wait (dut.cap_done);
    sw15 = 1;
    wait (frame_done);
    @(negedge clk_b);
    check(config_done, "camera configured");
    check_frame("frame 1");
    // snapshot mode: nothing happens without the button
    make_frame(1);
    repeat (200000) @(negedge clk_b);
    check(dut.u_ctrl.ready && frames_done == 1, "snapshot mode idles without a press");
    // bouncing press, then a real one (held longer than the 10 ms debounce)
    repeat (3) begin btnc = 1; repeat (1000) @(negedge clk_b); btnc = 0; repeat (1000) @(negedge clk_b); end
    btnc = 1;
    repeat (1_200_000) @(negedge clk_b);
    btnc = 0;
    wait (frames_done == 2);
    @(negedge clk_b);
    check_frame("frame 2");
    repeat (100000) @(negedge clk_b);
    check(frames_done == 2, "snapshot mode took exactly one frame");
    $display("mechanisms: video %0d snapshot %0d early-exit %0d passes %0d partial-group %0d overflow-frames %0d portA-steals %0d",
             m_video, m_snapshot, m_early, m_pass, m_partial, int'(face_overflow), m_portA);
    check(m_video >= 1, "video-mode capture never happened");
    check(m_snapshot == 1, "snapshot capture count");
    check(m_early > 0, "early exit never happened");
    check(m_pass > 0, "no window passed the cascade");
    check(m_partial > 0, "partial window group never happened");
    check(face_overflow, "face list overflow never happened");
    check(m_portA > 0, "face box never took port A during active video");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cascade copy for the reference, read from the ROM before reset ends
  classifier_rom u_rom_copy (.stage_idx(rom_s), .feat_idx(rom_f), .stage(rom_stage), .feat(rom_feat));
  logic [3:0] rom_s;
  logic [7:0] rom_f;
  stage_t rom_stage;
  feature_t rom_feat;
  initial begin
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
  end

  initial begin
    repeat (40_000_000) @(posedge clk_b);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
