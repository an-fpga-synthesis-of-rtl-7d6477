// fd_top: Viola-Jones face detector with OV7670 camera input and VGA output.
//
// Data path: the camera controller configures the OV7670 over SCCB; the
// capture unit writes a 320x240 RGB444 frame into the dual-port image buffer
// (port B). The control logic then walks the frame in strips of 24 rows: the
// integral image generator reads the strip through port B, converts it to
// gray and writes the integral and squared integral images into two strip
// buffers; subwindow_top runs the Haar cascade from the classifier ROM on 16
// windows in parallel, fed through the two data muxes, and reports every
// window that passes all stages. Once the whole frame is done, face_box
// paints a rectangle around each detection into the image buffer (port A),
// and the VGA driver shows the buffer (port A) on a 640x480 monitor.
//
// Clocks: clk_a is the 25 MHz pixel clock (VGA, port A, face painter, camera
// XCLK); clk_b is the detector clock (100 MHz nominal; capture, port B,
// integral images, classifiers, control). The board PLL that derives them
// from the 50 MHz oscillator is outside this RTL. rst_n is asynchronous and
// is synchronised into each domain. Port A is shared: a face-box write takes
// the port for one clock, the VGA pixel of that clock is lost.
// The block structure and the port assignment of the image buffer follow the
// published block diagram; the strip schedule and the clocking are this
// design's choices.
module fd_top
  import fd_pkg::*;
(
  input  logic       clk_a,
  input  logic       clk_b,
  input  logic       rst_n,
  // board controls
  input  logic       sw15,          // capture mode: 0 video, 1 snapshot
  input  logic       btnc,          // capture button
  // OV7670 camera
  output logic       cam_xclk,
  output logic       cam_sioc,
  output logic       cam_siod_o,
  output logic       cam_siod_oe,
  output logic       cam_reset,
  output logic       cam_pwdn,
  input  logic       cam_pclk,
  input  logic       cam_vsync,
  input  logic       cam_href,
  input  logic [7:0] cam_d,
  // VGA
  output logic [3:0] vga_r,
  output logic [3:0] vga_g,
  output logic [3:0] vga_b,
  output logic       vga_hs,
  output logic       vga_vs,
  // status (clk_b)
  output logic       config_done,
  output logic       frame_done,
  output logic [7:0] face_count,
  output logic       face_overflow
);
  // ---- reset synchronisers -------------------------------------------------
  logic [1:0] rst_a_q, rst_b_q;
  logic       rst_a_n, rst_b_n;
  always_ff @(posedge clk_a or negedge rst_n)
    if (!rst_n) rst_a_q <= '0; else rst_a_q <= {rst_a_q[0], 1'b1};
  always_ff @(posedge clk_b or negedge rst_n)
    if (!rst_n) rst_b_q <= '0; else rst_b_q <= {rst_b_q[0], 1'b1};
  assign rst_a_n = rst_a_q[1];
  assign rst_b_n = rst_b_q[1];

  assign cam_xclk = clk_a;

  // ---- camera ----------------------------------------------------------------
  ov7670_controller u_cam_ctrl (
    .clk(clk_b), .rst_n(rst_b_n), .sioc(cam_sioc), .siod_o(cam_siod_o),
    .siod_oe(cam_siod_oe), .cam_reset, .cam_pwdn, .config_done
  );

  logic cap_req, ready, cap_start, cap_sel, cap_done;
  capture_ctrl u_top_mode (
    .clk(clk_b), .rst_n(rst_b_n), .sw_mode(sw15), .btn(btnc), .ready,
    .cap_req, .pending()
  );

  logic              cap_we;
  logic [IMG_AW-1:0] cap_addr;
  logic [PIX_W-1:0]  cap_data;
  ov7670_capture u_capture (
    .clk(clk_b), .rst_n(rst_b_n), .start(cap_start), .done(cap_done), .busy(),
    .cam_pclk, .cam_vsync, .cam_href, .cam_d,
    .we(cap_we), .addr(cap_addr), .wdata(cap_data)
  );

  // ---- image buffer ----------------------------------------------------------
  logic              box_we;
  logic [IMG_AW-1:0] box_addr, vga_addr, img_addr;
  logic [PIX_W-1:0]  box_data, vga_data, img_data;

  image_buffer u_img (
    .clk_a(clk_a), .a_we(box_we), .a_addr(box_we ? box_addr : vga_addr),
    .a_wdata(box_data), .a_rdata(vga_data),
    .clk_b(clk_b), .b_we(cap_sel && cap_we), .b_addr(cap_sel ? cap_addr : img_addr),
    .b_wdata(cap_data), .b_rdata(img_data)
  );

  // ---- integral images -------------------------------------------------------
  logic             ii_start, ii_done, sw_start, sw_done;
  logic [7:0]       strip_y;
  logic [4:0]       a_row, b_row;
  logic [8:0]       a_col;
  logic             a_we;
  logic [II_W-1:0]  ii_wd, ii_rd;
  logic [IIX2_W-1:0] iix2_wd, iix2_rd;
  logic [4:0]       b_blk;
  logic [CHUNK-1:0][II_W-1:0]   ii_chunk;
  logic [CHUNK-1:0][IIX2_W-1:0] iix2_chunk;

  ii_gen u_ii_gen (
    .clk(clk_b), .rst_n(rst_b_n), .start(ii_start), .strip_y, .done(ii_done),
    .img_addr, .img_rdata(img_data),
    .a_row, .a_col, .a_we, .ii_wdata(ii_wd), .iix2_wdata(iix2_wd),
    .ii_rdata(ii_rd), .iix2_rdata(iix2_rd)
  );

  ii_buffer #(.DW(II_W)) u_iix_buffer (
    .clk(clk_b), .a_row, .a_col, .a_we, .a_wdata(ii_wd), .a_rdata(ii_rd),
    .b_row, .b_blk, .b_rdata(ii_chunk)
  );
  ii_buffer #(.DW(IIX2_W)) u_iix2_buffer (
    .clk(clk_b), .a_row, .a_col, .a_we, .a_wdata(iix2_wd), .a_rdata(iix2_rd),
    .b_row, .b_blk, .b_rdata(iix2_chunk)
  );

  // ---- classifiers -----------------------------------------------------------
  logic       det_valid;
  logic [8:0] det_x;
  logic [7:0] det_y;
  subwindow_top u_subwindow_top (
    .clk(clk_b), .rst_n(rst_b_n), .start(sw_start), .strip_y, .done(sw_done),
    .b_row, .b_blk, .ii_chunk, .iix2_chunk,
    .det_valid, .det_x, .det_y, .early_exit()
  );

  // ---- control and face boxes ------------------------------------------------
  logic face_clear, draw_req, draw_ack;
  control_logic u_ctrl (
    .clk(clk_b), .rst_n(rst_b_n), .cap_req, .ready, .cap_start, .cap_sel,
    .cap_done, .face_clear, .ii_start, .ii_done, .sw_start, .sw_done, .strip_y,
    .draw_req, .draw_ack, .frame_done
  );

  face_box u_face_box (
    .clk_b, .rst_b_n, .clear(face_clear), .det_valid, .det_x, .det_y,
    .draw_req, .draw_ack, .face_count, .overflow(face_overflow),
    .clk_a, .rst_a_n, .box_we, .box_addr, .box_data
  );

  // ---- display ---------------------------------------------------------------
  vga_driver u_vga (
    .clk(clk_a), .rst_n(rst_a_n), .vga_addr, .vga_data,
    .red(vga_r), .green(vga_g), .blue(vga_b), .hsync(vga_hs), .vsync(vga_vs)
  );
endmodule
