// tb_ov7670_capture: a camera model sends random frames; the capture unit is
// armed once and must write exactly one whole frame, every pixel at its
// row-major address with its 12-bit value, then pulse `done`. Writes after
// `done` (the next frame) must not happen until re-armed.
module tb_ov7670_capture;
  import fd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, done, busy, we;
  logic [IMG_AW-1:0] addr;
  logic [PIX_W-1:0] wdata;
  logic pclk, vsync, href;
  logic [7:0] d;
  logic [11:0] mem [IMG_W*IMG_H];
  int writes = 0, checks = 0, failures = 0;

  ov7670_model #(.PCLK_HALF(20), .VS_PCLKS(500)) cam (.pclk, .vsync, .href, .d);
  ov7670_capture dut (.clk, .rst_n, .start, .done, .busy, .cam_pclk(pclk), .cam_vsync(vsync),
                      .cam_href(href), .cam_d(d), .we, .addr, .wdata);

  always @(posedge clk) if (rst_n && we) begin
    writes++;
    if (32'(addr) < IMG_W*IMG_H) mem[addr] <= wdata;
  end

  initial begin
    for (int p = 0; p < IMG_W*IMG_H; p++) cam.pix[p] = 12'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // arm in the middle of a frame: that frame must be skipped
    wait (cam.frames == 0 && href);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    @(negedge clk);
    checks++;
    if (writes != IMG_W*IMG_H) begin failures++; $display("writes %0d", writes); end
    for (int p = 0; p < IMG_W*IMG_H; p++) begin
      checks++;
      if (mem[p] !== cam.pix[p]) begin
        failures++;
        if (failures < 10) $display("pixel %0d got %h exp %h", p, mem[p], cam.pix[p]);
      end
    end
    checks++;
    if (cam.frames != 2) begin failures++; $display("captured frame index %0d", cam.frames); end
    // not armed: the next frame writes nothing
    wait (cam.frames == 3);
    checks++;
    if (writes != IMG_W*IMG_H) begin failures++; $display("writes while idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
