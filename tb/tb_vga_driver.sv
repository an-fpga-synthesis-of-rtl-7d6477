// tb_vga_driver: with a one-clock memory model whose data is a function of
// the address, checks the 800x525 frame timing, sync pulse widths and
// polarity, blanking, and that each visible screen pixel (h, v) shows stored
// pixel (h/2, v/2).
module tb_vga_driver;
  logic clk = 0, rst_n = 0;
  always #20 clk = ~clk;
  logic [16:0] vga_addr;
  logic [11:0] vga_data;
  logic [3:0]  red, green, blue;
  logic        hsync, vsync;
  int checks = 0, failures = 0;

  vga_driver dut (.*);

  function automatic logic [11:0] pix(int a);
    return 12'(a * 37 + 5);
  endfunction
  always_ff @(posedge clk) vga_data <= pix(int'(vga_addr));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // screen position of the pixel on the outputs: 2 clocks behind the counters
  int h = 0, v = 0;
  int hs_fall = -1, t = 0, hs_low = 0, vs_low_lines = 0, frames = 0;
  logic hs_q = 1, vs_q = 1;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // outputs of counter state (0,0) appear 2 clocks after reset release
    @(posedge clk); @(posedge clk);
    forever begin
      @(negedge clk);
      t++;
      if (h < 640 && v < 480) begin
        check({red, green, blue} == pix((v/2)*320 + h/2), $sformatf("pixel %0d,%0d", h, v));
      end else begin
        check({red, green, blue} == 12'h000, $sformatf("blank %0d,%0d", h, v));
      end
      check(hsync == !(h >= 656 && h < 752), $sformatf("hsync at %0d", h));
      check(vsync == !(v >= 490 && v < 492), $sformatf("vsync at line %0d", v));
      if (!hsync && hs_q) begin
        if (hs_fall >= 0) check(t - hs_fall == 800, $sformatf("line length %0d", t - hs_fall));
        hs_fall = t;
      end
      hs_q = hsync;
      h++;
      if (h == 800) begin
        h = 0; v++;
        if (v == 525) begin v = 0; frames++; end
      end
      if (frames == 2 && v == 3) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (900000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
