// tb_ov7670_controller: decodes the SCCB bus like a camera would (start and
// stop conditions while SIOC is high, data sampled on SIOC rising edges) and
// checks the sequence of register writes, the released "don't care" bit
// after each byte, the bit period, and the reset/power-down levels.
module tb_ov7670_controller;
  localparam int DIV = 4, GAP = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sioc, siod_o, siod_oe, cam_reset, cam_pwdn, config_done;
  int checks = 0, failures = 0;

  ov7670_controller #(.CLK_DIV(DIV), .GAP_TICKS(GAP)) dut (.*);

  // expected writes (register, value)
  logic [15:0] expected [6] = '{16'h1280, 16'h1214, 16'h8C02, 16'h40D0, 16'h1101, 16'h3E00};

  logic siod_bus;
  assign siod_bus = siod_oe ? siod_o : 1'b1;     // pull-up when released

  int nwrites = 0, nbits = 0, last_rise = -1, now = 0;
  logic [27:0] bits;
  int period [28];
  logic [8:0]  oe_at_dc;
  logic in_frame = 0;
  logic sioc_q = 1, siod_q = 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    now++;
    if (rst_n) begin
      if (sioc && sioc_q && siod_q && !siod_bus) begin          // start
        in_frame <= 1; nbits = 0; bits = '0;
      end else if (sioc && sioc_q && !siod_q && siod_bus && in_frame) begin   // stop
        in_frame <= 0;
        // the SIOC rise of the stop condition was sampled as a 28th bit
        bits = bits >> 1;
        check(nbits == 28, $sformatf("write %0d has %0d bits", nwrites, nbits - 1));
        for (int b = 2; b < 27; b++)
          check(period[b] == 4 * DIV, $sformatf("write %0d bit %0d period %0d", nwrites, b, period[b]));
        check(bits[26:19] == 8'h42, $sformatf("write %0d device id %h", nwrites, bits[26:19]));
        check({bits[17:10], bits[8:1]} == expected[nwrites],
              $sformatf("write %0d = %h exp %h", nwrites, {bits[17:10], bits[8:1]}, expected[nwrites]));
        nwrites++;
      end else if (sioc && !sioc_q && in_frame) begin           // data bit
        if (nbits == 8 || nbits == 17 || nbits == 26) check(!siod_oe, "don't-care bit driven");
        else if (nbits < 27) check(siod_oe, "data bit released");
        bits = {bits[26:0], siod_bus};
        nbits++;
        if (nbits < 28) period[nbits] = now - last_rise;
        last_rise = now;
      end
    end
    sioc_q <= sioc;
    siod_q <= siod_bus;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (config_done);
    repeat (50) @(posedge clk);
    check(nwrites == 6, $sformatf("%0d writes", nwrites));
    check(cam_reset == 1'b1 && cam_pwdn == 1'b0, "reset / power-down levels");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
