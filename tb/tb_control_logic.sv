// tb_control_logic: models the units around the frame sequencer with random
// response times and checks the order of one frame: capture (with port B
// given to the capture unit), one integral-image build and one classification
// per strip for strip_y = 0 .. IMG_H-WIN in order, the draw handshake, and
// frame_done. Runs two frames.
module tb_control_logic;
  import fd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cap_req = 0, ready, cap_start, cap_sel, cap_done = 0, face_clear, ii_start, ii_done = 0;
  logic sw_start, sw_done = 0, draw_req, draw_ack = 0, frame_done;
  logic [7:0] strip_y;
  int checks = 0, failures = 0;

  control_logic dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic pulse_after(ref logic sig, input int n);
    repeat (n) @(negedge clk);
    sig = 1;
    @(negedge clk) sig = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int fr = 0; fr < 2; fr++) begin
      @(negedge clk);
      check(ready, "ready when idle");
      cap_req = 1;
      @(negedge clk) cap_req = 0;
      check(cap_start && face_clear, "capture start / list clear");
      @(negedge clk);
      check(cap_sel && !ready, "port B to capture");
      pulse_after(cap_done, $urandom_range(20));
      for (int y = 0; y <= IMG_H - WIN; y++) begin
        wait (ii_start);
        @(negedge clk);
        check(!cap_sel, "port B released");
        check(int'(strip_y) == y, $sformatf("strip %0d got %0d", y, strip_y));
        pulse_after(ii_done, $urandom_range(5));
        wait (sw_start);
        @(negedge clk);
        pulse_after(sw_done, $urandom_range(5));
      end
      wait (draw_req);
      check(!ii_start && !sw_start, "no strip after the last");
      repeat ($urandom_range(10)) @(negedge clk);
      draw_ack = 1;
      wait (!draw_req);
      @(negedge clk) draw_ack = 0;
      wait (frame_done);
      check(1, "frame done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
