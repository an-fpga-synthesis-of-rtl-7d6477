// tb_capture_ctrl: continuous mode must request a frame whenever the detector
// is ready; snapshot mode only after a debounced button press, remembered
// until ready. Button bounces shorter than the debounce time are ignored.
module tb_capture_ctrl;
  localparam int DB = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sw_mode = 0, btn = 0, ready, cap_req, pending;
  int checks = 0, failures = 0, reqs = 0;

  capture_ctrl #(.DEBOUNCE(DB)) dut (.*);

  always @(posedge clk) if (rst_n && cap_req) reqs++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // detector model: busy for 20 clocks after every request; `hold` keeps it busy
  int busy_cnt = 0;
  logic hold = 0;
  always_ff @(posedge clk)
    if (cap_req) busy_cnt <= 20;
    else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
  assign ready = rst_n && busy_cnt == 0 && !hold;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // continuous: about one request per 21 clocks
    repeat (210) @(posedge clk);
    check(reqs >= 9 && reqs <= 11, $sformatf("continuous requests %0d", reqs));
    // snapshot: nothing without a press
    sw_mode = 1;
    repeat (30) @(posedge clk);
    reqs = 0;
    repeat (200) @(posedge clk);
    check(reqs == 0, "request without press");
    // bounce: 3-clock pulses are ignored
    repeat (5) begin btn = 1; repeat (3) @(posedge clk); btn = 0; repeat (3) @(posedge clk); end
    repeat (50) @(posedge clk);
    check(reqs == 0, "bounce accepted");
    // real press while busy: remembered until ready
    hold = 1;
    btn = 1; repeat (40) @(posedge clk); btn = 0;
    repeat (20) @(posedge clk);
    check(pending && reqs == 0, "press not remembered");
    hold = 0;
    repeat (5) @(posedge clk);
    check(reqs == 1 && !pending, $sformatf("press gave %0d requests", reqs));
    repeat (100) @(posedge clk);
    check(reqs == 1, "extra requests after one press");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
