// tb_image_buffer: writes random pixels through both ports (port B at the
// detector clock, port A at the VGA clock), reads them back through the other
// port and compares against a model array; checks the read-first behaviour
// and the one-clock read latency.
module tb_image_buffer;
  localparam int DEPTH = 320 * 240;
  logic clk_a = 0, clk_b = 0;
  always #20 clk_a = ~clk_a;
  always #5  clk_b = ~clk_b;

  logic        a_we = 0, b_we = 0;
  logic [16:0] a_addr = 0, b_addr = 0;
  logic [11:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  int checks = 0, failures = 0;
  logic [11:0] model [int];

  image_buffer dut (.*);

  task automatic check(string what, logic [11:0] got, logic [11:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h exp %h", what, got, exp);
    end
  endtask

  int addrs [64];
  initial begin
    for (int i = 0; i < 64; i++) addrs[i] = (i == 0) ? 0 : (i == 1) ? DEPTH - 1 : $urandom_range(DEPTH - 1);
    // port B writes
    for (int i = 0; i < 32; i++) begin
      @(negedge clk_b);
      b_we = 1; b_addr = 17'(addrs[i]); b_wdata = 12'($urandom); model[addrs[i]] = b_wdata;
    end
    @(negedge clk_b) b_we = 0;
    // port A writes
    for (int i = 32; i < 64; i++) begin
      @(negedge clk_a);
      a_we = 1; a_addr = 17'(addrs[i]); a_wdata = 12'($urandom); model[addrs[i]] = a_wdata;
    end
    @(negedge clk_a) a_we = 0;
    // read all through A and B
    for (int i = 0; i < 64; i++) begin
      @(negedge clk_a) a_addr = 17'(addrs[i]);
      @(negedge clk_a) check("A read", a_rdata, model[addrs[i]]);
      @(negedge clk_b) b_addr = 17'(addrs[i]);
      @(negedge clk_b) check("B read", b_rdata, model[addrs[i]]);
    end
    // read-first on port B: write new data, same-cycle read returns old data
    @(negedge clk_b) begin b_we = 1; b_addr = 17'(addrs[5]); b_wdata = ~model[addrs[5]]; end
    @(negedge clk_b) begin b_we = 0; check("B read-first", b_rdata, model[addrs[5]]); model[addrs[5]] = ~model[addrs[5]]; end
    @(negedge clk_b) check("B after write", b_rdata, model[addrs[5]]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk_b);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
