// tb_face_box: fills the detection list past its capacity (overflow), asks for
// drawing across the clock domains and checks that exactly the outlines of
// the stored windows are written, in the box colour, with one write per clock,
// and that the request/acknowledge handshake completes. A second round after
// `clear` checks that the list restarts.
module tb_face_box;
  import fd_pkg::*;
  localparam int MAXF = 4;
  logic clk_a = 0, clk_b = 0, rst_a_n = 0, rst_b_n = 0;
  always #20 clk_a = ~clk_a;
  always #5  clk_b = ~clk_b;

  logic clear = 0, det_valid = 0, draw_req = 0, draw_ack, overflow, box_we;
  logic [8:0] det_x = 0;
  logic [7:0] det_y = 0;
  logic [$clog2(MAXF+1)-1:0] face_count;
  logic [IMG_AW-1:0] box_addr;
  logic [PIX_W-1:0] box_data;
  int checks = 0, failures = 0, writes = 0;
  bit written [int];

  face_box #(.MAX_FACES(MAXF), .BOX_COLOR(12'h0F0)) dut (.*);

  always @(posedge clk_a) if (rst_a_n && box_we) begin
    writes++;
    written[int'(box_addr)] = 1;
    checks++;
    if (box_data != 12'h0F0) failures++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic round(int n, int xs[], int ys[]);
    bit exp_set [int];
    writes = 0;
    written.delete();
    @(negedge clk_b) clear = 1;
    @(negedge clk_b) clear = 0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk_b) begin det_valid = 1; det_x = 9'(xs[k]); det_y = 8'(ys[k]); end
    end
    @(negedge clk_b) det_valid = 0;
    check(int'(face_count) == ((n < MAXF) ? n : MAXF), $sformatf("count %0d", face_count));
    check(overflow == (n > MAXF), "overflow flag");
    draw_req = 1;
    wait (draw_ack);
    @(negedge clk_b) draw_req = 0;
    wait (!draw_ack);
    for (int k = 0; k < n && k < MAXF; k++)
      for (int i = 0; i < WIN; i++) begin
        exp_set[(ys[k]) * IMG_W + xs[k] + i] = 1;
        exp_set[(ys[k] + WIN - 1) * IMG_W + xs[k] + i] = 1;
        exp_set[(ys[k] + i) * IMG_W + xs[k]] = 1;
        exp_set[(ys[k] + i) * IMG_W + xs[k] + WIN - 1] = 1;
      end
    check(writes == 4 * WIN * ((n < MAXF) ? n : MAXF), $sformatf("writes %0d", writes));
    check(written.size() == exp_set.size(), $sformatf("pixels %0d exp %0d", written.size(), exp_set.size()));
    foreach (exp_set[a]) check(written.exists(a), $sformatf("pixel %0d not drawn", a));
  endtask

  initial begin
    repeat (3) @(posedge clk_a);
    rst_a_n = 1; rst_b_n = 1;
    round(6, '{0, 100, 296, 150, 7, 8}, '{0, 50, 216, 100, 9, 9});
    round(2, '{10, 20}, '{20, 30});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk_a);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
