// tb_ii_data_mux: random 32-word chunks and offsets; output word i must be
// chunk word offset+i, one clock later.
module tb_ii_data_mux;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0][20:0] chunk;
  logic [3:0]        offset;
  logic [15:0][20:0] words;
  int checks = 0, failures = 0;

  ii_data_mux dut (.clk, .chunk, .offset, .words);

  initial begin
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      for (int j = 0; j < 32; j++) chunk[j] = 21'($urandom);
      offset = 4'($urandom);
      @(negedge clk);
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (words[i] !== chunk[int'(offset) + i]) begin
          failures++;
          if (failures < 10) $display("off=%0d i=%0d got %h exp %h", offset, i, words[i], chunk[int'(offset)+i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
