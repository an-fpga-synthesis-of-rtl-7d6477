// tb_rgb2gray: exhaustive test of the RGB444 to gray conversion against the
// BT.601 weights computed in integer arithmetic.
module tb_rgb2gray;
  logic [11:0] rgb;
  logic [7:0]  gray;
  int checks = 0, failures = 0;

  rgb2gray dut (.rgb, .gray);

  initial begin
    for (int v = 0; v < 4096; v++) begin
      int exp_g;
      rgb = 12'(v);
      #1;
      exp_g = fd_ref_pkg::gray_of(rgb);
      checks++;
      if (int'(gray) != exp_g) begin
        failures++;
        if (failures < 10) $display("mismatch rgb=%h gray=%0d exp=%0d", rgb, gray, exp_g);
      end
      if (rgb[11:8] == rgb[7:4] && rgb[7:4] == rgb[3:0]) begin
        checks++;
        if (int'(gray) != int'(rgb[3:0]) * 17) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
