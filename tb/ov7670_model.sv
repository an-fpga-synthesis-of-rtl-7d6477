// ov7670_model: behavioural model of the OV7670 camera's video output in
// RGB444 "xR GB" QVGA mode, for the testbenches. It runs frames back to back:
// VSYNC high for VS_PCLKS clocks, a gap, then IMG_H lines of 2*IMG_W bytes
// with HREF high, each line followed by H_BLANK clocks with HREF low. Data
// changes on the falling edge of PCLK. The testbench fills `pix` (row-major
// 12-bit pixels) and may change it between frames; `frames` counts the
// frames sent.
module ov7670_model #(
  parameter int  IMG_W    = 320,
  parameter int  IMG_H    = 240,
  parameter int  PCLK_HALF = 40,    // in the time unit of the testbench clocks
  parameter int  VS_PCLKS = 1000,
  parameter int  H_BLANK  = 144
) (
  output logic       pclk,
  output logic       vsync,
  output logic       href,
  output logic [7:0] d
);
  logic [11:0] pix [IMG_W*IMG_H];
  int frames = 0;

  initial begin
    pclk = 0; vsync = 0; href = 0; d = 0;
    forever #(PCLK_HALF) pclk = ~pclk;
  end

  task automatic clocks(int n);
    repeat (n) @(negedge pclk);
  endtask

  initial begin
    @(negedge pclk);
    forever begin
      vsync = 1; clocks(VS_PCLKS);
      vsync = 0; clocks(VS_PCLKS);
      for (int y = 0; y < IMG_H; y++) begin
        for (int x = 0; x < IMG_W; x++) begin
          href = 1;
          d = {4'h0, pix[y*IMG_W + x][11:8]};
          clocks(1);
          d = pix[y*IMG_W + x][7:0];
          clocks(1);
        end
        href = 0; d = 0;
        clocks(H_BLANK);
      end
      clocks(VS_PCLKS);
      frames++;
    end
  end
endmodule
