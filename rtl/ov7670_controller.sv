// ov7670_controller: after reset, writes the OV7670 configuration registers
// over the camera's SCCB serial bus (SIOC clock, SIOD data), then raises
// `config_done`. Each write is a 3-phase transmission: start condition, the
// device write address 0x42, the register address, the value, each byte
// followed by a "don't care" bit during which SIOD is released (siod_oe = 0),
// then a stop condition. One bit lasts 4 * CLK_DIV clocks (100 kHz SIOC at
// 100 MHz by default) and writes are GAP_TICKS * CLK_DIV clocks apart.
// The camera is kept out of reset (cam_reset high) and powered (cam_pwdn low).
// The SCCB control pins and the RESET/PWRDN lines come from the published
// design. The register list is not given there; the one below, chosen by this
// design, sets QVGA, RGB444 "xR GB" output, full output range and an internal
// clock of XCLK/2: a soft reset, then COM7, RGB444, COM15, CLKRC and COM14.
module ov7670_controller #(
  parameter int unsigned CLK_DIV   = 250,
  parameter int unsigned GAP_TICKS = 400
) (
  input  logic clk,
  input  logic rst_n,
  output logic sioc,
  output logic siod_o,
  output logic siod_oe,
  output logic cam_reset,
  output logic cam_pwdn,
  output logic config_done
);
  localparam int unsigned NREGS = 6;

  function automatic logic [15:0] reg_entry(int unsigned n);
    unique case (n)
      0:       return 16'h12_80;   // COM7: register reset
      1:       return 16'h12_14;   // COM7: QVGA, RGB output
      2:       return 16'h8C_02;   // RGB444: enable, xR GB word order
      3:       return 16'h40_D0;   // COM15: output range 00-FF, RGB565/444
      4:       return 16'h11_01;   // CLKRC: internal clock = XCLK / 2
      default: return 16'h3E_00;   // COM14: normal PCLK
    endcase
  endfunction

  typedef enum logic [2:0] {B_GAP, B_START, B_BITS, B_STOP, B_DONE} sccb_e;
  sccb_e       state;
  logic [$clog2(CLK_DIV)-1:0] div;
  logic        tick;
  logic [1:0]  q;            // quarter of the bit time
  logic [4:0]  bitn;         // 0..26
  logic [26:0] shreg;
  logic [2:0]  regn;
  logic [$clog2(GAP_TICKS+1)-1:0] gap;

  assign cam_reset = 1'b1;
  assign cam_pwdn  = 1'b0;
  assign tick      = (div == ($clog2(CLK_DIV))'(CLK_DIV - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div         <= '0;
      state       <= B_GAP;
      q           <= '0;
      bitn        <= '0;
      shreg       <= '0;
      regn        <= '0;
      gap         <= '0;
      sioc        <= 1'b1;
      siod_o      <= 1'b1;
      siod_oe     <= 1'b1;
      config_done <= 1'b0;
    end else begin
      div <= tick ? '0 : div + 1'b1;
      if (tick) begin
        unique case (state)
          B_GAP: begin
            sioc <= 1'b1; siod_o <= 1'b1; siod_oe <= 1'b1;
            if (gap == ($clog2(GAP_TICKS+1))'(GAP_TICKS)) begin
              gap   <= '0;
              q     <= '0;
              shreg <= {8'h42, 1'b1, reg_entry(32'(regn))[15:8], 1'b1,
                        reg_entry(32'(regn))[7:0], 1'b1};
              state <= B_START;
            end else gap <= gap + 1'b1;
          end
          B_START: begin
            q <= q + 2'd1;
            unique case (q)
              2'd0: begin siod_o <= 1'b0; sioc <= 1'b1; end
              2'd1: begin siod_o <= 1'b0; sioc <= 1'b0; end
              default: begin q <= '0; bitn <= '0; state <= B_BITS; end
            endcase
          end
          B_BITS: begin
            q <= q + 2'd1;
            unique case (q)
              2'd0: begin
                sioc    <= 1'b0;
                siod_o  <= shreg[26];
                siod_oe <= !(bitn == 5'd8 || bitn == 5'd17 || bitn == 5'd26);
              end
              2'd1: sioc <= 1'b0;
              2'd2: sioc <= 1'b1;
              default: begin
                sioc  <= 1'b1;
                shreg <= {shreg[25:0], 1'b0};
                bitn  <= bitn + 5'd1;
                if (bitn == 5'd26) begin q <= '0; state <= B_STOP; end
              end
            endcase
          end
          B_STOP: begin
            q <= q + 2'd1;
            unique case (q)
              2'd0: begin sioc <= 1'b0; siod_o <= 1'b0; siod_oe <= 1'b1; end
              2'd1: begin sioc <= 1'b1; siod_o <= 1'b0; end
              default: begin
                siod_o <= 1'b1;
                q      <= '0;
                if (32'(regn) == NREGS - 1) state <= B_DONE;
                else begin regn <= regn + 3'd1; state <= B_GAP; end
              end
            endcase
          end
          B_DONE: config_done <= 1'b1;
          default: state <= B_DONE;
        endcase
      end
    end
  end
endmodule
