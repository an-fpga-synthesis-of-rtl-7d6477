// capture_ctrl: the capture-mode logic behind the board's mode switch (SW15)
// and capture button (btnc). With the switch low the system runs as video:
// a new frame is requested every time the detector is ready. With the switch
// high it works in snapshot mode: a frame is requested only after a press of
// the button, and the last processed frame stays on screen meanwhile. The
// button is synchronised and debounced (it must be stable for DEBOUNCE clocks)
// and a press is remembered until the detector is ready. `cap_req` is a
// one-clock pulse. Mode switch and capture button come from the published
// design; the polarity of the switch and the debounce time are this design's.
module capture_ctrl #(
  parameter int unsigned DEBOUNCE = 1_000_000   // 10 ms at 100 MHz
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sw_mode,     // 0 = continuous, 1 = snapshot on button
  input  logic btn,
  input  logic ready,       // detector idle
  output logic cap_req,
  output logic pending      // snapshot requested, not yet started
);
  logic [2:0]  sync;
  logic        btn_state, btn_prev;
  logic [$clog2(DEBOUNCE+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync      <= '0;
      btn_state <= 1'b0;
      btn_prev  <= 1'b0;
      cnt       <= '0;
      pending   <= 1'b0;
      cap_req   <= 1'b0;
    end else begin
      sync     <= {sync[1:0], btn};
      btn_prev <= btn_state;
      if (sync[2] != btn_state) begin
        if (cnt == ($clog2(DEBOUNCE+1))'(DEBOUNCE - 1)) begin
          btn_state <= sync[2];
          cnt       <= '0;
        end else cnt <= cnt + 1'b1;
      end else cnt <= '0;

      cap_req <= 1'b0;
      if (btn_state && !btn_prev && sw_mode) pending <= 1'b1;
      if (ready && !cap_req && (!sw_mode || pending)) begin
        cap_req <= 1'b1;
        pending <= 1'b0;
      end
    end
  end
endmodule
