// chan_sel: channel selection for the ADC0808 input multiplexer.
//
// Every falling edge of the channel push-button advances a 4-bit press
// counter (wrapping from 15 to 0). The channel address is the counter
// divided by two, so each channel 0..7 stays selected for two presses and a
// full cycle of the eight channels takes sixteen presses. That mapping is the
// design's specified one. Own choices: the button is synchronised to clk and
// its edge detected there (rather than clocking the counter from the button
// itself), and reset returns to channel 0.
//
// Timing: chan changes on the third clk rising edge after the button falls.
module chan_sel
  import daq_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ch_btn,   // asynchronous push-button
  output chan_t chan
);
  logic       btn_s, btn_q;
  logic [3:0] presses;

  sync2 #(.RESET_VAL(1'b0)) u_sync (.clk, .rst_n, .d(ch_btn), .q(btn_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      btn_q   <= 1'b0;
      presses <= '0;
    end else begin
      btn_q <= btn_s;
      if (btn_q && !btn_s) presses <= presses + 4'd1;
    end
  end

  assign chan = presses[3:1];
endmodule
