// adc_ctrl: the parallel interface to the ADC0808.
//
// Start side. In the default, free-running-frame mode (HANDSHAKE = 0) a
// counter runs over a frame of FRAME_CLKS clocks and drives START and ALE high
// together for START_LEN clocks beginning at count START_FIRST: with the
// specified defaults a 4-clock start pulse every 226 clocks. In HANDSHAKE = 1
// mode the controller instead follows the start / acknowledge protocol: pulse
// START, wait for EOC to fall and rise again (the acknowledge), read the
// data, then start the next conversion at once.
//
// Address. The channel address is copied from chan one clock before the start
// pulse and held until the next one, so the multiplexer address is stable
// around the ALE edge that latches it inside the ADC and the sample can be
// tagged with the channel it came from.
//
// Read side. EOC is synchronised; on its rising edge the data bus is read into
// smp_data and smp_valid pulses for one clock. The ADC output enable is taken
// to be tied high, so the data bus is valid while EOC is high.
//
// Specified: the frame, pulse position and length, START and ALE driven
// together, reading the data at end of conversion, and the start/acknowledge
// sequence. Own choices: HANDSHAKE mode as a parameter, the synchroniser, the
// address register, and the restart after ACK_TIMEOUT clocks if the ADC never
// acknowledges in HANDSHAKE mode.
//
// Latency: smp_valid comes 3 clk edges after EOC rises.
module adc_ctrl
  import daq_pkg::*;
#(
  parameter int FRAME_CLKS  = 226,
  parameter int START_FIRST = 220,
  parameter int START_LEN   = 4,
  parameter bit HANDSHAKE   = 1'b0,
  parameter int ACK_TIMEOUT = 1024
) (
  input  logic    clk,
  input  logic    rst_n,
  input  chan_t   chan,
  // ADC0808 pins
  output chan_t   adc_add,
  output logic    adc_start,
  output logic    adc_ale,
  input  logic    adc_eoc,
  input  sample_t adc_din,
  // captured sample
  output logic    smp_valid,
  output chan_t   smp_chan,
  output sample_t smp_data
);
  localparam int CW = $clog2(FRAME_CLKS > ACK_TIMEOUT ? FRAME_CLKS : ACK_TIMEOUT) + 1;

  typedef enum logic [1:0] {HS_PREP, HS_START, HS_WAIT_LOW, HS_WAIT_HIGH} hs_state_e;

  logic          eoc_s, eoc_q, eoc_rise;
  logic [CW-1:0] cnt;
  logic          start_q;
  hs_state_e     hs_state;

  // EOC idles high on the ADC0808, so the synchroniser resets high.
  sync2 #(.RESET_VAL(1'b1)) u_sync (.clk, .rst_n, .d(adc_eoc), .q(eoc_s));
  assign eoc_rise = eoc_s && !eoc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eoc_q    <= 1'b1;
      cnt      <= '0;
      start_q  <= 1'b0;
      adc_add  <= '0;
      hs_state <= HS_PREP;
    end else begin
      eoc_q <= eoc_s;
      if (!HANDSHAKE) begin
        cnt     <= (cnt == CW'(FRAME_CLKS - 1)) ? '0 : cnt + 1'b1;
        start_q <= (cnt >= CW'(START_FIRST - 1)) && (cnt < CW'(START_FIRST + START_LEN - 1));
        if (cnt == CW'(START_FIRST - 2) ||
            (START_FIRST < 2 && cnt == CW'(FRAME_CLKS + START_FIRST - 2)))
          adc_add <= chan;
      end else begin
        unique case (hs_state)
          HS_PREP: begin
            adc_add  <= chan;
            cnt      <= '0;
            hs_state <= HS_START;
          end
          HS_START: begin
            start_q <= 1'b1;
            cnt     <= cnt + 1'b1;
            if (cnt == CW'(START_LEN)) begin
              start_q  <= 1'b0;
              cnt      <= '0;
              hs_state <= HS_WAIT_LOW;
            end
          end
          HS_WAIT_LOW: begin
            cnt <= cnt + 1'b1;
            if (!eoc_s)                           hs_state <= HS_WAIT_HIGH;
            else if (cnt == CW'(ACK_TIMEOUT - 1)) hs_state <= HS_PREP;
          end
          HS_WAIT_HIGH: begin
            cnt <= cnt + 1'b1;
            if (eoc_rise || cnt == CW'(ACK_TIMEOUT - 1)) hs_state <= HS_PREP;
          end
        endcase
      end
    end
  end

  assign adc_start = start_q;
  assign adc_ale   = start_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      smp_valid <= 1'b0;
      smp_chan  <= '0;
      smp_data  <= '0;
    end else begin
      smp_valid <= eoc_rise;
      if (eoc_rise) begin
        smp_chan <= adc_add;
        smp_data <= adc_din;
      end
    end
  end

  // The address must not change while the ADC is latching it.
  a_add_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 adc_ale |-> $stable(adc_add));
endmodule
