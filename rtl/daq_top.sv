// daq_top: the CPLD logic of an eight-channel data-acquisition and fire-alarm
// system built around an ADC0808 and a character LCD.
//
// Data path: adc_ctrl starts the ADC0808 on a fixed frame (or, with
// HANDSHAKE = 1, after each acknowledged conversion) on the channel chosen
// with the channel button (chan_sel), and reads the 8-bit result when EOC
// rises. Each result is written into sample_ram at its channel's address.
// threshold_alarm reads back the temperature word and then the gas word and
// drives alarm when either exceeds its stored threshold. The latest result is
// also held in disp_code, converted to a reading d.d V by volt_conv, and
// shown by lcd_ctrl when the mode switch b is 0; with b = 1 the LCD shows
// the greeting. Port B of sample_ram is brought out for the host (USB) link,
// whose transport lies outside this logic.
//
// The LCD control lines are driven as two identical copies (index 0 and 1),
// as the design specifies, for two display connectors.
//
// All logic runs on clk, the slow system clock. The button, switch and EOC
// inputs are asynchronous and are synchronised inside.
//
// The ADC frame, channel button, calibration table and LCD scripts follow
// the reference design. The sample store layout, the alarm's channels and
// thresholds, the host read port, the reset and the synchronisers are this
// design's own choices. lcd_rw is constant 0: the LCD is only written.
module daq_top
  import daq_pkg::*;
#(
  parameter bit      HANDSHAKE   = 1'b0,
  parameter int      STEP_CLKS   = 1,
  parameter sample_t TEMP_THRESH = 8'd128,
  parameter sample_t GAS_THRESH  = 8'd128
) (
  input  logic       clk,
  input  logic       rst_n,
  // operator inputs
  input  logic       mode_b,       // 1: greeting page, 0: voltage page
  input  logic       ch_btn,       // channel push-button
  // ADC0808
  output chan_t      adc_add,
  output logic       adc_start,
  output logic       adc_ale,
  input  logic       adc_eoc,
  input  sample_t    adc_din,
  // LCD (two copies of the control lines)
  output logic [7:0] lcd_db,
  output logic [1:0] lcd_rs,
  output logic [1:0] lcd_rw,
  output logic [1:0] lcd_e,
  // fire alarm
  output logic       alarm,
  output logic       temp_over,
  output logic       gas_over,
  // host side: read access to the stored samples
  input  chan_t      host_addr,
  output sample_t    host_data,
  output logic       host_valid,
  // status
  output chan_t      chan,
  output logic       smp_valid,
  output logic [5:0] reading_tenths,  // displayed reading in 0.1 V
  output logic       lcd_pass_done
);
  chan_t      smp_chan, alm_addr;
  sample_t    smp_data, alm_data, disp_code;
  logic       alm_valid, mode_s;
  logic [7:0] units_ascii, tenths_ascii;
  logic       rs, rw, e;

  chan_sel u_chan_sel (.clk, .rst_n, .ch_btn, .chan);

  adc_ctrl #(.HANDSHAKE(HANDSHAKE)) u_adc (
    .clk, .rst_n, .chan,
    .adc_add, .adc_start, .adc_ale, .adc_eoc, .adc_din,
    .smp_valid, .smp_chan, .smp_data
  );

  sample_ram #(.DEPTH(NUM_CH), .WIDTH(ADC_W)) u_ram (
    .clk, .rst_n,
    .we(smp_valid), .waddr(smp_chan), .wdata(smp_data),
    .a_addr(alm_addr), .a_data(alm_data), .a_valid(alm_valid),
    .b_addr(host_addr), .b_data(host_data), .b_valid(host_valid)
  );

  threshold_alarm #(.TEMP_THRESH(TEMP_THRESH), .GAS_THRESH(GAS_THRESH)) u_alarm (
    .clk, .rst_n,
    .rd_addr(alm_addr), .rd_data(alm_data), .rd_valid(alm_valid),
    .temp_over, .gas_over, .alarm
  );

  // Reading shown on the LCD: the most recent conversion.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         disp_code <= '0;
    else if (smp_valid) disp_code <= smp_data;
  end

  volt_conv u_conv (.code(disp_code), .tenths_total(reading_tenths), .units_ascii, .tenths_ascii);

  sync2 #(.RESET_VAL(1'b1)) u_mode_sync (.clk, .rst_n, .d(mode_b), .q(mode_s));

  lcd_ctrl #(.STEP_CLKS(STEP_CLKS)) u_lcd (
    .clk, .rst_n,
    .page(mode_s ? PAGE_GREET : PAGE_VOLT),
    .units_ascii, .tenths_ascii,
    .lcd_rs(rs), .lcd_rw(rw), .lcd_e(e), .lcd_db,
    .pass_done(lcd_pass_done)
  );

  assign lcd_rs = {2{rs}};
  assign lcd_rw = {2{rw}};
  assign lcd_e  = {2{e}};
endmodule
