// tb_daq_top: end-to-end test of the whole acquisition system at its default
// parameters, with a behavioural ADC0808 and a behavioural character LCD.
//
// It shows the greeting, switches to the voltage page, walks the channel
// button through all eight channels checking each stored sample through the
// host port and the reading on the LCD, raises the alarm from the gas
// channel and from the temperature channel and clears it again, and checks
// the conversion rate (one start every 226 clocks). Each mechanism is
// counted; one that never happened counts as a failure.
module tb_daq_top;
  import daq_pkg::*;
  int checks = 0, failures = 0;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       mode_b = 1'b1, ch_btn = 1'b0;
  chan_t      adc_add, host_addr = '0, chan;
  logic       adc_start, adc_ale, adc_eoc;
  sample_t    adc_din, host_data;
  logic [7:0] lcd_db;
  logic [1:0] lcd_rs, lcd_rw, lcd_e;
  logic       alarm, temp_over, gas_over, host_valid, smp_valid, lcd_pass_done;
  logic [5:0] reading_tenths;
  logic [7:0] vin [8];
  int         conversions;

  daq_top dut (.*);

  adc0808_model adc (.clk, .start(adc_start && rst_n), .ale(adc_ale && rst_n), .add(adc_add),
                     .vin, .eoc(adc_eoc), .dout(adc_din), .conversions);
  lcd_model lcd (.e(lcd_e[0]), .rs(lcd_rs[0]), .rw(lcd_rw[0]), .db(lcd_db));

  always #5 clk = ~clk;

  // mechanisms seen
  int m_greet = 0, m_volt = 0, m_switch = 0, m_chan = 0, m_conv = 0;
  int m_gas_alarm = 0, m_temp_alarm = 0, m_clear = 0, m_host = 0, m_shift = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the two LCD control copies always agree
  always @(posedge clk) if (rst_n && (lcd_e[0] != lcd_e[1] || lcd_rs[0] != lcd_rs[1]
                                      || lcd_rw[0] != lcd_rw[1])) begin
    failures++; $display("LCD control copies differ");
  end

  // start period
  int cyc = 0, last_start = -1, n_period_checks = 0;
  logic start_q = 1'b0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    start_q <= adc_start;
    if (rst_n && adc_start && !start_q) begin
      if (last_start >= 0) begin
        checks++; n_period_checks++;
        if (cyc - last_start != 226) begin failures++; $display("start period %0d", cyc - last_start); end
      end
      last_start <= cyc;
    end
    if (rst_n && smp_valid) m_conv++;
  end

  // reference reading, from the calibration ranges
  function automatic logic [8*4-1:0] reading_text(int c);
    int lo  [24] = '{0, 19, 21, 41, 45, 49, 57, 65, 73, 81, 87, 95, 103, 111, 117,
                     125, 133, 141, 147, 161, 175, 191, 205, 221};
    int rdg [24] = '{3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15, 16, 17,
                     18, 19, 20, 22, 24, 26, 28, 30, 34};
    int r = 0;
    for (int i = 0; i < 24; i++) if (c >= lo[i]) r = rdg[i];
    return {8'(8'h30 + r / 10), ".", 8'(8'h30 + r % 10), "V"};
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  task automatic press();
    @(negedge clk) ch_btn = 1'b1;
    repeat (3) @(negedge clk);
    ch_btn = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  task automatic wait_samples(int n);
    repeat (n) @(posedge clk iff smp_valid);
    repeat (2) @(posedge clk);
  endtask

  task automatic wait_passes(int n);
    repeat (n) @(posedge clk iff lcd_pass_done);
    @(negedge clk);
  endtask

  task automatic host_read(chan_t a, output sample_t d, output logic v);
    @(negedge clk) host_addr = a;
    @(negedge clk);
    d = host_data; v = host_valid;
    m_host++;
  endtask

  initial begin
    sample_t d;
    logic    v;
    chan_t   cur;
    vin = '{8'd60, 8'd40, 8'd100, 8'd150, 8'd190, 8'd230, 8'd5, 8'd128};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // greeting page
    wait_passes(2);
    check(lcd.text('h00, 16) == {"WEL", 8'hB0, "COME", 8'hA0, "TO", 8'hA0, "CPLD"}, "greeting line 1");
    check(lcd.text('h41, 13) == {"ADC08", 8'hA0, "CONTROL"}, "greeting line 2");
    check(lcd.func_set_8bit_2l && lcd.display_on && lcd.entry_inc, "LCD initialised");
    if (lcd.text('h41, 13) == {"ADC08", 8'hA0, "CONTROL"}) m_greet++;
    if (lcd.n_shift_r > 0 && lcd.n_shift_l > 0) m_shift++;

    // samples of channel 0 arrive and are stored
    wait_samples(2);
    host_read(3'd0, d, v);
    check(v && d == vin[0], "channel 0 stored");
    host_read(3'd1, d, v);
    check(!v, "channel 1 not yet converted");
    check(!alarm, "no alarm at start");

    // voltage page
    @(negedge clk) mode_b = 1'b0;
    m_switch++;
    wait_passes(2);
    check(lcd.text('h02, 13) == {"INPUT", 8'hA0, "VOLTAGE"}, "voltage line 1");
    check(lcd.text('h46, 4) == reading_text(vin[0]), "channel 0 reading");
    if (lcd.text('h46, 4) == reading_text(vin[0])) m_volt++;

    // walk through all channels: two presses per channel
    cur = 3'd0;
    for (int k = 1; k <= 8; k++) begin
      press(); press();
      cur = 3'(k % 8);
      check(chan == cur, $sformatf("channel %0d selected", cur));
      m_chan++;
      wait_samples(2);
      check(adc_add == cur, "ADC address follows the channel");
      host_read(cur, d, v);
      check(v && d == vin[cur], $sformatf("channel %0d stored", cur));
      wait_passes(1);
      check(lcd.text('h46, 4) == reading_text(vin[cur]),
            $sformatf("channel %0d reading '%s'", cur, lcd.text('h46, 4)));
      check(reading_tenths != 0, "reading present");
    end
    // every channel's word is now valid
    for (int i = 0; i < 8; i++) begin
      host_read(3'(i), d, v);
      check(v && d == vin[i], $sformatf("channel %0d kept", i));
    end
    check(!alarm && !temp_over && !gas_over, "no alarm below thresholds");

    // gas alarm: channel 1
    press(); press();
    check(chan == 3'd1, "on gas channel");
    vin[1] = 8'd200;
    wait_samples(2);
    repeat (4) @(negedge clk);
    check(gas_over && alarm && !temp_over, "gas alarm");
    if (alarm && gas_over) m_gas_alarm++;
    vin[1] = 8'd30;
    wait_samples(2);
    repeat (4) @(negedge clk);
    check(!alarm, "gas alarm cleared");
    if (!alarm) m_clear++;

    // temperature alarm: channel 0, fourteen presses on
    repeat (14) press();
    check(chan == 3'd0, "on temperature channel");
    vin[0] = 8'd250;
    wait_samples(2);
    repeat (4) @(negedge clk);
    check(temp_over && alarm && !gas_over, "temperature alarm");
    if (alarm && temp_over) m_temp_alarm++;
    wait_passes(1);
    check(lcd.text('h46, 4) == "3.4V", "full-scale reading");
    // the stored value keeps the alarm on while another channel is viewed
    press(); press(); press(); press();
    wait_samples(2);
    check(alarm, "alarm held by stored temperature");
    repeat (12) press();
    vin[0] = 8'd128;   // exactly at the threshold: not over
    wait_samples(2);
    repeat (4) @(negedge clk);
    check(!alarm, "temperature at threshold clears alarm");
    if (!alarm) m_clear++;

    // back to the greeting
    @(negedge clk) mode_b = 1'b1;
    m_switch++;
    wait_passes(2);
    check(lcd.text('h00, 16) == {"WEL", 8'hB0, "COME", 8'hA0, "TO", 8'hA0, "CPLD"}, "greeting again");

    check(conversions >= m_conv && m_conv > 20, "conversions counted");
    check(n_period_checks > 20, "start period observed");
    check(m_greet > 0, "mechanism: greeting shown");
    check(m_shift > 0, "mechanism: display shift");
    check(m_volt > 0, "mechanism: voltage page");
    check(m_switch >= 2, "mechanism: mode switch");
    check(m_chan >= 8, "mechanism: channel change");
    check(m_conv > 0, "mechanism: conversion");
    check(m_gas_alarm > 0, "mechanism: gas alarm");
    check(m_temp_alarm > 0, "mechanism: temperature alarm");
    check(m_clear >= 2, "mechanism: alarm clear");
    check(m_host > 0, "mechanism: host read");
    $display("greet %0d shift %0d volt %0d switch %0d chan %0d conv %0d gas %0d temp %0d clear %0d host %0d, %0d clocks",
             m_greet, m_shift, m_volt, m_switch, m_chan, m_conv, m_gas_alarm, m_temp_alarm,
             m_clear, m_host, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
