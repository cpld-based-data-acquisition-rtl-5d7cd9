// tb_daq_top_handshake: the whole system with the ADC run by the
// start/acknowledge protocol (HANDSHAKE = 1) instead of the fixed frame.
// Checks that every conversion is started again right after its
// acknowledge (samples come back to back, far faster than one per 226
// clocks), that all eight channels are stored and shown correctly, and that
// the gas alarm rises and clears.
module tb_daq_top_handshake;
  import daq_pkg::*;
  int checks = 0, failures = 0;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       mode_b = 1'b0, ch_btn = 1'b0;
  chan_t      adc_add, host_addr = '0, chan;
  logic       adc_start, adc_ale, adc_eoc;
  sample_t    adc_din, host_data;
  logic [7:0] lcd_db;
  logic [1:0] lcd_rs, lcd_rw, lcd_e;
  logic       alarm, temp_over, gas_over, host_valid, smp_valid, lcd_pass_done;
  logic [5:0] reading_tenths;
  logic [7:0] vin [8];
  int         conversions;

  daq_top #(.HANDSHAKE(1'b1)) dut (.*);

  adc0808_model adc (.clk, .start(adc_start && rst_n), .ale(adc_ale && rst_n), .add(adc_add),
                     .vin, .eoc(adc_eoc), .dout(adc_din), .conversions);
  lcd_model lcd (.e(lcd_e[0]), .rs(lcd_rs[0]), .rw(lcd_rw[0]), .db(lcd_db));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // interval between samples
  int cyc = 0, last_smp = -1, max_gap = 0, n_smp = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && smp_valid) begin
      n_smp <= n_smp + 1;
      if (last_smp >= 0 && cyc - last_smp > max_gap) max_gap <= cyc - last_smp;
      last_smp <= cyc;
    end
  end

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

  // ASCII digits of the reading, from the calibration ranges
  function automatic logic [8*4-1:0] reading_text(int c);
    int lo  [24] = '{0, 19, 21, 41, 45, 49, 57, 65, 73, 81, 87, 95, 103, 111, 117,
                     125, 133, 141, 147, 161, 175, 191, 205, 221};
    int rdg [24] = '{3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15, 16, 17,
                     18, 19, 20, 22, 24, 26, 28, 30, 34};
    int r = 0;
    for (int i = 0; i < 24; i++) if (c >= lo[i]) r = rdg[i];
    return {8'(8'h30 + r / 10), ".", 8'(8'h30 + r % 10), "V"};
  endfunction

  initial begin
    vin = '{8'd20, 8'd70, 8'd99, 8'd140, 8'd170, 8'd210, 8'd240, 8'd45};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // the greeting must run once before the voltage page (it sets the LCD up)
    mode_b = 1'b1;
    repeat (2) @(posedge clk iff lcd_pass_done);
    @(negedge clk) mode_b = 1'b0;
    for (int k = 0; k < 8; k++) begin
      wait_samples(2);
      @(negedge clk) host_addr = 3'(k);
      @(negedge clk);
      check(host_valid && host_data == vin[k], $sformatf("channel %0d stored", k));
      repeat (2) @(posedge clk iff lcd_pass_done);
      check(lcd.text('h46, 4) == reading_text(vin[k]), $sformatf("channel %0d shown", k));
      press(); press();
    end
    check(chan == 3'd0, "button wrapped to channel 0");
    // gas alarm
    press(); press();
    vin[1] = 8'd255;
    wait_samples(2);
    repeat (4) @(negedge clk);
    check(alarm && gas_over, "gas alarm");
    vin[1] = 8'd0;
    wait_samples(2);
    repeat (4) @(negedge clk);
    check(!alarm, "gas alarm cleared");
    check(n_smp == conversions, "one sample per conversion");
    check(n_smp > cyc / 100, "conversions faster than one per 100 clocks");
    // 4 start + 8 EOC delay + 64 conversion + a few clocks of synchronising
    check(max_gap <= 90, $sformatf("samples back to back (largest gap %0d)", max_gap));
    $display("%0d samples, largest gap %0d clocks, %0d clocks", n_smp, max_gap, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
