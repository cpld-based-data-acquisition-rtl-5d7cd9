// tb_adc_ctrl: the ADC0808 interface against a behavioural ADC0808.
//
// Instance p (default, fixed frame): START and ALE are identical, 4 clocks
// long, every 226 clocks, first rising after the 220th clock edge out of
// reset; the address is stable at the ALE edge; every sample equals the
// model's input for the channel latched at the start, and smp_valid comes 3
// clock edges after EOC rises.
// Instance h (HANDSHAKE = 1): the next START follows the acknowledge within a
// few clocks, so conversions come back to back; samples are checked likewise.
// Instance t (HANDSHAKE = 1, EOC stuck high): the controller gives up after
// ACK_TIMEOUT clocks and starts again.
module tb_adc_ctrl;
  import daq_pkg::*;
  int checks = 0, failures = 0;

  logic       clk = 1'b0, rst_n = 1'b0;
  chan_t      chan = '0;
  logic [7:0] vin [8];

  // fixed-frame instance
  chan_t   p_add, p_smp_chan;
  logic    p_start, p_ale, p_eoc, p_valid;
  sample_t p_dout, p_smp;
  int      p_conv;
  adc_ctrl dut_p (.clk, .rst_n, .chan, .adc_add(p_add), .adc_start(p_start), .adc_ale(p_ale),
                  .adc_eoc(p_eoc), .adc_din(p_dout), .smp_valid(p_valid),
                  .smp_chan(p_smp_chan), .smp_data(p_smp));
  adc0808_model adc_p (.clk, .start(p_start && rst_n), .ale(p_ale && rst_n), .add(p_add), .vin,
                       .eoc(p_eoc), .dout(p_dout), .conversions(p_conv));

  // handshake instance
  chan_t   h_add, h_smp_chan;
  logic    h_start, h_ale, h_eoc, h_valid;
  sample_t h_dout, h_smp;
  int      h_conv;
  adc_ctrl #(.HANDSHAKE(1'b1)) dut_h (.clk, .rst_n, .chan, .adc_add(h_add), .adc_start(h_start),
                  .adc_ale(h_ale), .adc_eoc(h_eoc), .adc_din(h_dout), .smp_valid(h_valid),
                  .smp_chan(h_smp_chan), .smp_data(h_smp));
  adc0808_model adc_h (.clk, .start(h_start && rst_n), .ale(h_ale && rst_n), .add(h_add), .vin,
                       .eoc(h_eoc), .dout(h_dout), .conversions(h_conv));

  // handshake instance whose ADC never answers
  chan_t   t_add, t_smp_chan;
  logic    t_start, t_ale, t_valid;
  sample_t t_smp;
  adc_ctrl #(.HANDSHAKE(1'b1), .ACK_TIMEOUT(50)) dut_t (.clk, .rst_n, .chan, .adc_add(t_add),
                  .adc_start(t_start), .adc_ale(t_ale), .adc_eoc(1'b1), .adc_din(8'h00),
                  .smp_valid(t_valid), .smp_chan(t_smp_chan), .smp_data(t_smp));

  always #5 clk = ~clk;

  int   cyc = 0;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --- fixed frame: pulse shape and period
  int p_rise = -1, p_len = 0, p_pulses = 0;
  chan_t p_exp_chan, h_exp_chan;
  sample_t p_exp_val, h_exp_val;
  always @(posedge clk) if (rst_n) begin
    if (p_start != p_ale) begin failures++; $display("START and ALE differ"); end
    if (p_start) p_len <= p_len + 1;
    if (p_start && p_len == 0) begin   // first clock of a pulse
      checks++;
      if (p_rise < 0) begin
        if (cyc != 220) begin failures++; $display("first start after %0d clocks", cyc); end
      end else if (cyc - p_rise != 226) begin
        failures++; $display("start period %0d", cyc - p_rise);
      end
      p_rise     <= cyc;
      p_pulses   <= p_pulses + 1;
      p_exp_chan <= p_add;
    end
    if (!p_start && p_len != 0) begin
      checks++;
      if (p_len != 4) begin failures++; $display("start length %0d", p_len); end
      p_len <= 0;
    end
  end

  // --- sample checks (both instances); the reference value is the ADC bus at
  // the moment EOC rises, and the model's latched channel must be the one the
  // controller presented at START
  int p_eoc_rise = -1, p_samples = 0, h_samples = 0;
  logic p_eoc_q = 1'b1;
  always @(posedge clk) if (rst_n) begin
    p_eoc_q <= p_eoc;
    if (p_eoc && !p_eoc_q) begin p_eoc_rise <= cyc; p_exp_val <= p_dout; end
    if (p_valid) begin
      checks++;
      p_samples <= p_samples + 1;
      if (p_smp != p_exp_val || adc_p.ch != p_exp_chan || p_smp_chan != p_exp_chan) begin
        failures++; $display("fixed @%0d model ch %0d: sample %h ch %0d, expected %h ch %0d", cyc, adc_p.ch,
                             p_smp, p_smp_chan, p_exp_val, p_exp_chan);
      end
      checks++;
      if (cyc - p_eoc_rise != 3) begin failures++; $display("capture latency %0d", cyc - p_eoc_rise); end
    end
  end

  int h_eoc_rise = -1, h_gap_max = 0, h_starts = 0;
  logic h_eoc_q = 1'b1, h_start_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    h_eoc_q   <= h_eoc;
    h_start_q <= h_start;
    if (h_eoc && !h_eoc_q) begin h_eoc_rise <= cyc; h_exp_val <= h_dout; end
    if (h_start && !h_start_q) begin
      h_starts   <= h_starts + 1;
      h_exp_chan <= h_add;
      if (h_eoc_rise >= 0 && cyc - h_eoc_rise > h_gap_max) h_gap_max <= cyc - h_eoc_rise;
    end
    if (h_valid) begin
      checks++;
      h_samples <= h_samples + 1;
      if (h_smp != h_exp_val || adc_h.ch != h_exp_chan || h_smp_chan != h_exp_chan) begin
        failures++; $display("handshake: sample %h ch %0d, expected %h ch %0d",
                             h_smp, h_smp_chan, h_exp_val, h_exp_chan);
      end
    end
  end

  int t_starts = 0;
  logic t_start_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    t_start_q <= t_start;
    if (t_start && !t_start_q) t_starts <= t_starts + 1;
    if (t_valid) begin failures++; $display("sample without acknowledge"); end
  end

  initial begin
    foreach (vin[i]) vin[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 120; n++) begin
      repeat ($urandom_range(20, 300)) @(negedge clk);
      chan = 3'($urandom);
      vin[$urandom_range(0, 7)] = 8'($urandom);
    end
    repeat (300) @(negedge clk);
    checks++;
    if (p_samples < 60 || p_samples != p_conv) begin
      failures++; $display("fixed: %0d samples, %0d conversions", p_samples, p_conv);
    end
    checks++;
    if (h_samples != h_conv || h_samples < 2 * p_samples) begin
      failures++; $display("handshake: %0d samples, %0d conversions", h_samples, h_conv);
    end
    checks++;
    // acknowledge -> synchroniser (2) -> edge (1) -> address (1) -> START
    if (h_gap_max > 5) begin failures++; $display("restart after acknowledge took %0d", h_gap_max); end
    checks++;
    if (t_starts < 100) begin failures++; $display("no restart on timeout: %0d starts", t_starts); end
    $display("fixed %0d samples, handshake %0d samples, timeout restarts %0d",
             p_samples, h_samples, t_starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
