// tb_threshold_alarm: drives the alarm checker from a reference memory with
// one cycle of read latency. Checks that only the temperature and gas words
// are read, alternately; that each flag is "stored value > threshold" and
// "word written"; that alarm is their OR; and that a change shows within 4
// cycles. Runs random values, values at the thresholds, and unwritten words.
module tb_threshold_alarm;
  import daq_pkg::*;
  int checks = 0, failures = 0;

  localparam chan_t   TCH = 3'd2, GCH = 3'd5;
  localparam sample_t TTH = 8'd100, GTH = 8'd180;

  logic    clk = 1'b0, rst_n = 1'b0;
  chan_t   rd_addr;
  sample_t rd_data;
  logic    rd_valid;
  logic    temp_over, gas_over, alarm;

  threshold_alarm #(.TEMP_CH(TCH), .GAS_CH(GCH), .TEMP_THRESH(TTH), .GAS_THRESH(GTH))
    dut (.*);

  always #5 clk = ~clk;

  sample_t mem [8];
  bit      ok  [8];
  chan_t   prev_addr;
  bit      seen_prev = 1'b0;

  always_ff @(posedge clk) begin
    rd_data  <= mem[rd_addr];
    rd_valid <= ok[rd_addr] && rst_n;
  end

  // address pattern: temp, gas, temp, gas ...
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (rd_addr != TCH && rd_addr != GCH) begin failures++; $display("bad address %0d", rd_addr); end
    if (seen_prev && rd_addr == prev_addr) begin failures++; $display("address repeated"); end
    prev_addr <= rd_addr;
    seen_prev <= 1'b1;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_flags(string what);
    bit et = ok[TCH] && (mem[TCH] > TTH);
    bit eg = ok[GCH] && (mem[GCH] > GTH);
    checks++;
    if (temp_over != et || gas_over != eg || alarm != (et || eg)) begin
      failures++;
      $display("%s: temp %0d gas %0d -> t%0d g%0d a%0d", what, mem[TCH], mem[GCH],
               temp_over, gas_over, alarm);
    end
  endtask

  initial begin
    automatic int n_alarm = 0;
    foreach (mem[i]) begin mem[i] = 8'hFF; ok[i] = 1'b0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (6) @(negedge clk);
    check_flags("unwritten words");
    // boundary values
    foreach (mem[i]) ok[i] = 1'b1;
    mem[TCH] = TTH;      mem[GCH] = GTH;      repeat (4) @(negedge clk); check_flags("at thresholds");
    mem[TCH] = TTH + 1;                       repeat (4) @(negedge clk); check_flags("temp over");
    mem[TCH] = TTH;      mem[GCH] = GTH + 1;  repeat (4) @(negedge clk); check_flags("gas over");
    mem[GCH] = GTH;                           repeat (4) @(negedge clk); check_flags("cleared");
    // other channels never raise the alarm
    for (int i = 0; i < 8; i++) if (i != TCH && i != GCH) mem[i] = 8'hFF;
    repeat (4) @(negedge clk); check_flags("others high");
    for (int n = 0; n < 500; n++) begin
      mem[TCH] = 8'($urandom_range(TTH - 20, TTH + 20));
      mem[GCH] = 8'($urandom_range(GTH - 20, GTH + 20));
      repeat (4) @(negedge clk);
      check_flags("random");
      if (alarm) n_alarm++;
    end
    checks++;
    if (n_alarm == 0 || n_alarm == 500) begin failures++; $display("alarm never toggled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
