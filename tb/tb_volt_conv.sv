// tb_volt_conv: exhaustive check of the ADC-code-to-voltage conversion.
// Every code 0..255 is applied and the two ASCII digits compared with a
// reference written independently as (lowest code, reading) pairs.
module tb_volt_conv;
  import daq_pkg::*;
  int checks = 0, failures = 0;

  sample_t    code;
  logic [5:0] tenths_total;
  logic [7:0] units_ascii, tenths_ascii;

  volt_conv dut (.code, .tenths_total, .units_ascii, .tenths_ascii);

  // Lowest code of each range and its reading in tenths of a volt.
  int lo  [24] = '{0, 19, 21, 41, 45, 49, 57, 65, 73, 81, 87, 95, 103, 111, 117,
                   125, 133, 141, 147, 161, 175, 191, 205, 221};
  int rdg [24] = '{3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15, 16, 17,
                   18, 19, 20, 22, 24, 26, 28, 30, 34};

  function automatic int expect_tenths(int c);
    int r = 0;
    for (int i = 0; i < 24; i++) if (c >= lo[i]) r = rdg[i];
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      int t;
      code = 8'(c);
      #1;
      t = expect_tenths(c);
      checks++;
      if (units_ascii != 8'(8'h30 + t / 10) || tenths_ascii != 8'(8'h30 + t % 10)
          || int'(tenths_total) != t) begin
        failures++;
        $display("code %0d: got %c.%c expected %0d.%0d", c, units_ascii, tenths_ascii,
                 t / 10, t % 10);
      end
    end
    // a few spot values written out in full
    code = 8'd0;   #1; checks++; if ({units_ascii, tenths_ascii} != "03") failures++;
    code = 8'd146; #1; checks++; if ({units_ascii, tenths_ascii} != "20") failures++;
    code = 8'd255; #1; checks++; if ({units_ascii, tenths_ascii} != "34") failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
