// volt_conv: turns an 8-bit ADC0808 code into the voltage shown on the LCD.
//
// The code is looked up in the calibration table of daq_pkg: 24 contiguous
// code ranges, each with a reading in tenths of a volt (0.3 V for codes 0-18
// up to 3.4 V for codes 221-255). The reading is returned as two ASCII
// digits, units and tenths, ready to be written around a '.' on the display.
// The table is the design's; computing the digits from a tenths value rather
// than storing them is an implementation choice.
//
// Purely combinational.
module volt_conv
  import daq_pkg::*;
(
  input  sample_t    code,
  output logic [5:0] tenths_total,  // reading in units of 0.1 V
  output logic [7:0] units_ascii,
  output logic [7:0] tenths_ascii
);
  always_comb begin
    tenths_total = VOLT_TENTHS[VOLT_RANGES-1];
    for (int i = VOLT_RANGES - 1; i >= 0; i--) begin
      if (code <= VOLT_UPPER[i]) tenths_total = VOLT_TENTHS[i];
    end
  end

  always_comb begin
    units_ascii  = 8'h30 + 8'(tenths_total / 6'd10);
    tenths_ascii = 8'h30 + 8'(tenths_total % 6'd10);
  end
endmodule
