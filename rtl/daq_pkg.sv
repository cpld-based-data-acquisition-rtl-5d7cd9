// daq_pkg: types and constants shared by the data-acquisition CPLD logic.
//
// The system samples eight analog channels through an ADC0808, keeps the
// latest sample of each channel, raises a fire alarm when the temperature or
// gas reading passes a stored threshold, and writes messages and the current
// reading to a character LCD (HD44780-style 8-bit bus).
//
// This package holds:
//   * the LCD write record (register select + byte) and the two message
//     scripts the LCD driver plays: the greeting (mode b=1) and the voltage
//     page (mode b=0). Text, command bytes, cursor addresses and the order of
//     writes are the ones the design specifies; spaces are written as 8'hA0
//     and the greeting's fourth character is 8'hB0, as specified.
//   * the calibration table that turns an 8-bit ADC code into a reading
//     d.d volts (24 code ranges, as specified).
package daq_pkg;

  localparam int NUM_CH = 8;          // ADC0808 multiplexer inputs
  localparam int ADC_W  = 8;          // ADC0808 resolution

  typedef logic [ADC_W-1:0]          sample_t;
  typedef logic [$clog2(NUM_CH)-1:0] chan_t;

  // LCD driver page selected by the mode switch b.
  typedef enum logic {
    PAGE_VOLT  = 1'b0,   // "INPUT VOLTAGE" / d.dV
    PAGE_GREET = 1'b1    // initialise, greeting text, display shifts
  } lcd_page_e;

  // One write on the LCD bus: rs = 0 command, rs = 1 character data.
  typedef struct packed {
    logic       rs;
    logic [7:0] data;
  } lcd_write_t;

  // HD44780 command bytes used by the scripts.
  localparam logic [7:0] LCD_FUNC_8BIT_2L = 8'h38;  // 8-bit bus, 2 lines, 5x7
  localparam logic [7:0] LCD_DISP_ON      = 8'h0C;  // display on, cursor off
  localparam logic [7:0] LCD_CLEAR        = 8'h01;
  localparam logic [7:0] LCD_ENTRY_INC    = 8'h06;  // increment, no shift
  localparam logic [7:0] LCD_SHIFT_RIGHT  = 8'h1C;
  localparam logic [7:0] LCD_SHIFT_LEFT   = 8'h18;
  localparam logic [7:0] LCD_BLANK        = 8'hA0;  // space character used
  localparam logic [7:0] LCD_DASH         = 8'hB0;  // greeting separator

  // Message texts, first character in the most significant byte.
  localparam int GREET_L1_LEN = 16;
  localparam logic [8*GREET_L1_LEN-1:0] GREET_L1 =
    {"WEL", LCD_DASH, "COME", LCD_BLANK, "TO", LCD_BLANK, "CPLD"};
  localparam int GREET_L2_LEN = 13;
  localparam logic [8*GREET_L2_LEN-1:0] GREET_L2 =
    {"ADC08", LCD_BLANK, "CONTROL"};
  localparam int VOLT_L1_LEN = 13;
  localparam logic [8*VOLT_L1_LEN-1:0] VOLT_L1 =
    {"INPUT", LCD_BLANK, "VOLTAGE"};

  // Cursor addresses (set-DDRAM-address commands).
  localparam logic [7:0] GREET_L2_ADDR = 8'hC1;  // line 2, column 1
  localparam logic [7:0] VOLT_L1_ADDR  = 8'h82;  // line 1, column 2
  localparam logic [7:0] VOLT_L2_ADDR  = 8'hC6;  // line 2, column 6

  // Number of writes in each script and the length of one pass in steps.
  // Each write takes two steps (E low, then E high); step 0 of a pass
  // writes nothing and holds the bus, and the voltage pass has one more
  // idle step at its end.
  localparam int GREET_WRITES = 4 + GREET_L1_LEN + 1 + GREET_L2_LEN + 3;  // 37
  localparam int VOLT_WRITES  = 3 + VOLT_L1_LEN + 1 + 4;                  // 21
  localparam int GREET_STEPS  = 75;   // steps 0..74
  localparam int VOLT_STEPS   = 44;   // steps 0..43

  function automatic logic [7:0] char_at(input logic [8*16-1:0] text,
                                         input int len, input int idx);
    return text[8*(len-1-idx) +: 8];
  endfunction

  // Write number idx (0-based) of the greeting script.
  function automatic lcd_write_t greet_write(input int idx);
    lcd_write_t w;
    w = '{rs: 1'b0, data: 8'h00};
    if (idx == 0)                           w = '{1'b0, LCD_FUNC_8BIT_2L};
    else if (idx == 1)                      w = '{1'b0, LCD_DISP_ON};
    else if (idx == 2)                      w = '{1'b0, LCD_CLEAR};
    else if (idx == 3)                      w = '{1'b0, LCD_ENTRY_INC};
    else if (idx < 4 + GREET_L1_LEN)
      w = '{1'b1, char_at(128'(GREET_L1), GREET_L1_LEN, idx - 4)};
    else if (idx == 4 + GREET_L1_LEN)       w = '{1'b0, GREET_L2_ADDR};
    else if (idx < 5 + GREET_L1_LEN + GREET_L2_LEN)
      w = '{1'b1, char_at(128'(GREET_L2), GREET_L2_LEN, idx - 5 - GREET_L1_LEN)};
    else if (idx == 5 + GREET_L1_LEN + GREET_L2_LEN) w = '{1'b0, LCD_SHIFT_RIGHT};
    else                                    w = '{1'b0, LCD_SHIFT_LEFT};
    return w;
  endfunction

  // Write number idx (0-based) of the voltage script; units and tenths are
  // the ASCII digits of the current reading.
  function automatic lcd_write_t volt_write(input int idx,
                                            input logic [7:0] units,
                                            input logic [7:0] tenths);
    lcd_write_t w;
    w = '{rs: 1'b0, data: 8'h00};
    if (idx == 0)                          w = '{1'b0, LCD_CLEAR};
    else if (idx == 1)                     w = '{1'b0, LCD_ENTRY_INC};
    else if (idx == 2)                     w = '{1'b0, VOLT_L1_ADDR};
    else if (idx < 3 + VOLT_L1_LEN)
      w = '{1'b1, char_at(128'(VOLT_L1), VOLT_L1_LEN, idx - 3)};
    else if (idx == 3 + VOLT_L1_LEN)       w = '{1'b0, VOLT_L2_ADDR};
    else if (idx == 4 + VOLT_L1_LEN)       w = '{1'b1, units};
    else if (idx == 5 + VOLT_L1_LEN)       w = '{1'b1, "."};
    else if (idx == 6 + VOLT_L1_LEN)       w = '{1'b1, tenths};
    else                                   w = '{1'b1, "V"};
    return w;
  endfunction

  // Calibration: code c reads as VOLT_TENTHS[i] / 10 volts for the first i
  // with c <= VOLT_UPPER[i]. The ranges are the design's own calibration of
  // its signal conditioning, not a linear scale.
  localparam int VOLT_RANGES = 24;
  localparam logic [7:0] VOLT_UPPER [VOLT_RANGES] = '{
    8'd18,  8'd20,  8'd40,  8'd44,  8'd48,  8'd56,  8'd64,  8'd72,
    8'd80,  8'd86,  8'd94,  8'd102, 8'd110, 8'd116, 8'd124, 8'd132,
    8'd140, 8'd146, 8'd160, 8'd174, 8'd190, 8'd204, 8'd220, 8'd255};
  localparam logic [5:0] VOLT_TENTHS [VOLT_RANGES] = '{
    6'd3,  6'd4,  6'd5,  6'd6,  6'd7,  6'd8,  6'd9,  6'd10,
    6'd11, 6'd12, 6'd13, 6'd14, 6'd15, 6'd16, 6'd17, 6'd18,
    6'd19, 6'd20, 6'd22, 6'd24, 6'd26, 6'd28, 6'd30, 6'd34};

endpackage
