// lcd_ctrl: drives a character LCD (HD44780-style, 8-bit bus, write only).
//
// The driver plays one of two fixed scripts over and over, chosen by page:
//   PAGE_GREET (b = 1): function set (8-bit, 2 lines), display on, clear,
//     entry mode; the greeting "WEL-COME TO CPLD" from line 1 column 0 and
//     "ADC08 CONTROL" from line 2 column 1; then display shift right, left,
//     left. One pass is 75 steps.
//   PAGE_VOLT (b = 0): clear, entry mode; "INPUT VOLTAGE" from line 1
//     column 2; at line 2 column 6 the reading "u.tV" with the two digits
//     taken live from units/tenths. One pass is 44 steps.
// Every write spends two steps on the bus: in the first, RS and DB are set
// with E low; in the second, E is high with RS and DB unchanged, so the LCD
// latches on E's falling edge at the start of the next write. Step 0 of a
// pass (and the last step of a voltage pass) writes nothing and leaves the
// bus as it was. RW is always 0.
//
// One step lasts STEP_CLKS clocks. The design specifies one step per clock of
// the slow system clock; STEP_CLKS lets a faster clock meet the LCD's
// command times. Changing page restarts the new script from step 0 (own
// choice; the two scripts otherwise have independent step counters).
//
// Outputs are registered; pass_done pulses for one clock as a pass ends.
module lcd_ctrl
  import daq_pkg::*;
#(
  parameter int STEP_CLKS = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  lcd_page_e  page,
  input  logic [7:0] units_ascii,
  input  logic [7:0] tenths_ascii,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic       lcd_e,
  output logic [7:0] lcd_db,
  output logic       pass_done
);
  localparam int PW = (STEP_CLKS > 1) ? $clog2(STEP_CLKS) : 1;

  lcd_page_e  page_q;
  logic [6:0] step;
  logic [PW-1:0] pre;
  logic       tick;
  logic [6:0] last_step;
  int         nwrites;
  logic       in_script;
  int         widx;
  lcd_write_t wr;

  assign tick = (STEP_CLKS == 1) || (pre == PW'(STEP_CLKS - 1));

  always_comb begin
    last_step = (page_q == PAGE_GREET) ? 7'(GREET_STEPS - 1) : 7'(VOLT_STEPS - 1);
    nwrites   = (page_q == PAGE_GREET) ? GREET_WRITES : VOLT_WRITES;
    in_script = (step != 7'd0) && (int'(step) <= 2 * nwrites);
    widx      = (int'(step) - 1) / 2;
    wr        = (page_q == PAGE_GREET) ? greet_write(widx)
                                       : volt_write(widx, units_ascii, tenths_ascii);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      page_q    <= PAGE_GREET;
      step      <= '0;
      pre       <= '0;
      lcd_rs    <= 1'b0;
      lcd_e     <= 1'b0;
      lcd_db    <= '0;
      pass_done <= 1'b0;
    end else begin
      pass_done <= 1'b0;
      if (page != page_q) begin
        page_q <= page;
        step   <= '0;
        pre    <= '0;
      end else begin
        pre <= tick ? '0 : pre + 1'b1;
        if (tick) begin
          if (step == last_step) begin
            step      <= '0;
            pass_done <= 1'b1;
          end else begin
            step <= step + 7'd1;
          end
          if (in_script) begin
            if (step[0]) begin    // odd step: set up the write, E low
              lcd_rs <= wr.rs;
              lcd_db <= wr.data;
              lcd_e  <= 1'b0;
            end else begin        // even step: strobe
              lcd_e  <= 1'b1;
            end
          end
        end
      end
    end
  end

  assign lcd_rw = 1'b0;

  // RS and DB hold while E is high.
  a_bus_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 lcd_e |-> ($stable(lcd_db) && $stable(lcd_rs)));
endmodule
