// tb_lcd_ctrl: plays both LCD scripts into an LCD model and checks what the
// display memory holds, the initialisation and shift commands, the pass
// lengths (75 steps for the greeting, 44 for the voltage page, one step per
// clock) and, with a second instance at 3 clocks per step, the prescaler.
module tb_lcd_ctrl;
  import daq_pkg::*;
  int checks = 0, failures = 0;

  logic       clk = 1'b0, rst_n = 1'b0;
  lcd_page_e  page = PAGE_GREET;
  logic [7:0] units = "1", tenths = "7";
  logic       rs, rw, e, pass_done;
  logic [7:0] db;
  logic       rs3, rw3, e3, pass_done3;
  logic [7:0] db3;

  lcd_ctrl dut (.clk, .rst_n, .page, .units_ascii(units), .tenths_ascii(tenths),
                .lcd_rs(rs), .lcd_rw(rw), .lcd_e(e), .lcd_db(db), .pass_done);
  lcd_model lcd (.e, .rs, .rw, .db);

  lcd_ctrl #(.STEP_CLKS(3)) dut3 (.clk, .rst_n, .page, .units_ascii(units),
                .tenths_ascii(tenths), .lcd_rs(rs3), .lcd_rw(rw3), .lcd_e(e3),
                .lcd_db(db3), .pass_done(pass_done3));
  lcd_model lcd3 (.e(e3), .rs(rs3), .rw(rw3), .db(db3));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_text(string what, logic [8*16-1:0] got, logic [8*16-1:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got '%s' expected '%s'", what, got, exp); end
  endtask

  // clocks between two pass_done pulses
  task automatic pass_len(output int n);
    n = 0;
    @(posedge clk iff pass_done);
    do begin @(posedge clk); n++; end while (!pass_done);
  endtask

  initial begin
    int n, t0, t1, bad0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    bad0 = lcd.n_bad;   // bus noise before reset is not counted
    // greeting page
    pass_len(n);
    checks++; if (n != 75) begin failures++; $display("greeting pass %0d clocks", n); end
    expect_text("greet line 1", lcd.text('h00, 16),
                {"WEL", 8'hB0, "COME", 8'hA0, "TO", 8'hA0, "CPLD"});
    expect_text("greet line 2", lcd.text('h41, 13), {"ADC08", 8'hA0, "CONTROL"});
    checks++;
    if (!lcd.func_set_8bit_2l || !lcd.display_on || !lcd.entry_inc || lcd.n_bad != bad0) begin
      failures++; $display("initialisation commands missing");
    end
    checks++;
    if (lcd.n_shift_r < 1 || lcd.n_shift_l != 2 * lcd.n_shift_r) begin
      failures++; $display("shifts r=%0d l=%0d", lcd.n_shift_r, lcd.n_shift_l);
    end
    // one greeting pass writes 37 bytes: 8 commands, 29 characters
    t0 = lcd.n_cmd + lcd.n_data;
    do @(posedge clk); while (!pass_done);
    t1 = lcd.n_cmd + lcd.n_data;
    checks++; if (t1 - t0 != 37) begin failures++; $display("writes per pass %0d", t1 - t0); end
    // voltage page
    @(negedge clk) page = PAGE_VOLT;
    pass_len(n);
    checks++; if (n != 44) begin failures++; $display("voltage pass %0d clocks", n); end
    expect_text("volt line 1", lcd.text('h02, 13), {"INPUT", 8'hA0, "VOLTAGE"});
    expect_text("volt line 2", lcd.text('h46, 4), "1.7V");
    expect_text("volt line 1 start", lcd.text('h00, 2), "  ");
    // reading follows the inputs
    @(negedge clk) begin units = "3"; tenths = "4"; end
    pass_len(n);
    expect_text("volt line 2 new", lcd.text('h46, 4), "3.4V");
    // back to the greeting
    @(negedge clk) page = PAGE_GREET;
    pass_len(n);
    expect_text("greet again", lcd.text('h00, 16),
                {"WEL", 8'hB0, "COME", 8'hA0, "TO", 8'hA0, "CPLD"});
    // slow instance: 3 clocks per step
    @(posedge clk iff pass_done3);
    n = 0;
    do begin @(posedge clk); n++; end while (!pass_done3);
    checks++; if (n != 3 * 75) begin failures++; $display("slow greeting pass %0d", n); end
    expect_text("slow greet line 2", lcd3.text('h41, 13), {"ADC08", 8'hA0, "CONTROL"});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
