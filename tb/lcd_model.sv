// lcd_model: behavioural model of an HD44780-style character LCD on an
// 8-bit write-only bus, for simulation only.
//
// A write is taken on the falling edge of E. With RS = 0 the byte is a
// command: clear (0x01) fills the display memory with 0x20 and homes the
// cursor; entry mode, display control and function set are recorded; a set
// display address (0x80 | a) moves the cursor; the display shift commands
// (0x1C right, 0x18 left) move the shift counter. With RS = 1 the byte is
// stored at the cursor, which then advances. Line 1 starts at address 0x00
// and line 2 at 0x40.
module lcd_model (
  input  logic       e,
  input  logic       rs,
  input  logic       rw,
  input  logic [7:0] db
);
  logic [7:0] ddram [128];
  logic [6:0] addr;
  int         shift;
  int         n_cmd, n_data, n_clear, n_shift_r, n_shift_l, n_bad;
  bit         func_set_8bit_2l, display_on, entry_inc;

  initial begin
    foreach (ddram[i]) ddram[i] = 8'h20;
    addr = '0; shift = 0;
    n_cmd = 0; n_data = 0; n_clear = 0; n_shift_r = 0; n_shift_l = 0; n_bad = 0;
    func_set_8bit_2l = 1'b0; display_on = 1'b0; entry_inc = 1'b0;
  end

  always @(negedge e) begin
    if (rw) n_bad++;
    else if (rs) begin
      ddram[addr] = db;
      addr        = addr + 7'd1;
      n_data++;
    end else begin
      n_cmd++;
      if (db[7]) addr = db[6:0];
      else if (db == 8'h01) begin
        foreach (ddram[i]) ddram[i] = 8'h20;
        addr = '0; shift = 0; n_clear++;
      end
      else if (db == 8'h06) entry_inc = 1'b1;
      else if (db == 8'h0C) display_on = 1'b1;
      else if (db == 8'h38) func_set_8bit_2l = 1'b1;
      else if (db == 8'h1C) begin shift++; n_shift_r++; end
      else if (db == 8'h18) begin shift--; n_shift_l++; end
      else n_bad++;
    end
  end

  // Text of n characters from display address a, first character in the
  // most significant byte.
  function automatic logic [8*16-1:0] text(input int a, input int n);
    logic [8*16-1:0] t = '0;
    for (int i = 0; i < n; i++) t = {t[8*15-1:0], ddram[(a + i) % 128]};
    return t;
  endfunction
endmodule
