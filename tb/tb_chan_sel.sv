// tb_chan_sel: channel button counting. Presses the button with random
// press and release lengths and checks after each press that the channel is
// (number of presses mod 16) / 2, and that a press takes effect on the third
// clock edge after the button falls.
module tb_chan_sel;
  import daq_pkg::*;
  int checks = 0, failures = 0;

  logic  clk = 1'b0, rst_n = 1'b0, ch_btn = 1'b0;
  chan_t chan;

  chan_sel dut (.clk, .rst_n, .ch_btn, .chan);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int presses = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    checks++; if (chan != 3'd0) failures++;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk); ch_btn = 1'b1;
      repeat (2 + $urandom_range(0, 5)) @(negedge clk);
      ch_btn = 1'b0;   // falling edge: a press
      presses++;
      // before the third rising edge the old value must still be there
      @(posedge clk); @(posedge clk); #1;
      checks++;
      if (chan != 3'(((presses - 1) % 16) / 2)) begin
        failures++; $display("press %0d: changed too early", presses);
      end
      @(posedge clk); #1;
      checks++;
      if (chan != 3'((presses % 16) / 2)) begin
        failures++; $display("press %0d: chan %0d", presses, chan);
      end
      repeat ($urandom_range(1, 6)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
