// tb_sample_ram: random writes and reads on both ports against a reference
// array; checks the one-cycle read latency and the per-word valid flags.
module tb_sample_ram;
  int checks = 0, failures = 0;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       we = 1'b0;
  logic [2:0] waddr = '0, a_addr = '0, b_addr = '0;
  logic [7:0] wdata = '0, a_data, b_data;
  logic       a_valid, b_valid;

  sample_ram #(.DEPTH(8), .WIDTH(8)) dut (.*);

  always #5 clk = ~clk;

  logic [7:0] ref_mem [8];
  bit         ref_ok  [8];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_ok[i]) ref_ok[i] = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      logic [2:0] ra, rb;
      @(negedge clk);
      we     = ($urandom_range(0, 2) == 0);
      waddr  = 3'($urandom);
      wdata  = 8'($urandom);
      ra     = 3'($urandom);
      rb     = 3'($urandom);
      a_addr = ra;
      b_addr = rb;
      @(posedge clk); #1;
      // reads see the contents from before this edge's write
      checks++;
      if (a_valid != ref_ok[ra] || (ref_ok[ra] && a_data != ref_mem[ra])) begin
        failures++; $display("port A addr %0d: %h/%0d", ra, a_data, a_valid);
      end
      checks++;
      if (b_valid != ref_ok[rb] || (ref_ok[rb] && b_data != ref_mem[rb])) begin
        failures++; $display("port B addr %0d: %h/%0d", rb, b_data, b_valid);
      end
      if (we) begin ref_mem[waddr] = wdata; ref_ok[waddr] = 1'b1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
