// sync2: two-flip-flop synchroniser for a slow asynchronous input (push
// button, switch, ADC end-of-conversion) entering the system clock domain.
// RESET_VAL is the level the chain holds in reset, chosen to match the
// input's idle level so that leaving reset does not look like an edge.
// Output q follows d after two clk rising edges. The synchronisers are this
// design's addition; the reference logic samples these inputs directly.
module sync2 #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
