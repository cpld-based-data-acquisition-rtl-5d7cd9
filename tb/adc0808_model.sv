// adc0808_model: behavioural model of the ADC0808 8-channel, 8-bit
// successive-approximation converter, for simulation only (not synthesizable
// as a converter: the analog inputs are given as ideal 8-bit codes).
//
// The rising edge of ALE latches the 3-bit multiplexer address. The rising
// edge of START resets the converter; EOC goes low EOC_DELAY clock cycles
// later, and CONV_CLKS clock cycles after START falls the result for the
// latched channel appears on dout and EOC goes high again. Output enable is
// taken as tied high, so dout always shows the last result. conversions
// counts finished conversions.
module adc0808_model #(
  parameter int EOC_DELAY = 8,
  parameter int CONV_CLKS = 64
) (
  input  logic       clk,
  input  logic       start,
  input  logic       ale,
  input  logic [2:0] add,
  input  logic [7:0] vin [8],
  output logic       eoc,
  output logic [7:0] dout,
  output int         conversions
);
  logic       start_q = 1'b0, ale_q = 1'b0;
  logic [2:0] ch = 3'd0;
  int         timer = -1;   // clocks since START fell, -1 when idle
  int         since_start = 0;
  bit         converting = 1'b0;

  initial begin
    eoc         = 1'b1;
    dout        = 8'h00;
    conversions = 0;
  end

  always @(posedge clk) begin
    start_q <= start;
    ale_q   <= ale;
    if (ale && !ale_q) ch <= add;
    if (start && !start_q) begin
      converting  <= 1'b1;
      since_start <= 0;
      timer       <= -1;
    end else if (converting) begin
      since_start <= since_start + 1;
      if (since_start == EOC_DELAY - 1) eoc <= 1'b0;
      if (!start && timer < 0) timer <= 0;
      else if (timer >= 0) timer <= timer + 1;
      if (timer == CONV_CLKS - 1) begin
        dout        <= vin[ch];
        eoc         <= 1'b1;
        converting  <= 1'b0;
        conversions <= conversions + 1;
      end
    end
  end
endmodule
