// sample_ram: the store for the latest sample of every ADC channel.
//
// One word per channel, written whenever a conversion of that channel ends.
// Two independent read ports: port A serves the threshold comparison, port B
// the host (USB) side. Reads are synchronous: data and its valid flag appear
// on the clock edge after the address. A valid bit per word, cleared by reset,
// tells a word that has been written from one that has not; the words
// themselves are not reset. The design only says samples are kept in the
// device's internal RAM; the port arrangement and valid bits are this
// design's choice.
module sample_ram #(
  parameter int DEPTH = 8,
  parameter int WIDTH = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // write port
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  // read port A
  input  logic [AW-1:0]    a_addr,
  output logic [WIDTH-1:0] a_data,
  output logic             a_valid,
  // read port B
  input  logic [AW-1:0]    b_addr,
  output logic [WIDTH-1:0] b_data,
  output logic             b_valid
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [DEPTH-1:0] written;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    a_data <= mem[a_addr];
    b_data <= mem[b_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      written <= '0;
      a_valid <= 1'b0;
      b_valid <= 1'b0;
    end else begin
      if (we) written[waddr] <= 1'b1;
      a_valid <= written[a_addr];
      b_valid <= written[b_addr];
    end
  end
endmodule
