// Secure Double Rate Register (SDRR).
//
// A 2:1 multiplexer chooses between the input data (sel = 0) and the random
// data (sel = 1); its output passes through two cascaded registers, both on
// the rising edge of clk, and the second register drives q. The random data
// thus travels the same registers and the same combinational path behind
// them as the real data, so the power drawn does not reveal which of the two
// is being processed. The mux, the two registers and their common clock
// follow the design; rising-edge clocking of both registers and the absence
// of a reset (the registers only carry data) are this design's choices.
// Latency: the value selected in cycle n appears on q after the second
// rising edge, in cycle n + 2.
module sdrr #(
  parameter int unsigned WIDTH = 128
) (
  input  logic             clk,
  input  logic             sel,
  input  logic [WIDTH-1:0] data_in,
  input  logic [WIDTH-1:0] rand_in,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] mux_out, reg1;

  assign mux_out = sel ? rand_in : data_in;

  always_ff @(posedge clk) begin
    reg1 <= mux_out;
    q    <= reg1;
  end
endmodule
