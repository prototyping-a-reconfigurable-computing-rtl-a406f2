// Octal D flip-flop with output enable of the IP library (TTL374), after
// the 74374 part: the eight D inputs are stored on each rising CLK edge; the
// stored byte is driven while OE_N is low. Inside a chip the three-state
// output is represented by the byte Q and its drive enable Q_EN, which the
// pad or a bus multiplexer uses; this split is this design's choice. The flip-
// flops are not reset, like the original part's.
module ttl374 (
  input  logic       CLK,
  input  logic       OE_N,
  input  logic [7:0] D,
  output logic [7:0] Q,
  output logic       Q_EN
);

  always_ff @(posedge CLK) Q <= D;

  assign Q_EN = !OE_N;

endmodule
