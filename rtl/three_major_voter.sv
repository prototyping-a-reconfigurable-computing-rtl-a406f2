// Three-input majority voter of the IP library (ThreeMajorVoter): each bit
// of Y is the value held by at least two of A, B and C, as in triple
// modular redundancy. Combinational; WIDTH (default 1) is this design's
// addition.
module three_major_voter #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] A,
  input  logic [WIDTH-1:0] B,
  input  logic [WIDTH-1:0] C,
  output logic [WIDTH-1:0] Y
);

  always_comb Y = (A & B) | (A & C) | (B & C);

endmodule
