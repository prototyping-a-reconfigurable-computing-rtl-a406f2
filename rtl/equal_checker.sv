// Equality checker of the IP library (EqualChecker8/32 and the parameterised
// one): EQ is high when A equals B, computed as the NOR of the bitwise XOR.
// Combinational.
module equal_checker #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] A,
  input  logic [WIDTH-1:0] B,
  output logic             EQ
);

  always_comb EQ = ~|(A ^ B);

endmodule
