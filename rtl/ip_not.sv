// Bitwise NOT of a WIDTH-bit word, one of the IP library's basic logic
// components (8-, 16-, 32-bit and parameterised versions are this module at
// different WIDTH). Combinational; port names are this design's choice.
module ip_not #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] A,
  output logic [WIDTH-1:0] Y
);

  always_comb Y = ~A;

endmodule
