// Bitwise AND of two WIDTH-bit words, one of the IP library's basic logic
// components (8-, 16- and 32-bit versions and a parameterised one are the
// same module at different WIDTH). Combinational. The library names the
// component; the port names are this design's choice.
module ip_and #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] A,
  input  logic [WIDTH-1:0] B,
  output logic [WIDTH-1:0] Y
);

  always_comb Y = A & B;

endmodule
