// Ripple-carry adder of the IP library (RippleAdder): S = A + B + CI with
// carry-out CO, built as a chain of WIDTH full adders, each passing its carry
// to the next. Combinational; the delay grows with WIDTH. The width default
// of 8 is this design's choice.
module ripple_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] A,
  input  logic [WIDTH-1:0] B,
  input  logic             CI,
  output logic [WIDTH-1:0] S,
  output logic             CO
);

  logic [WIDTH:0] c;

  assign c[0] = CI;
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (.a(A[i]), .b(B[i]), .ci(c[i]), .s(S[i]), .co(c[i+1]));
  end
  assign CO = c[WIDTH];

endmodule
