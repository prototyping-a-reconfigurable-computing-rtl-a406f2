// Parameterised adder of the IP library: S = A + B + CI, with carry-out CO.
//
// Purely combinational; WIDTH sets the length of A, B and S. The ports,
// their widths and the default width of 8 follow the library's data sheet
// for this component. It is the adder reused by the edge-enhancement and
// expansion IPs.
module ip_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] A,
  input  logic [WIDTH-1:0] B,
  input  logic             CI,
  output logic [WIDTH-1:0] S,
  output logic             CO
);

  always_comb begin
    {CO, S} = {1'b0, A} + {1'b0, B} + {{WIDTH{1'b0}}, CI};
  end

endmodule
