// Magnitude comparator of the IP library (Bigger8/16/32 and BIGGER): GT is
// high when unsigned A is greater than B. Combinational. Treating the
// operands as unsigned is this design's choice.
module ip_bigger #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] A,
  input  logic [WIDTH-1:0] B,
  output logic             GT
);

  always_comb GT = (A > B);

endmodule
