// Multiplexer of the IP library (mux2, mux4 and mux8 are N = 2, 4, 8): Y is
// input D[SEL] of N words of WIDTH bits. Combinational; a SEL beyond N-1
// gives 0. Word width 8 is this design's choice.
module ip_mux #(
  parameter int unsigned N     = 4,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][WIDTH-1:0] D,
  input  logic [SW-1:0]           SEL,
  output logic [WIDTH-1:0]        Y
);

  always_comb begin
    Y = '0;
    for (int i = 0; i < N; i++) if (SEL == SW'(i)) Y = D[i];
  end

endmodule
