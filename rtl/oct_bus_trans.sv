// Octal bus transceiver of the IP library (OctBusTrans), after the 74245
// part: with G_N low, DIR high passes the A side to the B side and DIR low
// passes B to A; with G_N high neither side is driven. Inside a chip each
// bidirectional side is represented by an input, an output and the output's
// drive enable (A_EN, B_EN); this split is this design's choice.
// Combinational.
module oct_bus_trans (
  input  logic       DIR,
  input  logic       G_N,
  input  logic [7:0] A_IN,
  input  logic [7:0] B_IN,
  output logic [7:0] A_OUT,
  output logic [7:0] B_OUT,
  output logic       A_EN,
  output logic       B_EN
);

  always_comb begin
    B_EN  = !G_N &&  DIR;
    A_EN  = !G_N && !DIR;
    B_OUT = A_IN;
    A_OUT = B_IN;
  end

endmodule
