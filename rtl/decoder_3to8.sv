// 3-to-8 decoder of the IP library: with EN high, output Y[A] is 1 and the
// other seven are 0; with EN low all are 0. Combinational; the enable and
// the active-high outputs are this design's choices.
module decoder_3to8 (
  input  logic [2:0] A,
  input  logic       EN,
  output logic [7:0] Y
);

  always_comb Y = EN ? (8'b1 << A) : 8'b0;

endmodule
