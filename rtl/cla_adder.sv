// Carry look-ahead adder of the IP library (CarryLookAheadAdder16 is the
// default WIDTH; CLA64 is WIDTH 64): S = A + B + CI with carry-out CO.
//
// Each bit forms generate g = a&b and propagate p = a^b; the carries come
// from a parallel-prefix (Kogge-Stone) combination of (g, p) pairs in
// log2(WIDTH) levels, so no carry ripples bit by bit; S = p ^ carry.
// Combinational; the prefix network is this design's choice of look-ahead.
module cla_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] A,
  input  logic [WIDTH-1:0] B,
  input  logic             CI,
  output logic [WIDTH-1:0] S,
  output logic             CO
);

  logic [WIDTH-1:0] p, g, pg, gg, g_next, p_next;
  logic [WIDTH:0]   c;

  always_comb begin
    p  = A ^ B;
    g  = A & B;
    // fold the carry-in into bit 0's generate
    gg = g;
    pg = p;
    gg[0] = g[0] | (p[0] & CI);
    for (int d = 1; d < WIDTH; d = d * 2) begin
      g_next = gg;
      p_next = pg;
      for (int i = d; i < WIDTH; i++) begin
        g_next[i] = gg[i] | (pg[i] & gg[i-d]);
        p_next[i] = pg[i] & pg[i-d];
      end
      gg = g_next;
      pg = p_next;
    end
    c[0] = CI;
    for (int i = 0; i < WIDTH; i++) c[i+1] = gg[i];
    S  = p ^ c[WIDTH-1:0];
    CO = c[WIDTH];
  end

endmodule
