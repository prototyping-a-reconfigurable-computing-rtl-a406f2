// Linear feedback shift register of the IP library (LFSR4 and LFSR32; the
// default is the 32-bit one).
//
// Fibonacci form: each clock with en high the register shifts left by one and
// the new bit 0 is the XOR of the tapped bits (TAPS bit i set = stage i+1 is
// tapped). Default taps are maximal-length polynomials from the standard
// tables: x^32+x^22+x^2+x+1 for 32 bits, x^4+x^3+1 for 4 bits, x^8+x^6+x^5+
// x^4+1 for 8 and x^16+x^15+x^13+x^4+1 for 16. load puts seed in the
// register (an all-zero seed locks it at zero). The polynomials and the
// controls are this design's choices.
module ip_lfsr #(
  parameter int unsigned WIDTH = 32,
  parameter logic [WIDTH-1:0] TAPS =
      (WIDTH == 4)  ? WIDTH'(4'b1100) :
      (WIDTH == 8)  ? WIDTH'(8'hB8) :
      (WIDTH == 16) ? WIDTH'(16'hD008) :
                      WIDTH'(32'h8020_0003)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic             en,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= WIDTH'(1);
    else if (load) q <= seed;
    else if (en)   q <= {q[WIDTH-2:0], ^(q & TAPS)};
  end

endmodule
