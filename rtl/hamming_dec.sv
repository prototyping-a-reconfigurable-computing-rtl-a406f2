// Hamming decoder of the IP library (HammingDec), the partner of
// hamming_enc: recomputes the three parity checks of a (7,4) code word; the
// syndrome is the position (1..7) of a single flipped bit, or 0. That bit is
// corrected before the data bits are taken out. ERR flags a non-zero
// syndrome. Combinational; two flipped bits are miscorrected, as the code
// allows no better.
module hamming_dec (
  input  logic [6:0] C,
  output logic [3:0] D,
  output logic       ERR
);

  logic [2:0] syn;
  logic [6:0] fixed;

  always_comb begin
    syn[0] = C[0] ^ C[2] ^ C[4] ^ C[6];
    syn[1] = C[1] ^ C[2] ^ C[5] ^ C[6];
    syn[2] = C[3] ^ C[4] ^ C[5] ^ C[6];
    fixed  = C;
    if (syn != 3'd0) fixed[syn - 3'd1] = ~C[syn - 3'd1];
    ERR = (syn != 3'd0);
    D   = {fixed[6], fixed[5], fixed[4], fixed[2]};
  end

endmodule
