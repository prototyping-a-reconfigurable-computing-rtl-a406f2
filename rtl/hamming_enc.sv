// Hamming encoder of the IP library (HammingEnc): the classic (7,4) code.
// Code bit C[k-1] is position k of the code word; parity bits sit at
// positions 1, 2 and 4 and data bits D[0..3] at positions 3, 5, 6, 7. Each
// parity bit makes the XOR of the positions whose index has that bit set
// even. Combinational; the (7,4) size is this design's choice.
module hamming_enc (
  input  logic [3:0] D,
  output logic [6:0] C
);

  always_comb begin
    C[2] = D[0];
    C[4] = D[1];
    C[5] = D[2];
    C[6] = D[3];
    C[0] = D[0] ^ D[1] ^ D[3];   // position 1: 3, 5, 7
    C[1] = D[0] ^ D[2] ^ D[3];   // position 2: 3, 6, 7
    C[3] = D[1] ^ D[2] ^ D[3];   // position 4: 5, 6, 7
  end

endmodule
