// Booth multiplier of the IP library (boothmult8/16/32 are WIDTH 8/16/32):
// signed product P = A * B of two WIDTH-bit two's-complement operands.
//
// Radix-2 Booth recoding: each bit pair {B[i], B[i-1]} (B[-1] = 0) selects
// +A (01), -A (10) or nothing (00, 11) shifted left by i, and the WIDTH
// partial products are summed. Combinational; the library gives only the
// name, so the radix and the single-cycle form are this design's choices.
module booth_mult #(
  parameter int unsigned WIDTH = 8
) (
  input  logic signed [WIDTH-1:0]   A,
  input  logic signed [WIDTH-1:0]   B,
  output logic signed [2*WIDTH-1:0] P
);

  logic signed [2*WIDTH-1:0] a_ext;
  logic                      prev;

  always_comb begin
    a_ext = (2*WIDTH)'(A);
    P     = '0;
    prev  = 1'b0;
    for (int i = 0; i < WIDTH; i++) begin
      unique case ({B[i], prev})
        2'b01:   P = P + (a_ext <<< i);
        2'b10:   P = P - (a_ext <<< i);
        default: ;
      endcase
      prev = B[i];
    end
  end

endmodule
