// One-bit full adder: s = a ^ b ^ ci, co = majority(a, b, ci). The cell the
// ripple-carry adder chains.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end

endmodule
