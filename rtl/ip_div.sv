// Divider of the IP library (div8, Div16, Div32 and Div are this module at
// WIDTH 8, 16, 32): unsigned quotient Q and remainder R of N / D.
//
// Restoring division unrolled into WIDTH compare-and-subtract stages, one
// quotient bit per stage, most significant first. Division by zero gives
// Q = all ones and R = N, which is what the stages produce unaltered.
// Combinational; operand type and algorithm are this design's choices.
module ip_div #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] N,
  input  logic [WIDTH-1:0] D,
  output logic [WIDTH-1:0] Q,
  output logic [WIDTH-1:0] R
);

  logic [WIDTH:0] rem;

  always_comb begin
    rem = '0;
    Q   = '0;
    for (int i = WIDTH - 1; i >= 0; i--) begin
      rem = {rem[WIDTH-1:0], N[i]};
      if (rem >= {1'b0, D}) begin
        rem  = rem - {1'b0, D};
        Q[i] = 1'b1;
      end
    end
    R = rem[WIDTH-1:0];
  end

endmodule
