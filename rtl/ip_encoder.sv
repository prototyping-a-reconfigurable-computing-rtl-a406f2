// Priority encoder of the IP library (ENCODER8 and ENCODER32 are WIDTH 8 and
// 32): IDX is the index of the highest set bit of D and VALID says whether
// any bit is set (IDX is 0 when none is). Combinational; the priority order
// is this design's choice.
module ip_encoder #(
  parameter int unsigned WIDTH = 8,
  localparam int unsigned IW = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] D,
  output logic [IW-1:0]    IDX,
  output logic             VALID
);

  always_comb begin
    IDX   = '0;
    VALID = 1'b0;
    for (int i = 0; i < WIDTH; i++) begin
      if (D[i]) begin
        IDX   = IW'(i);
        VALID = 1'b1;
      end
    end
  end

endmodule
