// Barrel shifter of the IP library (BarrellShifter16 is the default WIDTH):
// shifts DIN by AMT places in one step, left (LEFT = 1) or right, filling
// with zeros, or rotates when ROT = 1.
//
// log2(WIDTH) stages, stage s moving the word by 2^s places when AMT[s] is
// set. Combinational; the control inputs are this design's choice. WIDTH
// must be a power of two.
module barrel_shifter #(
  parameter int unsigned WIDTH = 16,
  localparam int unsigned SW = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] DIN,
  input  logic [SW-1:0]    AMT,
  input  logic             LEFT,
  input  logic             ROT,
  output logic [WIDTH-1:0] DOUT
);

  logic [WIDTH-1:0] stage;

  always_comb begin
    stage = DIN;
    for (int s = 0; s < SW; s++) begin
      if (AMT[s]) begin
        if (LEFT) stage = (stage << (1 << s)) | (ROT ? stage >> (WIDTH - (1 << s)) : '0);
        else      stage = (stage >> (1 << s)) | (ROT ? stage << (WIDTH - (1 << s)) : '0);
      end
    end
    DOUT = stage;
  end

endmodule
