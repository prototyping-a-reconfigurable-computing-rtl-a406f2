// Shift register of the IP library (Shift): LOAD puts D in the register;
// otherwise with EN high it shifts by one place, left (LEFT = 1, SIN enters
// at bit 0) or right (SIN enters at the top bit). SOUT is the bit that would
// leave next. Synchronous load, asynchronous reset to zero. The library gives
// only the name; width 8 and the controls are this design's choices.
module ip_shift #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             LOAD,
  input  logic [WIDTH-1:0] D,
  input  logic             EN,
  input  logic             LEFT,
  input  logic             SIN,
  output logic [WIDTH-1:0] Q,
  output logic             SOUT
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     Q <= '0;
    else if (LOAD)  Q <= D;
    else if (EN)    Q <= LEFT ? {Q[WIDTH-2:0], SIN} : {SIN, Q[WIDTH-1:1]};
  end

  assign SOUT = LEFT ? Q[WIDTH-1] : Q[0];

endmodule
