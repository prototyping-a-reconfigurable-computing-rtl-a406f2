// Universal counter of the IP library (unicntr): LOAD puts D in the counter;
// otherwise with EN high it counts up (UP = 1) or down, wrapping around.
// TC (terminal count) is high at all ones when counting up and at zero when
// counting down. Synchronous load, asynchronous reset to zero. The library
// gives only the name; the controls are this design's choices.
module uni_cntr #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             LOAD,
  input  logic [WIDTH-1:0] D,
  input  logic             EN,
  input  logic             UP,
  output logic [WIDTH-1:0] Q,
  output logic             TC
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     Q <= '0;
    else if (LOAD)  Q <= D;
    else if (EN)    Q <= UP ? Q + 1'b1 : Q - 1'b1;
  end

  assign TC = UP ? (Q == '1) : (Q == '0);

endmodule
