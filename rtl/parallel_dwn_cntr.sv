// Parallel-load down counter of the IP library (ParallelDwnCntr): LOAD puts
// D into the counter, otherwise it counts down by one each clock with EN
// high and stops at zero; ZERO is high when the count is zero. Synchronous
// load, asynchronous reset to zero. Width 8, the stop at zero and the flag
// are this design's choices.
module parallel_dwn_cntr #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             LOAD,
  input  logic [WIDTH-1:0] D,
  input  logic             EN,
  output logic [WIDTH-1:0] Q,
  output logic             ZERO
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  Q <= '0;
    else if (LOAD)               Q <= D;
    else if (EN && Q != '0)      Q <= Q - 1'b1;
  end

  assign ZERO = (Q == '0);

endmodule
