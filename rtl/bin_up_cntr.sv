// Binary up counter of the IP library (BinUpCntr8/16/32 are WIDTH 8/16/32).
// Counts up by one on each clock with en high, wrapping from all ones to
// zero; clr clears it synchronously and wins over en; rst_n clears it
// asynchronously. The library only names the counter: the enable, the clear
// and the reset are this design's choices.
module bin_up_cntr #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else if (en)  q <= q + 1'b1;
  end

endmodule
