// First-in first-out buffer of the IP library (FIFO8: 8-bit words).
//
// DEPTH words in a circular memory with read and write pointers one bit
// wider than the address, so full and empty are told apart by the extra bit.
// A push when full and a pop when empty are ignored; push and pop together
// are both done. DOUT shows the oldest word whenever EMPTY is low (first-word
// fall-through). The library gives only the name and the 8-bit width; the
// depth of 16, the flags and the fall-through are this design's choices.
module ip_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             PUSH,
  input  logic [WIDTH-1:0] DIN,
  input  logic             POP,
  output logic [WIDTH-1:0] DOUT,
  output logic             FULL,
  output logic             EMPTY
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;
  logic             do_push, do_pop;

  always_comb begin
    EMPTY   = (wp == rp);
    FULL    = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
    do_push = PUSH && !FULL;
    do_pop  = POP && !EMPTY;
    DOUT    = mem[rp[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wp[AW-1:0]] <= DIN;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
    end
  end

  initial begin
    assert (DEPTH == (1 << AW)) else $error("DEPTH must be a power of two");
  end

endmodule
