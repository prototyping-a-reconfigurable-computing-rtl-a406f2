// Image-expansion IP: sums the eight neighbours of the centre pixel and
// saturates the result to a pixel.
//
// Three levels of library adders (8-bit, 9-bit and 10-bit, as the original
// lists them) form an adder tree over P1-P4 and P6-P9, as in the original design's
// hardware chart; a comparator with 256 then maps every sum of 256 or more to
// 255 (white) and passes smaller sums unchanged. The saturation value is this
// design's choice: the original description only says the return value is checked.
// Combinational.
module image_expand
  import mfcu_pkg::*;
(
  input  window_t win,
  output pixel_t  pix_out
);

  logic [8:0]  l1 [4];   // pair sums, 9 bits
  logic [9:0]  l2 [2];   // quad sums, 10 bits
  logic [10:0] total;    // up to 8*255 = 2040

  // Level 1: 8-bit adders, carry-out is the ninth bit.
  ip_adder #(.WIDTH(8)) u_l1_12 (.A(win[0]), .B(win[1]), .CI(1'b0), .S(l1[0][7:0]), .CO(l1[0][8]));
  ip_adder #(.WIDTH(8)) u_l1_34 (.A(win[2]), .B(win[3]), .CI(1'b0), .S(l1[1][7:0]), .CO(l1[1][8]));
  ip_adder #(.WIDTH(8)) u_l1_67 (.A(win[5]), .B(win[6]), .CI(1'b0), .S(l1[2][7:0]), .CO(l1[2][8]));
  ip_adder #(.WIDTH(8)) u_l1_89 (.A(win[7]), .B(win[8]), .CI(1'b0), .S(l1[3][7:0]), .CO(l1[3][8]));
  // Level 2: 9-bit adders.
  ip_adder #(.WIDTH(9)) u_l2_a (.A(l1[0]), .B(l1[1]), .CI(1'b0), .S(l2[0][8:0]), .CO(l2[0][9]));
  ip_adder #(.WIDTH(9)) u_l2_b (.A(l1[2]), .B(l1[3]), .CI(1'b0), .S(l2[1][8:0]), .CO(l2[1][9]));
  // Level 3: 10-bit adder.
  ip_adder #(.WIDTH(10)) u_l3 (.A(l2[0]), .B(l2[1]), .CI(1'b0), .S(total[9:0]), .CO(total[10]));

  always_comb begin
    if (total >= 11'd256) pix_out = 8'd255;
    else                  pix_out = total[7:0];
  end

endmodule
