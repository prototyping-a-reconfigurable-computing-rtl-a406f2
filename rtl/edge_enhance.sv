// Edge-enhancement IP: a Sobel-style gradient over the nine-cell window.
//
//   Gx = (P7 + 2*P8 + P9) - (P1 + 2*P2 + P3)
//   Gy = (P3 + 2*P6 + P9) - (P1 + 2*P4 + P7)
//   out = Gx + Gy, compared against 255
//
// The structure follows the original design's hardware chart: each doubling is a
// shift by one, each triple sum two library adders, then one subtractor per
// gradient, one adder and a comparator with 255. The original design does not say
// what happens to a negative sum; this design clamps it to 0, and a sum above
// 255 to 255, so the output is always a valid 8-bit pixel. The centre pixel
// P5 is not used. Combinational: one clock of the surrounding logic.
module edge_enhance
  import mfcu_pkg::*;
(
  input  window_t win,
  output pixel_t  pix_out
);

  localparam int unsigned SW = PIX_W + 2;   // one triple sum: up to 1020

  logic [SW-1:0] d8, d2, d6, d4;            // shifter outputs (2*P)
  logic [SW-1:0] s79, s13, s39, s17;        // outer pairs
  logic [SW-1:0] tx_pos, tx_neg, ty_pos, ty_neg;
  logic          unused_co [8];
  logic signed [SW:0]   gx, gy;             // -1020..1020
  logic signed [SW+1:0] gsum;               // -2040..2040

  always_comb begin
    d8 = SW'(win[7]) << 1;
    d2 = SW'(win[1]) << 1;
    d6 = SW'(win[5]) << 1;
    d4 = SW'(win[3]) << 1;
  end

  ip_adder #(.WIDTH(SW)) u_a79 (.A(SW'(win[6])), .B(SW'(win[8])), .CI(1'b0), .S(s79), .CO(unused_co[0]));
  ip_adder #(.WIDTH(SW)) u_a13 (.A(SW'(win[0])), .B(SW'(win[2])), .CI(1'b0), .S(s13), .CO(unused_co[1]));
  ip_adder #(.WIDTH(SW)) u_a39 (.A(SW'(win[2])), .B(SW'(win[8])), .CI(1'b0), .S(s39), .CO(unused_co[2]));
  ip_adder #(.WIDTH(SW)) u_a17 (.A(SW'(win[0])), .B(SW'(win[6])), .CI(1'b0), .S(s17), .CO(unused_co[3]));
  ip_adder #(.WIDTH(SW)) u_ax1 (.A(d8), .B(s79), .CI(1'b0), .S(tx_pos), .CO(unused_co[4]));
  ip_adder #(.WIDTH(SW)) u_ax2 (.A(d2), .B(s13), .CI(1'b0), .S(tx_neg), .CO(unused_co[5]));
  ip_adder #(.WIDTH(SW)) u_ay1 (.A(d6), .B(s39), .CI(1'b0), .S(ty_pos), .CO(unused_co[6]));
  ip_adder #(.WIDTH(SW)) u_ay2 (.A(d4), .B(s17), .CI(1'b0), .S(ty_neg), .CO(unused_co[7]));

  always_comb begin
    gx   = $signed({1'b0, tx_pos}) - $signed({1'b0, tx_neg});
    gy   = $signed({1'b0, ty_pos}) - $signed({1'b0, ty_neg});
    gsum = (SW+2)'(gx) + (SW+2)'(gy);
    if (gsum > 255)     pix_out = 8'd255;
    else if (gsum < 0)  pix_out = 8'd0;
    else                pix_out = pixel_t'(gsum);
  end

endmodule
