// Image-erosion IP: bitwise AND of the pixels of the nine-cell window.
//
// A tree of AND stages as in the original design's hardware chart. The chart draws
// the eight neighbours only, while the original design's equation includes the
// centre pixel P5 and its pin count (9 x 8 inputs + 8 outputs = 80) fits nine
// inputs; the equation is followed and P5 joins the last stage.
// Combinational.
module image_erosion
  import mfcu_pkg::*;
(
  input  window_t win,
  output pixel_t  pix_out
);

  pixel_t l1 [4];
  pixel_t l2 [2];

  always_comb begin
    l1[0]   = win[0] & win[1];
    l1[1]   = win[2] & win[3];
    l1[2]   = win[5] & win[6];
    l1[3]   = win[7] & win[8];
    l2[0]   = l1[0] & l1[1];
    l2[1]   = l1[2] & l1[3];
    pix_out = l2[0] & l2[1] & win[4];
  end

endmodule
