// Image-negative IP: each colour channel becomes 255 minus its value.
//
// One 8-bit subtractor from 255 per channel, as in the original design's hardware
// chart, which draws three channels (R, G, B); CHANNELS sets how many, so a
// gray-level datapath can use one. Combinational.
module image_negative
  import mfcu_pkg::*;
#(
  parameter int unsigned CHANNELS = 3
) (
  input  pixel_t [CHANNELS-1:0] pix_in,
  output pixel_t [CHANNELS-1:0] pix_out
);

  always_comb begin
    for (int c = 0; c < CHANNELS; c++) pix_out[c] = 8'd255 - pix_in[c];
  end

endmodule
