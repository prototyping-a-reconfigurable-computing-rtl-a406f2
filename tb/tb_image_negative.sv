// Self-checking testbench of image_negative with its three R, G, B channels:
// every value 0..255 on every channel, against 255 - value.
module tb_image_negative;
  import mfcu_pkg::*;
  int checks = 0, failures = 0;
  pixel_t [2:0] pin, pout;

  image_negative dut (.pix_in(pin), .pix_out(pout));

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      pin[0] = 8'(v); pin[1] = 8'((v + 85) % 256); pin[2] = 8'((v * 7) % 256); #1;
      for (int c = 0; c < 3; c++) begin
        checks++;
        if (int'(pout[c]) != 255 - int'(pin[c])) begin
          failures++; $display("FAIL ch %0d in %0d out %0d", c, pin[c], pout[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
