// Self-checking testbench of image_erosion: the output must be the bitwise
// AND of all nine window pixels; each pixel in turn is shown to matter.
module tb_image_erosion;
  import mfcu_pkg::*;
  int checks = 0, failures = 0;
  window_t win;
  pixel_t  pix;

  image_erosion dut (.win(win), .pix_out(pix));

  task automatic check(window_t w);
    pixel_t exp;
    win = w; #1;
    exp = 8'hFF;
    for (int i = 0; i < 9; i++) exp &= w[i];
    checks++;
    if (pix !== exp) begin
      failures++; $display("FAIL window %h: got %h expected %h", w, pix, exp);
    end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    window_t w;
    for (int i = 0; i < 9; i++) w[i] = 8'hFF;
    check(w);
    for (int j = 0; j < 9; j++) begin          // clearing one bit of any pixel clears it
      for (int i = 0; i < 9; i++) w[i] = 8'hFF;
      w[j] = 8'hFF ^ (8'h01 << (j % 8));
      check(w);
    end
    repeat (2000) begin
      for (int i = 0; i < 9; i++) w[i] = 8'($urandom_range(255)) | 8'hC3;
      check(w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
