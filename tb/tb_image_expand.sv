// Self-checking testbench of image_expand: sums of the eight neighbours
// below, at and above 256, against an integer reference.
module tb_image_expand;
  import mfcu_pkg::*;
  int checks = 0, failures = 0;
  window_t win;
  pixel_t  pix;

  image_expand dut (.win(win), .pix_out(pix));

  task automatic check(window_t w);
    int s, exp;
    win = w; #1;
    s = 0;
    for (int i = 0; i < 9; i++) if (i != 4) s += int'(w[i]);
    exp = (s >= 256) ? 255 : s;
    checks++;
    if (int'(pix) != exp) begin
      failures++; $display("FAIL window %h: got %0d expected %0d", w, pix, exp);
    end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    window_t w;
    w = '0; w[4] = 8'd255; check(w);                      // centre ignored: 0
    for (int i = 0; i < 9; i++) w[i] = 8'd31; check(w);   // 248
    for (int i = 0; i < 9; i++) w[i] = 8'd32; check(w);   // 256 -> 255
    w = '0; w[0] = 8'd255; check(w);                      // 255
    w = '0; w[0] = 8'd255; w[8] = 8'd1; check(w);         // 256 -> 255
    for (int i = 0; i < 9; i++) w[i] = 8'd255; check(w);  // 2040 -> 255
    repeat (2000) begin
      for (int i = 0; i < 9; i++) w[i] = 8'($urandom_range(($urandom_range(1) != 0) ? 255 : 40));
      check(w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
