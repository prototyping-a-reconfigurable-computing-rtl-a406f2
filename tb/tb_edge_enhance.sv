// Self-checking testbench of edge_enhance: flat, vertical-step, horizontal-
// step and random windows, against the gradient formula computed here with
// integers and clamped to 0..255.
module tb_edge_enhance;
  import mfcu_pkg::*;
  int checks = 0, failures = 0;
  int n_sat_hi = 0, n_sat_lo = 0;
  window_t win;
  pixel_t  pix;

  edge_enhance dut (.win(win), .pix_out(pix));

  function automatic int ref_edge(window_t w);
    int p[1:9]; int gx, gy, s;
    for (int i = 1; i <= 9; i++) p[i] = int'(w[i-1]);
    gx = (p[7] + 2*p[8] + p[9]) - (p[1] + 2*p[2] + p[3]);
    gy = (p[3] + 2*p[6] + p[9]) - (p[1] + 2*p[4] + p[7]);
    s = gx + gy;
    return (s > 255) ? 255 : (s < 0) ? 0 : s;
  endfunction

  task automatic check(window_t w);
    int exp;
    win = w; #1;
    exp = ref_edge(w);
    if (exp == 255) n_sat_hi++;
    if (exp == 0) n_sat_lo++;
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
    for (int i = 0; i < 9; i++) w[i] = 8'd100;
    check(w);                                   // flat: 0
    w = '0; w[6] = 8'd10; w[7] = 8'd10; w[8] = 8'd10;
    check(w);                                   // Gx = 40, Gy = 10 -> 50
    w = '0; w[7] = 8'd200;
    check(w);                                   // Gx = 400 -> 255
    w = '0; w[1] = 8'd30;
    check(w);                                   // Gx = -60 -> 0
    w = '0; w[5] = 8'd50; w[3] = 8'd20;
    check(w);                                   // Gy = 100-40 = 60
    repeat (2000) begin
      for (int i = 0; i < 9; i++) w[i] = 8'($urandom_range(255));
      check(w);
    end
    repeat (1000) begin                         // small gradients hit the unclamped range
      for (int i = 0; i < 9; i++) w[i] = 8'(100 + $urandom_range(40));
      check(w);
    end
    if (n_sat_hi == 0 || n_sat_lo == 0) begin failures++; $display("FAIL saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
