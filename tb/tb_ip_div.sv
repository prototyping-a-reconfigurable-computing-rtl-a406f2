// Self-checking testbench of ip_div: 8-bit dividends and divisors in steps, division by zero, random 32-bit pairs.
module tb_ip_div;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [7:0] n, d, q, r;
  logic [31:0] n32, d32, q32, r32;
  ip_div dut (.N(n), .D(d), .Q(q), .R(r));
  ip_div #(.WIDTH(32)) d_32 (.N(n32), .D(d32), .Q(q32), .R(r32));
  initial begin
    for (int i = 0; i < 256; i += 3) for (int j = 1; j < 256; j += 2) begin
      n = 8'(i); d = 8'(j); #1; chk("Q", q, i / j); chk("R", r, i % j);
    end
    n = 8'd77; d = 8'd0; #1; chk("Q /0", q, 255); chk("R /0", r, 77);
    for (int i = 0; i < 200; i++) begin
      n32 = $urandom; d32 = $urandom >> $urandom_range(31); if (d32 == 0) d32 = 1; #1;
      chk("Q32", q32, n32 / d32); chk("R32", r32, n32 % d32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
