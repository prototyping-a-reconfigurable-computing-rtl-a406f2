// Self-checking testbench of ttl374: data is stored only on the rising edge, and the drive enable follows OE_N.
module tb_ttl374;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic clk = 0, oe_n = 1, q_en; logic [7:0] d, q, prev;
  ttl374 dut (.CLK(clk), .OE_N(oe_n), .D(d), .Q(q), .Q_EN(q_en));
  initial begin
    d = 8'h3C; #5 clk = 1; #5 clk = 0;
    chk("stored", q, 8'h3C);
    for (int i = 0; i < 100; i++) begin
      prev = q;
      d = 8'($urandom); #2;
      chk("no change before edge", q, prev);
      clk = 1; #2; chk("captured", q, d);
      d = 8'(~d); #2; chk("held after edge", q, 8'(~d));
      clk = 0;
      oe_n = 1'($urandom); #1; chk("drive enable", q_en, !oe_n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
