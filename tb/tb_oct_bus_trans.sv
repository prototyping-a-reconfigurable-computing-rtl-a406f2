// Self-checking testbench of oct_bus_trans: both directions and disabled, with random data on both sides.
module tb_oct_bus_trans;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic dir, g_n, a_en, b_en; logic [7:0] a_in, b_in, a_out, b_out;
  oct_bus_trans dut (.DIR(dir), .G_N(g_n), .A_IN(a_in), .B_IN(b_in), .A_OUT(a_out), .B_OUT(b_out), .A_EN(a_en), .B_EN(b_en));
  initial begin
    for (int i = 0; i < 200; i++) begin
      dir = 1'($urandom); g_n = 1'($urandom); a_in = 8'($urandom); b_in = 8'($urandom); #1;
      chk("B driven", b_en, !g_n && dir);
      chk("A driven", a_en, !g_n && !dir);
      if (b_en) chk("A to B", b_out, a_in);
      if (a_en) chk("B to A", a_out, b_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
