// Self-checking testbench of ip_not: all 8-bit values and random 16-bit ones.
module tb_ip_not;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [7:0] a8, y8;
  logic [15:0] a16, y16;
  ip_not u8 (.A(a8), .Y(y8));
  ip_not #(.WIDTH(16)) u16 (.A(a16), .Y(y16));
  initial begin
    for (int i = 0; i < 256; i++) begin
      a8 = 8'(i); a16 = 16'($urandom); #1;
      chk("8-bit", y8, 255 - i);
      chk("16-bit", y16, 65535 - a16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
