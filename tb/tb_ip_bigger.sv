// Self-checking testbench of ip_bigger: all 8-bit operand pairs.
module tb_ip_bigger;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [7:0] a, b; logic gt;
  ip_bigger dut (.A(a), .B(b), .GT(gt));
  initial begin
    for (int i = 0; i < 256; i++) for (int j = 0; j < 256; j += 3) begin
      a = 8'(i); b = 8'(j); #1; chk("GT", gt, i > j);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
