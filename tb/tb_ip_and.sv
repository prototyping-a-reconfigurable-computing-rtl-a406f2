// Self-checking testbench of ip_and: random 8-bit and 32-bit operands against the & operator.
module tb_ip_and;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [7:0] a8, b8, y8;
  logic [31:0] a32, b32, y32;
  ip_and u8 (.A(a8), .B(b8), .Y(y8));
  ip_and #(.WIDTH(32)) u32 (.A(a32), .B(b32), .Y(y32));
  initial begin
    for (int i = 0; i < 300; i++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); a32 = $urandom; b32 = $urandom; #1;
      chk("8-bit", y8, a8 & b8);
      chk("32-bit", y32, a32 & b32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
