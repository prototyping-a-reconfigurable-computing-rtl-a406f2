// Self-checking testbench of equal_checker: equal and near-equal 8- and 32-bit operands.
module tb_equal_checker;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [7:0] a, b; logic eq;
  logic [31:0] a32, b32; logic eq32;
  equal_checker dut (.A(a), .B(b), .EQ(eq));
  equal_checker #(.WIDTH(32)) d32 (.A(a32), .B(b32), .EQ(eq32));
  initial begin
    for (int i = 0; i < 256; i++) for (int j = 0; j < 256; j += 5) begin
      a = 8'(i); b = 8'(j); #1; chk("EQ", eq, i == j);
    end
    for (int i = 0; i < 200; i++) begin
      a32 = $urandom; b32 = (i % 2) ? a32 : a32 ^ (32'd1 << (i % 32)); #1;
      chk("EQ32", eq32, a32 == b32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
