// Self-checking testbench of three_major_voter: all input combinations at width 1 and random words at width 8.
module tb_three_major_voter;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic a, b, c, y;
  logic [7:0] a8, b8, c8, y8;
  three_major_voter dut (.A(a), .B(b), .C(c), .Y(y));
  three_major_voter #(.WIDTH(8)) d8 (.A(a8), .B(b8), .C(c8), .Y(y8));
  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i); #1; chk("Y", y, (int'(a) + int'(b) + int'(c)) >= 2);
    end
    for (int t = 0; t < 100; t++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); c8 = 8'($urandom); #1;
      for (int k = 0; k < 8; k++) chk("Y8", y8[k], (int'(a8[k]) + int'(b8[k]) + int'(c8[k])) >= 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
