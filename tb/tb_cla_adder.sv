// Self-checking testbench of cla_adder: random and carry-chain operands at the default width and at 64 bits, against integer addition.
module tb_cla_adder;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [15:0] a, b, s; logic ci, co;
  logic [63:0] a64, b64, s64; logic ci64, co64;
  cla_adder #(.WIDTH(16)) dut (.A(a), .B(b), .CI(ci), .S(s), .CO(co));
  cla_adder #(.WIDTH(64)) d64 (.A(a64), .B(b64), .CI(ci64), .S(s64), .CO(co64));
  initial begin
    a = 16'hFFFF; b = 16'h0000; ci = 1; #1; chk("carry chain", {co, s}, 17'h10000);
    for (int i = 0; i < 500; i++) begin
      a = 16'($urandom); b = 16'($urandom); ci = 1'($urandom); #1;
      chk("S16", {co, s}, longint'(a) + longint'(b) + longint'(ci));
      a64 = {$urandom, $urandom}; b64 = (i % 3 == 0) ? ~a64 : {$urandom, $urandom}; ci64 = 1'($urandom); #1;
      chk("S64 low", s64, a64 + b64 + 64'(ci64));
      chk("CO64", co64, ((65'(a64) + 65'(b64) + 65'(ci64)) >> 64));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
