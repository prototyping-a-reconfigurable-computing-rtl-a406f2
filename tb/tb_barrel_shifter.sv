// Self-checking testbench of barrel_shifter (16 bits): every amount, both directions, shift and rotate, against shift operators.
module tb_barrel_shifter;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [15:0] din, dout; logic [3:0] amt; logic left, rot;
  logic [15:0] exp;
  barrel_shifter dut (.DIN(din), .AMT(amt), .LEFT(left), .ROT(rot), .DOUT(dout));
  initial begin
    for (int i = 0; i < 40; i++) for (int s = 0; s < 16; s++) for (int m = 0; m < 4; m++) begin
      din = 16'($urandom); amt = 4'(s); left = m[0]; rot = m[1]; #1;
      if (left) exp = rot ? 16'((din << s) | (din >> ((16 - s) % 16))) : 16'(din << s);
      else      exp = rot ? 16'((din >> s) | (din << ((16 - s) % 16))) : 16'(din >> s);
      chk("DOUT", dout, exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
