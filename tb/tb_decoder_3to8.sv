// Self-checking testbench of decoder_3to8: every code with the enable high and low.
module tb_decoder_3to8;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [2:0] a; logic en; logic [7:0] y;
  decoder_3to8 dut (.A(a), .EN(en), .Y(y));
  initial begin
    for (int e = 0; e < 2; e++) for (int i = 0; i < 8; i++) begin
      a = 3'(i); en = 1'(e); #1; chk("Y", y, e ? (1 << i) : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
