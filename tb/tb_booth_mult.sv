// Self-checking testbench of booth_mult: all signed 8-bit pairs in steps, extremes, and random 16-bit pairs, against integer multiplication.
module tb_booth_mult;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic signed [7:0] a, b; logic signed [15:0] p;
  logic signed [15:0] a16, b16; logic signed [31:0] p16;
  booth_mult dut (.A(a), .B(b), .P(p));
  booth_mult #(.WIDTH(16)) d16 (.A(a16), .B(b16), .P(p16));
  initial begin
    for (int i = -128; i < 128; i += 3) for (int j = -128; j < 128; j += 5) begin
      a = 8'(i); b = 8'(j); #1; chk("P8", p, i * j);
    end
    a = -128; b = -128; #1; chk("P8 min*min", p, 16384);
    a = 127; b = -128; #1; chk("P8 max*min", p, -16256);
    for (int i = 0; i < 300; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); #1;
      chk("P16", p16, longint'(a16) * longint'(b16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
