// Self-checking testbench of ip_encoder: every 8-bit input and random 32-bit inputs, against a highest-set-bit search.
module tb_ip_encoder;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [7:0] d; logic [2:0] idx; logic v;
  logic [31:0] d32; logic [4:0] idx32; logic v32;
  int e;
  ip_encoder dut (.D(d), .IDX(idx), .VALID(v));
  ip_encoder #(.WIDTH(32)) d_32 (.D(d32), .IDX(idx32), .VALID(v32));
  initial begin
    for (int i = 0; i < 256; i++) begin
      d = 8'(i); #1;
      e = 0; for (int b = 0; b < 8; b++) if (i & (1 << b)) e = b;
      chk("VALID", v, i != 0); chk("IDX", idx, e);
    end
    for (int i = 0; i < 200; i++) begin
      d32 = $urandom >> $urandom_range(31); #1;
      e = 0; for (int b = 0; b < 32; b++) if (d32[b]) e = b;
      chk("VALID32", v32, d32 != 0); chk("IDX32", idx32, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
