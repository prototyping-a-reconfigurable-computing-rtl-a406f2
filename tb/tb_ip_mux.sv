// Self-checking testbench of ip_mux: 2-, 4- and 8-input versions, every select with random data.
module tb_ip_mux;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [1:0][7:0] d2; logic [3:0][7:0] d4; logic [7:0][7:0] d8;
  logic s2; logic [1:0] s4; logic [2:0] s8;
  logic [7:0] y2, y4, y8;
  ip_mux #(.N(2)) m2 (.D(d2), .SEL(s2), .Y(y2));
  ip_mux #(.N(4)) m4 (.D(d4), .SEL(s4), .Y(y4));
  ip_mux #(.N(8)) m8 (.D(d8), .SEL(s8), .Y(y8));
  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < 8; i++) d8[i] = 8'($urandom);
      for (int i = 0; i < 4; i++) d4[i] = 8'($urandom);
      for (int i = 0; i < 2; i++) d2[i] = 8'($urandom);
      for (int s = 0; s < 8; s++) begin
        s8 = 3'(s); s4 = 2'(s); s2 = 1'(s); #1;
        chk("mux8", y8, d8[s]); chk("mux4", y4, d4[s % 4]); chk("mux2", y2, d2[s % 2]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
