// Self-checking testbench of ip_shift: loads and left/right shifts with random serial input, against a model.
module tb_ip_shift;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic clk = 0, rst_n = 0, load, en, left, sin, sout;
  logic [7:0] d, q, model;
  ip_shift dut (.clk(clk), .rst_n(rst_n), .LOAD(load), .D(d), .EN(en), .LEFT(left), .SIN(sin), .Q(q), .SOUT(sout));
  always #5 clk = ~clk;
  initial begin
    load = 0; en = 0; left = 0; sin = 0; d = 0; model = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 800; i++) begin
      load = ($urandom_range(19) == 0); d = 8'($urandom); en = 1'($urandom); left = 1'($urandom); sin = 1'($urandom);
      #1 chk("SOUT", sout, left ? model[7] : model[0]);
      @(negedge clk);
      if (load) model = d;
      else if (en) model = left ? {model[6:0], sin} : {sin, model[7:1]};
      chk("Q", q, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
