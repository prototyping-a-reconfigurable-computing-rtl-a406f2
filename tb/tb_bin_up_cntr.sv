// Self-checking testbench of bin_up_cntr: counts with random enables against a model, wraps at 255, clears.
module tb_bin_up_cntr;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [7:0] q;
  int model = 0;
  bin_up_cntr dut (.*);
  always #5 clk = ~clk;
  initial begin
    @(negedge clk); rst_n = 1;
    chk("reset", q, 0);
    for (int i = 0; i < 700; i++) begin
      en = (i < 300) ? 1'b1 : 1'($urandom);
      clr = (i == 500);
      @(negedge clk);
      model = clr ? 0 : en ? (model + 1) % 256 : model;
      chk("count", q, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
