// Self-checking testbench of parallel_dwn_cntr: random loads, counts down with random enables against a model, stops at zero.
module tb_parallel_dwn_cntr;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic clk = 0, rst_n = 0, load = 0, en = 0, zero;
  logic [7:0] d, q;
  int model = 0, n_stop = 0;
  parallel_dwn_cntr dut (.clk(clk), .rst_n(rst_n), .LOAD(load), .D(d), .EN(en), .Q(q), .ZERO(zero));
  always #5 clk = ~clk;
  initial begin
    @(negedge clk); rst_n = 1;
    chk("reset", q, 0); chk("zero", zero, 1);
    for (int i = 0; i < 1000; i++) begin
      load = ($urandom_range(49) == 0); d = 8'($urandom_range(40)); en = 1'($urandom_range(3) != 0);
      @(negedge clk);
      if (load) model = d; else if (en && model > 0) model--; else if (en) n_stop++;
      chk("Q", q, model); chk("ZERO", zero, model == 0);
    end
    chk("stopped at zero", n_stop > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
