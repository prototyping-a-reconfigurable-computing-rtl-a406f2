// Self-checking testbench of uni_cntr: loads, up and down counting with wrap-around, terminal count, against a model.
module tb_uni_cntr;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic clk = 0, rst_n = 0, load, en, up, tc;
  logic [7:0] d, q;
  int model = 0, n_wrap = 0;
  uni_cntr dut (.clk(clk), .rst_n(rst_n), .LOAD(load), .D(d), .EN(en), .UP(up), .Q(q), .TC(tc));
  always #5 clk = ~clk;
  initial begin
    load = 0; en = 0; up = 1; d = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      load = ($urandom_range(99) == 0); d = 8'($urandom); en = 1'($urandom_range(3) != 0);
      up = ((i / 300) % 2) == 0;
      #1 chk("TC", tc, up ? (model == 255) : (model == 0));
      @(negedge clk);
      if (load) model = d;
      else if (en) begin
        if (up && model == 255) n_wrap++;
        if (!up && model == 0) n_wrap++;
        model = up ? (model + 1) % 256 : (model + 255) % 256;
      end
      chk("Q", q, model);
    end
    chk("wrapped", n_wrap > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
