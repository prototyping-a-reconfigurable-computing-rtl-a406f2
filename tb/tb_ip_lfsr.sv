// Self-checking testbench of ip_lfsr: the 4-bit register must visit all 15 non-zero states before repeating; the 32-bit one is compared step by step with a model of x^32+x^22+x^2+x+1; load and hold are checked.
module tb_ip_lfsr;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [3:0] seed4, q4;
  logic [31:0] seed32, q32, model;
  bit seen [16];
  ip_lfsr #(.WIDTH(4)) d4 (.clk(clk), .rst_n(rst_n), .load(load), .seed(seed4), .en(en), .q(q4));
  ip_lfsr d32 (.clk(clk), .rst_n(rst_n), .load(load), .seed(seed32), .en(en), .q(q32));
  always #5 clk = ~clk;
  initial begin
    seed4 = 4'h9; seed32 = 32'hDEAD_BEEF;
    @(negedge clk); rst_n = 1;
    chk("reset 4", q4, 1); chk("reset 32", q32, 1);
    load = 1; @(negedge clk); load = 0;
    chk("load 4", q4, 9); chk("load 32", q32, 32'hDEAD_BEEF);
    @(negedge clk); chk("hold 4", q4, 9);
    model = 32'hDEAD_BEEF;
    en = 1;
    for (int i = 0; i < 15; i++) begin
      chk("state 4 new", seen[q4], 0);
      seen[q4] = 1;
      @(negedge clk);
      model = {model[30:0], model[31] ^ model[21] ^ model[1] ^ model[0]};
      chk("state 32", q32, model);
    end
    chk("period 15", q4, 9);
    repeat (200) begin
      @(negedge clk);
      model = {model[30:0], model[31] ^ model[21] ^ model[1] ^ model[0]};
      chk("state 32", q32, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
