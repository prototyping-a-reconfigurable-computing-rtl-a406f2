// Self-checking testbench of ip_fifo: random pushes and pops against a queue model, including writes when full and reads when empty.
module tb_ip_fifo;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic clk = 0, rst_n = 0, push = 0, pop = 0, full, empty;
  logic [7:0] din, dout;
  logic [7:0] q[$];
  int n_full = 0, n_empty = 0;
  ip_fifo dut (.clk(clk), .rst_n(rst_n), .PUSH(push), .DIN(din), .POP(pop), .DOUT(dout), .FULL(full), .EMPTY(empty));
  always #5 clk = ~clk;
  initial begin
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      // phases biased to fill and to drain
      push = 1'($urandom_range(99) < (((i / 200) % 2) ? 80 : 20));
      pop  = 1'($urandom_range(99) < (((i / 200) % 2) ? 20 : 80));
      din = 8'($urandom);
      #1;
      chk("EMPTY", empty, q.size() == 0);
      chk("FULL", full, q.size() == 16);
      if (q.size() > 0) chk("DOUT", dout, q[0]);
      if (full) n_full++;
      if (empty) n_empty++;
      @(negedge clk);
      begin
        bit was_full;
        was_full = (q.size() == 16);
        if (pop && q.size() > 0) void'(q.pop_front());
        if (push && !was_full) q.push_back(din);
      end
    end
    chk("full reached", n_full > 0, 1);
    chk("empty reached", n_empty > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
