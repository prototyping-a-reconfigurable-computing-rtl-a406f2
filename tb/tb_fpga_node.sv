// Self-checking testbench of fpga_node: writes a quarter over the link,
// reads it back (one-cycle read latency), starts each filter mode, waits for
// done and reads the result memory, comparing with the reference filters.
module tb_fpga_node;
  import mfcu_pkg::*;
  import tb_ref_pkg::*;

  localparam int QW = 8, QH = 8;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_req_t req;
  link_rsp_t rsp;
  int img[];

  fpga_node #(.QW(QW), .QH(QH)) dut (.clk(clk), .rst_n(rst_n), .req_i(req), .rsp_o(rsp));

  task automatic link_write(int addr, int data);
    @(negedge clk);
    req = '0; req.req = 1; req.we = 1; req.addr = LINK_AW'(addr); req.wdata = 8'(data);
    @(negedge clk);
    req = '0;
  endtask

  task automatic link_read(int addr, output int data);
    @(negedge clk);
    req = '0; req.req = 1; req.addr = LINK_AW'(addr);
    @(negedge clk);
    req = '0;
    checks++;
    if (!rsp.rvalid) begin failures++; $display("FAIL rvalid missing"); end
    data = int'(rsp.rdata);
    @(negedge clk);
    checks++;
    if (rsp.rvalid) begin failures++; $display("FAIL rvalid held"); end
  endtask

  initial begin
    #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int d, cycles, p[1:9];
    req = '0;
    img = new[QW*QH];
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (rsp.busy || rsp.done) begin failures++; $display("FAIL status after reset"); end
    for (int m = 0; m < 4; m++) begin
      for (int i = 0; i < QW*QH; i++) begin
        img[i] = $urandom_range(255);
        if (m == 2) img[i] = img[i] | 8'hE0;
        link_write(i, img[i]);
      end
      for (int i = 0; i < QW*QH; i += 7) begin
        link_read(i, d);
        checks++;
        if (d != img[i]) begin failures++; $display("FAIL readback %0d: %0d vs %0d", i, d, img[i]); end
      end
      @(negedge clk);
      req = '0; req.start = 1; req.mode = filter_mode_e'(m);
      @(negedge clk);
      req = '0;
      cycles = 0;
      while (!rsp.done) begin @(negedge clk); cycles++; end
      checks++;
      if (cycles != 11*QW*QH) begin failures++; $display("FAIL scan took %0d cycles", cycles); end
      for (int r = 0; r < QH; r++)
        for (int c = 0; c < QW; c++) begin
          link_read((1 << (LINK_AW-1)) + r*QW + c, d);
          window_of(img, QW, QH, r, c, p);
          checks++;
          if (d != filter(m, p)) begin
            failures++; $display("FAIL mode %0d (%0d,%0d): got %0d expected %0d", m, r, c, d, filter(m, p));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
