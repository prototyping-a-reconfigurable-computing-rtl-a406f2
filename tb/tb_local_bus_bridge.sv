// Self-checking testbench of local_bus_bridge: behavioural node models
// (a memory per node answering reads one cycle later, settable busy/done)
// sit on the four links. Checks the PTR read-back, pointer auto-increment,
// that DATA writes and reads reach only the selected node, the CTRL start
// pulses and mode, the STATUS bits, and the lb_ready latencies (1 cycle,
// 3 cycles for a DATA read).
module tb_local_bus_bridge;
  import mfcu_pkg::*;

  localparam int NODES = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lb_cs, lb_wr, lb_rd, lb_ready;
  logic [1:0] lb_addr;
  logic [15:0] lb_wdata, lb_rdata;
  link_req_t req [NODES];
  link_rsp_t rsp [NODES];

  local_bus_bridge #(.NODES(NODES)) dut (.clk(clk), .rst_n(rst_n), .lb_cs(lb_cs), .lb_wr(lb_wr),
    .lb_rd(lb_rd), .lb_addr(lb_addr), .lb_wdata(lb_wdata), .lb_rdata(lb_rdata),
    .lb_ready(lb_ready), .req_o(req), .rsp_i(rsp));

  // Node models.
  pixel_t mem [NODES][64];
  int starts [NODES];
  filter_mode_e last_mode [NODES];
  logic [NODES-1:0] set_busy, set_done;
  for (genvar n = 0; n < NODES; n++) begin : g_model
    always_ff @(posedge clk) begin
      rsp[n].busy   <= set_busy[n];
      rsp[n].done   <= set_done[n];
      rsp[n].rvalid <= 1'b0;
      if (req[n].req && req[n].we) mem[n][req[n].addr[5:0]] <= req[n].wdata;
      if (req[n].req && !req[n].we) begin
        rsp[n].rvalid <= 1'b1;
        rsp[n].rdata  <= mem[n][req[n].addr[5:0]] ^ 8'(n);
      end
      if (req[n].start) begin starts[n] <= starts[n] + 1; last_mode[n] <= req[n].mode; end
    end
  end

  task automatic access(bit wr, int addr, int wdata, output int rdata, output int lat);
    @(negedge clk);
    lb_cs = 1; lb_wr = wr; lb_rd = !wr; lb_addr = 2'(addr); lb_wdata = 16'(wdata);
    @(negedge clk);
    lb_cs = 0; lb_wr = 0; lb_rd = 0;
    lat = 1;
    while (!lb_ready) begin @(negedge clk); lat++; if (lat > 20) break; end
    rdata = int'(lb_rdata);
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int d, lat;
    lb_cs = 0; lb_wr = 0; lb_rd = 0; lb_addr = 0; lb_wdata = 0;
    set_busy = '0; set_done = '0;
    for (int n = 0; n < NODES; n++) starts[n] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // pointer register
    access(1, 0, (2 << 14) | 5, d, lat);
    expect_eq("write latency", lat, 1);
    access(0, 0, 0, d, lat);
    expect_eq("PTR readback", d, (2 << 14) | 5);
    expect_eq("register read latency", lat, 1);
    // stream 8 bytes into each node
    for (int n = 0; n < NODES; n++) begin
      access(1, 0, (n << 14) | 0, d, lat);
      for (int i = 0; i < 8; i++) access(1, 1, 16'hAB00 | (n * 16 + i), d, lat);
    end
    @(negedge clk);
    for (int n = 0; n < NODES; n++)
      for (int i = 0; i < 8; i++) expect_eq("node memory", int'(mem[n][i]), n * 16 + i);
    access(0, 0, 0, d, lat);
    expect_eq("pointer incremented", d, (3 << 14) | 8);
    // read back through DATA
    for (int n = 0; n < NODES; n++) begin
      access(1, 0, (n << 14) | 2, d, lat);
      for (int i = 2; i < 6; i++) begin
        access(0, 1, 0, d, lat);
        expect_eq("DATA read", d, (n * 16 + i) ^ n);
        expect_eq("DATA read latency", lat, 3);
      end
    end
    // start nodes 1 and 3 with mode 2
    access(1, 2, 16'h00A2, d, lat);
    repeat (2) @(negedge clk);
    expect_eq("starts node0", starts[0], 0);
    expect_eq("starts node1", starts[1], 1);
    expect_eq("starts node2", starts[2], 0);
    expect_eq("starts node3", starts[3], 1);
    expect_eq("mode node1", int'(last_mode[1]), 2);
    access(0, 2, 0, d, lat);
    expect_eq("CTRL readback", d, 2);
    access(1, 2, 16'h00F0, d, lat);
    repeat (2) @(negedge clk);
    for (int n = 0; n < NODES; n++) expect_eq("broadcast start", starts[n], (n % 2 == 1) ? 2 : 1);
    // status
    set_busy = 4'b0110; set_done = 4'b1001;
    access(0, 3, 0, d, lat);
    expect_eq("STATUS", d, 8'h69);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
