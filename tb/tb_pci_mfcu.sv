// End-to-end testbench of the board at its default size: a 16x16 gray image,
// four nodes of 8x8 each. Acting as the host, it splits each test image into
// quarters, streams every quarter into its node over the local bus, starts
// all four nodes with one write, polls STATUS until all are done, reads the
// four results back and compares every pixel with the reference filter
// applied to each quarter on its own. All four filter modes are run.
// Mechanisms counted (each must occur): each mode, all four nodes busy at
// once, STATUS polled while busy, edge result clamped high and low, expansion
// saturated, DATA reads with wait states, window cells replicated at a
// quarter's border.
module tb_pci_mfcu;
  import mfcu_pkg::*;
  import tb_ref_pkg::*;

  localparam int NODES = 4, QW = 8, QH = 8;
  localparam int W = 2 * QW, H = 2 * QH;

  int checks = 0, failures = 0;
  int n_mode [4], n_all_busy, n_poll_busy, n_edge_hi, n_edge_lo, n_exp_sat, n_wait_read, n_border;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lb_cs, lb_wr, lb_rd, lb_ready;
  logic [1:0] lb_addr;
  logic [15:0] lb_wdata, lb_rdata;

  pci_mfcu dut (.*);

  task automatic access(bit wr, int addr, int wdata, output int rdata, output int lat);
    @(negedge clk);
    lb_cs = 1; lb_wr = wr; lb_rd = !wr; lb_addr = 2'(addr); lb_wdata = 16'(wdata);
    @(negedge clk);
    lb_cs = 0; lb_wr = 0; lb_rd = 0;
    lat = 1;
    while (!lb_ready) begin @(negedge clk); lat++; end
    rdata = int'(lb_rdata);
  endtask

  initial begin
    #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int img[], quarter[], d, lat, p[1:9], expv, t0, cycles;
    lb_cs = 0; lb_wr = 0; lb_rd = 0; lb_addr = 0; lb_wdata = 0;
    n_all_busy = 0; n_poll_busy = 0; n_edge_hi = 0; n_edge_lo = 0; n_exp_sat = 0;
    n_wait_read = 0; n_border = 0;
    for (int m = 0; m < 4; m++) n_mode[m] = 0;
    img = new[W*H];
    quarter = new[QW*QH];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      // test image: a bright square with a ramp, some noise; erosion gets high bits set
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          d = (x >= 4 && x < 12 && y >= 5 && y < 11) ? 200 : 10 + 3 * x;
          if (((x * 7 + y * 3) % 5) == 0) d = $urandom_range(255);
          if (m == 2) d = d | 8'hC0;
          img[y*W + x] = d;
        end
      // host writes the four quarters
      for (int n = 0; n < NODES; n++) begin
        access(1, 0, (n << 14), d, lat);
        for (int r = 0; r < QH; r++)
          for (int c = 0; c < QW; c++)
            access(1, 1, img[((n / 2) * QH + r) * W + (n % 2) * QW + c], d, lat);
      end
      // start all nodes
      access(1, 2, 16'h00F0 | m, d, lat);
      t0 = $time;
      do begin
        access(0, 3, 0, d, lat);
        if (d[7:4] == 4'hF) n_all_busy++;
        if (d[7:4] != 0) n_poll_busy++;
      end while (d[3:0] != 4'hF);
      cycles = ($time - t0) / 10;
      checks++;
      if (cycles < 11 * QW * QH || cycles > 11 * QW * QH + 20) begin
        failures++; $display("FAIL mode %0d finished after %0d cycles", m, cycles);
      end
      n_mode[m]++;
      // read back and compare
      for (int n = 0; n < NODES; n++) begin
        for (int i = 0; i < QW*QH; i++)
          quarter[i] = img[((n / 2) * QH + i / QW) * W + (n % 2) * QW + i % QW];
        access(1, 0, (n << 14) | (1 << (LINK_AW - 1)), d, lat);
        for (int r = 0; r < QH; r++)
          for (int c = 0; c < QW; c++) begin
            access(0, 1, 0, d, lat);
            if (lat > 1) n_wait_read++;
            window_of(quarter, QW, QH, r, c, p);
            expv = filter(m, p);
            if (r == 0 || c == 0 || r == QH - 1 || c == QW - 1) n_border++;
            if (m == 0 && expv == 255) n_edge_hi++;
            if (m == 0 && expv == 0) n_edge_lo++;
            if (m == 1 && expv == 255) n_exp_sat++;
            checks++;
            if (d != expv) begin
              failures++;
              $display("FAIL mode %0d node %0d (%0d,%0d): got %0d expected %0d", m, n, r, c, d, expv);
            end
          end
      end
    end
    $display("mechanisms: modes %0d %0d %0d %0d, all busy %0d, busy polls %0d, edge hi %0d lo %0d, expand sat %0d, wait reads %0d, border %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_all_busy, n_poll_busy, n_edge_hi, n_edge_lo,
             n_exp_sat, n_wait_read, n_border);
    foreach (n_mode[m]) begin checks++; if (n_mode[m] == 0) failures++; end
    checks++; if (n_all_busy == 0) begin failures++; $display("FAIL nodes never busy together"); end
    checks++; if (n_poll_busy == 0) failures++;
    checks++; if (n_edge_hi == 0 || n_edge_lo == 0) begin failures++; $display("FAIL edge clamps not reached"); end
    checks++; if (n_exp_sat == 0) begin failures++; $display("FAIL expansion never saturated"); end
    checks++; if (n_wait_read == 0) failures++;
    checks++; if (n_border == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
