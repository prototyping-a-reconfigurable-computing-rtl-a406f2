// End-to-end testbench of the whole system at its default size. First the IP
// library: every component is driven with random operands and compared with
// its arithmetic definition (the Hamming pair as encode, flip one bit,
// decode), and the sequential ones are stepped against models, the FIFO
// being filled past full and drained. Then the image board, as the host
// would use it: a 16x16 gray image is split into four 8x8 quarters, each
// streamed into its node over the local bus; one write starts all four
// nodes; STATUS is polled until all are done; the results are read back and
// compared pixel by pixel with the reference filter applied to each quarter
// on its own. All four filter modes are run.
// Mechanisms counted (each must occur): each mode, all four nodes busy at
// once, STATUS polled while busy, edge result clamped high and low, expansion
// saturated, DATA reads with wait states, window cells replicated at a
// quarter's border, FIFO full, Hamming correction.
module tb_rcs_top;
  import ip_lib_pkg::*;
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

  lib_in_t  lib_in;
  lib_out_t lib_out;
  int n_fifo_full, n_ham_fix, n_lfsr_steps;

  rcs_top dut (.*);

  task automatic lchk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL library %s: got %0d expected %0d", what, got, exp); end
  endtask

  // Library components, checked against their arithmetic definitions.
  task automatic run_library();
    int cnt, sz, pdc, code;
    logic [31:0] lf;
    logic [7:0] fifo_model [$];
    n_fifo_full = 0; n_ham_fix = 0; n_lfsr_steps = 0;
    repeat (200) begin
      @(negedge clk);
      lib_in = lib_in_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                          $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                          $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      lib_in.div_d = lib_in.div_d | 8'd1;
      lib_in.cnt_clr = 0; lib_in.cnt_en = 0; lib_in.fifo_push = 0; lib_in.fifo_pop = 0;
      lib_in.lfsr_load = 0; lib_in.lfsr_en = 0; lib_in.pdc_load = 0; lib_in.pdc_en = 0;
      lib_in.sh_load = 0; lib_in.sh_en = 0; lib_in.uc_load = 0; lib_in.uc_en = 0;
      #1;
      lchk("adder", {lib_out.add_co, lib_out.add_s}, lib_in.add_a + lib_in.add_b + lib_in.add_ci);
      lchk("and", lib_out.and_y, lib_in.and_a & lib_in.and_b);
      lchk("or", lib_out.or_y, lib_in.or_a | lib_in.or_b);
      lchk("xor", lib_out.xor_y, lib_in.xor_a ^ lib_in.xor_b);
      lchk("not", lib_out.not_y, 8'(~lib_in.not_a));
      lchk("bigger", lib_out.big_gt, lib_in.big_a > lib_in.big_b);
      lchk("booth", lib_out.mul_p, int'(lib_in.mul_a) * int'(lib_in.mul_b));
      lchk("div q", lib_out.div_q, lib_in.div_n / lib_in.div_d);
      lchk("div r", lib_out.div_r, lib_in.div_n % lib_in.div_d);
      lchk("cla", {lib_out.cla_co, lib_out.cla_s}, lib_in.cla_a + lib_in.cla_b + lib_in.cla_ci);
      lchk("ripple", {lib_out.rip_co, lib_out.rip_s}, lib_in.rip_a + lib_in.rip_b + lib_in.rip_ci);
      lchk("equal", lib_out.eq_eq, lib_in.eq_a == lib_in.eq_b);
      lchk("decoder", lib_out.dec_y, lib_in.dec_en ? (1 << lib_in.dec_a) : 0);
      lchk("mux", lib_out.mux_y, lib_in.mux_d[lib_in.mux_sel]);
      lchk("voter", lib_out.vot_y, (int'(lib_in.vot_a) + int'(lib_in.vot_b) + int'(lib_in.vot_c)) >= 2);
      lchk("transceiver", lib_out.obt_b_en, !lib_in.obt_g_n && lib_in.obt_dir);
      if (lib_out.obt_b_en) lchk("transceiver a->b", lib_out.obt_b_out, lib_in.obt_a_in);
      lchk("barrel", lib_out.bsh_dout, lib_in.bsh_left ?
           16'((lib_in.bsh_din << lib_in.bsh_amt) | (lib_in.bsh_rot ? lib_in.bsh_din >> ((16 - lib_in.bsh_amt) % 16) : 0)) :
           16'((lib_in.bsh_din >> lib_in.bsh_amt) | (lib_in.bsh_rot ? lib_in.bsh_din << ((16 - lib_in.bsh_amt) % 16) : 0)));
      code = 0;
      for (int b = 0; b < 8; b++) if (lib_in.enc_d[b]) code = b;
      lchk("encoder", {lib_out.enc_valid, lib_out.enc_idx}, {lib_in.enc_d != 0, 3'(code)});
      // hamming: encode here, flip a bit, feed to the decoder
      lib_in.hdec_c = lib_out.ham_c ^ 7'(((lib_in.hdec_c[2:0] % 8) == 7) ? 0 : (1 << (lib_in.hdec_c[2:0] % 7)));
      #1;
      lchk("hamming round trip", lib_out.hdec_d, lib_in.ham_d);
      if (lib_out.hdec_err) n_ham_fix++;
    end
    // sequential components
    @(negedge clk);
    lib_in.cnt_clr = 1; lib_in.lfsr_load = 1; lib_in.lfsr_seed = 32'h1234_5678;
    lib_in.pdc_load = 1; lib_in.pdc_d = 8'd20; lib_in.uc_load = 1; lib_in.uc_d = 8'd250; lib_in.uc_up = 1;
    lib_in.sh_load = 1; lib_in.sh_d = 8'h81;
    @(negedge clk);
    lib_in.cnt_clr = 0; lib_in.lfsr_load = 0; lib_in.pdc_load = 0; lib_in.uc_load = 0; lib_in.sh_load = 0;
    lib_in.cnt_en = 1; lib_in.lfsr_en = 1; lib_in.pdc_en = 1; lib_in.uc_en = 1;
    lib_in.sh_en = 1; lib_in.sh_left = 1; lib_in.sh_sin = 0;
    lf = 32'h1234_5678;
    for (int i = 1; i <= 40; i++) begin
      lib_in.fifo_push = (i <= 20); lib_in.fifo_pop = (i > 20); lib_in.fifo_din = 8'(i * 3);
      lib_in.ttl_d = 8'(i); lib_in.ttl_oe_n = 1'(i % 2);
      #1;
      if (lib_out.fifo_full) n_fifo_full++;
      if (lib_in.fifo_pop && fifo_model.size() > 0) lchk("fifo out", lib_out.fifo_dout, fifo_model[0]);
      if (lib_in.fifo_push && !lib_out.fifo_full) fifo_model.push_back(lib_in.fifo_din);
      if (lib_in.fifo_pop && fifo_model.size() > 0) void'(fifo_model.pop_front());
      @(negedge clk);
      lf = {lf[30:0], lf[31] ^ lf[21] ^ lf[1] ^ lf[0]};
      n_lfsr_steps++;
      lchk("counter", lib_out.cnt_q, i);
      lchk("lfsr", lib_out.lfsr_q, lf);
      lchk("down counter", lib_out.pdc_q, (i >= 20) ? 0 : 20 - i);
      lchk("universal counter", lib_out.uc_q, (250 + i) % 256);
      lchk("shifter", lib_out.sh_q, 8'(8'h81 << i));
      lchk("ttl374", {lib_out.ttl_q_en, lib_out.ttl_q}, {!lib_in.ttl_oe_n, 8'(i)});
    end
    lchk("fifo drained", lib_out.fifo_empty, 1);
  endtask

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
    lib_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_library();
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
    $display("library: fifo full %0d, hamming corrections %0d, lfsr steps %0d", n_fifo_full, n_ham_fix, n_lfsr_steps);
    checks++; if (n_fifo_full == 0 || n_ham_fix == 0) begin failures++; $display("FAIL library mechanisms missing"); end
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
