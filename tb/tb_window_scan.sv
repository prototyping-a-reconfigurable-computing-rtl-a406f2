// Self-checking testbench of window_scan: a behavioural input memory holds a
// random 8x8 quarter; each of
// the four modes is run and every written pixel is compared with the
// reference filter, and the scan time is checked to be 11 cycles per pixel.
module tb_window_scan;
  import mfcu_pkg::*;
  import tb_ref_pkg::*;

  localparam int QW = 8, QH = 8;
  localparam int AW = $clog2(QW*QH);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, rd_en, wr_en;
  filter_mode_e mode;
  logic [AW-1:0] rd_addr, wr_addr;
  pixel_t rd_data, wr_data;

  int img[];
  pixel_t mem_in [QW*QH];
  int res [QW*QH];
  int writes;

  window_scan #(.QW(QW), .QH(QH)) dut (.*);

  always_ff @(posedge clk) if (rd_en) rd_data <= mem_in[rd_addr];
  always_ff @(posedge clk) if (wr_en) begin res[wr_addr] <= int'(wr_data); writes <= writes + 1; end

  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cycles, p[1:9];
    start = 0; mode = MODE_EDGE;
    img = new[QW*QH];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      for (int i = 0; i < QW*QH; i++) begin
        // mix of flat areas and random pixels so every clamp is reached
        img[i] = ((i / 13) % 2 == 0) ? $urandom_range(255) : 120 + (i % 3);
        if (m == 2) img[i] = img[i] | 8'hF0;   // erosion needs mostly-set bits
        mem_in[i] = 8'(img[i]);
      end
      writes = 0;
      @(negedge clk);
      start = 1; mode = filter_mode_e'(m);
      @(negedge clk);
      start = 0; mode = MODE_EDGE;          // mode must have been sampled
      cycles = 0;
      checks++;
      if (!busy || done) begin failures++; $display("FAIL busy/done after start"); end
      while (busy) begin @(negedge clk); cycles++; end
      checks++;
      if (cycles != 11*QW*QH) begin
        failures++; $display("FAIL mode %0d took %0d cycles, expected %0d", m, cycles, 11*QW*QH);
      end
      checks++;
      if (!done || writes != QW*QH) begin failures++; $display("FAIL done=%0d writes=%0d", done, writes); end
      for (int r = 0; r < QH; r++)
        for (int c = 0; c < QW; c++) begin
          window_of(img, QW, QH, r, c, p);
          checks++;
          if (res[r*QW + c] != filter(m, p)) begin
            failures++;
            $display("FAIL mode %0d (%0d,%0d): got %0d expected %0d", m, r, c, res[r*QW+c], filter(m, p));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
