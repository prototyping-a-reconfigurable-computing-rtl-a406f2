// Self-checking testbench of hamming_enc: the seven-bit code of each of the 16 data words must hold the data at positions 3, 5, 6, 7 and pass all three parity checks; distinct words must differ in at least three bits.
module tb_hamming_enc;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [3:0] d; logic [6:0] c;
  logic [6:0] codes [16];
  hamming_enc dut (.D(d), .C(c));
  initial begin
    for (int i = 0; i < 16; i++) begin
      d = 4'(i); #1;
      codes[i] = c;
      chk("data bits", {c[6], c[5], c[4], c[2]}, i);
      chk("check 1", c[0] ^ c[2] ^ c[4] ^ c[6], 0);
      chk("check 2", c[1] ^ c[2] ^ c[5] ^ c[6], 0);
      chk("check 4", c[3] ^ c[4] ^ c[5] ^ c[6], 0);
    end
    for (int i = 0; i < 16; i++) for (int j = i + 1; j < 16; j++)
      chk("distance >= 3", $countones(codes[i] ^ codes[j]) >= 3, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
