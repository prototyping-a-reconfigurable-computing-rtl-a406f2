// Self-checking testbench of hamming_dec: each of the 16 code words (built here from the parity equations) is decoded clean and with each of its seven bits flipped.
module tb_hamming_dec;
  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [6:0] c; logic [3:0] d; logic err;
  logic [6:0] code;
  hamming_dec dut (.C(c), .D(d), .ERR(err));
  initial begin
    for (int i = 0; i < 16; i++) begin
      code = '0;
      code[2] = i[0]; code[4] = i[1]; code[5] = i[2]; code[6] = i[3];
      code[0] = i[0] ^ i[1] ^ i[3];
      code[1] = i[0] ^ i[2] ^ i[3];
      code[3] = i[1] ^ i[2] ^ i[3];
      c = code; #1;
      chk("clean data", d, i); chk("clean err", err, 0);
      for (int b = 0; b < 7; b++) begin
        c = code ^ (7'd1 << b); #1;
        chk("corrected data", d, i); chk("err flag", err, 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
