// Self-checking testbench of ip_adder: the data-sheet example values
// (128+64, 58+74, 36+42+1) and random operands at widths 8 and 16, checked
// against integer arithmetic.
module tb_ip_adder;
  int checks = 0, failures = 0;
  logic [7:0]  a8, b8, s8;   logic ci8, co8;
  logic [15:0] a16, b16, s16; logic ci16, co16;

  ip_adder u8 (.A(a8), .B(b8), .CI(ci8), .S(s8), .CO(co8));
  ip_adder #(.WIDTH(16)) u16 (.A(a16), .B(b16), .CI(ci16), .S(s16), .CO(co16));

  task automatic check8(int a, int b, int c);
    int exp;
    a8 = 8'(a); b8 = 8'(b); ci8 = 1'(c); #1;
    exp = a + b + c;
    checks++;
    if ({co8, s8} !== 9'(exp)) begin
      failures++; $display("FAIL 8-bit %0d+%0d+%0d got %0d co %0d", a, b, c, s8, co8);
    end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    check8(128, 64, 1);   // 193
    check8(58, 74, 0);    // 132
    check8(36, 42, 1);    // 79
    check8(255, 255, 1);  // carry out
    check8(255, 0, 1);
    repeat (500) check8($urandom_range(255), $urandom_range(255), $urandom_range(1));
    repeat (500) begin
      int unsigned a, b, c;
      a = $urandom_range(65535); b = $urandom_range(65535); c = $urandom_range(1);
      a16 = 16'(a); b16 = 16'(b); ci16 = 1'(c); #1;
      checks++;
      if ({co16, s16} !== 17'(a + b + c)) begin
        failures++; $display("FAIL 16-bit %0d+%0d+%0d", a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
