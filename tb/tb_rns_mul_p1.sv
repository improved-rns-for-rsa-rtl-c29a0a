// tb_rns_mul_p1: exhaustive check of the diminished-1 2^n+1 multiplier for
// n = 8 (all 257 x 257 operand words, zero included) and random words for
// n = 4 and n = 16.  The product word must be exactly the diminished-1 form of
// a*b mod 2^n+1 (2^n for zero).
module tb_rns_mul_p1;
  import tb_rns_math_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [8:0]  a8, b8, p8;
  logic [4:0]  a4, b4, p4;
  logic [16:0] a16, b16, p16;

  rns_mul_p1 #(.N(8))  dut8  (.a_i(a8),  .b_i(b8),  .p_o(p8));
  rns_mul_p1 #(.N(4))  dut4  (.a_i(a4),  .b_i(b4),  .p_o(p4));
  rns_mul_p1 #(.N(16)) dut16 (.a_i(a16), .b_i(b16), .p_o(p16));

  function automatic u64 expect_d1(u64 wa, u64 wb, int unsigned n);
    u64 m = (u64'(1) << n) + 1;
    return to_d1(mulmod(from_d1(wa, n), from_d1(wb, n), m), n);
  endfunction

  function automatic u64 rnd_word(int unsigned n);
    u64 v = u64'($urandom) % ((u64'(1) << n) + 1);
    return v;
  endfunction

  initial begin
    for (int a = 0; a <= 256; a++)
      for (int b = 0; b <= 256; b++) begin
        a8 = 9'(a); b8 = 9'(b); #1;
        checks++;
        if (u64'(p8) != expect_d1(a, b, 8)) begin
          failures++;
          if (failures < 10) $display("FAIL n=8 a=%0d b=%0d p=%0d exp=%0d", a, b, p8, expect_d1(a, b, 8));
        end
      end
    for (int k = 0; k < 3000; k++) begin
      a4 = 5'(rnd_word(4)); b4 = 5'(rnd_word(4));
      a16 = 17'(rnd_word(16)); b16 = 17'(rnd_word(16)); #1;
      checks += 2;
      if (u64'(p4) != expect_d1(a4, b4, 4)) begin failures++; $display("FAIL n=4 %0d %0d %0d", a4, b4, p4); end
      if (u64'(p16) != expect_d1(a16, b16, 16)) begin failures++; $display("FAIL n=16 %0d %0d %0d", a16, b16, p16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
