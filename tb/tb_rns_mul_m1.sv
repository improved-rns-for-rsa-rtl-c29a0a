// tb_rns_mul_m1: exhaustive check of the 2^n-1 multiplier for n = 8 (all
// 65536 operand pairs) and random pairs for n = 5 and n = 13.  The product
// must be congruent to a*b modulo 2^n-1.
module tb_rns_mul_m1;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  a8, b8, p8;
  logic [4:0]  a5, b5, p5;
  logic [12:0] a13, b13, p13;

  rns_mul_m1 #(.N(8))  dut8  (.a_i(a8),  .b_i(b8),  .p_o(p8));
  rns_mul_m1 #(.N(5))  dut5  (.a_i(a5),  .b_i(b5),  .p_o(p5));
  rns_mul_m1 #(.N(13)) dut13 (.a_i(a13), .b_i(b13), .p_o(p13));

  function automatic bit ok(longint unsigned a, longint unsigned b, longint unsigned p, int n);
    longint unsigned m = (64'd1 << n) - 1;
    return (p % m) == ((a * b) % m) && p <= m;
  endfunction

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        a8 = 8'(a); b8 = 8'(b); #1;
        checks++;
        if (!ok(a, b, p8, 8)) begin
          failures++;
          if (failures < 10) $display("FAIL n=8 a=%0d b=%0d p=%0d", a, b, p8);
        end
      end
    for (int k = 0; k < 2000; k++) begin
      a5 = 5'($urandom); b5 = 5'($urandom); a13 = 13'($urandom); b13 = 13'($urandom); #1;
      checks += 2;
      if (!ok(a5, b5, p5, 5))     begin failures++; $display("FAIL n=5 %0d %0d %0d", a5, b5, p5); end
      if (!ok(a13, b13, p13, 13)) begin failures++; $display("FAIL n=13 %0d %0d %0d", a13, b13, p13); end
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
