// tb_rns_acc_p1: random accumulation sequences on the 2^n+1 accumulating
// adder (n = 8 and n = 5) with diminished-1 inputs, zero words included.  The
// binary output must equal the reference sum modulo 2^n+1 exactly (0..2^n)
// after every clock; zero inputs must leave it unchanged.
module tb_rns_acc_p1;
  import tb_rns_math_pkg::*;
  int checks = 0, failures = 0, zero_inputs = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       en, first;
  logic [8:0] x8, q8;
  logic [5:0] x5, q5;
  u64         ref8, ref5, v8, v5;

  rns_acc_p1 #(.N(8)) dut8 (.clk, .rst_n, .en_i(en), .first_i(first), .x_i(x8), .q_o(q8));
  rns_acc_p1 #(.N(5)) dut5 (.clk, .rst_n, .en_i(en), .first_i(first), .x_i(x5), .q_o(q5));

  initial begin
    en = 0; first = 0; x8 = 0; x5 = 0; ref8 = 0; ref5 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (q8 != 0 || q5 != 0) failures++;
    for (int k = 0; k < 4000; k++) begin
      en    = ($urandom % 8) != 0;
      first = ($urandom % 10) == 0;
      v8    = u64'($urandom) % 257;
      v5    = u64'($urandom) % 33;
      if (k % 13 == 0) v8 = 0;
      if (k % 7 == 0)  v5 = 0;
      if (k % 97 == 0) v8 = 256 - ref8;   // drives the sum to 2^n (word 2^n)
      x8 = 9'(to_d1(v8, 8));
      x5 = 6'(to_d1(v5, 5));
      if (en) begin
        ref8 = ((first ? 0 : ref8) + v8) % 257;
        ref5 = ((first ? 0 : ref5) + v5) % 33;
        if (v8 == 0) zero_inputs++;
      end
      @(negedge clk);
      checks += 2;
      if (u64'(q8) != ref8) begin failures++; if (failures < 10) $display("FAIL n=8 q=%0d ref=%0d", q8, ref8); end
      if (u64'(q5) != ref5) begin failures++; if (failures < 10) $display("FAIL n=5 q=%0d ref=%0d", q5, ref5); end
    end
    checks++;
    if (zero_inputs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
