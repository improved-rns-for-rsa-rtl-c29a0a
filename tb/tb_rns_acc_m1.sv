// tb_rns_acc_m1: random accumulation sequences on the 2^n-1 accumulating
// adder (n = 8 and n = 11).  A reference sum is kept modulo 2^n-1; first_i
// restarts it.  The register must match modulo 2^n-1 after every clock, and a
// disabled clock must keep it.
module tb_rns_acc_m1;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        en, first;
  logic [7:0]  x8, q8;
  logic [10:0] x11, q11;
  longint unsigned ref8, ref11;

  rns_acc_m1 #(.N(8))  dut8  (.clk, .rst_n, .en_i(en), .first_i(first), .x_i(x8),  .q_o(q8));
  rns_acc_m1 #(.N(11)) dut11 (.clk, .rst_n, .en_i(en), .first_i(first), .x_i(x11), .q_o(q11));

  initial begin
    en = 0; first = 0; x8 = 0; x11 = 0; ref8 = 0; ref11 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (q8 != 0 || q11 != 0) failures++;
    for (int k = 0; k < 3000; k++) begin
      en    = ($urandom % 8) != 0;
      first = ($urandom % 10) == 0;
      x8    = (k % 17 == 0) ? 8'hff : 8'($urandom);
      x11   = 11'($urandom);
      if (en) begin
        ref8  = ((first ? 0 : ref8)  + x8)  % 255;
        ref11 = ((first ? 0 : ref11) + x11) % 2047;
      end
      @(negedge clk);
      checks += 2;
      if (q8 % 255 != ref8)    begin failures++; if (failures < 10) $display("FAIL n=8 q=%0d ref=%0d", q8, ref8); end
      if (q11 % 2047 != ref11) begin failures++; if (failures < 10) $display("FAIL n=11 q=%0d ref=%0d", q11, ref11); end
    end
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
