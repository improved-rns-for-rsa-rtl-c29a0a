// tb_rns_mm: end-to-end check of one RNS Montgomery multiplication on a small
// valid residue configuration: B = {127, 31, 7}, B' = {65537, 257, 17},
// m_r = 4, N = 1009 (so (K+2)^2 N < M).  The constants are computed by the
// reference package and written through the constant port.  For random
// operands a, b < (K+2)N (and a few chosen edge values) the result must
//   - reconstruct (CRT over B) to r with r = a*b*M^-1 mod N and r < (K+2)N,
//   - have B' and m_r residues equal to r mod 2^n+1 (diminished-1) and r mod 4,
//   - arrive exactly 2K+5 clocks after start.
module tb_rns_mm;
  import tb_rns_math_pkg::*;

  localparam int K = 3;
  localparam int unsigned NB [K] = '{7, 5, 3};
  localparam int unsigned NBP[K] = '{16, 8, 4};
  localparam int R = 2;
  localparam int W = 17;
  localparam u64 NMOD = 1009;

  int checks = 0, failures = 0, alpha_nonzero = 0, zero_operands = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, busy, done;
  logic [W-1:0] a_b [K], a_bp [K], b_b [K], b_bp [K], r_b [K], r_bp [K];
  logic [R-1:0] a_r, b_r, r_r;
  logic         cw_en;
  logic [7:0]   cw_chan, cw_addr;
  logic [W-1:0] cw_data;

  rns_mm #(.K(K), .NB(NB), .NBP(NBP), .R(R), .W(W)) dut (
    .clk, .rst_n, .start_i(start), .busy_o(busy), .done_o(done),
    .a_b_i(a_b), .a_bp_i(a_bp), .a_r_i(a_r), .b_b_i(b_b), .b_bp_i(b_bp), .b_r_i(b_r),
    .r_b_o(r_b), .r_bp_o(r_bp), .r_r_o(r_r),
    .cw_en_i(cw_en), .cw_chan_i(cw_chan), .cw_addr_i(cw_addr), .cw_data_i(cw_data)
  );

  rns_cfg #(K) cfg;

  task automatic write_const(int ch, int addr, u64 v);
    @(negedge clk);
    cw_en = 1; cw_chan = 8'(ch); cw_addr = 8'(addr); cw_data = W'(v);
    @(negedge clk);
    cw_en = 0;
  endtask

  task automatic run(u64 a, u64 b);
    int cyc = 0;
    u64 rb [K], r, expect_mod;
    for (int i = 0; i < K; i++) begin
      a_b[i]  = W'(a % cfg.m[i]);             b_b[i]  = W'(b % cfg.m[i]);
      a_bp[i] = W'(to_d1(a % cfg.mp[i], NBP[i])); b_bp[i] = W'(to_d1(b % cfg.mp[i], NBP[i]));
      if (a % cfg.mp[i] == 0 || b % cfg.mp[i] == 0) zero_operands++;
    end
    a_r = R'(a % cfg.mr); b_r = R'(b % cfg.mr);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 2 * K + 5) begin failures++; $display("FAIL latency %0d", cyc); end
    if (dut.u_chr.alpha_o != 0) alpha_nonzero++;
    for (int i = 0; i < K; i++) rb[i] = u64'(r_b[i]);
    r = cfg.from_b(rb);
    expect_mod = mulmod(mulmod(a, b, NMOD), modinv(cfg.bigm % NMOD, NMOD), NMOD);
    checks += 2;
    if (r % NMOD != expect_mod) begin
      failures++; $display("FAIL a=%0d b=%0d r=%0d (mod N %0d) expected %0d", a, b, r, r % NMOD, expect_mod);
    end
    if (r >= (K + 2) * NMOD) begin failures++; $display("FAIL bound r=%0d", r); end
    for (int j = 0; j < K; j++) begin
      checks++;
      if (u64'(r_bp[j]) != to_d1(r % cfg.mp[j], NBP[j])) begin
        failures++; $display("FAIL B' ch %0d got %0d exp %0d", j, r_bp[j], to_d1(r % cfg.mp[j], NBP[j]));
      end
    end
    checks++;
    if (u64'(r_r) != r % cfg.mr) begin failures++; $display("FAIL m_r got %0d exp %0d", r_r, r % cfg.mr); end
  endtask

  initial begin
    start = 0; cw_en = 0; cw_chan = 0; cw_addr = 0; cw_data = 0;
    foreach (a_b[i]) begin a_b[i] = 0; a_bp[i] = 0; b_b[i] = 0; b_bp[i] = 0; end
    a_r = 0; b_r = 0;
    cfg = new(NB, NBP, R, NMOD);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < K; i++)
      for (int w = 0; w < K + 2; w++) write_const(i, w, cfg.c_b[i][w]);
    for (int j = 0; j < K; j++)
      for (int w = 0; w < K + 2; w++) write_const(K + j, w, cfg.c_bp[j][w]);
    for (int w = 0; w < 2 * K + 2; w++) write_const(2 * K, w, cfg.c_r[w]);
    run(0, 123);
    run(1, 1);
    run(17, 257);
    run((K + 2) * NMOD - 1, (K + 2) * NMOD - 1);
    run(65537 % ((K + 2) * NMOD), 4369);
    for (int k = 0; k < 400; k++)
      run(u64'($urandom) % ((K + 2) * NMOD), u64'($urandom) % ((K + 2) * NMOD));
    checks += 2;
    if (alpha_nonzero == 0) begin failures++; $display("FAIL alpha never nonzero"); end
    if (zero_operands == 0) begin failures++; $display("FAIL no zero operand seen"); end
    $display("alpha nonzero in %0d runs, zero B' operands in %0d runs", alpha_nonzero, zero_operands);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
