// tb_rsa_rns_top: end-to-end RSA exponentiation on a small valid residue
// configuration (B = {127, 31, 7}, B' = {65537, 257, 17}, m_r = 4,
// N = 1009, 10-bit exponents).  The host side (constants, M^2 mod N, residue
// conversion) is done by the reference package.  For each message a and
// exponent e the result must reconstruct to c = a^e mod N (up to multiples of
// N, below (K+2)N), its B' and m_r residues must agree with c, and the run
// must take (3 + EBITS + popcount(e)) multiplications of 2K+6 clocks.
// Mechanisms counted (each must occur): squaring, multiply step for a one
// bit, skipped multiply for a zero bit, a zero operand at a diminished-1
// multiplier, a zero input holding a 2^n+1 accumulator, a nonzero alpha
// correction in the second base extension, an end-around carry in a 2^n-1
// multiplier.
module tb_rsa_rns_top;
  import tb_rns_math_pkg::*;
  import rns_pkg::*;

  localparam int K = 3;
  localparam int unsigned NB [K] = '{7, 5, 3};
  localparam int unsigned NBP[K] = '{16, 8, 4};
  localparam int R = 2;
  localparam int W = 17;
  localparam int EB = 10;
  localparam u64 NMOD = 1009;

  int checks = 0, failures = 0;
  int n_sqr = 0, n_mul = 0, n_skip = 0, n_zero_mul = 0, n_acc_hold = 0, n_alpha = 0, n_wrap = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start, busy, done, cw_en;
  logic [EB-1:0] e;
  logic [W-1:0]  msg_b [K], msg_bp [K], m2_b [K], m2_bp [K], c_b [K], c_bp [K];
  logic [R-1:0]  msg_r, m2_r, c_r;
  logic [7:0]    cw_chan, cw_addr;
  logic [W-1:0]  cw_data;

  rsa_rns_top #(.K(K), .NB(NB), .NBP(NBP), .R(R), .W(W), .EBITS(EB)) dut (
    .clk, .rst_n, .start_i(start), .e_i(e),
    .msg_b_i(msg_b), .msg_bp_i(msg_bp), .msg_r_i(msg_r),
    .m2_b_i(m2_b), .m2_bp_i(m2_bp), .m2_r_i(m2_r),
    .cw_en_i(cw_en), .cw_chan_i(cw_chan), .cw_addr_i(cw_addr), .cw_data_i(cw_data),
    .busy_o(busy), .done_o(done), .c_b_o(c_b), .c_bp_o(c_bp), .c_r_o(c_r)
  );

  rns_cfg #(K) cfg;

  // mechanism counters (observe the datapath)
  always @(posedge clk) if (rst_n) begin
    if (dut.u_mm.u_ctrl.ctl_o.start) begin
      if (dut.sel_a == OP_CBAR && dut.sel_b == OP_CBAR) n_sqr++;
      if (dut.sel_a == OP_ABAR) n_mul++;
    end
    if (dut.u_ctrl.st_q == 3'd3 && dut.mm_done && !dut.u_ctrl.e_q[dut.u_ctrl.bit_q]) n_skip++;
    if (dut.u_mm.g_bp[2].u_ch.ma[4] || dut.u_mm.g_bp[2].u_ch.mb[4]) n_zero_mul++;
    if (dut.u_mm.g_bp[2].u_ch.acc_en && dut.u_mm.g_bp[2].u_ch.acc_x[4]) n_acc_hold++;
    if (dut.u_mm.u_ctrl.ctl_o.phase == PH_FINAL && dut.u_mm.alpha != 0) n_alpha++;
    if (dut.u_mm.g_b[0].u_ch.u_mul.t[7]) n_wrap++;
  end

  task automatic write_const(int ch, int addr, u64 v);
    @(negedge clk);
    cw_en = 1; cw_chan = 8'(ch); cw_addr = 8'(addr); cw_data = W'(v);
    @(negedge clk);
    cw_en = 0;
  endtask

  task automatic run(u64 a, logic [EB-1:0] ee);
    int cyc = 0, nmm;
    u64 rb [K], c, m2, want;
    m2 = mulmod(cfg.bigm % NMOD, cfg.bigm % NMOD, NMOD);
    for (int i = 0; i < K; i++) begin
      msg_b[i]  = W'(a % cfg.m[i]);                 m2_b[i]  = W'(m2 % cfg.m[i]);
      msg_bp[i] = W'(to_d1(a % cfg.mp[i], NBP[i])); m2_bp[i] = W'(to_d1(m2 % cfg.mp[i], NBP[i]));
    end
    msg_r = R'(a % cfg.mr); m2_r = R'(m2 % cfg.mr);
    e = ee;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 100000) begin @(negedge clk); cyc++; end
    nmm = 3 + EB + $countones(ee);
    checks++;
    if (cyc != nmm * (2 * K + 6) + 1) begin
      failures++; $display("FAIL cycles %0d expected %0d", cyc, nmm * (2 * K + 6) + 1);
    end
    for (int i = 0; i < K; i++) rb[i] = u64'(c_b[i]);
    c = cfg.from_b(rb);
    want = powmod(a, u64'(ee), NMOD);
    checks += 2;
    if (c % NMOD != want) begin failures++; $display("FAIL a=%0d e=%0d c=%0d want %0d", a, ee, c, want); end
    if (c >= (K + 2) * NMOD) begin failures++; $display("FAIL bound c=%0d", c); end
    for (int j = 0; j < K; j++) begin
      checks++;
      if (u64'(c_bp[j]) != to_d1(c % cfg.mp[j], NBP[j])) begin failures++; $display("FAIL B' %0d", j); end
    end
    checks++;
    if (u64'(c_r) != c % cfg.mr) begin failures++; $display("FAIL m_r"); end
  endtask

  initial begin
    start = 0; cw_en = 0; cw_chan = 0; cw_addr = 0; cw_data = 0; e = 0;
    foreach (msg_b[i]) begin msg_b[i] = 0; msg_bp[i] = 0; m2_b[i] = 0; m2_bp[i] = 0; end
    msg_r = 0; m2_r = 0;
    cfg = new(NB, NBP, R, NMOD);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < K; i++)
      for (int w = 0; w < K + 2; w++) write_const(i, w, cfg.c_b[i][w]);
    for (int j = 0; j < K; j++)
      for (int w = 0; w < K + 2; w++) write_const(K + j, w, cfg.c_bp[j][w]);
    for (int w = 0; w < 2 * K + 2; w++) write_const(2 * K, w, cfg.c_r[w]);
    run(2, 10'd0);
    run(5, '1);
    run(1008, 10'd3);
    run(0, 10'd17);
    for (int k = 0; k < 12; k++) run(u64'($urandom) % NMOD, EB'($urandom));
    $display("squarings %0d multiplies %0d skipped %0d zero-operand %0d acc-hold %0d alpha %0d wrap %0d",
             n_sqr, n_mul, n_skip, n_zero_mul, n_acc_hold, n_alpha, n_wrap);
    checks += 7;
    if (n_sqr == 0 || n_mul == 0 || n_skip == 0 || n_zero_mul == 0 || n_acc_hold == 0 ||
        n_alpha == 0 || n_wrap == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
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
