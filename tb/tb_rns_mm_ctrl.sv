// tb_rns_mm_ctrl: checks the phase sequence of the multiplication sequencer
// for K = 4: start is accepted only when idle, then SIG, EXT1_ADD, K x EXT1
// (term index 0..K-1), K x EXT2, ALPHA, FINAL, and a one-clock done pulse
// 2K+5 clocks after the accepting clock; busy is high throughout.
module tb_rns_mm_ctrl;
  import rns_pkg::*;
  localparam int K = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    start, busy, done;
  mm_ctl_t ctl;

  rns_mm_ctrl #(.K(K)) dut (.clk, .rst_n, .start_i(start), .ctl_o(ctl), .busy_o(busy), .done_o(done));

  mm_phase_e exp_ph [2*K+4];
  int        exp_ix [2*K+4];

  task automatic expect_cycle(mm_phase_e ph, int ix, logic bz, logic dn);
    checks++;
    if (ctl.phase != ph || (ix >= 0 && int'(ctl.idx) != ix) || busy != bz || done != dn) begin
      failures++;
      $display("FAIL phase %s idx %0d busy %0b done %0b, expected %s %0d %0b %0b",
               ctl.phase.name(), ctl.idx, busy, done, ph.name(), ix, bz, dn);
    end
  endtask

  initial begin
    int n = 0;
    exp_ph[n] = PH_SIG; exp_ix[n++] = -1;
    exp_ph[n] = PH_EXT1_ADD; exp_ix[n++] = -1;
    for (int i = 0; i < K; i++) begin exp_ph[n] = PH_EXT1; exp_ix[n++] = i; end
    for (int i = 0; i < K; i++) begin exp_ph[n] = PH_EXT2; exp_ix[n++] = i; end
    exp_ph[n] = PH_ALPHA; exp_ix[n++] = -1;
    exp_ph[n] = PH_FINAL; exp_ix[n++] = -1;
    start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_cycle(PH_IDLE, -1, 0, 0);
    for (int rep = 0; rep < 3; rep++) begin
      start = 1;
      #1;
      checks++;
      if (!ctl.start) begin failures++; $display("FAIL start not accepted"); end
      @(negedge clk);
      start = 0;
      for (int c = 0; c < 2 * K + 4; c++) begin
        expect_cycle(exp_ph[c], exp_ix[c], 1, 0);
        checks++;
        if (ctl.start) failures++;
        @(negedge clk);
      end
      expect_cycle(PH_IDLE, -1, 0, 1);
      @(negedge clk);
      expect_cycle(PH_IDLE, -1, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
