// tb_rsa_exp_ctrl: drives the exponentiation controller with a simple
// multiplier stand-in that answers every start after a random 1..6 clocks,
// and records the sequence of (operand A, operand B, destination) steps.  For
// random 12-bit exponents the sequence must be: (MSG,M2)->abar, (M2,ONE)->cbar,
// then per bit from the top (CBAR,CBAR)->cbar and, for a one bit,
// (ABAR,CBAR)->cbar, and finally (CBAR,ONE)->result with a done pulse.
module tb_rsa_exp_ctrl;
  import rns_pkg::*;
  localparam int EB = 12;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start, mm_done, mm_start, wr_abar, wr_cbar, wr_res, busy, done;
  logic [EB-1:0] e;
  op_sel_e       opa, opb;

  rsa_exp_ctrl #(.EBITS(EB)) dut (
    .clk, .rst_n, .start_i(start), .e_i(e), .mm_done_i(mm_done), .mm_start_o(mm_start),
    .op_a_o(opa), .op_b_o(opb), .wr_abar_o(wr_abar), .wr_cbar_o(wr_cbar), .wr_res_o(wr_res),
    .busy_o(busy), .done_o(done)
  );

  // multiplier stand-in
  int wait_left = -1;
  always @(negedge clk) begin
    mm_done <= 1'b0;
    if (mm_start) wait_left = 1 + ($urandom % 6);
    else if (wait_left > 0) begin
      wait_left--;
      if (wait_left == 0) begin mm_done <= 1'b1; wait_left = -1; end
    end
  end

  typedef struct { op_sel_e a; op_sel_e b; int dst; } step_t;  // dst 0 abar, 1 cbar, 2 res
  step_t got [$];
  op_sel_e cur_a, cur_b;

  always @(posedge clk) begin
    if (mm_start) begin cur_a = opa; cur_b = opb; end
    if (mm_done) begin
      if (opa != cur_a || opb != cur_b) begin failures++; $display("FAIL operands changed while busy"); end
      if (wr_abar + wr_cbar + wr_res != 1) begin failures++; $display("FAIL write strobes"); end
      got.push_back('{cur_a, cur_b, wr_abar ? 0 : wr_cbar ? 1 : 2});
    end
  end

  initial begin
    step_t want [$];
    start = 0; e = 0; mm_done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 20; rep++) begin
      int guard = 0;
      e = (rep == 0) ? '0 : (rep == 1) ? '1 : EB'($urandom);
      want.delete(); got.delete();
      want.push_back('{OP_MSG, OP_M2, 0});
      want.push_back('{OP_M2, OP_ONE, 1});
      for (int i = EB - 1; i >= 0; i--) begin
        want.push_back('{OP_CBAR, OP_CBAR, 1});
        if (e[i]) want.push_back('{OP_ABAR, OP_CBAR, 1});
      end
      want.push_back('{OP_CBAR, OP_ONE, 2});
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done && guard < 2000) begin @(negedge clk); guard++; end
      checks++;
      if (got.size() != want.size()) begin
        failures++; $display("FAIL e=%h steps %0d expected %0d", e, got.size(), want.size());
      end else
        for (int s = 0; s < want.size(); s++) begin
          checks++;
          if (got[s] != want[s]) begin failures++; $display("FAIL e=%h step %0d", e, s); end
        end
      @(negedge clk);
      checks++;
      if (busy) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
