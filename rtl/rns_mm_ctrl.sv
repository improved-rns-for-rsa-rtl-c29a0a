// rns_mm_ctrl: sequencer of one RNS Montgomery multiplication.
//
// The improved algorithm groups its work into five categories whose
// calculations are independent within a category, so every channel works in
// lock step and one multiplication per channel is done per clock:
//   start     every channel forms a*b                        (1 cycle)
//   PH_SIG    sigma = (a*b) * combined constant  (category 1, 1 cycle)
//   PH_EXT1_ADD  B' and m_r accumulators take their sigma    (1 cycle)
//   PH_EXT1   xi_j, |r|_mr += sigma_i * constant (category 2, K cycles)
//   PH_EXT2   rho, alpha1  += xi_j * constant    (category 3, K cycles)
//   PH_ALPHA  alpha = alpha1 - |r|_mr * constant (category 4, 1 cycle)
//   PH_FINAL  B: rho - alpha*M', B': xi_j*M'_j   (category 5, 1 cycle)
// done_o pulses for one cycle, 2K+5 clocks after the clock that accepted
// start_i; the results are valid from then on until the next start.  A start
// while busy is not accepted (and flagged by an assertion).
// The category split follows the method; the one-cycle phases for the single
// addition of category 2 and for the a*b product are this design's reading of
// its cycle counts.
//
// Flip-flops use rst_n only as an asynchronous reset. It also disables the
// handshake assertion in rns_mm_ctrl while reset is active. Lint tools
// may therefore report rst_n as used both synchronously and asynchronously.
// No flip-flop uses it synchronously.
module rns_mm_ctrl
  import rns_pkg::*;
#(
  parameter int unsigned K = K_DEF
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start_i,
  output mm_ctl_t ctl_o,
  output logic    busy_o,
  output logic    done_o
);

  mm_phase_e       ph_q, ph_n;
  logic [IDXW-1:0] idx_q, idx_n;
  logic            done_q;

  always_comb begin
    ph_n  = ph_q;
    idx_n = idx_q;
    unique case (ph_q)
      PH_IDLE:     if (start_i) ph_n = PH_SIG;
      PH_SIG:      ph_n = PH_EXT1_ADD;
      PH_EXT1_ADD: begin ph_n = PH_EXT1; idx_n = '0; end
      PH_EXT1:     if (32'(idx_q) == K - 1) begin ph_n = PH_EXT2; idx_n = '0; end
                   else idx_n = idx_q + 1'b1;
      PH_EXT2:     if (32'(idx_q) == K - 1) begin ph_n = PH_ALPHA; idx_n = '0; end
                   else idx_n = idx_q + 1'b1;
      PH_ALPHA:    ph_n = PH_FINAL;
      PH_FINAL:    ph_n = PH_IDLE;
      default:     ph_n = PH_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_q   <= PH_IDLE;
      idx_q  <= '0;
      done_q <= 1'b0;
    end else begin
      ph_q   <= ph_n;
      idx_q  <= idx_n;
      done_q <= (ph_q == PH_FINAL);
    end
  end

  assign ctl_o.phase = ph_q;
  assign ctl_o.idx   = idx_q;
  assign ctl_o.start = start_i && (ph_q == PH_IDLE);
  assign busy_o      = (ph_q != PH_IDLE);
  assign done_o      = done_q;

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) start_i |-> !busy_o)
    else $error("rns_mm_ctrl: start while busy");

endmodule
