// rsa_rns_top: RSA modular exponentiation c = a^e mod N computed entirely in
// a residue number system.
//
// An improved RNS Montgomery multiplier (rns_mm) is driven by a binary
// exponentiation controller (rsa_exp_ctrl).  The datapath between them holds
// the operands in residue form: the message a and M^2 mod N are sampled on
// start, abar and cbar are the Montgomery-form working values, and the final
// multiplication by 1 takes the result out of Montgomery form.
//
// Interface: every number is carried as its K residues in base B (binary, in
// [NB[i]-1:0] of each word), its K residues in base B' (diminished-1, in
// [NBP[j]:0]), and its residue modulo m_r = 2^R.  The host converts to and
// from this form and loads the per-key constants through cw_* (see rns_mm)
// before raising start_i with e_i.  done_o pulses once c_* holds the result.
// The result is congruent to a^e mod N and lies below (K+2)N; reducing it
// fully (an exact base extension of the last product) is left to the host.
// Latency: (2 + EBITS + popcount(e) + 1) multiplications of 2K+6 clocks each
// (2K+5 in rns_mm plus one to issue the next start).
//
// Flip-flops use rst_n only as an asynchronous reset. It also disables the
// handshake assertion in rns_mm_ctrl while reset is active. Lint tools
// may therefore report rst_n as used both synchronously and asynchronously.
// No flip-flop uses it synchronously.
module rsa_rns_top
  import rns_pkg::*;
#(
  parameter int unsigned K       = K_DEF,
  parameter int unsigned NB [K]  = NB_DEF,
  parameter int unsigned NBP[K]  = NBP_DEF,
  parameter int unsigned R       = R_DEF,
  parameter int unsigned W       = W_DEF,
  parameter int unsigned EBITS   = EBITS_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start_i,
  input  logic [EBITS-1:0] e_i,
  input  logic [W-1:0]     msg_b_i  [K],
  input  logic [W-1:0]     msg_bp_i [K],
  input  logic [R-1:0]     msg_r_i,
  input  logic [W-1:0]     m2_b_i   [K],
  input  logic [W-1:0]     m2_bp_i  [K],
  input  logic [R-1:0]     m2_r_i,
  input  logic             cw_en_i,
  input  logic [7:0]       cw_chan_i,
  input  logic [7:0]       cw_addr_i,
  input  logic [W-1:0]     cw_data_i,
  output logic             busy_o,
  output logic             done_o,
  output logic [W-1:0]     c_b_o    [K],
  output logic [W-1:0]     c_bp_o   [K],
  output logic [R-1:0]     c_r_o
);

  // one residue-number in all channels
  typedef struct {
    logic [W-1:0] b  [K];
    logic [W-1:0] bp [K];
    logic [R-1:0] r;
  } rns_num_t;

  rns_num_t msg_q, m2_q, abar_q, cbar_q, res_q, one, opa, opb, mmr;

  logic    mm_start, mm_busy, mm_done, wr_abar, wr_cbar, wr_res, idle;
  op_sel_e sel_a, sel_b;

  // the number 1: binary 1 in B and m_r, diminished-1 zero word in B'
  always_comb begin
    for (int unsigned i = 0; i < K; i++) begin
      one.b[i]  = W'(1);
      one.bp[i] = '0;
    end
    one.r = R'(1);
  end

  function automatic rns_num_t pick(input op_sel_e s, input rns_num_t m, input rns_num_t q,
                                    input rns_num_t o, input rns_num_t ab, input rns_num_t cb);
    unique case (s)
      OP_MSG:  return m;
      OP_M2:   return q;
      OP_ONE:  return o;
      OP_ABAR: return ab;
      default: return cb;
    endcase
  endfunction

  assign opa = pick(sel_a, msg_q, m2_q, one, abar_q, cbar_q);
  assign opb = pick(sel_b, msg_q, m2_q, one, abar_q, cbar_q);

  rsa_exp_ctrl #(.EBITS(EBITS)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start_i   (start_i),
    .e_i       (e_i),
    .mm_done_i (mm_done),
    .mm_start_o(mm_start),
    .op_a_o    (sel_a),
    .op_b_o    (sel_b),
    .wr_abar_o (wr_abar),
    .wr_cbar_o (wr_cbar),
    .wr_res_o  (wr_res),
    .busy_o    (busy_o),
    .done_o    (done_o)
  );

  rns_mm #(.K(K), .NB(NB), .NBP(NBP), .R(R), .W(W)) u_mm (
    .clk      (clk),
    .rst_n    (rst_n),
    .start_i  (mm_start),
    .busy_o   (mm_busy),
    .done_o   (mm_done),
    .a_b_i    (opa.b),
    .a_bp_i   (opa.bp),
    .a_r_i    (opa.r),
    .b_b_i    (opb.b),
    .b_bp_i   (opb.bp),
    .b_r_i    (opb.r),
    .r_b_o    (mmr.b),
    .r_bp_o   (mmr.bp),
    .r_r_o    (mmr.r),
    .cw_en_i  (cw_en_i && !busy_o),
    .cw_chan_i(cw_chan_i),
    .cw_addr_i(cw_addr_i),
    .cw_data_i(cw_data_i)
  );

  assign idle = !busy_o && !mm_busy;

  always_ff @(posedge clk) begin
    if (start_i && idle) begin
      msg_q.b  <= msg_b_i;
      msg_q.bp <= msg_bp_i;
      msg_q.r  <= msg_r_i;
      m2_q.b   <= m2_b_i;
      m2_q.bp  <= m2_bp_i;
      m2_q.r   <= m2_r_i;
    end
    if (wr_abar) abar_q <= mmr;
    if (wr_cbar) cbar_q <= mmr;
    if (wr_res)  res_q  <= mmr;
  end

  assign c_b_o  = res_q.b;
  assign c_bp_o = res_q.bp;
  assign c_r_o  = res_q.r;

endmodule
