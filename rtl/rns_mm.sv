// rns_mm: RNS Montgomery modular multiplication, r = a*b*M^-1 (mod N),
// in the improved form where the quotient q is never formed.
//
// Numbers are held as residues in base B = {2^n-1} (K channels), base
// B' = {2^n+1} (K channels, diminished-1) and the redundant modulus m_r = 2^R.
// The classic algorithm computes q = a*b*(-N^-1) in B, extends q to B', forms
// r = (a*b + q*N)*M^-1 in B' and m_r and extends r back to B.  Here every
// constant that multiplies the same variable is folded into one stored
// product, so one multiplication per channel per clock gives, in order:
//   1  sigma_i = ab*|-N^-1 M_i^-1|,  sigma_j = ab*|M^-1 M'_j^-1|,
//      sigma_r = ab*|M^-1|
//   2  xi_j = sigma_j + sum_i sigma_i*|M_i N M^-1 M'_j^-1|,
//      |r|_mr = sigma_r + sum_i sigma_i*|M_i N M^-1|_mr
//   3  rho_i = sum_j xi_j*|M'_j|_mi,  alpha1 = sum_j xi_j*|M'^-1 M'_j|_mr
//   4  alpha = alpha1 - |r|_mr*|M'^-1|_mr
//   5  |r|_mi = rho_i - alpha*|M'|_mi,   |r|_mj = xi_j*|M'_j|_mj
// sigma_i (category 2) and xi_j (category 3) are broadcast one per clock to
// all channels of the other base and to the redundant channel.
//
// Interface: operands and results carry all 2K+1 residues: B residues binary
// in [N_i-1:0] of each word, B' residues diminished-1 in [N'_j:0], the m_r
// residue on its own port.  Operands are sampled on the clock that accepts
// start_i; done_o pulses 2K+5 clocks later and the results then stay valid
// until the next start.  The result is below (K+2)N when a*b < M*N.
// Constants are written through cw_*: cw_chan_i selects B channel i (0..K-1),
// B' channel j (K..2K-1) or the redundant channel (2K); the word layout per
// channel is given in rns_chan_m1, rns_chan_p1 and rns_chan_r.
//
// Flip-flops use rst_n only as an asynchronous reset. It also disables the
// handshake assertion in rns_mm_ctrl while reset is active. Lint tools
// may therefore report rst_n as used both synchronously and asynchronously.
// No flip-flop uses it synchronously.
module rns_mm
  import rns_pkg::*;
#(
  parameter int unsigned K       = K_DEF,
  parameter int unsigned NB [K]  = NB_DEF,
  parameter int unsigned NBP[K]  = NBP_DEF,
  parameter int unsigned R       = R_DEF,
  parameter int unsigned W       = W_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,
  output logic         busy_o,
  output logic         done_o,
  input  logic [W-1:0] a_b_i  [K],
  input  logic [W-1:0] a_bp_i [K],
  input  logic [R-1:0] a_r_i,
  input  logic [W-1:0] b_b_i  [K],
  input  logic [W-1:0] b_bp_i [K],
  input  logic [R-1:0] b_r_i,
  output logic [W-1:0] r_b_o  [K],
  output logic [W-1:0] r_bp_o [K],
  output logic [R-1:0] r_r_o,
  input  logic         cw_en_i,
  input  logic [7:0]   cw_chan_i,
  input  logic [7:0]   cw_addr_i,
  input  logic [W-1:0] cw_data_i
);

  mm_ctl_t      ctl;
  logic [W-1:0] sig_all [K];
  logic [W-1:0] xi_all  [K];
  logic [W-1:0] sig_bc, xi_bc;
  logic [R-1:0] alpha;

  for (genvar i = 0; i < K; i++) begin : g_chk
    if (NB[i] + 1 > W || NBP[i] + 1 > W) begin : g_err
      $error("rns_mm: W must exceed every channel exponent");
    end
  end

  rns_mm_ctrl #(.K(K)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start_i(start_i), .ctl_o(ctl), .busy_o(busy_o), .done_o(done_o)
  );

  always_comb begin
    sig_bc = '0;
    xi_bc  = '0;
    for (int unsigned i = 0; i < K; i++) begin
      if (32'(ctl.idx) == i) begin
        sig_bc = sig_all[i];
        xi_bc  = xi_all[i];
      end
    end
  end

  for (genvar i = 0; i < K; i++) begin : g_b
    localparam int unsigned N = NB[i];
    logic [N-1:0] sig, res;
    rns_chan_m1 #(.N(N), .K(K), .W(W), .R(R)) u_ch (
      .clk      (clk),
      .rst_n    (rst_n),
      .ctl_i    (ctl),
      .a_i      (a_b_i[i][N-1:0]),
      .b_i      (b_b_i[i][N-1:0]),
      .xi_bc_i  (xi_bc),
      .alpha_i  (alpha),
      .cw_en_i  (cw_en_i && (32'(cw_chan_i) == i)),
      .cw_addr_i(cw_addr_i),
      .cw_data_i(cw_data_i),
      .sig_o    (sig),
      .res_o    (res)
    );
    assign sig_all[i] = W'(sig);
    assign r_b_o[i]   = W'(res);
  end

  for (genvar j = 0; j < K; j++) begin : g_bp
    localparam int unsigned N = NBP[j];
    logic [N:0] xi, res;
    rns_chan_p1 #(.N(N), .K(K), .W(W)) u_ch (
      .clk      (clk),
      .rst_n    (rst_n),
      .ctl_i    (ctl),
      .a_i      (a_bp_i[j][N:0]),
      .b_i      (b_bp_i[j][N:0]),
      .sig_bc_i (sig_bc),
      .cw_en_i  (cw_en_i && (32'(cw_chan_i) == K + j)),
      .cw_addr_i(cw_addr_i),
      .cw_data_i(cw_data_i),
      .xi_o     (xi),
      .res_o    (res)
    );
    assign xi_all[j] = W'(xi);
    assign r_bp_o[j] = W'(res);
  end

  rns_chan_r #(.R(R), .K(K), .W(W)) u_chr (
    .clk      (clk),
    .rst_n    (rst_n),
    .ctl_i    (ctl),
    .a_i      (a_r_i),
    .b_i      (b_r_i),
    .sig_bc_i (sig_bc),
    .xi_bc_i  (xi_bc),
    .cw_en_i  (cw_en_i && (32'(cw_chan_i) == 2 * K)),
    .cw_addr_i(cw_addr_i),
    .cw_data_i(cw_data_i),
    .alpha_o  (alpha),
    .res_o    (r_r_o)
  );

endmodule
