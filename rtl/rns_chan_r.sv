// rns_chan_r: the redundant channel, modulus m_r = 2^R.
//
// Arithmetic modulo a power of two is plain truncated multiplication and
// addition.  The channel follows the phase of rns_mm_ctrl:
//   start       p   <= a*b
//   PH_SIG      sig <= p * |M^-1|                      (word 0)
//   PH_EXT1_ADD acc <= sig
//   PH_EXT1     acc += sigma_i * |M_i*N*M^-1|          (words 1..K)    = |r|_mr
//   PH_EXT2     rr  <= acc (first step);
//               acc := sum xi_j * |M'^-1 * M'_j|       (words K+1..2K) = alpha1
//   PH_ALPHA    acc += rr * |-M'^-1|                   (word 2K+1)     = alpha
// alpha (0..K-1 for valid operands) drives the B channels during PH_FINAL;
// rr, the residue of the result modulo m_r, is the channel's result.
// Broadcast sigma_i and xi_j enter by keeping their low R bits.
module rns_chan_r
  import rns_pkg::*;
#(
  parameter int unsigned R = R_DEF,
  parameter int unsigned K = K_DEF,
  parameter int unsigned W = W_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  mm_ctl_t      ctl_i,
  input  logic [R-1:0] a_i,
  input  logic [R-1:0] b_i,
  input  logic [W-1:0] sig_bc_i,
  input  logic [W-1:0] xi_bc_i,
  input  logic         cw_en_i,
  input  logic [7:0]   cw_addr_i,
  input  logic [W-1:0] cw_data_i,
  output logic [R-1:0] alpha_o,
  output logic [R-1:0] res_o
);

  localparam int unsigned DEPTH = 2 * K + 2;

  logic [R-1:0] ma, mb, mp, p_q, sig_q, rr_q, cst, acc_q, acc_x, fb;
  logic [7:0]   raddr;
  logic         acc_en, acc_first;

  rns_const_mem #(.WIDTH(R), .DEPTH(DEPTH), .AW(8)) u_mem (
    .clk    (clk),
    .we_i   (cw_en_i),
    .waddr_i(cw_addr_i),
    .wdata_i(cw_data_i[R-1:0]),
    .raddr_i(raddr),
    .rdata_o(cst)
  );

  assign mp = ma * mb;   // modulo 2^R by truncation

  always_comb begin
    ma        = a_i;
    mb        = b_i;
    raddr     = '0;
    acc_en    = 1'b0;
    acc_first = 1'b0;
    acc_x     = mp;
    unique case (ctl_i.phase)
      PH_SIG: begin
        ma = p_q;  mb = cst;  raddr = 8'd0;
      end
      PH_EXT1_ADD: begin
        acc_x = sig_q;  acc_en = 1'b1;  acc_first = 1'b1;
      end
      PH_EXT1: begin
        ma = sig_bc_i[R-1:0];  mb = cst;  raddr = 8'(ctl_i.idx) + 8'd1;
        acc_en = 1'b1;
      end
      PH_EXT2: begin
        ma = xi_bc_i[R-1:0];  mb = cst;  raddr = 8'(ctl_i.idx) + 8'(K + 1);
        acc_en = 1'b1;  acc_first = (ctl_i.idx == '0);
      end
      PH_ALPHA: begin
        ma = rr_q;  mb = cst;  raddr = 8'(2 * K + 1);
        acc_en = 1'b1;
      end
      default: ;
    endcase
    fb = acc_first ? '0 : acc_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q   <= '0;
      sig_q <= '0;
      rr_q  <= '0;
      acc_q <= '0;
    end else begin
      if (ctl_i.start)                                   p_q   <= mp;
      if (ctl_i.phase == PH_SIG)                         sig_q <= mp;
      if (ctl_i.phase == PH_EXT2 && ctl_i.idx == '0)     rr_q  <= acc_q;
      if (acc_en)                                        acc_q <= fb + acc_x;
    end
  end

  assign alpha_o = acc_q;
  assign res_o   = rr_q;

endmodule
