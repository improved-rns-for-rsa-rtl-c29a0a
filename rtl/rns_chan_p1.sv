// rns_chan_p1: one channel of base B', modulus 2^N+1, diminished-1 operands.
//
// Holds one diminished-1 2^N+1 multiplier, one 2^N+1 accumulating adder and
// the channel's constant memory (constants stored in diminished-1 form), and
// follows the phase of rns_mm_ctrl:
//   start       p   <= a*b
//   PH_SIG      sig <= p * |M^-1 * M'_j^-1|                 (word 0)
//   PH_EXT1_ADD acc <= sig
//   PH_EXT1     acc += |sigma_i| * |M_i*N*M^-1*M'_j^-1|     (words 1..K) = xi_j
//   PH_FINAL    p   <= xi_j * |M'_j|                        (word K+1)   = |r|_mj
// The accumulator output xi_j is binary (0..2^N) and is broadcast to the
// B channels and the redundant channel during PH_EXT2.  The result |r|_mj is
// diminished-1, ready to be an operand of the next multiplication.
// sigma_i broadcast from B channels is reduced mod 2^N+1 and converted to
// diminished-1 on entry; xi_j is converted back to diminished-1 for the last
// product.
module rns_chan_p1
  import rns_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned K = K_DEF,
  parameter int unsigned W = W_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  mm_ctl_t      ctl_i,
  input  logic [N:0]   a_i,        // diminished-1
  input  logic [N:0]   b_i,        // diminished-1
  input  logic [W-1:0] sig_bc_i,   // sigma_i broadcast during PH_EXT1
  input  logic         cw_en_i,
  input  logic [7:0]   cw_addr_i,
  input  logic [W-1:0] cw_data_i,
  output logic [N:0]   xi_o,       // binary
  output logic [N:0]   res_o       // diminished-1
);

  localparam int unsigned DEPTH = K + 2;

  logic [N:0] ma, mb, mp, p_q, sig_q, cst, acc_q, acc_x, sig_d1, xi_d1;
  logic [7:0] raddr;
  logic       acc_en, acc_first;

  rns_const_mem #(.WIDTH(N+1), .DEPTH(DEPTH), .AW(8)) u_mem (
    .clk    (clk),
    .we_i   (cw_en_i),
    .waddr_i(cw_addr_i),
    .wdata_i(cw_data_i[N:0]),
    .raddr_i(raddr),
    .rdata_o(cst)
  );

  rns_red_p1 #(.WI(W),   .N(N)) u_red_sig (.x_i(sig_bc_i), .y_o(sig_d1));
  rns_red_p1 #(.WI(N+1), .N(N)) u_red_xi  (.x_i(acc_q),    .y_o(xi_d1));

  rns_mul_p1 #(.N(N)) u_mul (.a_i(ma), .b_i(mb), .p_o(mp));

  rns_acc_p1 #(.N(N)) u_acc (
    .clk(clk), .rst_n(rst_n), .en_i(acc_en), .first_i(acc_first), .x_i(acc_x), .q_o(acc_q)
  );

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
        ma = sig_d1;  mb = cst;  raddr = 8'(ctl_i.idx) + 8'd1;
        acc_en = 1'b1;
      end
      PH_FINAL: begin
        ma = xi_d1;  mb = cst;  raddr = 8'(K + 1);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q   <= '0;
      sig_q <= '0;
    end else begin
      if (ctl_i.start || ctl_i.phase == PH_FINAL) p_q <= mp;
      if (ctl_i.phase == PH_SIG)                  sig_q <= mp;
    end
  end

  assign xi_o  = acc_q;
  assign res_o = p_q;

endmodule
