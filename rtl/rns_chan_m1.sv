// rns_chan_m1: one channel of base B, modulus 2^N-1.
//
// Holds one 2^N-1 multiplier, one 2^N-1 accumulating adder and the channel's
// constant memory, and follows the phase of rns_mm_ctrl:
//   start    p     <= a*b
//   PH_SIG   sigma <= p * |-N^-1 * M_i^-1|            (memory word 0)
//   PH_EXT2  acc   (+)= |xi_j| * |M'_j|  for j=0..K-1  (words 1..K)   = rho
//   PH_FINAL acc    += alpha * |-M'|                   (word K+1)     = |r|_mi
// sigma is broadcast to the other channels (category 2) and |r|_mi is the
// result.  Both are canonical residues (0..2^N-2).  The xi_j and alpha values
// broadcast from other channels are reduced modulo 2^N-1 on entry.
// The subtraction of alpha*M' is done as an addition of alpha*|-M'| so that
// the multiply-accumulate path serves it too: this is this design's choice.
module rns_chan_m1
  import rns_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned K = K_DEF,
  parameter int unsigned W = W_DEF,
  parameter int unsigned R = R_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  mm_ctl_t      ctl_i,
  input  logic [N-1:0] a_i,
  input  logic [N-1:0] b_i,
  input  logic [W-1:0] xi_bc_i,    // xi_j broadcast during PH_EXT2
  input  logic [R-1:0] alpha_i,    // alpha during PH_FINAL
  input  logic         cw_en_i,
  input  logic [7:0]   cw_addr_i,
  input  logic [W-1:0] cw_data_i,
  output logic [N-1:0] sig_o,
  output logic [N-1:0] res_o
);

  localparam int unsigned DEPTH = K + 2;

  logic [N-1:0] ma, mb, mp, p_q, sig_q, red_y, cst, acc_q;
  logic [W-1:0] red_x;
  logic [7:0]   raddr;
  logic         acc_en, acc_first;

  function automatic logic [N-1:0] canon(input logic [N-1:0] v);
    return (v == {N{1'b1}}) ? '0 : v;
  endfunction

  rns_const_mem #(.WIDTH(N), .DEPTH(DEPTH), .AW(8)) u_mem (
    .clk    (clk),
    .we_i   (cw_en_i),
    .waddr_i(cw_addr_i),
    .wdata_i(cw_data_i[N-1:0]),
    .raddr_i(raddr),
    .rdata_o(cst)
  );

  assign red_x = (ctl_i.phase == PH_FINAL) ? W'(alpha_i) : xi_bc_i;
  rns_red_m1 #(.WI(W), .N(N)) u_red (.x_i(red_x), .y_o(red_y));

  rns_mul_m1 #(.N(N)) u_mul (.a_i(ma), .b_i(mb), .p_o(mp));

  rns_acc_m1 #(.N(N)) u_acc (
    .clk(clk), .rst_n(rst_n), .en_i(acc_en), .first_i(acc_first), .x_i(mp), .q_o(acc_q)
  );

  always_comb begin
    ma        = a_i;
    mb        = b_i;
    raddr     = '0;
    acc_en    = 1'b0;
    acc_first = 1'b0;
    unique case (ctl_i.phase)
      PH_SIG: begin
        ma = p_q;  mb = cst;  raddr = 8'd0;
      end
      PH_EXT2: begin
        ma = red_y;  mb = cst;  raddr = 8'(ctl_i.idx) + 8'd1;
        acc_en = 1'b1;  acc_first = (ctl_i.idx == '0);
      end
      PH_FINAL: begin
        ma = red_y;  mb = cst;  raddr = 8'(K + 1);
        acc_en = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q   <= '0;
      sig_q <= '0;
    end else begin
      if (ctl_i.start)              p_q   <= mp;
      if (ctl_i.phase == PH_SIG)    sig_q <= canon(mp);
    end
  end

  assign sig_o = sig_q;
  assign res_o = canon(acc_q);

endmodule
