// rsa_exp_ctrl: controller of RSA modular exponentiation c = a^e mod N on top
// of a Montgomery multiplier MM(x, y) = x*y*M^-1 mod N.
//
// Sequence (left-to-right binary exponentiation in the Montgomery domain,
// with the Montgomery radix taken as M, the product of base B):
//   PRE_A  abar = MM(a, M^2 mod N)        a into Montgomery form
//   PRE_C  cbar = MM(M^2 mod N, 1)        1 into Montgomery form (M mod N)
//   for i = EBITS-1 downto 0:
//     SQR  cbar = MM(cbar, cbar)
//     MUL  cbar = MM(abar, cbar)          only when e_i = 1
//   POST   c    = MM(cbar, 1)             back out of Montgomery form
// Each step raises mm_start_o for one clock, then waits for mm_done_i; on
// mm_done_i the step's destination write strobe is high for that clock.
// op_a_o/op_b_o select the operands for the datapath.  The loop follows the
// method; forming abar and cbar with the multiplier itself (from a host
// supplied M^2 mod N) is this design's choice.
module rsa_exp_ctrl
  import rns_pkg::*;
#(
  parameter int unsigned EBITS = EBITS_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start_i,
  input  logic [EBITS-1:0] e_i,
  input  logic             mm_done_i,
  output logic             mm_start_o,
  output op_sel_e          op_a_o,
  output op_sel_e          op_b_o,
  output logic             wr_abar_o,
  output logic             wr_cbar_o,
  output logic             wr_res_o,
  output logic             busy_o,
  output logic             done_o
);

  typedef enum logic [2:0] {S_IDLE, S_PRE_A, S_PRE_C, S_SQR, S_MUL, S_POST} state_e;

  localparam int unsigned BW = (EBITS > 1) ? $clog2(EBITS) : 1;

  state_e           st_q;
  logic             issued_q, done_q;
  logic [EBITS-1:0] e_q;
  logic [BW-1:0]    bit_q;

  always_comb begin
    op_a_o = OP_CBAR;
    op_b_o = OP_CBAR;
    unique case (st_q)
      S_PRE_A: begin op_a_o = OP_MSG;  op_b_o = OP_M2;   end
      S_PRE_C: begin op_a_o = OP_M2;   op_b_o = OP_ONE;  end
      S_SQR:   begin op_a_o = OP_CBAR; op_b_o = OP_CBAR; end
      S_MUL:   begin op_a_o = OP_ABAR; op_b_o = OP_CBAR; end
      S_POST:  begin op_a_o = OP_CBAR; op_b_o = OP_ONE;  end
      default: ;
    endcase
  end

  assign mm_start_o = (st_q != S_IDLE) && !issued_q;
  assign wr_abar_o  = mm_done_i && (st_q == S_PRE_A);
  assign wr_cbar_o  = mm_done_i && (st_q == S_PRE_C || st_q == S_SQR || st_q == S_MUL);
  assign wr_res_o   = mm_done_i && (st_q == S_POST);
  assign busy_o     = (st_q != S_IDLE);
  assign done_o     = done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= S_IDLE;
      issued_q <= 1'b0;
      done_q   <= 1'b0;
      e_q      <= '0;
      bit_q    <= '0;
    end else begin
      done_q <= 1'b0;
      if (mm_start_o) issued_q <= 1'b1;
      unique case (st_q)
        S_IDLE: if (start_i) begin
          st_q  <= S_PRE_A;
          e_q   <= e_i;
          bit_q <= BW'(EBITS - 1);
        end
        S_PRE_A: if (mm_done_i) begin st_q <= S_PRE_C; issued_q <= 1'b0; end
        S_PRE_C: if (mm_done_i) begin st_q <= S_SQR;   issued_q <= 1'b0; end
        S_SQR, S_MUL: if (mm_done_i) begin
          issued_q <= 1'b0;
          if (st_q == S_SQR && e_q[bit_q]) st_q <= S_MUL;
          else if (bit_q == '0)            st_q <= S_POST;
          else begin
            st_q  <= S_SQR;
            bit_q <= bit_q - 1'b1;
          end
        end
        S_POST: if (mm_done_i) begin
          st_q     <= S_IDLE;
          issued_q <= 1'b0;
          done_q   <= 1'b1;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

endmodule
