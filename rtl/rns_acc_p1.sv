// rns_acc_p1: accumulating adder modulo 2^N+1 with diminished-1 input and
// binary output.
//
// The input x_i is a diminished-1 word (N+1 bits, bit N set means zero).  The
// register starts at zero, which read as a diminished-1 word stands for 1, so
// after adding inputs X1..Xt in diminished-1 arithmetic it stands for
// 1 + X1 + ... + Xt: read as a plain binary number it is exactly the sum
// X1 + ... + Xt mod 2^N+1, in the range 0..2^N.  The output therefore needs no
// conversion; it is already binary, which is what the next users (2^n-1
// channels, the redundant channel, the system output) want.
// Each addition is: N-bit add, then a half-adder chain adding the complemented
// carry out (diminished-1 carry correction); a carry into bit N marks the
// diminished-1 zero.  A zero input (bit N set) leaves the register unchanged,
// as if its clock were stopped.  With first_i set the reset value is used in
// place of the register contents, so a new sum starts without a clear cycle.
//
// Timing: q_o is registered, valid one clock after the last add.  Reset is
// asynchronous, active low.  The structure follows the 2^n+1 adder of the
// method; first_i and the case of a register holding the zero word are this
// design's.
module rns_acc_p1 #(
  parameter int unsigned N = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en_i,
  input  logic       first_i,
  input  logic [N:0] x_i,
  output logic [N:0] q_o
);

  logic [N:0] acc_q, fb, nxt, t;

  always_comb begin
    fb = first_i ? '0 : acc_q;
    t  = {1'b0, fb[N-1:0]} + {1'b0, x_i[N-1:0]};
    if (x_i[N])      nxt = fb;          // adding zero: keep the value
    else if (fb[N])  nxt = x_i;         // register stands for 0: result is x
    else             nxt = {1'b0, t[N-1:0]} + (N+1)'(!t[N]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    acc_q <= '0;
    else if (en_i) acc_q <= nxt;
  end

  assign q_o = acc_q;

endmodule
