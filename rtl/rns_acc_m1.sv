// rns_acc_m1: accumulating adder modulo 2^N-1.
//
// On every enabled clock the N-bit input is added to the internal register
// with an end-around carry (adder, then a half-adder chain that adds the carry
// out back in at bit 0) and the sum is stored and driven out.  With first_i
// set the register's reset value, zero, is used in place of its contents, so
// a new sum starts without a separate clearing cycle.  Zero needs no special
// handling; it may be held as all zeros or all ones.
//
// Timing: q_o is the registered sum, valid one clock after the last add.
// Reset (asynchronous, active low) clears the register.  The end-around carry
// structure follows the 2^n-1 adder of the method; the first_i input is this
// design's.
module rns_acc_m1 #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en_i,
  input  logic         first_i,
  input  logic [N-1:0] x_i,
  output logic [N-1:0] q_o
);

  logic [N-1:0] acc_q, fb, nxt;
  logic [N:0]   t;

  always_comb begin
    fb  = first_i ? '0 : acc_q;
    t   = {1'b0, fb} + {1'b0, x_i};
    nxt = t[N-1:0] + N'(t[N]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    acc_q <= '0;
    else if (en_i) acc_q <= nxt;
  end

  assign q_o = acc_q;

endmodule
