// rns_red_m1: reduces a WI-bit binary number modulo 2^N-1 (combinational).
//
// Since 2^N = 1 modulo 2^N-1, the number is cut into N-bit chunks which are
// simply added; the short sum (a few bits wider than N) is then reduced by a
// narrow constant-modulus remainder.  Used where a residue of one channel is
// broadcast into a channel of another modulus.  The result is canonical
// (0..2^N-2).  The method does not describe this step; the structure is this
// design's.
module rns_red_m1 #(
  parameter int unsigned WI = 16,
  parameter int unsigned N  = 8
) (
  input  logic [WI-1:0] x_i,
  output logic [N-1:0]  y_o
);
  localparam int unsigned C  = (WI + N - 1) / N;         // number of chunks
  localparam int unsigned WS = N + $clog2(C + 1) + 1;    // width of the chunk sum
  localparam logic [WS-1:0] MOD = WS'({N{1'b1}});

  logic [C*N-1:0] xp;
  logic [WS-1:0]  s, r;

  always_comb begin
    xp = (C*N)'(x_i);
    s  = '0;
    for (int unsigned k = 0; k < C; k++) s = s + WS'(xp[k*N +: N]);
    r   = s % MOD;
    y_o = r[N-1:0];
  end
endmodule
