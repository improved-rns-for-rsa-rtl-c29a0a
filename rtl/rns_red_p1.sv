// rns_red_p1: reduces a WI-bit binary number modulo 2^N+1 and converts it to
// diminished-1 form (N+1 bits, 2^N for zero).  Combinational.
//
// Since 2^N = -1 modulo 2^N+1, the number is cut into N-bit chunks; the even
// chunks are added and the odd ones subtracted (the odd sum is taken from a
// multiple of the modulus that bounds it, so nothing goes negative).  The
// short result is reduced by a narrow constant-modulus remainder and then
// decremented into diminished-1 form.  Used where a residue of another channel
// enters a 2^n+1 channel, and where a binary 2^n+1 accumulator result
// re-enters a 2^n+1 multiplier.  The method leaves this conversion to known
// techniques; this structure is this design's.
module rns_red_p1 #(
  parameter int unsigned WI = 16,
  parameter int unsigned N  = 8
) (
  input  logic [WI-1:0] x_i,
  output logic [N:0]    y_o
);
  localparam int unsigned C  = (WI + N - 1) / N;         // number of chunks
  localparam int unsigned NO = C / 2;                    // number of odd chunks
  localparam int unsigned WS = N + $clog2(C + 2) + 2;    // width of the chunk sums
  localparam logic [WS-1:0] MOD  = WS'({1'b1, {(N-1){1'b0}}, 1'b1});
  localparam logic [WS-1:0] BIAS = WS'(NO) * MOD;        // bounds the odd sum

  logic [C*N-1:0] xp;
  logic [WS-1:0]  pe, po, v, r;

  always_comb begin
    xp = (C*N)'(x_i);
    pe = '0;
    po = '0;
    for (int unsigned k = 0; k < C; k++)
      if (k % 2 == 0) pe = pe + WS'(xp[k*N +: N]);
      else            po = po + WS'(xp[k*N +: N]);
    v = pe + (BIAS - po);
    r = v % MOD;
    if (r == '0) y_o = {1'b1, {N{1'b0}}};
    else         y_o = r[N:0] - (N+1)'(1);
  end
endmodule
