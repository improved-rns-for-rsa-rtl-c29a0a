// rns_mul_p1: combinational multiplier modulo 2^N+1 in diminished-1 form.
//
// A residue x is carried as d(x) = x-1 on N+1 bits; bit N set marks x = 0
// (the word is then 2^N).  Writing b = d(b)+1 with bits b_i of d(b),
//   a*b = sum_{i>=1} b_i 2^i a + d1,  d1 = a (b_0 = 0) or 2a (b_0 = 1),
// and in diminished-1 arithmetic
//   d(ab) = sum_{i=1..N-1} b_i d(2^i a) + d1(a) + ~Z + (N+1)   (mod 2^N+1)
// where Z counts the zeros among b_1..b_{N-1} and ~Z is its N-bit complement.
// d(2^i a) is d(a) rotated left by i with the wrapped bits complemented.
// The N+1 rows (d1, N-1 gated rows, ~Z) go through a carry-save tree whose
// wrapped carries are complemented (each level adds one), then an adder with
// carry-in 1 and a half-adder chain that adds back the complemented carry out;
// that stage's own carry lands in bit N and so flags a zero result.  If either
// operand is zero the product is forced to zero; the arithmetic above is not
// valid for a zero operand.
//
// Interface: a_i, b_i, p_o are diminished-1 words of N+1 bits.
// The equations, the row contents and the zero handling follow the 2^n+1
// multiplier of the method; the generic Wallace grouping is this design's.
module rns_mul_p1 #(
  parameter int unsigned N = 8
) (
  input  logic [N:0] a_i,
  input  logic [N:0] b_i,
  output logic [N:0] p_o
);

  localparam int unsigned ZW = $clog2(N);

  logic [N-1:0] da, db;
  logic [N-1:0] rows [N+1];
  logic [N-1:0] s, c, d2a, zbar;
  logic [ZW:0]  zcnt;
  logic [N:0]   t, u;

  assign da  = a_i[N-1:0];
  assign db  = b_i[N-1:0];
  assign d2a = {da[N-2:0], ~da[N-1]};

  // number of zero bits among b_1..b_{N-1}
  always_comb begin
    zcnt = '0;
    for (int unsigned i = 1; i < N; i++) zcnt = zcnt + (ZW+1)'(!db[i]);
    zbar = ~N'(zcnt);
  end

  assign rows[0] = db[0] ? d2a : da;
  for (genvar i = 1; i < N; i++) begin : g_row
    assign rows[i] = db[i] ? {da[N-1-i:0], ~da[N-1:N-i]} : '0;
  end
  assign rows[N] = zbar;

  rns_csa_tree #(.N(N), .ROWS(N+1), .INV_WRAP(1'b1)) u_tree (
    .rows_i (rows),
    .sum_o  (s),
    .carry_o(c)
  );

  always_comb begin
    t = {1'b0, s} + {1'b0, c} + (N+1)'(1);
    u = {1'b0, t[N-1:0]} + (N+1)'(!t[N]);
    if (a_i[N] || b_i[N]) p_o = {1'b1, {N{1'b0}}};
    else                  p_o = u;
  end

endmodule
