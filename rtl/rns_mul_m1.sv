// rns_mul_m1: combinational multiplier modulo 2^N-1.
//
// Multiplying by 2^i modulo 2^N-1 is a left rotation by i bits, so partial
// product row i is operand a rotated left by i and gated by bit b_i.  The N
// rows are reduced by a carry-save (Wallace) tree whose carries wrap around
// unchanged, and the two remaining rows are added by a carry-propagate adder
// (carry in 0) followed by a half-adder chain that adds the carry out back in
// at bit 0.  No zero detection is needed: a zero operand gives zero.
//
// Interface: a_i, b_i and p_o are plain binary residues of N bits.  Zero may
// appear on p_o in either of its two forms, all zeros or all ones (2^N-1);
// users that need the canonical form replace all ones by zero.
//
// The row structure, the end-around carry and the two-stage final adder follow
// the 2^n-1 multiplier architecture of the method (an 8-bit instance is the
// reference drawing); the generic Wallace grouping is this design's.
module rns_mul_m1 #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a_i,
  input  logic [N-1:0] b_i,
  output logic [N-1:0] p_o
);

  logic [N-1:0] rows [N];
  logic [N-1:0] s, c;
  logic [N:0]   t;

  for (genvar i = 0; i < N; i++) begin : g_row
    if (i == 0) begin : g_r0
      assign rows[i] = b_i[i] ? a_i : '0;
    end else begin : g_ri
      assign rows[i] = b_i[i] ? {a_i[N-1-i:0], a_i[N-1:N-i]} : '0;
    end
  end

  rns_csa_tree #(.N(N), .ROWS(N), .INV_WRAP(1'b0)) u_tree (
    .rows_i (rows),
    .sum_o  (s),
    .carry_o(c)
  );

  always_comb begin
    t   = {1'b0, s} + {1'b0, c};
    p_o = t[N-1:0] + N'(t[N]);
  end

endmodule
