// rns_csa_tree: Wallace-style carry-save reduction of ROWS n-bit rows modulo
// 2^n-1 or 2^n+1, down to two rows.
//
// At every level the rows are taken three at a time through a row of full
// adders (a carry-save adder).  The carry vector is shifted left by one bit and
// the carry leaving the top bit is fed back into bit 0: unchanged for modulus
// 2^n-1 (INV_WRAP = 0, since 2^n = 1), complemented for modulus 2^n+1 in
// diminished-1 arithmetic (INV_WRAP = 1, since 2^n = -1; each such level adds
// exactly one to the represented sum, which the caller accounts for).  Rows
// left over at a level pass straight to the next one.  No carry propagates
// inside the tree; the two output rows go to a final end-around-carry adder.
// Purely combinational.
module rns_csa_tree #(
  parameter int unsigned N        = 8,   // row width, n >= 2
  parameter int unsigned ROWS     = 9,   // number of input rows
  parameter bit          INV_WRAP = 1'b0 // complement the wrapped carry
) (
  input  logic [N-1:0] rows_i [ROWS],
  output logic [N-1:0] sum_o,
  output logic [N-1:0] carry_o
);

  // Number of rows left after lvl levels of 3:2 reduction.
  function automatic int unsigned rows_after(input int unsigned lvl);
    int unsigned c = ROWS;
    for (int unsigned l = 0; l < lvl; l++) c = (c / 3) * 2 + (c % 3);
    return c;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned c = ROWS;
    int unsigned l = 0;
    for (int unsigned i = 0; i < ROWS; i++)
      if (c > 2) begin
        c = (c / 3) * 2 + (c % 3);
        l++;
      end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned CIN  = rows_after(l);
    localparam int unsigned COUT = rows_after(l + 1);
    localparam int unsigned G    = CIN / 3;
    logic [N-1:0] lin  [ROWS];
    logic [N-1:0] lout [ROWS];
    if (l == 0) begin : g_src
      assign lin = rows_i;
    end else begin : g_src
      assign lin = g_lvl[l-1].lout;
    end
    for (genvar g = 0; g < G; g++) begin : g_csa
      logic [N-1:0] x, y, z, s, c;
      assign x = lin[3*g];
      assign y = lin[3*g+1];
      assign z = lin[3*g+2];
      assign s = x ^ y ^ z;
      assign c = (x & y) | (x & z) | (y & z);
      assign lout[2*g]   = s;
      assign lout[2*g+1] = {c[N-2:0], c[N-1] ^ INV_WRAP};
    end
    for (genvar r = 3 * G; r < CIN; r++) begin : g_pass
      assign lout[2*G + r - 3*G] = lin[r];
    end
    for (genvar r = COUT; r < ROWS; r++) begin : g_unused
      assign lout[r] = '0;
    end
  end

  if (LEVELS == 0) begin : g_out
    assign sum_o   = rows_i[0];
    assign carry_o = (ROWS > 1) ? rows_i[ROWS > 1 ? 1 : 0] : '0;
  end else begin : g_out
    assign sum_o   = g_lvl[LEVELS-1].lout[0];
    assign carry_o = g_lvl[LEVELS-1].lout[1];
  end

endmodule
