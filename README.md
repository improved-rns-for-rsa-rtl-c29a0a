# RSA exponentiation in a residue number system

This RTL computes RSA's modular exponentiation `c = a^e mod N` without ever
handling the 1024-bit numbers as binary words. Every number is split into its
remainders modulo a set of small, pairwise coprime moduli: a residue number
system (RNS). In an RNS, addition and multiplication act on each remainder
independently, so 21 narrow channels work in parallel and no carry crosses
between them. Modular reduction by N has no direct RNS form. It is done with
Montgomery multiplication, which needs a second residue base and two *base
extensions*, i.e. conversions of a number's residues from one base to the
other.

The design implements an improved form of the Bajard RNS Montgomery
multiplication. Its main idea is to precompute more. Every chain of
constants that multiplies the same variable is folded into one stored
product. For example, `|-N^-1 * M_i^-1|` is stored instead of `|-N^-1|` and
`|M_i^-1|`. Intermediate values that the exponentiation never uses are also
folded away: the quotient `q` and the Bajard intermediate `r_j` are never
formed. The fold saves sequential multiplications. Forming `sigma_i` takes 2
instead of 3, and `xi_j` takes k+2 instead of k+4 for k moduli per base. It
also roughly halves the number of stored constants per channel.

## Residue bases and number formats

| base | moduli | channel format | count |
|---|---|---|---|
| B  | `m_i = 2^n_i - 1` | plain binary, `n_i` bits | K |
| B' | `m_j = 2^n_j + 1` | diminished-1, `n_j + 1` bits | K |
| redundant | `m_r = 2^R` | plain binary, `R` bits | 1 |

`M` is the product of the B moduli and `M'` the product of the B' moduli.
The Montgomery multiplication `MM(a, b) = a*b*M^-1 mod N` is correct when
`(K+2)^2 N < M < M'` and `a*b < M*N`. Its result is below `(K+2)N`, so
results can be fed back as operands indefinitely.

**Diminished-1.** A value `x` modulo `2^n+1` ranges over `0..2^n`, which needs
`n+1` bits. In diminished-1 form the word holds `x-1`. Bit `n` is then set
only for `x = 0`, whose word is `2^n`. Every nonzero value fits in `n` bits,
so adders and multipliers stay `n` bits wide. A zero is recognised by its top
bit alone, and arithmetic treats it as a special case. All B' operands,
results and constants use this form.

Two helpers reduce a residue that moves between channels of different
moduli. `rns_red_m1` sums `n`-bit chunks, since `2^n = 1 mod 2^n-1`.
`rns_red_p1` alternately adds and subtracts chunks, since `2^n = -1 mod 2^n+1`.
The redundant channel simply keeps the low `R` bits.

## The arithmetic units

**`rns_mul_m1`, multiplier modulo 2^n-1.** Multiplying by `2^i` is a left
rotation by `i`. Partial product row `i` is therefore `a` rotated by `i` and
gated by `b_i`. The `n` rows go through a Wallace tree of carry-save adders.
At each level the carry leaving the top bit re-enters at bit 0 unchanged. A
final adder (carry-in 0) and a half-adder chain add the two remaining rows
and feed the carry back in once more. Zero needs no special case. It may come
out as all ones, and the channel canonicalises it before it leaves.

**`rns_mul_p1`, multiplier modulo 2^n+1 in diminished-1.** Let `d(x) = x-1`,
and let `b_i` be the bits of `d(b)`. Then:

```
d(ab) = sum_{i=1..n-1} b_i d(2^i a)  +  d1(a)  +  ~Z  +  (n+1)   (mod 2^n+1)
d1(a) = d(a) if b_0 = 0, d(2a) if b_0 = 1
d(2^i a) = d(a) rotated left by i, with the i wrapped bits complemented
Z = number of zeros among b_1..b_{n-1};  ~Z its n-bit complement
```

These are `n+1` rows. In the carry-save tree, the carry that wraps from the
top bit is complemented, because `2^n = -1`. Each tree level therefore adds
exactly one to the sum. Together with the final adder's carry-in of 1 and the
complemented-carry half-adder chain, this supplies the `n+1`. A carry out of
that last chain lands in bit `n`, which correctly flags a zero product. If
either operand is zero, the output is forced to the zero word, because the
row equation does not hold for a zero operand.

**`rns_acc_p1`, accumulating adder modulo 2^n+1.** It adds a diminished-1
input to its register each clock: an `n`-bit add, then a half-adder chain
that adds the complemented carry. It has a useful property. The register
resets to 0, which read as a diminished-1 word means 1. After it adds
`X1..Xt` it therefore holds the diminished-1 word of `1 + X1 + ... + Xt`, and
read as a plain binary number that word is exactly `X1 + ... + Xt mod 2^n+1`.
So the accumulator takes diminished-1 inputs and delivers binary output
without any conversion step. Binary is what the B channels and the redundant
channel need. A zero input (top bit set) leaves the register unchanged. The
register is `n+1` bits, so a sum equal to `2^n` is representable.

**`rns_acc_m1`, accumulating adder modulo 2^n-1.** This is the same without
diminished-1: the carry is added back uncomplemented, and zero needs no
special case.

Both accumulators have a `first_i` input. It substitutes the reset value for
the register contents, so a new sum starts without a clearing cycle.

## One Montgomery multiplication (`rns_mm`)

Each channel has one multiplier, one accumulator and one constant memory
(`rns_const_mem`). `rns_mm_ctrl` steps all channels together through the
calculation groups. The calculations within a group are independent of one
another.

| clocks | phase | B channel i (2^n-1) | B' channel j (2^n+1) | redundant channel |
|---|---|---|---|---|
| 1 | start | `p = a*b` | `p = a*b` | `p = a*b` |
| 1 | SIG | `s_i = p*C[0]` | `s_j = p*C[0]` | `s_r = p*C[0]` |
| 1 | EXT1_ADD | – | `acc = s_j` | `acc = s_r` |
| K | EXT1, t = 0..K-1 | broadcasts `s_t` | `acc += |s_t| * C[1+t]` gives `xi_j` | `acc += s_t * C[1+t]` gives `|r|_mr` |
| K | EXT2, t = 0..K-1 | `acc (+)= |xi_t| * C[1+t]` gives `rho_i` | broadcasts `xi_t` | `rr = |r|_mr`; `acc (+)= xi_t * C[K+1+t]` gives `alpha1` |
| 1 | ALPHA | – | – | `acc += rr * C[2K+1]` gives `alpha` |
| 1 | FINAL | `acc += |alpha| * C[K+1]` gives `|r|_mi` | `p = xi_j * C[K+1]` gives `|r|_mj` | – |

`done_o` pulses 2K+5 clocks after the clock that accepted `start_i`. That is
25 clocks for K = 10. Operands are sampled on the start clock. Results stay
valid until the next start.

`alpha` is the number of times `M'` must be removed when the result is
rebuilt in B. It is computed exactly in the redundant channel, because its
value is below K and `m_r >= K`. The two subtractions of the method
(`alpha1 - |r|_mr |M'^-1|` and `rho - alpha M'`) are done as additions with
stored negated constants. This lets the multiply-accumulate path handle them.

### Constants (written per key through `cw_*`)

`M_i = M/m_i`, `M'_j = M'/m'_j`. Every value is reduced modulo the channel's
modulus. B' words are stored in diminished-1 form.

| channel (`cw_chan_i`) | word | constant |
|---|---|---|
| B channel i (i) | 0 | `-N^-1 * M_i^-1` |
| | 1+t | `M'_t` |
| | K+1 | `-M'` |
| B' channel j (K+j) | 0 | `M^-1 * M'_j^-1` |
| | 1+t | `M_t * N * M^-1 * M'_j^-1` |
| | K+1 | `M'_j` |
| redundant (2K) | 0 | `M^-1` |
| | 1+t | `M_t * N * M^-1` |
| | K+1+t | `M'^-1 * M'_t` |
| | 2K+1 | `-M'^-1` |

## Exponentiation (`rsa_exp_ctrl`, `rsa_rns_top`)

The controller runs left-to-right square-and-multiply in the Montgomery
domain, with `M` as the Montgomery radix:

```
abar = MM(a, M^2 mod N);   cbar = MM(M^2 mod N, 1)
for i = EBITS-1 downto 0:  cbar = MM(cbar, cbar);  if e_i: cbar = MM(abar, cbar)
c = MM(cbar, 1)
```

Each multiplication takes 2K+6 clocks, including the clock that issues it. A
run takes `(3 + EBITS + popcount(e)) * (2K+6) + 1` clocks from the start
clock to `done_o`. For RSA-1024 with K = 10 and a random exponent that is
about 40,000 clocks.

The host's tasks are:
- convert `a` and `M^2 mod N` into residues (B binary, B' diminished-1, m_r);
- load the constants above;
- convert the result back to binary.

The result is congruent to `a^e mod N` but lies anywhere below `(K+2)N`.
The final subtraction of multiples of N is left to the host. The published
method's way to avoid it, an exact mixed-radix base extension in the last
multiplication, is not built.

## Parameters and the default configuration

| parameter | default | meaning |
|---|---|---|
| `K` | 10 | moduli per base (RSA-1024 configuration) |
| `NB`, `NBP` | {89, 97, 101, 103, 105, 107, 109, 113, 127, 131} | exponents `n` of B and B' |
| `R` | 4 | `m_r = 16 >= K` |
| `W` | 132 | residue bus width, largest `n` plus one |
| `EBITS` | 1024 | exponent length |

The exponents are pairwise coprime, so the B moduli are pairwise coprime. B
holds 1082 bits, enough for `M > (K+2)^2 N` with a 1024-bit `N`.

**Caution about B'.** Two moduli `2^a+1` and `2^b+1` are coprime only if `a`
and `b` contain different powers of two. With odd exponents they all share
the factor 3. No set of ten near-equal `2^n+1` moduli is pairwise coprime, so
the default B' cannot carry a real RSA-1024 key. The hardware does not depend
on coprimality, because every key-dependent quantity is a loaded constant.
The default sizes therefore show the intended datapath width, while working
keys need a different B'. The testbenches use the valid small configuration
B = {127, 31, 7}, B' = {65537, 257, 17}, m_r = 4, N = 1009. A real deployment
could give B' exponents with distinct powers of two, or change the channel
type of some B' moduli.

## Verification

Every testbench checks its results itself and ends with a `TB_RESULT` line.
Run one with plain Verilator from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rns_pkg.sv tb/tb_rns_math_pkg.sv \
          tb/tb_rsa_rns_top.sv --top-module tb_rsa_rns_top && ./obj_dir/Vtb_rsa_rns_top
```

| testbench | what it establishes |
|---|---|
| `tb_rns_mul_p1` | all 257x257 diminished-1 operand pairs for n = 8 (zeros included) are exact; random pairs for n = 4 and 16 |
| `tb_rns_mul_m1` | all 256x256 pairs for n = 8 are correct; random pairs for n = 5 and 13 |
| `tb_rns_acc_p1`, `tb_rns_acc_m1` | random add, hold and restart sequences against a modular reference, including zero inputs and the sum `2^n` |
| `tb_rns_const_mem` | write and read-back; out-of-range addresses |
| `tb_rns_mm_ctrl` | exact phase and term-index sequence and the done timing |
| `tb_rns_mm` | 404 multiplications on the small valid base: CRT reconstruction gives `a*b*M^-1 mod N`, below `(K+2)N`, consistent in all channels, in exactly 2K+5 clocks |
| `tb_rsa_exp_ctrl` | operand and destination sequence for 20 exponents against a multiplier stand-in |
| `tb_rsa_rns_top` | 16 complete exponentiations (10-bit exponents) against `a^e mod N`; exact clock counts; each of these occurs at least once: squaring, multiply step, skipped multiply, zero operand at a 2^n+1 multiplier, zero input held by a 2^n+1 accumulator, nonzero `alpha`, end-around carry |

The largest configuration simulated end to end is K = 3 with channels up to
16 bits. The default 132-bit configuration lints and elaborates cleanly. A
bit-exact full-size simulation (random constants against a wide-integer
model of the calculation groups) was written, but building its C++ model
takes longer than is practical, so it is not part of `tb/`.

## Files

- `rtl/rns_pkg.sv`: default sizes, phase encoding and operand-select types.
- `rtl/rns_mul_m1.sv`, `rtl/rns_mul_p1.sv`, `rtl/rns_csa_tree.sv`: the
  multipliers and their shared Wallace tree.
- `rtl/rns_acc_m1.sv`, `rtl/rns_acc_p1.sv`: the accumulating adders.
- `rtl/rns_red_m1.sv`, `rtl/rns_red_p1.sv`: cross-channel reduction.
- `rtl/rns_const_mem.sv`: the constant memory.
- `rtl/rns_chan_m1.sv`, `rtl/rns_chan_p1.sv`, `rtl/rns_chan_r.sv`: one
  channel of each kind.
- `rtl/rns_mm_ctrl.sv`, `rtl/rns_mm.sv`: one Montgomery multiplication.
- `rtl/rsa_exp_ctrl.sv`, `rtl/rsa_rns_top.sv`: the exponentiation.
- `tb/tb_rns_math_pkg.sv`: reference arithmetic and constant generation for
  a small base.

## What follows the method and what is this design's own

The following come from the published method:
- the formulas;
- the five calculation groups;
- the structure of the multipliers and adders (row contents, end-around and
  complemented carries, zero handling by the top bit);
- the binary output of the 2^n+1 adder;
- the exponentiation loop.

The following are this design's own:
- the channel widths;
- the one-clock-per-phase schedule and the broadcast of one residue per
  clock;
- the constant memory layout;
- the host interface;
- the cross-channel reduction;
- subtraction by stored negated constants;
- the `first_i` restart of the adders;
- forming `abar` and `cbar` with the multiplier from a host-supplied
  `M^2 mod N`.
