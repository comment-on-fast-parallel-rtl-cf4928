# Modulo 2^n+1 adder with a parallel-prefix carry network

Residue number systems built on the moduli {2^n − 1, 2^n, 2^n + 1} need an adder
for each channel, and the three adders should be about equally fast. Adders
modulo 2^n and 2^n − 1 are ordinary (or end-around) parallel-prefix adders.
The 2^n + 1 channel is harder: its residues need n + 1 bits (0 … 2^n), and the
correction that folds an overflow back into range depends on the sum itself.

This RTL adds two residues A, B ∈ [0, 2^n] and returns R = (A + B) mod (2^n + 1)
in one combinational pass whose depth grows as log n. All carries, including
the effect of the "+1" correction on every column, come out of a single
prefix network, and the top result bit r_n is produced by one extra prefix
node instead of a separate detector. The equations are the corrected ones
published by Jaberipur and Alavi as a comment on the totally-parallel-prefix
(TPP) adder of Efstathiou, Vergos and Nikolos (IEEE Trans. Computers 53(9),
2004). The earlier top-bit rule r_n = ~c_n & P_n & s_0 gives wrong results;
this design does not use it.

Default width: **N = 8** (9-bit operands, modulo 257). Any N ≥ 2 elaborates.

## The arithmetic

Let `K = 2^n − 1`. The adder first forms

    M = A + B + K

Then

* if `M ≥ 2^(n+1)` (bit `m_{n+1}` = 1), `A + B ≥ 2^n + 1` and
  `R = M − 2^(n+1)`, which is just the low n+1 bits of M;
* otherwise `A + B ≤ 2^n` and `R = (M + 2^n + 1) mod 2^(n+1) = A + B`.

Together:

    R = ( m_n … m_0  +  (2^n + 1)·~m_{n+1} )  mod 2^(n+1)

So the correction is a carry-in of `~m_{n+1}` into bit 0, plus a 1 in bit n,
which only affects r_n.

### Carry-save front end (`mod2n1_preproc`)

Adding the constant K costs one row of half adders. For each bit:

| bit        | adds              | sum `s_i`        | carry `c_i` (weight 2^(i+1)) |
|------------|-------------------|------------------|------------------------------|
| 0 … n−1    | a_i + b_i + 1     | `~(a_i ^ b_i)`   | `a_i \| b_i`                 |
| n          | a_i + b_i         | `a_n ^ b_n`      | `a_n & b_n`                  |

so `M = S + 2C`. Column 0 of that sum holds `s_0` alone, column i (1 … n)
holds `s_i` and `c_{i−1}`, and column n+1 holds `c_n` alone. For columns 1 … n
the block gives

    g_i = s_i & c_{i−1}     p_i = s_i | c_{i−1}     h_i = s_i ^ c_{i−1}

Since column 0 cannot produce a carry, `m_{n+1} = c_n | G_{n,1}`, where
`G_{j,k}` / `P_{j,k}` are the group generate / propagate of columns j down
to k.

## The carry network (`mod2n1_tpp_tree`)

This is the part that needs the most care. The carry-in
`cin = ~m_{n+1} = ~(c_n | G_{n,1})` depends on the carry out of the *whole*
word, and it must then travel back up through the low columns. A second
carry pass would double the delay. Instead, every column's carry is written
in closed form. With `G*_{i,1}` the carry into column i+1 of S + 2C + cin:

    G*_{i,1} = G_{i,1} | P_{i,1} & G*_0,          G*_0 = s_0 & cin

Expanding `G_{n,1}` inside `cin` and simplifying (the group of columns 1 … i
can be dropped from it, because wherever it matters `G_{i,1}` already
decides the result) gives, for 1 ≤ i ≤ n−1,

    G*_{i,1} = G_{i,1} | P_{i,1} & s_0 & ~[ (c_n | g_n, p_n) o (G_{n−1,i+1}, P_{n−1,i+1}) ].g

Here `o` is the usual prefix operator
`(g, p) o (g', p') = (g | p & g', p & p')` (`gp_dot` in `mod2n1_pkg`), and
`.g` takes the generate half. The term in brackets is a *suffix* group: the
columns above i, with column n's generate widened by `c_n`. Leaving out the
`(c_n | g_n, p_n)` operand gives a wrong `cin` whenever `c_n = 1`, that is
for A = B = 2^n.

The block evaluates that formula with two trees side by side, each of
`clog2(N)` levels:

* a **prefix** Kogge-Stone tree over columns 1 … n−1, giving
  `(G_{i,1}, P_{i,1})` for every i;
* a **suffix** Kogge-Stone tree over columns n … 1. Its leaf at column n is
  `(c_n | g_n, p_n)`, and it gives the group of columns n … j for every j.

One row of AND-OR gates then merges them:
`gstar[i] = pre[i].g | pre[i].p & s0 & ~suf[i+1].g`. The suffix group of all
columns, `suf[1].g`, is `m_{n+1}`, so `cin = ~suf[1].g` and
`gstar[0] = s0 & cin`. The block also outputs `g_lo = G_{n−1,1}` for the top
bit.

The node placement (Kogge-Stone, radix 2) is this design's choice. Any
log-depth prefix layout computes the same groups and may be swapped in
without touching the other blocks.

## The low sum bits (`mod2n1_sum`)

    r_0 = s_0 ^ cin
    r_i = h_i ^ G*_{i−1,1}        1 ≤ i ≤ n−1

## The top bit r_n (`mod2n1_msb`)

Column n adds four bits: `s_n`, `c_{n−1}`, the correction bit `~m_{n+1}` and
the carry `G*_{n−1,1}`. Only their parity is needed, because R < 2^(n+1).
Folding `m_{n+1} = c_n | g_n | p_n & G_{n−1,1}` into the first three terms
(using `s_n & c_n = 0` and `c_n ⇒ ~c_{n−1}`) leaves

    r_n = ( c_n | s_n & c_{n−1} | (s_n | c_{n−1}) & ~G_{n−1,1} ) ^ ~G*_{n−1,1}

Built as written, this adds a gate level after the tree. Instead, the left
term is written as the complement of one prefix node whose operand comes
straight from the input bits:

    gamma = ~(a_n | b_n | c_{n−1})
    pi    = ~(a_n & b_n | (a_n | b_n) & c_{n−1})
    r_n   = ~[ (gamma, pi) o (G_{n−1,1}, P_{n−1,1}) ].g  ^  ~G*_{n−1,1}

`gamma` and `pi` take two and three gate delays, so they are ready before the
tree's outputs and r_n does not lengthen the critical path. The
uncorrected rule r_n = ~c_n & P_n & s_0 is true whenever A + B = 2^n, but it
is also true for many other inputs. For N = 4, A = B = 12 gives 24 mod 17 = 7
(r_4 = 0), while the old rule gives 1. Over all 257 × 257 in-range pairs
for N = 8, the old rule is wrong on 6273. The testbenches count these cases
as a check that they exercise the difference.

## Interface and timing

`mod2n1_adder #(parameter int unsigned N = 8)`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`  | in  | N+1   | operand, 0 … 2^N (bit N set only for 2^N) |
| `b`  | in  | N+1   | operand, 0 … 2^N |
| `r`  | out | N+1   | (a + b) mod (2^N + 1) |

Operands above 2^N are outside the domain, and the result for them is
unspecified. The adder is purely combinational: there is no clock, reset or
register. Its depth is the carry-save row, `clog2(N)` prefix levels, the merge
row and the final XOR. In unit-gate terms (AND/OR = 1, XOR = 2) this is about
6 + 2·log2 N. The RTL is behavioural, so that figure is not checked by
simulation. Pipeline registers, if needed, go outside the module.

## Files

| file | content |
|------|---------|
| `rtl/mod2n1_pkg.sv` | `gp_t` (generate, propagate) struct, `gp_dot` prefix operator |
| `rtl/mod2n1_preproc.sv` | carry-save row; g, p, h per column |
| `rtl/mod2n1_tpp_tree.sv` | prefix and suffix trees, merge row, `cin`, `G_{n−1,1}` |
| `rtl/mod2n1_sum.sv` | r_0 … r_{n−1} |
| `rtl/mod2n1_msb.sv` | (gamma, pi) node and r_n |
| `rtl/mod2n1_adder.sv` | top level |
| `tb/mod2n1_ref_pkg.sv` | integer reference model used by all testbenches |
| `tb/tb_mod2n1_*.sv` | self-checking testbenches |

## Verification

Each testbench compares against values from plain integer arithmetic
(`tb/mod2n1_ref_pkg.sv`: sums, shifts and remainders), never against the gate
equations. Each one ends by printing `TB_RESULT checks=… failures=…`.

| testbench | what it covers |
|-----------|----------------|
| `tb_mod2n1_preproc` | all 257² pairs (N = 8): per-bit s/c, S + 2C = A + B + 2^N − 1, g/p/h |
| `tb_mod2n1_tpp_tree` | all pairs: cin, every G*_i, G_{N−1,1}; both cin values occur |
| `tb_mod2n1_sum` | all pairs: r[N−1:0] |
| `tb_mod2n1_msb` | all pairs: r_N; counts pairs where the old rule would fail |
| `tb_mod2n1_adder` | the top at its default N = 8, all 66049 pairs. It counts wrap and no-wrap, a full carry ripple, r_N = 1, a 2^N operand and old-rule-wrong cases, and fails if any never occurs |
| `tb_mod2n1_adder_sizes` | N = 4 (counter-example 12 + 12 → 7, then exhaustive), N = 5 and N = 2 exhaustive, N = 16 and 32 with corners and 100000 random pairs |

All of them pass. Each one also fails when a deliberate fault is put into
its block.

Running one with Verilator, for example the top-level test:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_mod2n1_adder \
        rtl/mod2n1_pkg.sv tb/mod2n1_ref_pkg.sv rtl/mod2n1_preproc.sv \
        rtl/mod2n1_tpp_tree.sv rtl/mod2n1_sum.sv rtl/mod2n1_msb.sv \
        rtl/mod2n1_adder.sv tb/tb_mod2n1_adder.sv
    ./obj_dir/Vtb_mod2n1_adder

Each run takes well under a second.

## Departures and open points

* The arrangement of the prefix nodes is not fixed by the published
  equations. Kogge-Stone trees and a separate merge row are used here, so the
  node count and wiring will differ from other TPP layouts with the same
  depth.
* The published correction states that the uncorrected top-bit rule fails
  on 25 % of the inputs for n = 8. Counting over the 257 × 257 in-range pairs
  gives 6273 / 66049 ≈ 9.5 %, and over all 9-bit patterns ≈ 9.7 %. The
  design does not depend on this figure.
* The closed form for G*_{i,1} is published for 1 ≤ i ≤ n−2. For
  i = n−1 the group of columns n−1 … i+1 is empty, and the bracket reduces
  to the single operand (c_n | g_n, p_n). For i = 0 the carry is
  s_0 & cin, as above. Both cases follow from
  G*_{i,1} = G_{i,1} | P_{i,1} & G*_0, and the exhaustive tests cover them.
