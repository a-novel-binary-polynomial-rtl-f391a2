# Composite M-term Karatsuba / schoolbook multiplier for GF(2^n)

Multiplying two elements of a binary field GF(2^n) takes two steps. First the
two n-bit operands, read as polynomials with 0/1 coefficients, are multiplied
as polynomials: a carry-less product of 2n-1 bits. Then that product is
reduced modulo an irreducible polynomial of degree n. Almost all the cost is in
the first step. This RTL builds that step as a tree of *M-term Karatsuba-like*
splits with *schoolbook* multipliers at the leaves, and follows it with a
reduction stage.

The design trades two costs against each other:

* The **schoolbook multiplier** (SBM) ANDs every pair of operand bits and XORs
  the pairs of equal weight: n² AND gates and (n-1)² XOR gates. It has very
  little logic depth but quadratic area.
* **Karatsuba-Ofman** splits each operand in two halves and gets the product
  from three half-size products instead of four. Applied recursively it saves
  area, but each level of recursion adds XOR stages to the critical path.
* An **M-term Karatsuba-like** step splits each operand into M parts and gets
  the product from fewer than M² part products. Larger M means fewer levels
  of recursion, so less depth, but more sub-multipliers per level.

The composite multiplier uses L levels of M-term steps at the top, where the
operands are long and the area saving pays off. Below them it uses one
schoolbook step, where the operands are short and a flat AND/XOR array is
fastest. M (2..7) and L (1..3) are parameters. The right choice depends on the
operand size and the target technology, and is made by synthesising the
candidates and comparing area × delay.

The default configuration is a GF(2^232) multiplier with M = 3 and L = 2:

```
232-bit operands --pad--> 234 = 3 x 78      (level 1: 6 products of 78 bits)
 78-bit operands          78 = 3 x 26       (level 2: 6 products of 26 bits each)
 26-bit operands          36 schoolbook 26x26 multipliers (24 336 AND gates)
```

Everything is combinational: there is no clock and no register. Register the
ports outside the module if you need a pipelined unit.

## One M-term step

Write an operand as A(x) = Σ A_i·y^i with y = x^S. Here the parts A_i have
S = ceil(n/M) bits each, and the operand is zero-padded to M·S bits. The
product is then

    A·B = Σ_c R_c · y^c ,   R_c = Σ_{i+j=c} A_i·B_j ,   c = 0 .. 2M-2 .

A Karatsuba-like formula computes K products of *sums of parts*,

    P_k = (Σ_{i∈S_k} A_i) · (Σ_{i∈S_k} B_i) ,

and obtains each R_c as an XOR of some of the P_k. Over GF(2) addition is XOR,
so the step needs no subtraction and no carries. A step has three parts:

1. **Pre-addition** (`mterm_preadd`, one instance per operand). XOR the parts
   listed in S_k to form the operands of sub-multiplier k.
2. **Sub-multiplication.** K multipliers of S bits, which are either further
   M-term steps or, at the bottom, schoolbook multipliers.
3. **Reconstruction** (`mterm_recon`). XOR the products into the
   coefficients R_c (each 2S-1 bits wide). Then place R_c at bit offset c·S.
   Neighbouring coefficients overlap by S-1 bits, and the overlapping bits are
   XORed together.

The formulas live in `kara_pkg` as two tables, `prod_set(M,k)` = S_k and
`recon_set(M,c)` = the products XORed into R_c. The two step modules only read
these tables, so you can swap in another formula by editing the package.

| M | products K | formula |
|---|-----------|---------|
| 2 | 3  | Karatsuba-Ofman: A0B0, A1B1, (A0+A1)(B0+B1) |
| 3 | 6  | the three squares A_iB_i and the three pair sums (A_i+A_j)(B_i+B_j) |
| 4 | 9  | table |
| 5 | 13 | table |
| 6 | 17 | table |
| 7 | 22 | table |

For M = 2 and 3 the reconstruction is
R_c = Σ_{i<j, i+j=c} (P_ij + P_i + P_j) + P_{c/2} (the last term only for
even c). For example, with M = 3, R_1 = P_01 + P_0 + P_1 and
R_2 = P_02 + P_0 + P_2 + P_1.

The product counts for M = 4..7 are those of the best known Karatsuba-like
formulas (9, 13, 17, 22). The subsets in the tables were found by searching for
subset-sum products whose GF(2) span contains every R_c. The reconstruction
column is the linear combination that rebuilds each R_c. Every table keeps the
end squares A_0B_0 and A_{M-1}B_{M-1}, so R_0 and R_{2M-2} are single
products. The middle coefficients of the larger formulas need many products
each: `recon_set` XORs up to 22 terms into one coefficient for M = 7. The
whole M = 4..7 reconstruction costs 16, 32, 48 and 92 XORs of coefficient
width per step. These are correct formulas, but they are not tuned for XOR
count or depth. Tuning them is the first place to look for a faster M ≥ 4
step.

### Zero padding

When n is not a multiple of M, the operand is padded up to M·S bits. The
padding only adds coefficients above x^(2n-2), and those are always zero.
`mterm_kara` drops them. Padding happens again at each level, for example
232 → 234 → 3 × 78 → 3 × 26 in the default configuration, or
409 → 413 = 7 × 59 → 63 = 7 × 9 with M = 7, L = 2.

## The recursion: composite and pure M-term modes

`mterm_kara #(N, M, L, TAIL2)` is one recurrence stage and instantiates
itself for its K sub-products:

* L > 0: do an M-term step, with K children of size ceil(N/M) and L-1 levels.
* L = 0, TAIL2 = 0: one schoolbook multiplier. This is the **composite**
  leaf.
* L = 0, TAIL2 = 1: two-term Karatsuba steps down to single bits. This is the
  tail of the **pure M-term** multiplier. Using two-term steps at the last
  levels avoids padding a short operand up to M parts (a 2-bit operand split
  seven ways would carry five zero parts).
* N = 1: a single AND.

`kara_mult_top` selects the mode with `MODE`:

* `KMODE_COMPOSITE` (the default) uses `L` M-term levels followed by
  schoolbook leaves.
* `KMODE_MTERM` does M-term steps while the operand is longer than M bits
  (`kara_pkg::pure_levels`), then two-term steps down to single bits. `L` is
  ignored in this mode.

For M = 2, the pure mode is plain recursive Karatsuba-Ofman.

Area grows as K^L · (leaf size)², and depth as L times the depth of one step
plus the depth of the leaf. Deep pure M-term trees have many instances: K^L
leaves. For example, 232 bits with M = 7 has 22 × 22 × 27 single-bit leaves.
They elaborate correctly but make simulation builds slow.

## Reduction

`gf2m_reduce #(N, FLOW)` reduces the 2N-1 bit product modulo
f(x) = x^N + FLOW(x). Working down from the top coefficient to x^N, each set
coefficient x^i is cleared, and FLOW is XORed in at x^(i-N). This uses
x^N ≡ FLOW(x). The loop unrolls into a fixed XOR network, which is small for
a sparse f.

The default field polynomial is f = x^232 + x^9 + x^4 + x^2 + 1. It is the
least irreducible pentanomial of degree 232; no trinomial of degree 232 is
irreducible. Set `FLOW` for any other field. The testbenches use the least
irreducible pentanomials of degree 64 (x^4+x^3+x+1), 100 (x^6+x^5+x^2+1),
282 (x^6+x^3+x^2+1), 409 (x^7+x^5+x^3+1) and 750 (x^14+x^13+x^8+1). For
standard curves use their own polynomials, for example x^409 + x^87 + 1 for a
409-bit field.

## Modules

| file | what it is |
|------|-----------|
| `rtl/kara_pkg.sv` | mode enum, formula tables, `num_products`, `pure_levels`, helper functions |
| `rtl/sbm_mult.sv` | schoolbook multiplier, `N` bits → `2N-1` bits |
| `rtl/mterm_preadd.sv` | pre-addition of one M-term step |
| `rtl/mterm_recon.sv` | reconstruction of one M-term step |
| `rtl/mterm_kara.sv` | recursive multiplier node (composite or pure M-term) |
| `rtl/gf2m_reduce.sv` | reduction modulo x^N + FLOW |
| `rtl/kara_mult_top.sv` | top: multiplier + reduction |

Top-level interface (`kara_mult_top`). Bit i of every vector is the
coefficient of x^i.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`, `b` | in | N | operands |
| `prod` | out | 2N-1 | unreduced product a·b |
| `res` | out | N | a·b mod f |

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 232 | operand size |
| `M` | 3 | terms per Karatsuba-like step, 2..7 |
| `L` | 2 | M-term levels above the schoolbook leaves (composite mode) |
| `MODE` | `KMODE_COMPOSITE` | or `KMODE_MTERM` |
| `FLOW` | x^9+x^4+x^2+1 | f(x) − x^N |

## Verification

Each testbench in `tb/` checks its block against reference arithmetic in
`tb/gf2_ref_pkg.sv`, which is written independently of the RTL. The reference
uses a shift-and-XOR carry-less product and a long-division reduction. Each
testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | covers |
|-----------|--------|
| `tb_sbm_mult` | 6-bit exhaustive, 26-bit random and corner cases |
| `tb_mterm_preadd` | M = 2..7 operand words; product counts and distinct subsets of every table |
| `tb_mterm_recon` | M = 2..7: preadd → reference sub-products → recon must equal the full product (checks the formulas themselves) |
| `tb_mterm_kara` | composite M = 3/5/7/2 with L = 1..3, pure mode M = 4 and M = 2 |
| `tb_gf2m_reduce` | AES field, all 65 536 byte pairs, against a shift-and-add field multiply and the FIPS-197 example {57}·{83} = {c1}; 232-bit field against long division |
| `tb_kara_mult_top` | default top plus pure mode (n = 64, M = 5), M = 7 L = 1 (n = 100) and M = 2 L = 3 (n = 64). Counts that zero padding, schoolbook leaves, the two-term tail and reduction folding all occur |
| `tb_kara_mult_full` | the default GF(2^232) multiplier, no parameter overrides, 500 multiplications |
| `tb_kara_workloads` | n = 282 (M=2, L=3), 409 (M=7, L=2), 750 (M=5, L=2) and 232 (M=7, L=1) |
| `tb_kara_design_space` | n = 232 with M = 2..7 and L = 1, 2, plus L = 3 for M = 2..4 (15 configurations) |

Operands are random words plus corner cases: all ones, zero, the single top
bit, the single bit 0, and sparse values.

To run one testbench with Verilator, list the packages first:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/kara_pkg.sv tb/gf2_ref_pkg.sv tb/tb_kara_mult_full.sv \
    --top-module tb_kara_mult_full
./obj_dir/Vtb_kara_mult_full
```

Verilator finds the other modules through `-Irtl`. Build time grows with the
number of multiplier instances: the design-space testbench takes about two
minutes to build. Every run then finishes in about a second. M = 5..7 with
L = 3 at 232 bits (2 197 to 10 648 leaf multipliers) uses only tested
formulas and recursion, but was not simulated because the build takes too long.

## Trust and limits

* Every configuration in the tables above matches the reference on all
  checks. The formulas for M = 4..7 are checked as algebraic identities in
  `tb_mterm_recon`, and again inside full multipliers.
* The multiplier is combinational only. It has no pipelining, handshake or
  reset. Timing closure at a given clock is up to the user: for a clocked
  design, place registers around the top.
* The M = 4..7 formulas have the best known product counts, but their
  reconstruction networks are not minimised (see above). Area and delay
  figures for those M are likely worse than with hand-optimised formulas.
* The choice of M and L is left to the user. The defaults (M = 3, L = 2) are
  a reasonable point for 232 bits, not the result of a measured
  area × delay sweep.
* In pure M-term mode the switch to two-term steps happens once the operand is
  no longer than M bits. This is one reasonable rule; others are possible.
* Lint: when `mterm_kara` is linted as the top of its own hierarchy,
  Verilator does not expand its self-instances and reports their nets as
  unused or undriven. Inside `kara_mult_top` the hierarchy is complete and
  those warnings do not appear. The high bits of each step's rebuilt product are left unread on
  purpose: they are products of the zero padding.
