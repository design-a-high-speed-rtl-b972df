# Complex multiplier on a 2x2-cell divide-and-conquer multiplier

This design multiplies complex numbers `(ar + j·ai) · (br + j·bi)`. Every real
multiplication inside it runs on one small unsigned multiplier family. That
family is built entirely from a 2x2-bit cell made of four AND gates and two
half adders.

A 4x4 multiplier is four 2x2 cells, one for each pair of 2-bit operand
halves, plus an adder network that sums the four partial products. Two adder
networks are provided:

* **Architecture 1** uses full-width adders: 8-bit adders for a 4x4 product.
* **Architecture 2** uses half-width ripple carry adders: 4-bit adders for a
  4x4 product.

Larger N x N multipliers repeat the same halving step. The complex multiplier
comes in two forms, one with four real multipliers and one with three. Both
are instantiated side by side in the top level.

Everything is combinational. There is no clock, no reset and no handshake.
Outputs settle one propagation delay after the inputs change.

## Module map

```
cmul_top                      both complex solutions on shared operands
├── cmul4                     four-multiplier solution
│   └── pm_smul (x4)          signed wrapper: sign-magnitude around the core
│       └── pm_mult           N x N unsigned multiplier, halving tree
└── cmul3                     three-multiplier solution
    ├── pm_smul (x2)          N x N signed products
    └── pm_smul EXT=1 (x1)    (N+1) x (N+1) signed product, same N x N core
        └── pm_mult
              ├── pm_mult4x4_a1 / pm_mult4x4_a2   (level 2, per ARCH)
              │     ├── pm_mult2x2 (x4)  ── pm_half_adder (x2)
              │     └── pm_combine_a1 / pm_combine_a2 ── pm_rca ── pm_full_adder
              └── pm_combine_a1 / pm_combine_a2   (levels above 4x4)
pm_pkg                        arch_e enum (ARCH_WIDE = 1, ARCH_RCA = 2)
```

## The 2x2 cell (`pm_mult2x2`)

With `a = a1a0` and `b = b1b0`:

```
p0 = a0·b0
HA1: a1·b0 + a0·b1      -> p1, carry c1
HA2: a1·b1 + c1         -> p2, p3
```

So `p3 p2 p1 p0 = a · b`.

## Summing four sub-products: the two architectures

Write an operand of width `N = 2H` as a high half and a low half, `a = aH·2^H + aL`.
The four sub-products are `q_ll = aL·bL`, `q_hl = aH·bL`, `q_lh = aL·bH`
and `q_hh = aH·bH`. Each is 2H bits wide. Then

```
p = q_ll + (q_hl + q_lh)·2^H + q_hh·2^(2H)
```

The two architectures differ only in how they add these four terms.

**Architecture 1 (`pm_combine_a1`, full-width adders).** `q_ll` and
`q_hh·2^2H` do not overlap, so `{q_hh, q_ll}` is formed by wiring alone. Two
4H-bit ripple adders then add `q_hl·2^H` and `q_lh·2^H` one after the other.
For the 4x4 multiplier these are two 8-bit adders. The carries run the full
product width twice.

**Architecture 2 (`pm_combine_a2`, half-width ripple adders).** It uses three
2H-bit ripple carry adders:

```
p[H-1:0]   = q_ll[H-1:0]                          wiring
RCA1:  x,c1 = q_hl + q_lh
RCA2:  y,c2 = x + q_ll[2H-1:H]
p[2H-1:H]  = y[H-1:0]
RCA3:  p[4H-1:2H] = q_hh + { (c1|c2) at bit H, y[2H-1:H] }
```

`c1` and `c2` are never both 1. If `q_hl + q_lh` overflows, `x` is at most
`2^2H − 2^(H+2) + 2`, so adding `q_ll`'s upper half cannot overflow again.
Their OR is therefore their sum. For the 4x4 multiplier these are three 4-bit
ripple carry adders.

Both networks leave their final carry-out unused, because a product always
fits in 4H bits.

**Which architecture is faster?** The design intent is that the complex
multiplier uses the architecture with the shorter path delay. This RTL does
not settle that question. Architecture 2 is the default, because its carry
chains are half as long. The `ARCH` parameter (type `pm_pkg::arch_e`) selects
the other architecture throughout the hierarchy.

## N x N by halving (`pm_mult`)

`N` must be a power of two. `N = 2` is the 2x2 cell itself. For `N >= 4` the
halving is unrolled into levels, each held in a generate block `g_lv[k]` with
slice width `S = 2^k`:

* **Level 2** holds `(N/4)^2` 4x4 multipliers of the chosen architecture, one
  for every pair of 4-bit operand slices.
* **Level k > 2** builds each S x S product of slices `i, j` with one
  combine network, from the four products `(2i, 2j)`, `(2i+1, 2j)`,
  `(2i, 2j+1)` and `(2i+1, 2j+1)` of level k−1.

The single product at level `log2 N` is the result. This structure is the
4x4 construction applied repeatedly. It is one natural reading of an N x N
multiplier in this style; it is not a netlist taken from elsewhere.

## Signed operands (`pm_smul`)

The complex parts are two's complement, but the multiplier core is unsigned.
`pm_smul` converts each operand to a magnitude, multiplies the magnitudes,
and negates the product when exactly one operand is negative. The most
negative value, −2^(N−1), has magnitude 2^(N−1), which still fits in N bits.

The three-multiplier solution needs `(ar+ai)·(br+bi)`, whose operands are
N+1 bits wide, with magnitudes up to 2^N. With `EXT = 1`, `pm_smul` splits
each magnitude as `xh·2^N + xl` and computes

```
|x|·|y| = xl·yl  +  ((xh ? yl : 0) + (yh ? xl : 0))·2^N  +  (xh & yh)·2^2N
```

The N x N core still does the whole `xl·yl` product. Only AND-gated
correction terms are added, with plain `+`. The extra bit is used only when
both sums equal −2^N, that is, when all four parts are −2^(N−1).

## The two complex multipliers

| module  | real multiplications                              | results                         |
|---------|---------------------------------------------------|---------------------------------|
| `cmul4` | ar·br, ai·bi, ar·bi, ai·br (four N x N)           | pr = ar·br − ai·bi, pi = ar·bi + ai·br |
| `cmul3` | k1 = ar·br, k2 = ai·bi (N x N), k3 = (ar+ai)(br+bi) ((N+1) x (N+1)) | pr = k1 − k2, pi = k3 − k1 − k2 |

Results are `2N+1` bits signed. The extra bit is needed because
`ar·bi + ai·br` reaches +2^(2N−1) when all four parts are −2^(N−1). Both
modules give identical outputs for every input. The pre-adders and
post-adders of the complex stage are written as plain `+`/`−`, so the
synthesis tool chooses their structure. Only the real multipliers are built
from the cells above.

## Top level (`cmul_top`)

| port                    | dir | width | meaning                            |
|-------------------------|-----|-------|------------------------------------|
| `ar`, `ai`, `br`, `bi`  | in  | N     | operand parts, two's complement    |
| `pr4`, `pi4`            | out | 2N+1  | product from the four-multiplier solution |
| `pr3`, `pi3`            | out | 2N+1  | product from the three-multiplier solution |

| parameter | default          | meaning |
|-----------|------------------|---------|
| `N`       | 8                | width of each complex part; power of two, ≥ 2 |
| `ARCH`    | `pm_pkg::ARCH_RCA` | summation network for every multiplier: `ARCH_RCA` (architecture 2) or `ARCH_WIDE` (architecture 1) |

The default N = 8 matches 8-bit operand buses. In that setting the product of
`00000010` and `00000011` is `00000110`, and the top-level test applies this
vector.

## How far to trust it, and where it is this design's own choice

Everything was simulated with two-state Verilator. Every module is also
accepted by Verilator lint (`-Wall`) and by the slang front end of Yosys.

* **Exhaustively tested:** the 2x2 cell (16 pairs), both 4x4 architectures
  (256 pairs each), `pm_mult` at N = 2, 4 and 8 in both architectures, the
  4-bit `pm_rca` with carry-in, and both complex multipliers at N = 4
  (all 65,536 operand sets).
* **Corners and random vectors:** N = 16 for `pm_mult`; N = 8 for the complex
  multipliers and the top level, in both architectures. The corners are all
  combinations of −128, −127, −1, 0, 1 and 127, plus 100,000 random sets.
* **Fault tests:** each testbench was also run against a copy of its module
  with one deliberate fault, and each caught the fault.

The following are this design's own choices, not given by the structure
described above:

* The order of the additions inside both summation networks. Only the adder
  widths are fixed: 8-bit for architecture 1 and 4-bit ripple carry for
  architecture 2 at 4x4.
* The extension to N x N by repeated halving.
* The default architecture (2). Which architecture is faster is not settled
  here.
* Two's complement operands, sign-magnitude conversion, and the (N+1)-bit
  extension in `pm_smul`.
* The three-multiplier identity `k3 − k1 − k2` (Gauss's form).
* The operand width N = 8 and the 2N+1-bit result width.
* Combinational operation with no pipeline registers.
* Placing both complex solutions in one top level.

Not modelled:

* Adiabatic (energy-recovery) circuit techniques. They are a
  transistor-level, power-clocked gate style; the RTL gives only the logic
  function those gates compute.
* The bypassing array multipliers and the aging-aware variant with adaptive
  hold logic and Razor flip-flops. They are earlier designs that this one is
  compared against, not part of it.
* Timing and power figures. They come from a synthesized netlist, and none
  are claimed here.

## Simulating

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. From the directory
holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pm_pkg.sv tb/tb_cmul_top.sv \
          --top-module tb_cmul_top -Mdir obj_top
./obj_top/Vtb_cmul_top
```

| testbench             | covers |
|-----------------------|--------|
| `tb_pm_rca`           | ripple carry adder, 4-bit exhaustive and 8-bit random |
| `tb_pm_mult2x2`       | 2x2 cell |
| `tb_pm_mult4x4_a1/_a2`| 4x4 multipliers, both architectures |
| `tb_pm_mult`          | N x N at N = 2, 4, 8, 16, both architectures |
| `tb_cmul4`, `tb_cmul3`| complex multipliers, N = 8 in both architectures, N = 4 exhaustive |
| `tb_cmul_top`         | top level at default parameters, end to end |
| `tb_cmul_top_wide`    | top level with `ARCH_WIDE` |

`tb_cmul_top` also counts how often each of these events occurs:

* a negated product;
* use of the (N+1)-bit extension;
* an imaginary result that needs the extra output bit;
* a −2^(N−1) operand.

It fails if any of them never happens. Every run takes under a second.

To change the size, set `N` to another power of two on `cmul_top`,
`cmul4`, `cmul3` or `pm_mult`. Any other value stops elaboration with an
`$error`.
