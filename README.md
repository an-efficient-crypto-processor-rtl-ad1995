# Binary Huff Curve point-multiplication processor over GF(2^233)

This RTL computes the elliptic-curve point multiplication Q = k·P on a
*binary Huff curve*

    a·x·(y² + y + 1) = b·y·(x² + x + 1)        over GF(2^233)

with a single, non-pipelined datapath. A Huff curve has a *unified* addition
law: the same formula adds two different points and doubles a point. The
processor runs the same 37-instruction sequence for a doubling and for an
addition, so the arithmetic of the two operations is the same. Left-to-right
double-and-add is built on that sequence. The result is converted back to
affine coordinates with an Itoh–Tsujii inversion.

The datapath holds one adder, one multiplier and one squarer around a 24-entry
register array. A controller steps through the instructions one per state.
Six polynomial multipliers can be built into the datapath. They trade area
against the cycles per field multiplication (n). The default is a
least-significant-digit-parallel multiplier with n = 1, and with it one point
multiplication takes **13,124 cycles** for a key with 116 ones below its top bit.

## Arithmetic

* Field: GF(2^233), polynomial basis, reduction polynomial
  f(x) = x^233 + x^74 + 1 (the NIST B-233 trinomial). An element is a 233-bit
  vector whose bit i is the coefficient of x^i.
* Addition: XOR (`gf_add`).
* Squaring: put a zero between the bits, then reduce (`gf_sqr`).
* Reduction (`gf_reduce`, function `bhc_pkg::reduce`): x^233 = x^74 + 1, so the
  upper half of a 465-bit product is added back at offsets 0 and 74. That leaves
  coefficients up to x^305, and a second fold of the same kind clears them. It
  is combinational.
* Multiplication: a 465-bit unreduced product followed by `gf_reduce`
  (`bhc_mul_unit`).

## The unified addition law as instructions

Projective points are (X : Y : Z) with x = X/Z, y = Y/Z. The curve enters only
through two precomputed constants, α = (a+b)/b and β = (a+b)/a, which are
inputs of the processor. For inputs (X1,Y1,Z1) and (X2,Y2,Z2):

    m1 = X1X2   m2 = Y1Y2   m3 = Z1Z2
    m4 = (X1+Z1)(X2+Z2)     m5 = (Y1+Z1)(Y2+Z2)
    m6 = m1m3   m7 = m2m3   m8 = m1m2 + m3²
    m9 = m6(m2+m3)²         m10 = m7(m1+m3)²
    m11 = m8(m2+m3)         m12 = m8(m1+m3)
    Z3 = m11(m1+m3)
    X3 = α·m9  + (m4+m11)m11 + m11² + Z3
    Y3 = β·m10 + (m5+m12)m12 + m12² + Z3

`bhc_ucode_rom` splits this into 37 single-operator instructions:
17 multiplications, 15 additions and 5 squarings. t1..t12 live in registers
6–17 and the scratch values T1..T3 in 18–20. The inputs are no longer read
after instruction 9. So Z3 (instruction 23), X3 (30) and Y3 (37) are written
straight over the accumulator Q, and the result needs no copy.

Register map of the 24 × 233-bit array:

| address | content            | address | content                 |
|---------|--------------------|---------|-------------------------|
| 0–2     | Q = (X, Y, Z)      | 18–20   | T1, T2, T3              |
| 3–5     | P = (xp, yp, 1)    | 21, 22  | affine x, y of the result |
| 6–17    | t1 … t12           | 23      | Z⁻¹                     |

## Control sequence

`bhc_control` runs the micro-program as follows. The ROM index is the state
number minus 1.

| states   | work                                        | cycles        |
|----------|---------------------------------------------|---------------|
| 0        | idle, wait for `start`                       | –             |
| 1–3      | Q = P = (xp : yp : 1)                        | 3             |
| 4–40     | Q = UAL(Q, Q): doubling                      | 17n + 20      |
| 41–77    | Q = UAL(P, Q): addition, only if k_i = 1     | 17n + 20      |
| 78–98    | Z⁻¹ by Itoh–Tsujii                           | 10n + 232     |
| 99–100   | x = X·Z⁻¹, y = Y·Z⁻¹                         | 2n            |
| output   | capture x, y; pulse `done`                   | 1             |

At the end of each doubling the controller tests key bit k_i. If it is 1 the
addition follows, otherwise the next doubling starts. The bit index runs from
231 down to 0. Bit 232 must be 1 and is accounted for by starting with Q = P.
After bit 0, the doubling and the addition if k_0 = 1, the inversion starts. In total:

    cycles = 3 + (17n+20)(m−1) + (17n+20)·wt + (10n + m−1) + 2n + 1

Here m = 233 and wt is the number of ones in k[231:0]. The additions are
skipped for zero bits, so the run time depends on the key's Hamming weight. The
unified formula makes each step look the same, but it does not hide how many
steps run.

**Inversion.** Z⁻¹ = Z^(2^233 − 2) = (Z^(2^232 − 1))². β_j denotes
Z^(2^j − 1). It is built along the addition chain
1, 2, 3, 6, 7, 14, 28, 29, 58, 116, 232, using
β_(i+j) = (β_i)^(2^j) · β_j with j = i or j = 1. That is 10 multiplications and
squaring runs of 1, 1, 3, 1, 7, 14, 1, 29, 58 and 116. One final squaring
follows, for 232 squarings in all. A squaring instruction carries a repeat count. Its
first cycle squares the source register and the later cycles square the
destination in place, one squaring per cycle.

**Multi-cycle multipliers.** A multiplication instruction holds `mul_go` and its
operand addresses until the multiplier raises `mul_last`. The result is written
in that cycle. An assertion in `bhc_control` checks that the operands stay put.

## Multipliers

`bhc_pm_top #(.MUL_KIND(...))` chooses one. Every multiplier takes two 233-bit
operands and returns the 465-bit unreduced product.

| MUL_KIND         | module                 | n (cycles) | how                                                         |
|------------------|------------------------|-----------:|-------------------------------------------------------------|
| `MUL_LSD` (default) | `lsd_mul`           | 1   | B cut into 32-bit digits. A times every digit in parallel (265-bit partial products), shifted and XORed. |
| `MUL_HYBRID_KAR` | `hybrid_karatsuba_mul` | 1   | Two-term Karatsuba recursion 233 → 117/116 → 59/58 → 30/29 (`kara_node`). Below 30 bits, n-term Karatsuba on single bits. |
| `MUL_SCHOOLBOOK` | `schoolbook_mul`       | 232 | Bit-serial, MSB first, acc = acc·x + A·b_i. The first cycle takes the two top bits. |
| `MUL_KAR2`       | `split_mul #(.K(2))`   | 116 | Two 117-bit halves, 3 bit-serial inner products in parallel. |
| `MUL_TOOM3`      | `split_mul #(.K(3))`   | 77  | Three 78-bit parts, 6 inner products.                       |
| `MUL_TOOM4`      | `split_mul #(.K(4))`   | 58  | Four 59-bit parts, 10 inner products.                       |

`split_mul` recombines with the K-term Karatsuba identity
C = Σ M_i x^(2iw) + Σ_(i<j) (M_ij + M_i + M_j) x^((i+j)w), where
M_i = A_iB_i and M_ij = (A_i+A_j)(B_i+B_j). For K = 2 this is ordinary
Karatsuba. For K = 3 and 4 it replaces Toom–Cook interpolation, which needs
divisions awkward in characteristic 2. The split and the cycle counts are
those of 3- and 4-way Toom–Cook, but the inner-product count (6 and 10, not 5
and 7) and therefore the area are not.

Cycle totals for a key of weight 116:

| multiplier | n | total cycles |
|------------|---|-------------:|
| LSD, hybrid Karatsuba | 1 | 13,124 |
| schoolbook | 232 | 1,382,492 |
| 2-way Karatsuba | 116 | 694,844 |
| 3-way split | 77 | 463,652 |
| 4-way split | 58 | 351,020 |

## Interface of `bhc_pm_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset (clears all registers) |
| `start` | in | 1 | one-cycle pulse. `k` is latched then. |
| `k` | in | 233 | scalar, bit 232 must be 1 |
| `xp`, `yp` | in | 233 | affine base point |
| `alpha`, `beta` | in | 233 | (a+b)/b and (a+b)/a |
| `xq`, `yq` | out | 233 | affine result, held until the next `done` |
| `busy` | out | 1 | high from the cycle after `start` until the output cycle |
| `done` | out | 1 | one-cycle pulse when `xq`, `yq` are valid |

`xp`, `yp`, `alpha` and `beta` are read throughout the operation and must be
held until `done`. Nothing checks that the point lies on the curve or that
Z ≠ 0 before the inversion.

## Where this RTL makes its own choices

* **Initial point.** Q and P are both loaded with (xp : yp : 1) in three
  cycles. The register file's `dup` input writes address r and r+3 together.
  Mux_3 gets xp, yp and the constant 1 as extra inputs for this.
* **Affine y.** The result is y = Y/Z, which matches the homogeneous curve
  equation. A López–Dahab style y = Y/Z² would not lie on the curve. Of the
  "2n + 1" closing cycles, two are the multiplications and one is the output
  cycle.
* **Last key bit.** The addition for k_0 = 1 is performed before the
  inversion starts.
* **Squarer input.** The squarer takes the second operand, from register port
  C2.
* **State numbering.** The inversion uses 21 micro-instructions, one per
  addition-chain step (10 multiplications, 10 squaring runs, one final
  squaring). A squaring run stays in one state. The two affine
  multiplications are therefore states 99 and 100, and the output cycle has a
  state of its own. A tighter encoding could fit everything into states 0–99
  by merging squaring runs with the following multiplication. That would
  change no cycle count.
* **Hybrid Karatsuba.** The 30-bit threshold is this design's choice.
* **Handshakes.** `start`/`busy`/`done`, `go`/`last` on the serial
  multipliers, the register map and the instruction encoding are all this
  design's own.

## Files

* `rtl/bhc_pkg.sv` holds the field constants, types (`fe_t`, `uinstr_t`, enums
  for the ALU operation, the operand source and the multiplier), the register
  map, the ROM layout and the reduction and spreading functions.
* `rtl/bhc_pm_top.sv` is the top. Below it are `bhc_control.sv` (with
  `bhc_ucode_rom.sv`) and `bhc_datapath.sv`. The datapath contains
  `bhc_regfile.sv`, `gf_add.sv`, `gf_sqr.sv`, `gf_reduce.sv` and
  `bhc_mul_unit.sv`. The multiplier unit instantiates one of `lsd_mul.sv`,
  `hybrid_karatsuba_mul.sv` (with `kara_node.sv`), `schoolbook_mul.sv` or
  `split_mul.sv`.
* `tb/tb_gf_ref.sv` is the reference model used by the testbenches, written
  independently of the RTL. It has shift-and-add multiplication with bit-wise
  reduction, Fermat inversion, the addition law as printed above and
  double-and-add.
* `tb/tb_<module>.sv` holds one self-checking testbench per module.
  `tb_bhc_pm_top` draws a random curve and a point on it (using the half-trace),
  runs two point multiplications at the default configuration and checks the
  results against the model. It also checks that the results lie on the curve
  and that the cycle counts are exact. `tb_bhc_pm_mult_kinds` runs the other
  five multipliers side by side, about 2 minutes of simulation, dominated by
  the schoolbook's 1.38 M cycles.

Every testbench prints `TB_RESULT checks=N failures=F`. To run one with
Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/bhc_pkg.sv tb/tb_gf_ref.sv tb/tb_bhc_pm_top.sv --top-module tb_bhc_pm_top
    ./obj_dir/Vtb_bhc_pm_top

## How far it has been checked

* Every block has a testbench with values computed independently of the RTL.
  Each one also fails against a deliberately broken copy of its module.
* At the default configuration, the full point multiplication matches the
  reference model and lands on the curve, in exactly 13,124 cycles at key
  weight 116.
* All six multiplier variants give the same points and the cycle totals of
  the table above.
* Not checked: timing closure and area on any FPGA, and behaviour for
  degenerate inputs (Z = 0 during the ladder, points not on the curve).
