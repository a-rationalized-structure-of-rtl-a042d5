# A 3×3 matrix-product unit with 22 multipliers

This unit computes the product of two 3×3 matrices, Z = X·Y with
z_ij = Σ_k x_ik·y_kj, in one combinational pass. A plain parallel
implementation needs 27 multipliers. This one needs 22. It gets there by
rearranging the work into a small set of sums that form before the
multipliers, and a second set that forms after them. The scheme is a
variant of Makarov's commutative algorithm for 3×3 matrices, arranged to
need fewer additions than the original. Multipliers cost far more than
adders in both FPGA and ASIC. Saving five of them pays for the extra adders
once the operands are wider than about 8 bits. On FPGAs with embedded
multipliers it can mean one device fewer. For example, 27 products need
three devices with 12 multipliers each, while 22 fit in two.

The RTL is parameterised by the operand width `N` (default 15). It gives
exact signed results of 2N+1 bits.

## The key idea: splitting the operands into two groups

The 18 operands are split into two groups of nine:

| group | operands | feeds |
|---|---|---|
| U | row 0 of Y (y00 y01 y02), columns 1 and 2 of X (x01 x11 x21, x02 x12 x22) | first factor of each product |
| V | column 0 of X (x00 x10 x20), rows 1 and 2 of Y (y10 y11 y12, y20 y21 y22) | second factor of each product |

Every multiplier multiplies one sum of U operands by one sum of V operands.
Look at the three terms of each result element:

    z_ij = x_i0·y_0j + x_i1·y_1j + x_i2·y_2j

In the last two terms the X element is in U and the Y element is in V. In
the first term it is the other way round: y_0j is in U and x_i0 is in V. So
the unit really computes y_0j·x_i0 for that term. That is correct only
because multiplication of the elements commutes. Two consequences follow:

* The unit works for integers, fixed-point and any other commutative number
  system. It cannot be used recursively, with matrix blocks as elements.
* Seen as a bilinear map from U×V, the problem is no longer the plain 3×3
  matrix product. That is why 22 products are enough. The best known
  bilinear schemes for the plain product need 23.

Each product carries unwanted cross terms as well as the terms it is
meant to contribute. The pre-sums are chosen so that these cross terms
cancel exactly in the post-additions. Take z00 as an example, with
L1 = x02 − x12 and N3 = x00 + y20:

    M5 + M12 = (y00 − L1)·x00 + L1·(x00 + y20) = y00·x00 + x02·y20 − x12·y20
    M10 + M11 = x01·y10 + x12·y20
    z00 = M5 + M12 + M10 + M11 = x00·y00 + x01·y10 + x02·y20

## The algorithm

Shared sums over group U (first pre-adder):

    L1 = x02 − x12   L2 = x01 + x11   L3 = x01 + x21   L4 = x12 + x22
    L5 = y01 + x01   L6 = y02 − x12   L7 = x02 + x22

Shared sums over group V (second pre-adder):

    N1 = y20 − y21 + y22   N2 = y10 − y11 + y12   N3 = x00 + y20
    N4 = y10 − x10         N5 = y10 − x20         N6 = y12 + y21
    N7 = x20 − y20

The 22 products:

| | first factor (U) | second factor (V) | | first factor (U) | second factor (V) |
|---|---|---|---|---|---|
| M1 | y02 + L1 | x00 + N1 | M12 | L1 | N3 |
| M2 | y01 + L2 | x10 − N2 | M13 | L2 | N4 |
| M3 | y01 + L3 | x20 − N2 | M14 | L5 | N2 |
| M4 | y02 − L4 | x20 − N1 | M15 | x11 | y12 |
| M5 | y00 − L1 | x00 | M16 | L6 | N1 |
| M6 | y00 + L2 | x10 | M17 | x12 | y21 |
| M7 | y00 + L3 + L4 | x20 | M18 | x21 − L4 | y12 |
| M8 | y01 | x00 + N2 | M19 | L7 − L3 | y21 |
| M9 | y02 | x10 + N1 | M20 | L3 | N5 + N6 |
| M10 | x01 | y10 | M21 | L4 | N7 + N6 |
| M11 | x12 | y20 | M22 | L4 − L3 | N6 |

The post-additions use seven shared sums:

    Q1 = M10 + M11   Q2 = M10 − M14   Q3 = M17 − M18   Q4 = M19 − M22
    Q5 = M11 + M16   Q6 = M15 + M17   Q7 = M20 + M22

These give the nine results:

    z00 = M5 + Q1 + M12              z01 = M8 + Q2 + Q3 + Q4
    z02 = M1 − Q5 − M12 + Q3 + Q4    z10 = M6 − M10 + M11 + M13
    z11 = M2 − Q2 + M13 + Q6         z12 = M9 − Q5 + Q6
    z20 = M7 − Q1 + Q7 − M21         z21 = M3 − Q2 − Q3 + Q7
    z22 = M4 + Q5 − Q3 + M21

The 22 products are linearly independent. So this is the only way to write
each z_ij as a combination of them. A different post-adder would need
different products.

## The datapath, stage by stage

The unit is built as five stages, with the multiplier array between
stages 4 and 5:

1. **Input permutation.** It reorders the 18 operands so that group U comes
   first and group V second. Output k carries operand
   `BLOCK1_SRC[k] = 9 10 11 1 4 7 2 5 8 | 0 3 6 12 13 14 15 16 17`.
   Here operands 0–8 are x00…x22 and 9–17 are y00…y22, row by row.
2. **First pre-adder** (`mm3_preadd_u`). It forms L1…L7 and the 22 first
   factors. This takes 16 two-input adders and one three-input adder
   (for M7).
3. **Second pre-adder** (`mm3_preadd_v`). It forms N1…N7 and the 22 second
   factors. This takes two three-input adders (N1, N2) and 13 two-input
   adders.
4. **Operand permutation.** It interleaves the 44 factors so that
   multiplier j gets factor j of both pre-adders. Output k carries factor
   `k/2` if k is even, and factor `22 + k/2` if k is odd.
   * **Multiplier array** (`mm3_mult_array`): 22 signed multipliers, all
     working at once.
5. **Post-adder** (`mm3_postadd`). Seven two-input adders form Q1…Q7, then
   nine adders with three to five inputs form the results.

Stages 1 and 4 are wiring only. Their tables are in `mm3_pkg`, and the top
level `mm3_matmul` applies them with generate loops. Some factors are
single operands, such as M8's y01 or M10's x01/y10. The pre-adders simply
pass these through.

## Word lengths and why the results are exact

| signal | width (default) | why |
|---|---|---|
| operands | N (15) | parameter |
| factors | PW = N+3 (18) | M7's first factor sums five operands; the others need at most N+2 |
| products | 2·PW (36) | full signed product, nothing dropped |
| results | ZW = 2N+1 (31) | \|z_ij\| ≤ 3·2^(2N−2) |

The post-adder works modulo 2^ZW. It keeps only the low ZW bits of each
product and lets the intermediate sums wrap around. Each product can be
wider than the result, and so can the sums Q and partial z. Even so, the
final value is an exact integer that fits in ZW bits, and modular
arithmetic preserves it. The default N = 15 makes each factor 18 bits wide.
So every multiplier fits one 18×18 embedded FPGA multiplier.

## Choices made in this design

* **Operand and result numbering.** Operands: x row by row, then y row by
  row. Results: `z[3*i+j] = z_ij`.
* **Number format.** Signed two's complement throughout.
* **Word length.** `N = 15`, as explained above. Any N ≥ 2 works.
* **Timing.** There are no registers. The unit is purely combinational. To
  pipeline it, add registers at the stage boundaries: after the pre-adders,
  after the multipliers, or both. The multiplier array's internal structure
  is left to synthesis (`*`).
* **z10.** The reference structure forms z10 with a three-input adder,
  M6 − Q1 + M13. With the products above, that sum comes out 2·x12·y20 too
  low. This design therefore uses a four-input adder,
  M6 − M10 + M11 + M13. It is the only place where the adder structure
  differs.

## Files

| file | contents |
|---|---|
| `rtl/mm3_pkg.sv` | counts and the two permutation tables |
| `rtl/mm3_preadd_u.sv` | stage 2, first-factor pre-adder |
| `rtl/mm3_preadd_v.sv` | stage 3, second-factor pre-adder |
| `rtl/mm3_mult_array.sv` | the 22 multipliers |
| `rtl/mm3_postadd.sv` | stage 5, post-adder |
| `rtl/mm3_matmul.sv` | top level: stages 1–5 wired together |
| `tb/tb_mm3_*.sv` | one self-checking testbench per module |

Top-level ports of `mm3_matmul #(N)`:

    input  logic signed [N-1:0]  d_in [18]   // x00..x22, y00..y22
    output logic signed [2*N:0]  z    [9]    // z[3*i+j] = z_ij

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. From
the repository root:

    verilator --binary --timing -y rtl rtl/mm3_pkg.sv \
        tb/tb_mm3_matmul.sv --top-module tb_mm3_matmul -Mdir obj_matmul
    ./obj_matmul/Vtb_mm3_matmul

`-y rtl` lets Verilator find the modules by file name. The package is
named first so that it is compiled ahead of its users. For another
testbench, substitute its name, for example `tb_mm3_postadd`. All of them
finish in well under a second. The unit also passes the end-to-end test at
other widths, for example N = 4 and N = 24 (`#(.N(...))` on `mm3_matmul` and
the matching `N` in the testbench).

## How far it has been checked

* `tb_mm3_matmul` runs the unit at its default size against a direct
  27-product reference, about 27,000 matrix pairs in all. These include
  every pair of single-element matrices (each operand route and each result
  on its own), identity matrices, the all-most-negative case that gives the
  largest result, and random matrices biased towards extreme values. It also
  confirms that products wider than the result word occur, as do factors
  that need the full N+3 bits.
* Each stage has its own testbench:
  * The pre-adders are checked against coefficient tables.
  * The multipliers are checked against 64-bit products.
  * The post-adder is checked against a coefficient table derived
    independently by solving for the combination of products.
* Each testbench has been shown to fail on a deliberately broken copy of
  its module.
* The RTL passes Verilator lint and Yosys/slang elaboration. Timing and area
  have not been measured. The claimed savings in adders, area and FPGA
  devices are therefore not confirmed by this code.
