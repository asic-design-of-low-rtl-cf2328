# Carry pre-computation multiplier with operand decomposition

An unsigned 8 x 8 -> 16-bit combinational multiplier built for a low
power-delay product. Two ideas are combined:

* **Carry pre-computation.** The core is a 4 x 4 multiplier in the
  Urdhva-Tiryagbhyam ("vertically and crosswise") style. It does not add its
  partial products with a chain of adders. It computes every column carry of
  the partial-product array directly, with small multiplexers. Each product bit
  is then the XOR of its column. Four such cores and a carry-save/look-ahead
  adder stage make an 8-bit multiplier.
* **Operand decomposition.** Before multiplying, X and Y are rewritten as four
  sparser words. Two 8-bit multipliers work on those, which lowers switching
  activity. Their results are recombined into X*Y.

Everything is combinational: no clock, no reset, no handshake. The product is
valid one propagation delay after the operands settle. All operands are
unsigned.

## Block structure

```
od_mult (top, N = 8)
├── operand_decomposer        A = ~X&~Y, B = X&Y, C = ~X&Y, D = X&~Y
├── cpc_mult  u_mult_ab       A*B   (8-bit carry pre-computation multiplier)
│   ├── cpc_mult4 x 4         AH*BH, AH*BL, AL*BH, AL*BL
│   │   ├── pp_gen4           16 partial products
│   │   ├── pre_carry_logic   all column carries, multiplexer form
│   │   └── xor_logic         column parities -> 8-bit product
│   ├── csa                   3:2 row over the middle window
│   └── cla x 2               middle byte, upper nibble
├── cpc_mult  u_mult_cd       C*D   (same structure)
└── od_csa                    C*D - A*B + 255*B  ->  X*Y
    ├── csa x 2
    └── cla
```

`cpc_pkg` holds the carry bundle type `precarry_t`, which the pre-carry logic
passes to the XOR logic, and the core width.

## The 4-bit core: carries computed, not propagated

Number the partial products row by row: `pp_k = A[(k-1)%4] & B[(k-1)/4]`.
So row 1 is A*B0 (`pp1..pp4`), row 2 is A*B1 (`pp5..pp8`), shifted one column,
and so on. Column *j* (weight 2^(j-1)) then holds:

| column | partial products          | carries in  | carries out      |
|--------|---------------------------|-------------|------------------|
| 1      | pp1                       | –           | –                |
| 2      | pp2, pp5                  | –           | c2               |
| 3      | pp3, pp6, pp9             | c2          | c31, c32         |
| 4      | pp4, pp7, pp10, pp13      | c31         | c41, c42         |
| 5      | pp8, pp11, pp14           | c32, c41    | c51, c52         |
| 6      | pp12, pp15                | c42, c51    | c61, c62         |
| 7      | pp16                      | c52, c61    | c71              |
| 8      | –                         | c62, c71    | –                |

`c_j1` is bit 1 of column *j*'s sum and goes one column left. `c_j2` is bit 2
and goes two columns left. No column can sum to 8 or more, so these are all
the carries there are. Product bit *j* is simply the XOR of everything in
column *j* (`xor_logic`).

The work is in `pre_carry_logic`. Every single-weight carry is a 2:1
multiplexer whose select is the carry arriving from the previous column
(c2, c31, c41, c51). Both of its data inputs depend only on the column's own
bits, so they are ready before the select arrives:

* select = 0: bit 1 of the sum of three bits, which is their **majority**;
* select = 1: bit 1 of that sum plus one, which is 1 when the three bits are
  **not all equal**.

Columns 4 and 5 have a fourth early bit (pp13 in column 4, c32 in column 5).
There each data input is itself a multiplexer on that bit. The extra
"sum plus two" case is the **majority of the complemented bits**. The
double-weight carries (`c32`, `c42`, `c52`, `c62`) are AND/OR terms that fire
when at least four of the column's inputs are set. The critical path is
c2 -> c31 -> c41 -> c51 -> c61 -> c71: one multiplexer per column, not a full
adder per column. The equations are taken term by term from the published
design. Every carry was checked against integer column sums for all 65536
partial-product patterns, not only those a multiplier can produce.

## From 4 to 8 bits (`cpc_mult`)

Split A = {AH, AL} and B = {BH, BL}. Four cores give P4 = AH*BH, P3 = AH*BL,
P2 = AL*BH and P1 = AL*BL, each 8 bits:

* `product[3:0]` = P1[3:0];
* `product[11:4]` is the "middle window" {P4[3:0], P1[7:4]} + P3 + P2. A 3:2
  carry-save row reduces it to sum and carry vectors. An 8-bit carry
  look-ahead adder adds `sum + {carry[6:0], 0}`, and its carry-out is C1;
* `product[15:12]` = P4[7:4] + C1 + carry[7], through a 4-bit carry
  look-ahead adder.

**Departure from the published block diagram.** The diagram feeds the upper
adder with P4[7:4], a constant zero and C1. That loses carry[7]. The middle
window can reach 614, which is more than 2 x 256 (for example
0x6f * 0xde = 0x6042 gives a window of 516). In that case two carries of
weight 2^12 must enter the upper nibble. Here the upper adder's second operand
is {3'b000, carry[7]}. With the constant zero, 8444 of the 65536 operand
pairs come out wrong.

Inside `od_mult` the two operands of each multiplier never share a set bit.
So the window there stays below 512 and only C1 or carry[7] is ever set. The
fix matters for `cpc_mult` used alone.

The width is a parameter. At N > 8 `cpc_mult` instantiates itself at N/2. A
16-bit multiplier is four 8-bit ones, the same arrangement one level up. N
must be a power of two of at least 4, and an elaboration-time `$error` rejects
other values. The 16-bit structure is this design's extension: the source
reports 16-bit results but draws only the 8-bit multiplier.

## Operand decomposition and the combiner (`od_csa`)

```
A = ~X & ~Y    B = X & Y    C = ~X & Y    D = X & ~Y      (~ = bitwise NOT)
```

At every bit position exactly one of A, B, C, D is 1. C and D never overlap.

**Departure from the published formula.** The source gives
`X*Y = C*D - A*B`. That is wrong for 58975 of the 65536 8-bit pairs (it holds
only when X & Y = 0). The exact identity is

```
X*Y = (X|Y)*(X&Y) + (X&~Y)*(~X&Y)
    = C*D - A*B + (2^N - 1)*B          since X|Y = (2^N - 1) - A
```

This design keeps the published structure: A*B and C*D come from two 8-bit
multipliers, and a carry-save adder combines them. It adds the missing
(2^N - 1)*B = B*2^N - B term. `od_csa` sums four 16-bit terms modulo 2^16:
C*D, ~(A*B), B<<8 and ~B. The two "+1"s that complete the two's-complement
negations go into the free low bits of the two carry vectors. The summing
uses two 3:2 rows and one 16-bit carry look-ahead adder. The carry-out of
weight 2^16 is dropped, because the result always fits. The source also reads
`~` as two's complement. With that reading no identity holds, so bitwise NOT
is used.

## Adders

* `csa`: a row of full adders, `x + y + z = sum + 2*carry`. `carry[i]` has
  weight 2^(i+1).
* `cla`: generate/propagate look-ahead. Inside each 4-bit group (`GROUP`)
  every carry is written as an expanded sum of products of g, p and the group
  carry-in. Groups are chained by their carry-out.

The source names both adders but does not describe their insides. These are
the textbook forms.

## Interfaces

| module               | parameters          | ports                                                    |
|----------------------|---------------------|----------------------------------------------------------|
| `od_mult`            | `N = 8`             | `x[N-1:0]`, `y[N-1:0]` -> `product[2N-1:0]`             |
| `cpc_mult`           | `N = 8`             | `a`, `b` -> `product[2N-1:0]`                           |
| `cpc_mult4`          | –                   | `a[3:0]`, `b[3:0]` -> `product[7:0]`                    |
| `pp_gen4`            | –                   | `a`, `b` -> `pp[15:0]` (`pp[k-1]` = pp_k)               |
| `pre_carry_logic`    | –                   | `pp[15:0]` -> `c` (`precarry_t`)                        |
| `xor_logic`          | –                   | `pp`, `c` -> `product[7:0]`                             |
| `operand_decomposer` | `N = 8`             | `x`, `y` -> `a`, `b`, `c`, `d`                          |
| `od_csa`             | `N = 8`             | `prod_ab`, `prod_cd`, `b_op[N-1:0]` -> `product`        |
| `csa`                | `W = 8`             | `x`, `y`, `z` -> `sum`, `carry`                         |
| `cla`                | `W = 8`, `GROUP = 4`| `a`, `b`, `cin` -> `sum`, `cout`                        |

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Reference values are computed with integer
arithmetic in the testbench, never by the design's own equations.

| testbench               | what it covers                                                       |
|-------------------------|----------------------------------------------------------------------|
| `tb_od_mult`            | top at default parameters, all 65536 pairs; counts negative C*D-A*B, correction use, upper-nibble carries, zero sub-products |
| `tb_cpc_mult`           | 8-bit multiplier, all 65536 pairs; counts double window carries      |
| `tb_cpc_mult4`          | 4-bit core, all 256 pairs                                            |
| `tb_pre_carry_logic`    | all 65536 partial-product patterns; each multiplexer's select = 1 path |
| `tb_xor_logic`          | 20000 random partial products and carries                            |
| `tb_pp_gen4`            | all 256 pairs, each partial product and the weighted sum             |
| `tb_operand_decomposer` | all 65536 pairs, per-bit truth table                                 |
| `tb_od_csa`             | all 65536 decomposed product sets                                    |
| `tb_csa`, `tb_cla`      | random plus corners, and exhaustive 8-bit with carry-in              |
| `tb_mult16`             | `cpc_mult` and `od_mult` at N = 16, 200005 pairs each                |

Run one with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cpc_pkg.sv tb/tb_od_mult.sv \
          --top-module tb_od_mult -Mdir obj_tb -o sim && obj_tb/sim
```

(`-Irtl` lets Verilator find each module in the file of the same name.)
Each testbench finishes in about a second or less.

## Published figures

The source synthesized both multipliers in a 65 nm library and reported:

| design (8-bit / 16-bit)              | delay (ns)  | total power (µW) |
|--------------------------------------|-------------|------------------|
| carry pre-computation                | 0.75 / 1.4  | 33.23 / 66.44    |
| with operand decomposition (`od_mult`) | 1.02 / 1.96 | 18.17 / 36.34  |

The RTL here has not been synthesized to a cell library, and these numbers
have not been reproduced. The two departures above change the netlist: one
extra input bit on an upper adder, and a correction term in the final adder.
So delay and power will differ somewhat from what was reported.

## Where this RTL is the source's and where it is not

* As published: the partial-product numbering and the carry equations of the
  4-bit core, its three-stage structure, the four-core split of the 8-bit
  multiplier with a CSA and two CLAs, the decomposition equations and the
  two-multiplier structure of the top.
* This design's choices: unsigned operands, a purely combinational datapath,
  the insides of the CSA and CLA, the carry-save arrangement of the final
  combiner, and the recursive extension to widths above 8.
* Corrections: the extra carry bit into the upper nibble of `cpc_mult`, and the
  (2^N - 1)*B term in `od_csa`.
