# Four-operand multiplier: P = A × B × C × D in one combinational cell

A processor that needs the product of four numbers usually chains three
two-operand multiplications: A×B, then that result times C, then that result
times D, each through its own multiplier and its own final carry-propagate
adder (CPA). This design computes the four-operand product in one
combinational cell with four N-bit inputs and a 4N-bit output (N = 4: four
4-bit operands, 16-bit product). Such a cell helps with repeated
multiplication, for example raising to a power: g^15 = g^4 · g^4 · g^4 · g^3
takes two steps of four-operand products instead of fourteen two-operand
ones.

Three architectures for the cell are given, and all three are built. They
compute the same function and differ only in how the partial products are
formed and added, so they trade delay against area and power:

| Output      | Architecture | Structure | CPAs on critical path | Gate-level delay (N = 4) |
|-------------|--------------|-----------|-----------------------|--------------------------|
| `p_design1` | Design I     | 4×4, then 8×4, then 12×4 multiplier, in series | 3 | 81 unit delays |
| `p_design2` | Design II    | A×B and C×D by two 4×4 multipliers in parallel, then one 8×8 | 2 | 63 unit delays |
| `p_design3` | Design III   | all 256 partial products a_i·b_j·c_k·d_l in one reduction tree | 1 | 64 unit delays |

The delays come from a gate-level model in which an AND or OR gate costs
1 unit, an XOR 1.5, a full adder 3.5 and a 4:2 compressor 7. In transistor
level simulation of the original CNTFET circuits, Design II had the lowest
power and power-delay product and, at 0.9 V, the lowest delay. Design III,
with a single CPA but a 44-high tree, was fastest at 0.6 V and drew by far
the most power. The RTL here does not model delay or power. It reproduces
the logic structure of each architecture.

## Top level: `four_operand_multiplier`

```
four_operand_multiplier #(parameter int N = 4)
  input  logic [N-1:0]   a, b, c, d     unsigned operands
  output logic [4*N-1:0] p_design1      A*B*C*D via Design I
  output logic [4*N-1:0] p_design2      A*B*C*D via Design II
  output logic [4*N-1:0] p_design3      A*B*C*D via Design III
```

The three architectures sit side by side on the same four operand inputs.
The three outputs always hold the same value. The cell is purely
combinational: no clock, no reset, no handshake. A result is valid one
propagation delay after the operands settle. To use a single architecture,
instantiate `design1_mult`, `design2_mult` or `design3_mult` directly. All
three have the same ports (`a`, `b`, `c`, `d`, `p`) and parameter `N`.

## Building blocks

Every multiplier has three stages: AND gates form the partial products, a
tree of 4:2 compressors and full adders reduces them to two vectors, and a
ripple-carry CPA adds those two vectors.

| Module | Role |
|--------|------|
| `full_adder` | Carry out = majority(a, b, cin). Sum is built from XOR and XNOR of a, b: cin selects XNOR, otherwise XOR. This is the logic of the 14-transistor CNTFET cell the architectures were built from. |
| `compressor_4_2` | Two full adders in series: x1+x2+x3+x4+cin = sum + 2·(carry + cout). `cout` does not depend on `cin`, so a row of compressors ripples by at most one column. |
| `ripple_carry_adder` | WIDTH full adders in a chain. This is the CPA. |
| `pp_gen` | AND array for an AW×BW product. Row j is `a & b[j]` shifted left by j. |
| `csa_tree` | Reduces ROWS rows of WIDTH bits to `sum` and `carry` (see below). |
| `mult_nxm` | `pp_gen` + `csa_tree` + `ripple_carry_adder`: an unsigned AW×BW multiplier. Designs I and II are built from it. |
| `pp_gen_4op` | The 256 four-operand partial products of Design III, from three cascaded two-input AND stages: ((a_i & b_j) & c_k) & d_l. |
| `mult4op_pkg` | Elaboration-time functions: the tree's level schedule, and the column heights and bit placement for Design III. No hardware. |

### The reduction tree (`csa_tree`)

The tree is the part of the design with the most structure. It works on
whole rows (carry-save style). It does not place individual dots column by
column. At each level:

* every group of four rows passes through one row of WIDTH `compressor_4_2`
  cells and leaves as two rows. Within that row, column i's `cout` feeds
  column i+1's `cin`.
* if three rows remain, they go through a row of full adders and leave as
  two rows;
* if one or two rows remain, they pass to the next level unchanged.

The carry row of each compressor or adder row is shifted left one place
before it goes on, so the output `carry` is already aligned and the result
is simply `sum + carry`. Carries out of the top column are dropped. The
tree is therefore exact modulo 2^WIDTH. That is always enough here, because
each multiplier's output width holds its largest product.

Level counts: 4 rows take one compressor level (the 4×4, 8×4 and 12×4
multipliers), 8 rows take two (the 8×8 of Design II), and the 44 rows of
Design III take five (44 → 22 → 12 → 6 → 4 → 2).

### Design III's partial-product array

The product a_i·b_j·c_k·d_l has weight 2^(i+j+k+l). For N = 4 the 256 bits
fall into 13 columns with heights

    weight  0  1   2   3   4   5   6   7   8   9  10  11  12
    height  1  4  10  20  31  40  44  40  31  20  10   4   1

The tallest column holds (2N³+N)/3 = 44 bits. `design3_mult` stacks each
column: the r-th bit of column w, counted in loop order (i, j, k, l, with l
changing fastest), goes to row r, bit w. The result is 44 rows of 16 bits,
with zeros where a column is shorter. `mult4op_pkg::pp4_index_at` computes
this placement at elaboration time, so changing N needs no table. After the
tree, a single 16-bit CPA produces the product.

## Parameters and sizes

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `N` (top, designs, `pp_gen_4op`) | 4 | operand width. Product is 4N bits. |
| `AW`, `BW` (`mult_nxm`, `pp_gen`) | 4, 4 | operand widths of a two-operand multiplier |
| `ROWS`, `WIDTH` (`csa_tree`) | 4, 8 | number and width of rows to reduce |
| `WIDTH` (`ripple_carry_adder`) | 8 | adder width |

Designs I and II scale to any N. Design III needs N^4 partial products and a
tree of (2N³+N)/3 rows, so it grows quickly and is practical only for small
N. Everything is described bit by bit with full adders. Verilator therefore
generates a lot of C++ for wide instances: the 4-bit cell builds in seconds,
but 8-bit and wider instances of Design I take minutes to compile.

## Departures and choices

* **Arithmetic is unsigned.** Signed operands are not covered.
* **The tree is row-based.** Compressors and full adders are used together,
  as intended, but rows are reduced four at a time rather than by a
  hand-placed dot diagram. So the number of cells and levels may differ
  from a column-optimised Wallace or Dadda arrangement. The product is
  identical.
* **The 4:2 compressor** is the usual two-full-adder circuit. Its delay
  (twice a full adder) matches the gate-level model above.
* **The CPAs are full-width ripple-carry adders** (8/12/16 bits in Design I,
  8/8/16 in Design II, 16 in Design III). The delay formulas assume slightly
  shorter CPAs, because the lowest product bits need no carry propagation.
  The adders here are not trimmed.
* **The CNTFET circuits are reduced to logic.** The AND gate and the full
  adder were transistor-level CNTFET circuits. Only their logic function is
  kept here. The device itself has no RTL counterpart.
* **All three architectures are in the top**, sharing inputs, so that they
  can be compared and cross-checked. A real chip would keep one.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=<n> failures=<m>` and stops via `$finish`. All
need the package first. For example, to run the full-size top-level test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/mult4op_pkg.sv tb/tb_four_operand_multiplier.sv \
  --top-module tb_four_operand_multiplier -Mdir obj
./obj/Vtb_four_operand_multiplier
```

What the tests cover:

* `tb_four_operand_multiplier` drives all 65 536 operand sets through the
  default (N = 4) cell. It compares all three outputs with a·b·c·d and with
  each other. It also counts the zero-operand cases, the maximum product
  15^4 = 50 625, and products that reach bit 15.
* `tb_design1_mult`, `tb_design2_mult`, `tb_design3_mult`: the same
  exhaustive check for each architecture on its own.
* `tb_mult_nxm`: 4×4 and 8×8 exhaustively; 8×4 and 12×4 over all
  multipliers.
* `tb_csa_tree`: random and all-ones rows on trees of 1, 2, 3, 4, 7, 11 and
  44 rows.
* `tb_pp_gen`, `tb_pp_gen_4op`, `tb_ripple_carry_adder`,
  `tb_compressor_4_2`, `tb_full_adder`: exhaustive.
* `tb_exponent_g15` computes g^15 = g^4·g^4·g^4·g^3. Step 1 (g^4 and g^3) is
  computed for every 4-bit g on the default cell. Step 2 takes the step-1
  results as operands, and those are wider than 4 bits. It therefore runs
  on an 8-bit Design II instance and is checked for g = 0…3, whose g^4
  fits in 8 bits.

All testbenches pass. Each was also run against a deliberately broken copy
of its module, and in every case the breakage was detected.
