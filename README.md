# Column-wise reversible 4x4 multiplier

A reversible circuit has as many output lines as input lines, and its map from
inputs to outputs is one-to-one. No information is thrown away, so in principle
no energy has to be lost, and the circuit can be built from controlled-NOT gates
(Feynman, Toffoli and wider variants). Reversibility comes at a cost. Every
constant input ("ancilla") and every output nobody needs ("garbage") is an
extra line.

Reversible multipliers are usually built in two stages: a partial-product
generator and then a reversible adder array. Each stage brings its own
ancillas and garbage, plus fan-out circuits to copy operand bits. This design
does it differently. Every **column** of the pencil-and-paper multiplication is
one reversible block. That block forms the column's partial products `a_i·b_k`
(i + k = column), adds them to the carries coming in from lower columns, and
produces the product bit `S_j` and the carries for the columns above. The
operand bits are only ever used as gate *controls*, so they pass through each
block unchanged and feed the next one directly. No fan-out circuit is needed.

The whole 4x4 multiplier is eight blocks (`rev_col0` … `rev_col7`) and uses
20 lines:

| in                           | out                               |
|------------------------------|-----------------------------------|
| a3..a0, b3..b0 (8 operand)   | S7..S0 (8 product)                |
| 12 ancilla lines, all 0      | 12 garbage lines                  |

The SystemVerilog is combinational. Each block is written as its gate cascade,
one statement per gate, so the RTL is both a synthesizable multiplier and an
executable description of the reversible circuit.

## Carries between columns

`C_ij` is the carry produced in column `i` and added into column `j`. A column
can sum up to five ones (four partial products plus one carry in column 3,
three products plus two carries in column 4). So its running total needs up to
three bits, and those bits go to the next column **and the one after it**:

| column | adds                                  | max | result lines      | garbage lines     | lines in/out |
|--------|---------------------------------------|-----|-------------------|-------------------|--------------|
| 0      | P00                                   | 1   | S0                | –                 | 3            |
| 1      | P01, P10                              | 2   | S1, C12           | –                 | 6            |
| 2      | P02, P11, P20, C12                    | 4   | S2, C23, C24      | –                 | 9            |
| 3      | P03, P12, P21, P30, C23               | 5   | S3, C34, C35      | b0, a0            | 11           |
| 4      | P13, P22, P31, C24, C34               | 5   | S4, C45, C46      | b1, a1, C24       | 10           |
| 5      | P23, P32, C35, C45                    | 4   | S5, C56, C57      | b2, a2, C35       | 8            |
| 6      | P33, C46, C56                         | 3   | S6, C67           | b3, a3, C46       | 5            |
| 7      | C57, C67                              | 1   | S7                | C57               | 2            |

(`Pik = a_i·b_k`.) The lines in/out count includes the operand bits passed on
to later columns. Garbage totals 12. The ancillas are one per column 0 and 6
and two per column 1..5, which is also 12.

Column 7 needs no carry out. A 4x4 product is at most 225, so C57 and C67 are
never 1 together, and a single controlled-NOT forms S7.

## How a column adds: in-place counters

The running total of a column lives on its result lines: `{C_high, C_low, S}`
for a 3-bit total. The lowest bit starts on the incoming-carry line when there
is one (C12 becomes S2, C23 becomes S3, C34 becomes S4, C45 becomes S5, C56
becomes S6), and the upper bits start on ancillas. Adding one bit `x` is a
controlled increment. It flips bits from the top down, so that each gate still
sees the old values of the bits below it:

```
C_high ^= x & S & C_low;   // gate with x's controls + 2 more
C_low  ^= x & S;
S      ^= x;
```

For a partial product, `x` is `a_i & b_k`, so the gates get two more controls.
For an added carry, `x` is the carry line itself.

A gate that can never fire is left out. The running total of a 3-bit column
starts as at most 1 (the incoming carry) and is at most 2 after the first
addition. So the top-bit gate `C_high ^= …` is only needed from the third
addition on. It can only fire when the total is already 3. This "known-zero"
pruning makes the cascade exact only when the ancillas are 0, which is the
case the multiplier is used in. With other ancilla values the circuit is still
reversible but computes something else.

Each statement is one multiple-control NOT gate. A sequence of such gates is a
permutation of the line values whatever the ancillas hold, so every block, and
the chain of blocks, is reversible by construction.

Gate counts per column are 1, 3, 7, 10, 10, 7, 4 and 1, which is **43 gates**,
the same total as the published circuit.

## Using the multiplier

`rev_mult4x4` (top) ports:

| port      | dir | type          | meaning                                                       |
|-----------|-----|---------------|---------------------------------------------------------------|
| `a`, `b`  | in  | `logic [3:0]` | unsigned operands                                             |
| `anc`     | in  | `ancilla_t`   | the 12 ancilla lines; drive `'0` to multiply                  |
| `p`       | out | `logic [7:0]` | `a * b` when `anc == '0`                                      |
| `garbage` | out | `garbage_t`   | operand bits b0..b3, a0..a3 and carries C24, C35, C46, C57    |

`ancilla_t` and `garbage_t` are packed structs in `rev_mult_pkg`. Each field is
named after the signal the line carries. With a nonzero `anc` the module is
still a bijection on all 20 lines, but `p` is no longer the product. That is
useful only to check reversibility or to run the circuit backwards.

There is no clock, reset or latency. As logic, the top is 43 XOR cells and
about as many AND cells after synthesis. Eight of the garbage outputs are plain wires from the
operand inputs, because operand lines are never targets.

The column blocks have one port per line, named after the line (`c24_i`,
`s4_o`, `g_c24_o` for a line that leaves as garbage). They can also be used on
their own.

## Where this departs from the published design, and how far to trust it

Taken from the published architecture:
* the column-per-block structure;
* each block's input and output lines;
* which line turns into which (for example, the incoming carry line becoming
  the column's sum bit);
* the garbage lines of each column;
* the order in which each column adds its partial products and carries;
* the totals of 12 ancilla and 12 garbage lines.

This implementation's own choices:

* **Gate sequence.** The gate-by-gate layout of the published circuit is not
  reproduced. Each column is built from the counter scheme above, in the
  published order of additions, with the pruning
  described above. That gives the published total of 43 gates. The individual
  gates may still differ from the published ones. Such differences do not
  change the function: the column results are fixed by arithmetic, and the
  tests prove reversibility.
* **Quantum cost** (402 for the published circuit) is not modelled. The RTL
  does not say what each gate would cost in a given technology.
* **Unsigned operands.** The title and background mention Booth's algorithm
  for two's-complement numbers. The circuit actually designed sums plain
  partial products and so multiplies unsigned numbers. No Booth recoder is
  included.
* **Size.** Only the 4x4 multiplier is described. The column blocks are
  specific to their column, so `N` in the package documents the width and
  does not parameterise it.
* **Ancilla and garbage order** inside the two structs is this design's own.

Verification is exhaustive, so the function itself is not in doubt:

* `tb_rev_mult4x4` checks all 256 products. It checks every garbage line
  against the operand bit or carry it must carry, with carries worked out
  from column sums. It checks the ten carries between the blocks against the
  same column sums, and confirms that each carry is 1 for at least one
  operand pair. It then drives all 2^20 input patterns and
  checks that no output pattern repeats.
* `tb_rev_col0` … `tb_rev_col7` do the same for each block alone. Each runs
  all input combinations, checks reversibility, and checks the column sum and
  the pass-through and garbage lines whenever the ancillas are 0.

## Files

| file                         | content                                          |
|------------------------------|--------------------------------------------------|
| `rtl/rev_mult_pkg.sv`        | widths, line counts, `ancilla_t`, `garbage_t`    |
| `rtl/rev_col0.sv` … `rev_col7.sv` | the eight column blocks                     |
| `rtl/rev_mult4x4.sv`         | top: the eight blocks chained                    |
| `tb/tb_rev_col*.sv`          | exhaustive per-block testbenches                 |
| `tb/tb_rev_mult4x4.sv`       | exhaustive end-to-end testbench                  |

## Simulating

The package has to be read before the modules that import it. The end-to-end
test takes well under a second:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/rev_mult_pkg.sv rtl/rev_col*.sv rtl/rev_mult4x4.sv \
  tb/tb_rev_mult4x4.sv --top-module tb_rev_mult4x4
./obj_dir/Vtb_rev_mult4x4
```

A column test, for example column 4:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/rev_col4.sv tb/tb_rev_col4.sv --top-module tb_rev_col4
./obj_dir/Vtb_rev_col4
```

Each test ends with `TB_RESULT checks=N failures=M`. `failures=0` means it
passed. `verilator --lint-only -Wall` with the same file lists reports no
warnings.

To change a column, edit its gate statements. The block test will report any
change in the column sum, and any loss of reversibility (for example a gate
whose target is also one of its controls, or an output line that is a copy of
another).
