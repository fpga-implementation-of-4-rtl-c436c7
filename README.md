# Reversible-logic square units (4-bit and 8-bit)

This design squares an unsigned 4-bit or 8-bit operand, `sq = a * a`. It is
built only from reversible gates: Toffoli, Peres and Double Peres gates. In a
reversible gate every output pattern maps back to exactly one input pattern.
Circuits of this kind are judged by four figures:

- **gate count**: the number of reversible gates;
- **quantum cost**: the number of elementary 1x1/2x2 quantum gates needed to
  build them (Toffoli 5, Peres 4, Double Peres 6);
- **constant inputs**: lines that must be preset to 0 (ancillas);
- **garbage outputs**: lines that carry nothing useful but must exist to keep
  the mapping one-to-one.

The main idea is to avoid using a general multiplier to square a number. When
a number is squared, the partial-product matrix is symmetric. The terms
`a_i*a_j` and `a_j*a_i` are equal, so each pair becomes one term at twice the
weight, moved one column to the left. A diagonal term `a_i*a_i` is simply
`a_i`. That roughly halves the partial products and the adders that sum them.

The RTL is synthesizable SystemVerilog. Each gate is written as a small
module, and the square units are gate-level netlists of those modules. This
lets the cost figures be read straight from the structure. On an FPGA the
gates simply become LUT logic. The reversibility is structural, not physical.

## The reduced partial-product matrix

For an N-bit operand, column k (weight 2^k) holds:

- every cross product `a_i*a_j` with i < j and i + j + 1 = k;
- the diagonal term `a_(k/2)` when k is even.

Column 1 is always empty and is driven by a constant-0 line. For N = 4:

| column | 0  | 1 | 2        | 3    | 4              | 5    | 6        | 7 |
|--------|----|---|----------|------|----------------|------|----------|---|
| terms  | a0 | 0 | a0a1, a1 | a0a2 | a0a3, a1a2, a2 | a1a3 | a2a3, a3 | – |

An ordinary 4x4 multiplier needs 16 AND terms. Here only six are left (the
cross products), and the four diagonal terms are just the operand bits.

## Partial products: a chain of Toffoli gates (`rev_pp_gen`)

Each cross product is formed by one Toffoli gate with its target preset to 0,
so `R = A*B`. The gates sit in series on the operand lines. Each one passes
its two controls on unchanged to the next gate, so the operand comes out of
the chain intact (`a_out`) and no line is wasted as garbage. A Peres gate
could also form the AND, but it would corrupt one operand line. The gate
order, which is also the bit order of the `pp` bus, is
`(0,1) (0,2) … (0,N-1) (1,2) … (N-2,N-1)`. `rev_square_pkg::pp_index`
gives the position of each pair.

## Summation: one adder chain per column

The adders are reversible:

- **half adder** (`rev_half_adder`): a Peres gate with C = 0. Q is the sum,
  R the carry, and P (a copy of A) is one garbage line.
- **full adder** (`rev_full_adder`): a Double Peres gate with C = 0 and
  D = carry in. R is the sum, S the carry, and P, Q are two garbage lines.

The Double Peres gate is implemented as P = A, Q = A^B, R = A^B^D,
S = (A^B)D ^ AB ^ C. Some drawings of this gate swap the names of the C and
D lines. Only the labelling used here turns "C = 0, D = Cin" into a full
adder.

Every column is reduced by a linear chain of adders, and each adder sends its
carry one column to the left. Take a column holding h bits: its cross terms,
then the carries arriving from the column to its right, then its diagonal
term. The chain works like this:

- The first full adder takes three bits.
- Each further full adder takes the running sum plus two new bits.
- If one bit is left over at the end, a half adder adds it.

A column of height h therefore uses `(h-1)/2` full adders and `(h-1)%2` half
adders, and sends `h/2` carries on. The functions in `rev_square_pkg`
compute these counts column by column. `rev_sum_array` generates exactly the
adders those functions count.

**4-bit unit.** The rule gives the published 4x4 summation. `rev_sum4`
writes it out by hand:

```
col 2: HA(a0a1, a1)                   -> sq[2]
col 3: HA(a0a2, c2)                   -> sq[3]
col 4: FA(a1a2, a0a3, c3) -> HA(s, a2) -> sq[4]     two carries to col 5
col 5: FA(a1a3, c4, c4')              -> sq[5]
col 6: FA(a2a3, a3, c5)               -> sq[6], carry -> sq[7]
```

**8-bit unit.** Columns 2..14 get 1, 1, 2, 2, 3, 3, 4, 3, 3, 2, 2, 1, 1
adders: 21 full and 7 half adders. Drawn as rows, that is 13, 9, 5 and 1
adders. This is the shape of the published 8x8 array, with half adders at
the right end of the first two rows and a half adder as the single adder of
row 4 (column 8, which also takes `a4`). Row 3 here ends in two half adders
(columns 6 and 7). Which bits meet in
which adder inside a column is this design's own choice. The published
drawing cannot be followed wire by wire.

The critical path is the carry ripple across the columns, plus the chain
inside the tallest column.

## Cost figures

Both square units export these figures as localparams (`GATE_COUNT`,
`QUANTUM_COST`, `CONSTANT_INPUTS`, `GARBAGE_OUTPUTS`), computed from the same
functions that shape the array:

| unit  | Toffoli | Peres | Double Peres | gates | quantum cost | constant inputs | garbage |
|-------|---------|-------|--------------|-------|--------------|-----------------|---------|
| 4-bit | 6       | 3     | 3            | 12    | 60           | 13              | 9       |
| 8-bit | 28      | 7     | 21           | 56    | 294          | 57              | 49      |

The 4-bit row matches the published figures for this unit. For comparison,
the published figures for reversible multipliers used as squarers are 28 to
52 gates, quantum cost 196 to 290, 28 to 36 constant inputs and 28 to 52
garbage lines.

The 8-bit row is derived from this implementation; no published figures
exist for it. The constant-input count is one zero per gate plus the zero
line of `sq[1]`.

## Modules

| module              | role |
|---------------------|------|
| `rev_square_pkg`    | quantum costs per gate; functions for the matrix shape, adder counts, garbage offsets and totals |
| `toffoli_gate`      | P=A, Q=B, R=AB^C |
| `peres_gate`        | P=A, Q=A^B, R=AB^C |
| `double_peres_gate` | P=A, Q=A^B, R=A^B^D, S=(A^B)D^AB^C |
| `rev_half_adder`    | Peres gate with C=0 |
| `rev_full_adder`    | Double Peres gate with C=0, D=Cin |
| `rev_pp_gen #(N=8)` | Toffoli chain, `a` → `a_out`, `pp[N(N-1)/2]` |
| `rev_sum4`          | hand-written 4-bit summation netlist |
| `rev_square4`       | 4-bit unit: `rev_pp_gen #(4)` + `rev_sum4` |
| `rev_sum_array #(N=8)` | generated column-chain summation |
| `rev_square_n #(N=8)`  | N-bit unit: `rev_pp_gen` + `rev_sum_array` (the 8-bit unit at its default) |
| `square_fpga_top`   | board top |

Every square unit has the ports `a` (N bits), `sq` (2N bits) and `garbage`.
The garbage lines are numbered column by column and adder by adder; a full
adder contributes P and then Q. Everything is combinational: there is no
clock and no reset, and `sq` is valid one combinational delay after `a`
changes. `rev_square_n` also works at other sizes (the tests use N = 3, 4,
5 and 8). At N = 4 it builds the same gates in the same columns as
`rev_square4`; only the order of some adder inputs differs.

## Board top

`square_fpga_top` puts both units side by side, each with its own switches
and LEDs:

- `sw4[3:0]` → `led4[7:0]` (4-bit unit);
- `sw8[7:0]` → `led8[15:0]` (8-bit unit).

The original demonstration used DIP switches and LEDs on a Spartan-3 board.
The separate switch banks, active-high LEDs and unconnected garbage lines are
choices of this design. No pin constraints are supplied.

## Verification

Every module has a self-checking testbench in `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

- **Gates.** Exhaustive truth tables, plus a check that every output pattern
  occurs exactly once (reversibility).
- **Adders.** Exhaustive sums, plus the contents of the garbage lines.
- **`rev_pp_gen`.** All operands at N = 8 and N = 4, with the product bus
  built independently.
- **`rev_sum4`, `rev_square4`.** All 16 operands, plus the 4-bit cost
  figures (12 / 60 / 13 / 9).
- **`rev_sum_array`.** All operands at N = 3, 4, 5 and 8, plus the 8-bit row
  shape 13/9/5/1.
- **`rev_square_n`.** All 256 operands, plus the cost figures of both sizes.
- **`square_fpga_top_tb`.** All 16 × 256 switch settings at default
  parameters. It also counts the carry-out LEDs and the all-zero and all-one
  settings.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rev_square_pkg.sv \
    tb/square_fpga_top_tb.sv --top-module square_fpga_top_tb -Mdir obj
./obj/Vsquare_fpga_top_tb
```

Each testbench runs in well under a second.

## Departures and limits

- The 8-bit summation follows the column-chain rule of the 4-bit netlist and
  the row shape of the published 8x8 array. It is not a wire-for-wire copy.
- The cost figures count gates as the reversible-logic literature does.
  They say nothing about FPGA area: synthesis folds the gates into ordinary
  logic.
- Lint notes two things. The cost localparams are not used inside the RTL
  (they are there for inspection and for the testbenches). The carry vector
  of the last column is unused because that column never has an adder.
