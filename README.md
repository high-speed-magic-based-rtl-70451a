# MAGIC in-memory adders: exact and approximate ripple-carry addition inside a memristor crossbar

In a memristive crossbar, each cell is a resistive switch that both stores a bit and can compute.
Under MAGIC (Memristor-Aided loGIC), a NOR gate runs *in place*. Some cells of a row or column
are the inputs and one cell is the output; that output was first set to logic 1. Applying a voltage
V0 across the line pulls the output to 0 whenever any input is 1. Several rows (or columns) can do
this at the same time, and isolation voltages keep the lines that should not take part out of it.
So one such voltage pattern is one clock step, and an adder's cost is its number of steps.

This design builds an N-bit ripple-carry adder out of such steps:

* **MFA** is the exact full adder. It uses a 4 x 5 patch of cells and 9 NOR/NOT steps, plus two
  steps that set the output cells to 1. Two of the nine steps are shared by all bits, so an n-bit
  exact adder takes 7n + 4 steps.
* **MAFA-1, MAFA-2 and MAFA-3** are approximate full adders meant for the low-order bits. They
  are cheaper and give up some accuracy:

| cell   | carry out         | sum         | wrong outputs over 8 inputs | extra steps per bit |
|--------|-------------------|-------------|-----------------------------|---------------------|
| MFA    | majority(a,b,c)   | a^b^c       | 0                           | 7 (exact region)    |
| MAFA-1 | b                 | ~b          | 4                           | 0                   |
| MAFA-2 | b \| (a & c)      | ~carry      | 3                           | 3                   |
| MAFA-3 | majority(a,b,c)   | ~carry      | 2                           | 4                   |

An n-bit adder whose k low bits are approximate takes **7(n-k) + s·k + 5** steps, where s is 0, 3
or 4. The default is the 8-bit adder with three MAFA-1 bits ("Outline 1"). It is a 27 x 5 array
and finishes in 40 steps, where the exact adder needs 60. Outlines 2 and 3 approximate 4 and 5
bits.

The same cells are also used functionally. They build an 8 x 8 signed multiplier in which the
adders that sum the partial products are approximated, for INT8 neural-network inference.

## The blocks

| module (rtl/)      | what it is |
|--------------------|------------|
| `magic_pkg`        | line-level and step types, cell flavours, and the crossbar layout as functions (where each operand, sum and carry sits) |
| `magic_xbar`       | behavioural model of the crossbar: one bit per cell, INIT and MAGIC NOR steps in row or column orientation, isolation |
| `magic_rca_ctrl`   | the step sequencer: for every step it gives the level of each row and column line, or the mask of cells to initialise |
| `magic_rca`        | the in-memory adder: writes the operands into the array, runs the sequencer, reads the sum and carry |
| `approx_fa`        | Boolean form of the four cells, written as the NOR network the array computes |
| `approx_rca`       | combinational N-bit adder with K approximate low bits (the function of `magic_rca`, without the array) |
| `approx_mult8`     | 8 x 8 signed approximate multiplier built from seven `approx_rca` stages |
| `magic_imc_top`    | top level: the in-memory adder and the multiplier side by side |

The analog part is not modelled: the memristor devices, their thresholds and the V0 / isolation
voltage drivers. `magic_xbar` replaces them with a logic model. Each line gets one of four codes
(float, V0, GND, isolate), and each cell follows `new = old AND NOR(inputs)`. That captures the
one property the programs depend on: a MAGIC output can only fall from 1 to 0.

## How a step works in the model

A step's orientation is set by where V0 is applied:

* **Row step.** V0 is on one or more columns (the inputs) and GND on one or more columns (the
  outputs). Every row that is not isolated computes its own NOR in parallel. Steps 1, 3, 4, 6 and 8
  of the full adder are row steps. Step 1, for instance, inverts A and B in both operand rows at
  once.
* **Column step.** V0 is on the output row and GND on the input rows. Every column that is not
  isolated computes its own NOR. This is how two operands stored in different rows are combined,
  e.g. NOR(A,B) in step 2.

An INIT step sets the masked cells to 1. The adder uses two INIT steps. The first covers the cells
of rows that hold no operand; the second covers the free cells of the operand rows, since the
operand cells themselves must not be overwritten.

An assertion in `magic_xbar` checks that a MAGIC step drives V0 and GND in one orientation only.

## The exact full adder (MFA) program

In the 4 x 5 patch, with rows R1..R4 and columns C1..C5, the cells are: A at R1C1, B at R2C1 and
Cin at R1C3. X denotes A XOR B.

| step | kind   | result |
|------|--------|--------|
| 1    | row    | ~A → R1C2, ~B → R2C2 |
| 2    | column | NOR(A,B) → R3C1, NOR(~A,~B) = AB → R3C2 |
| 3    | row    | X = NOR(NOR(A,B), AB) → R3C3 |
| 4    | row    | ~Cin → R1C4, ~X → R3C4 |
| 5    | column | NOR(X,Cin) → R4C3, NOR(~X,~Cin) = X·Cin → R4C4 |
| 6    | row    | SUM = NOR(NOR(X,Cin), X·Cin) → R4C1 |
| 7    | column | AB → R4C2 |
| 8    | row    | ~Cout = NOR(AB, X·Cin) → R4C5 |
| 9    | column | Cout → R3C5 |

In an n-bit adder every exact bit gets four rows: A, B, a NOR row and a SUM row. The carry of a bit
is written straight into the A row of the next bit, in the column where that bit expects its
carry-in. That column alternates between C3 and C5 from bit to bit, so the carry never has to be
copied. Steps 1 and 3 are done once for all bits together. Steps 2 and 4-9 go bit by bit, since each
bit waits for its carry. When there are two or more exact bits, step 3 grounds both C3 and C5, so
each bit also gets a spare copy of X that is never used. The carry out of the last bit lands in
that bit's B row.

## The approximate region

The approximate bits sit above the exact ones:

* **MAFA-1.** It needs no computation of its own: the carry out *is* B, and the sum is ~B. All
  sums come from one NOT step, which is merged with step 1 of the exact bits. Operand rows follow
  each other, so bit i's B row is bit i+1's carry-in. The region is 2k + 1 rows.
* **MAFA-2.** Each bit takes 5 rows: A, B, Cin, two NOR rows and a carry row. It computes
  NOR(A,B) and NOR(Cin,B) with two column steps, then the carry as the NOR of those two.
* **MAFA-3.** Each bit takes 6 rows. It adds a third NOR row, NOR(Cin,A), and the carry becomes
  the three-input NOR, which is the majority.
* **Sums.** In both MAFA-2 and MAFA-3, every sum bit is the inverse of that bit's carry, computed
  in the shared NOT step.

When exact bits follow, one extra row step moves the last approximate carry into column C3 of the
first exact tile. It does this by inverting that bit's sum. The result is the `+5` of the step
formula: 2 INIT steps + the shared NOT step + the shared X step + this handover.

## The multiplier

`approx_mult8` is the Baugh–Wooley form of an 8 x 8 signed multiplication:

* The partial-product bits a_i·b_j where exactly one of i, j is 7 are inverted.
* Constant ones are added at weights 2^8 and 2^15.
* Seven 8-bit ripple-carry adders sum the rows one after another. A final half adder forms the top
  product bit.
* Stage s (1..7) approximates its k_s = clamp(Y - s + 1, 0, 8) low bits with cells of kind KIND.
  Y = 0 gives an exact multiplier.

The multiplier is named MULx_y, where x is the cell kind and y is Y. The default is MUL1_7. It is
plain combinational logic built from the Boolean cells; this design does not map it into a
crossbar.

## Interfaces and timing

`magic_rca` (and the `add_*` ports of the top) uses a start/done handshake with an asynchronous
active-low reset. When `start` arrives while idle, the operands are captured. Then:

1. **Load, 2N + 1 cycles:** A, B and Cin are written one cell per cycle.
2. **Run:** the step program executes, one crossbar step per cycle.
3. **Read-out, N + 1 cycles:** one row per cycle.
4. `done` pulses for one cycle. `sum`, `cout` and `steps` (the number of crossbar steps in the run
   phase) then hold until the next start.

Only the run phase corresponds to the latency quoted for these adders. The load and read-out stand
in for peripheral circuits that are outside the adder proper. The multiplier ports (`mul_a`,
`mul_b`, `mul_p`) are combinational.

Parameters:

* `magic_rca`: `N`, `K` and `KIND` (`FA_EXACT`, `FA_MAFA1`, `FA_MAFA2`, `FA_MAFA3`). The array
  height follows from them (`rca_rows` in `magic_pkg`).
* `approx_mult8`: `KIND` and `Y`.

## Where this design departs from, or adds to, its source

* **Array height.** An adder takes 4 rows per exact bit plus the approximate region: 27 rows for
  Outline 1, 32 for the exact 8-bit adder. A formula elsewhere in the source gives 4n + n/2 - 1
  rows; the 4-row pitch of its 8-bit layout drawing was followed instead. The memristor count is
  about 15n rather than 16n.
* **Pure MAFA-1 adder** (every bit approximate) takes 3 steps here: two INIT steps and one NOT
  step. The source counts 2. The two INIT steps were kept in every configuration so that one
  sequencer serves all of them.
* **Spare X copy.** The layout drawing marks one cell as unused where step 3 here writes the spare
  copy of X (see above). The value is never read.
* **MAFA-2 carry.** The source states the MAFA-2 carry two ways. The form used here,
  carry = NOR(NOR(A,B), NOR(Cin,B)), is the one whose 8-bit error statistics match the published
  ones.
* **Load, read-out and handshake** are this design's own.

Everything else was checked against published numbers:

* The step counts of all ten 8-bit configurations: 60 for exact; 40 / 33 / 26 for MAFA-1 at
  k = 3 / 4 / 5; 49 / 45 / 41 for MAFA-2; 52 / 49 / 46 for MAFA-3.
* The single-cell counts: 11 for MFA, 6 for MAFA-2, 7 for MAFA-3.
* The mean error distance of all nine approximate 8-bit adders over all 65,536 operand pairs (for
  example 2.625 for Outline 1 with MAFA-1).
* The mean error distance and mean relative error of all fifteen multiplier configurations over
  all 65,536 operand pairs.

## Testbenches (tb/)

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_magic_xbar`        | hand-written 9-step full-adder program on a 4 x 5 array for all 8 inputs; isolation; an uninitialised output stays 0; a three-input NOR |
| `tb_magic_rca_ctrl`    | number of steps of 13 configurations against the formula and the published counts; two INIT steps; one orientation per step; row/column step split of the exact adder (26 / 32). Uses `ctrl_probe` |
| `tb_magic_rca`         | 11 adder configurations on random and corner operands against a cell-by-cell reference (`rca_check`); the worked example 170 + 85 with Outline 1 (sum 2, carry 1, 40 steps) |
| `tb_approx_fa`         | truth tables of the four cells and their error totals 0 / 4 / 3 / 2 |
| `tb_approx_rca`        | all 65,536 operand pairs for nine configurations: mean error distance against the published table (±0.01) and a ripple reference |
| `tb_approx_mult8`      | all 65,536 signed operand pairs: exact at Y = 0; all fifteen MULx_y against an integer reference, the published mean error distances (±0.1) and mean relative errors (±0.02) |
| `tb_magic_imc_top`     | the top at its default parameters: the worked example, 3,000 random additions (40 steps each), 20,000 products; counts that every mechanism occurred |
| `tb_image_workloads`   | image addition (256 x 256), subtraction (320 x 240), RGB-to-gray and 2 x 2 average pooling (768 x 512) on generated images through all ten adder configurations; every result against the cell model and an error bound, PSNR per configuration, 200 pixel additions on the in-memory adder |

On the generated images, the PSNR trends match the ones reported for real photographs:

* Every approximate image addition stays above 30 dB.
* MAFA-3 beats MAFA-1 at five approximate bits.
* Gray conversion with five MAFA-1 bits drops below 30 dB (about 24 dB).

The bench checks these trends.

To run one with plain Verilator, from the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/magic_pkg.sv tb/tb_magic_imc_top.sv --top-module tb_magic_imc_top
./obj_dir/Vtb_magic_imc_top
```

The full-size top-level test runs in well under a second.
