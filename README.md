# Carry-save arrays for multiplication, division, square and square root

Cellular arithmetic arrays are regular, but they are slow at division and square root: each
row has to finish a full carry-propagating subtraction before the next row knows whether to keep
it. The idea behind these arrays is to run every row in carry-save form, as a fast multiplier
does, and to find each quotient or root bit separately, with a small carry-look-ahead circuit on
the side of the row that computes only the *sign* of the trial subtraction. A divider row then
costs one cell delay plus a two-level look-ahead and one XOR, close to a multiplier row. The
arrays are no longer strictly uniform (each row has its own look-ahead block), so they are
"array-like" rather than iterative.

The same restoring cell adds when its row's select bit is 1 and passes the remainder through
when it is 0. Because of that, one grid of cells can multiply or divide, and a variant of the
cell, which rewrites the subtrahend as it passes, can square or take square roots. The last
step merges both into one pipelined array that accepts a new multiply, divide, square or
square-root operand set on every clock.

All units default to N = 4 bit operands (the `N` parameter), like the 4-bit designs they
follow. The pipelined array has also been simulated at N = 8 and the multiplier-divider at every
N from 2 to 8.

## The units

| module | what it computes | clocked |
|---|---|---|
| `gen_pipeline_array` | all four operations, one operand set per clock, latency N+2 | yes (no with `PIPELINED = 0`) |
| `muldiv_array` | `x=0`: `s = a + b*p`; `x=1`: `q = a / b`, `s[N-1:0] = a mod b` | no (yes with `PIPELINED = 1`) |
| `sqrt_square_array` | `x=0`: `s = a + f*f`; `x=1`: `r = floor(sqrt(a))`, `s = a - r*r` | no (yes with `PIPELINED = 1`) |
| `restoring_divider` | `q = a / b`, `rem = a mod b` | no |
| `fast_divider` | same as `restoring_divider`, restoring moved into the next row | no |
| `rs_multiplier` | `s = a + b*p + d`, most significant multiplier bit first | no |
| `arith_arrays_top` | all of the above side by side, each with its own ports | - |

Cells and helpers: `add_cell` (AND plus full adder), `div_cell`, `mod_div_cell`, `sqrt_cell`,
`sign_lookahead` (two-level carry-out of a row), `cla_adder` (final adder, 4-bit groups with a
second look-ahead level), `gen_row` (one row of the pipelined array) and `arith_pkg` (operation
encoding).

Operand ranges: a dividend has 2N-1 bits and must be below `b * 2^N`, so that the quotient fits
in N bits, and `b` must not be 0. The pipelined array flags a bad division with an assertion. A
radicand has 2N bits. In the multiply and square modes the `a` input is an addend: drive it with 0
for a plain product. All `s` outputs are modulo 2^2N.

## Finding a quotient bit from a carry-save remainder

This is the part that needs the most care. Take `restoring_divider`, with dividend `a` (7 bits)
and divisor `b` (4 bits). Row `j` (first `j = 3`) tries to subtract `b * 2^j`. Its four cells
sit at bit columns `j .. j+3`. The partial remainder arrives as two vectors, sum and carry, and
each cell receives one bit of each plus the complemented divisor bit `~b`.

1. **Trial addition without propagation.** Every cell forms the sum of its three inputs as
   `x = a ^ ~b ^ c` and an "expected" carry `e = maj(a, ~b, c)`. Both are independent of the
   quotient bit. The +1 that completes the two's complement is fed as the expected carry into
   the lowest cell (`e = 1`).
2. **Sign look-ahead.** The true trial sum is the vector `x` plus the vector `e` moved up one
   column. Each cell gives the generate/propagate pair of its column, `G = x & e_in` and
   `P = x | e_in`. `sign_lookahead` turns the four pairs into the carry `c_cla` into column
   `j+4`. It is one two-level AND-OR expression.
3. **Sign column.** Column `j+4` has no cell. Four bits land in it: the sum bit `s` and the carry
   bit `c1` that the previous row left there, the top cell's expected carry `c2`, and `c_cla`.
   The trial remainder is non-negative exactly when bit `j+4` of the trial sum is 1, so
   `q_j = s ^ c1 ^ c2 ^ c_cla`.
4. **Gated carry-save step.** The cells now produce the row's real outputs,
   `s = a ^ c ^ (q & ~b)` and `c_out = maj(a, c, q & ~b)`. With `q = 0` the remainder is only
   re-coded into carry-save form: this is the restore. With `q = 1` the +1 is still owed. It is
   placed in the next row's carry vector at column `j`, which is always empty because no cell of
   this row sits to the right of it.
5. After the last row a 4-bit carry-look-ahead adder adds the two vectors and the owed +1 to give
   the remainder.

**Why a pending overflow does no harm.** In carry-save form, a subtraction that should have
carried out of the top of the row may leave that carry hidden in the two vectors. The next
row's remainder then reads too large by `2^(j+4)`. That is the next row's sign column plus one,
so bit `j+3`, the only bit that row looks at, does not change. The parity rule therefore needs
no correction term. An equivalent rule for the same sign, in majority/OR form, tracks such an
overflow with a "correction required" flag. With the flag clear, at most one of the four bits
is 1 and the sign is their OR; with it set, two or three are 1 and the sign is their majority.
That form saves gate levels, but it is not built here. In this array's wiring the flag is not
simply the previous row's `c_cla`: a restoring row (q = 0) can carry a pending overflow forward,
or absorb it, so the flag would need extra logic per row. Bit-level simulation of the array shows
this. The testbench of the top counts divisions in which a row's
look-ahead produced a carry, to show that this case is covered.

`muldiv_array` uses the same grid for multiplication. The XOR gates on `b` complement the divisor
only when `x = 1`. A switch per row feeds the cells either the multiplier bit `p[j]` or the row's
own quotient bit. An AND gate with `x` lets the owed +1 into the next row only when dividing.
Since the rows move one column right at a time, the top cell of every row leaves three bits that
no later row picks up. An extra row of N-1 full adders reduces them to two before the final adder.
`rs_multiplier` is the multiply-only form of the same grid.

Setting `PIPELINED = 1` on `muldiv_array` puts a latch bank after the operand inputs and after
every row. Each bank carries the operands, `x`, the carry-save rows formed so far and the
quotient bits found so far. A new multiplication or division can then start on every clock, and
its result appears N+1 rising edges later. The default is the combinational array, and its
`clk` and `rst_n` ports are then unused.

`fast_divider` removes the wait for the quotient bit in step 4. Its `mod_div_cell` computes
both the added pair (`a + c + ~b`) and the transfer pair (`a + c`) at once. The switches of the
*next* row then choose between them with the quotient bit. The sign-column bits `s` and `c1` are
selected the same way.

## Square root: a subtrahend that rewrites itself

To find root bit `r_k`, the partial remainder is compared with `(4R + 1) * 4^k`, where `R` holds
the root bits found so far. Written out, the subtrahends are `01`, then `0 r3 0 1`, then
`0 0 r3 r2 0 1`, and so on. Each one follows from the one before by a local rule:

- a `0` becomes the new root bit,
- a `1` becomes `0`,
- a root bit stays as it is,
- two fresh bits `0 1` appear at the bottom.

`sqrt_cell` therefore carries the subtrahend as a bit pair `(b, d)` and hands the next row, one
column to the right:

    g = d & (b | r)        next b
    h = b | (d & r)        next d

Equal pairs pass unchanged. `(0,1)` becomes `(r, r)` and `(1,0)` becomes `(0,1)`. The first row
receives `(0,1),(1,0)` in its two top columns, and every later row gets a fresh `(1,0)` in its
lowest column. The complementing XOR sits inside the cell (`b ^ x`), because the subtrahend
changes from row to row.

Squaring uses the same array with `x = 0`: the switches pass the bits of `f` instead of root
bits, and the array adds `f_k * (4F + 1) * 4^k` for each bit. The sum of these terms is `f*f`,
since `(2F + f_k)^2 = 4F^2 + f_k*(4F + 1)`.

In `sqrt_square_array`, row `k` has cells from column `2k` up to column `2N`. That top column is
one above the radicand and works as the sign column: with the complement also covering it, its
sum bit is the sign of the trial difference. The root bit is the inverse of
`x_top ^ e_top ^ c_cla`. With this layout the vectors never need an overflow correction, and no
extra carry-save row is needed.

Like the multiplier-divider, this array takes `PIPELINED = 1` to put a latch bank after its
inputs and after every row. The banks also carry the subtrahend pairs. One operand set enters
per clock, and its result appears N+1 rising edges later.

## The pipelined four-function array

`gen_pipeline_array` uses one set of N+1 rows (`gen_row`) of square/square-root cells, each
`W = 2N+1` columns wide, for all four operations. The operation is `op = {y, x}`:

| op | y | x | result |
|---|---|---|---|
| `OP_MUL` | 0 | 0 | `s = a + b*pf` |
| `OP_DIV` | 0 | 1 | `qr = a / b`, `s = a mod b` |
| `OP_SQR` | 1 | 0 | `s = a + pf*pf` |
| `OP_SQRT` | 1 | 1 | `qr = floor(sqrt(a))`, `s = a - qr*qr` |

- **Row usage.** Square root and square use rows 1..N: root bit `k = N-t` is found in row `t`.
  Multiply and divide use rows 2..N+1: quotient bit `j = N+1-t` is found in row `t`. In its
  unused row, an operation passes through as a transfer.
- **Live columns.** Which columns of a row take part depends on the operation: from column `j`
  for division step `j`, from `2k` for root step `k`. `gen_row` takes this lowest live column as
  an input. Columns below it pass their remainder bits and their pending subtrahend pairs straight
  down.
- **Subtrahend pairs.** For multiply and divide both bits of each pair carry `b` shifted to the
  top, so they move one column right per row, as `b * 2^j` must. For square and square root the
  pairs hold the fixed pattern `(0,1)` at column 2N-1 and `(1,0)` at every even column, which
  the cells expand as described above.
- **Sign.** Every row reaches column `2N`, one above all operands, so the sign rule is the same
  for all rows and operations.
- **Latches.** A latch bank follows the input and every row. Each bank holds:
  - the carry-save remainder,
  - the subtrahend pairs,
  - the operation and a valid bit,
  - the operand bits not yet used,
  - the quotient or root bits found so far.

  The result bits therefore travel with their operation, which plays the part of separate
  storage registers.
- **Final adder.** A carry-look-ahead adder after the last latch forms `s`.

Timing: present `in_valid`, `op`, `a`, `b` and `pf` before a rising edge. The result appears on
`out_valid`, `out_op`, `qr` and `s` N+2 rising edges later (6 for N = 4). Any mix of operations
may follow back to back, with no stalls. The irregular original layout needs an extra carry-save
row with its own latch bank, and so one more cycle. The full-width rows here make that row
unnecessary.

Setting the parameter `PIPELINED = 0` replaces every latch bank with wires. The same rows then
form a single combinational four-function unit, suited to uses where one operation at a time is
enough. In that form the results follow the inputs with no clock, and `clk` and `rst_n` are
unused. `rst_n` is a synchronous, active-low reset that clears
every latch. `qr` is meaningful for divide and square root only.

## How this differs from the original arrays

- **Sign rule.** The quotient bit uses the XOR (parity) form of the sign rule everywhere. The
  faster correction-flag form mentioned above is not built.
- **Square/square-root array.** It has one more cell per row (the sign column) than the original
  array, which has 2, 4, 6 and 8 cells per row with a separate 4-input XOR and an extra
  carry-save row.
- **Pipelined array, shape.** It uses a rectangular, full-width row whose live columns depend on
  the operation, instead of an irregular cell pattern. The original pattern needs "look-ahead
  terms for missing cells" after its irregular row and an extra carry-save row. The row
  assignment (root bits in rows 1-4, quotient bits in rows 2-5 for N = 4) and the control lines
  x, y follow the original design.
- **Pipelined array, cell count.** It has more cells than the original pattern: (N+1)(2N+1)
  = 45 against 22 for N = 4.
- **Modified cell.** `mod_div_cell` is written with active-high signals. The original cell
  works on complemented signals to save inverters.
- **Gate level.** Gate-level choices (NAND/NOR mapping, fan-in limits) are left to synthesis.
- **Not built.**
  - The left-shift multiplier, which can only multiply, is not included.
  - Dividing a sum, `(a + c) / b`, through the cells' free carry inputs is not offered. In this
    wiring the free inputs of the low columns sit in later rows. The carries of `a + c` in those
    columns would arrive after the higher rows have already chosen their quotient bits. The
    inputs are tied to 0.
  - The final adders are not split into two halves a row apart. That split is a fan-in measure
    for long words.
  - There is no fractional-number variant.
  - The pipelined array does not shift its outputs according to `y`. Both operation families
    already deliver results aligned to bit 0.

## Simulating

Each module has a self-checking testbench in `tb/`. Every testbench compares against integer
arithmetic and ends by printing `TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

    verilator --binary --timing -Wno-fatal -Irtl -y rtl --top-module tb_arith_arrays_top \
        rtl/arith_pkg.sv tb/tb_arith_arrays_top.sv
    ./obj_dir/Vtb_arith_arrays_top

`-y rtl` lets Verilator find each module in its own file. The package is named explicitly
because it is imported, not instantiated. `-Wno-fatal` keeps style warnings (such as unused
bits) from stopping the build. For a single unit, use the same command with that unit's testbench,
for example `--top-module tb_restoring_divider tb/tb_restoring_divider.sv`.

What the testbenches cover:

- **Cells:** exhaustive over all inputs.
- **Look-ahead:** exhaustive over every generate/propagate pattern of 8 columns (g implies p).
- **Adder:** exhaustive at 8 bits and random at 9 bits.
- **Separate arrays:** exhaustive at N = 4 (every valid division, every radicand, every product).
- **Pipelined array and top:** thousands of random mixed operations. Every result must appear
  exactly N+2 cycles after its operands. A latch-free copy (`PIPELINED = 0`) must give the same
  results at once. The testbenches of the multiplier-divider and the square/square-root array
  also run a pipelined copy, with a new operation every clock and an N+1 cycle latency. The top's testbench also checks that each mechanism
  occurred: each operation, back-to-back changes of operation, a full pipeline, restoring and
  subtracting rows, and a pending carry-save overflow.

- **Other sizes:** `tb_gen_pipeline_8bit` runs the pipelined array at N = 8 with random mixed
  operations and checks the N+2 = 10 cycle latency. `tb_muldiv_sizes` runs `muldiv_array` at
  every N from 2 to 8 side by side, in both its combinational and its pipelined form.

The other testbenches run at N = 4.
