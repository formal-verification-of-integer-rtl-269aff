# Integer dividers by a constant: look-up-table and restoring architectures

Dividing by a number that is fixed at design time (averaging three values,
splitting addresses across memory banks, converting between bases) does not
need a general divider. This RTL implements two ways of building such a
divider, plus a general restoring divider for reference:

* a **table-based divide-by-constant divider**: long division done in chunks,
  where each chunk is handled by a small look-up table;
* a **restoring divider with a hardwired divisor**, where constant
  propagation in synthesis specialises a standard restoring array;
* a **generic restoring divider**, with the divisor as an input.

All three are unsigned and purely combinational: no clock, no reset, no
handshake. A result is valid one propagation delay after the inputs change.

## Long division with look-up tables

Write the dividend `X` (k bits) as N chunks of n bits, most significant
first. Long division by hand processes one chunk at a time: the remainder
left after the previous chunk is placed in front of the next chunk, the
resulting number is divided by `D`, the quotient digit is written down and
the new remainder is carried on. One step of this is the basic block
(`divc_lut_block`):

    C_i * 2^n + X_i = D * Q_i + R_i,     0 <= R_i < D

* `C_i` is the carry-in, the remainder of the more significant block;
* `X_i` is the n-bit dividend chunk, `Q_i` the n-bit quotient chunk;
* `R_i` is the remainder, passed on as the carry-in of the next block.

Because `C_i < D`, the value `C_i * 2^n + X_i` is below `D * 2^n`, so the
quotient chunk always fits in n bits. The carry and remainder need
`m = floor(log2(D-1)) + 1` bits (that is `ceil(log2 D)`; 2 bits for D = 3,
5 bits for 17 or 31, 9 bits for 257 or 283). `divider_pkg::rem_bits`
computes it.

Each block is nothing but a table with `2^(m+n)` entries of `n+m` bits,
addressed by `{C_i, X_i}`. The table is generated during elaboration from
the equation above; synthesis turns it into a ROM or logic. Example for
D = 3, n = 1:

| C | X | 2C+X | Q | R |
|---|---|------|---|---|
| 0 | 0 | 0 | 0 | 0 |
| 0 | 1 | 1 | 0 | 1 |
| 1 | 0 | 2 | 0 | 2 |
| 1 | 1 | 3 | 1 | 0 |
| 2 | 0 | 4 | 1 | 1 |
| 2 | 1 | 5 | 1 | 2 |
| 3 | x | –  | – | – |

### Unreachable table entries

Addresses with `C_i >= D` never occur, since the carry-in is always a
remainder of a correct block (or an external carry-in below `D`). How many
such entries a table has depends on how close `D` is to a power of two: for
D = 17 (m = 5, n = 1) only 34 of the 64 entries are reachable, for D = 31
it is 62 of 64. These entries are free for logic minimisation. In this RTL
the LUT fills them with zero, so simulation is deterministic; a synthesis
flow that should exploit them can be given don't-cares instead. The
gate-level block below shows what a minimisation that uses them looks like:
for the unreachable inputs its outputs are not a valid division.

A consequence for anyone who reuses a block: driving a carry-in of `D` or
more gives a result that is not a division. The modular divider never does
so internally; its `c_in` port carries the same rule.

### The cascade (`divc_modular`)

`divc_modular` chains `N = ceil(k/n)` blocks. The most significant block
takes the external carry-in `c_in`; every block passes its remainder to the
next; the last remainder is the remainder of the division, and the quotient
chunks side by side are the quotient:

    c_in * 2^(N*n) + x = D * q + r

For a stand-alone divider `c_in` is 0. With a non-zero `c_in` two dividers
can be chained into a wider one: divide the upper word first, feed its
remainder as `c_in` of the lower word (the end-to-end testbench builds a
64-bit divide-by-3 this way). When `k` is not a multiple of `n`, the unused
inputs of the most significant block are tied to zero and `q` is `N*n` bits
wide.

The block width `n` is a trade-off: the table of one block grows as
`2^(m+n)`, the number of blocks in the carry chain falls as `k/n`, and the
delay is set by that chain. One-bit blocks (the default) give the smallest
tables; two- and four-bit blocks are supported and tested as well.

Each block stays a separate instance. Synthesised with its hierarchy kept
this is the "modular" form, in which the block boundaries and the carry
signals between them remain visible in the netlist; synthesised flat it
becomes one optimised network ("flat unroll"), with the same function and
no separate RTL.

### A gate-level block (`div3_gate_block`)

The one-bit divide-by-3 block written as gates instead of a table:

    q0 = c1 | (c0 & x0)
    r1 = (c0 & ~x0) | (c1 & x0)
    r0 = (~c1 & ~c0 & x0) | (c1 & ~x0)

These equations are a two-level minimisation of the table above that uses
carry-in 3 as a don't-care. Written as polynomials over the inputs
(`a & b = ab`, `a | b = a + b - ab`, `~a = 1 - a`), the weighted outputs
`3*q0 + 2*r1 + r0` come to `4*c1 + 2*c0 + x0 - 2*c1*c0*x0`. The extra term
contains `c1*c0`, which is zero for every reachable input, so the block
satisfies `2C + X = 3Q + R` wherever it is used. For the unreachable
input C = 3, X = 1 it returns 5 instead of 7. A cascade of these blocks
computes the same quotient and remainder as `divc_modular` with D = 3, n = 1.

## Restoring dividers

`restoring_stage` is one row of an unrolled restoring divider: it shifts the
next dividend bit into the partial remainder, subtracts the divisor, and
either keeps the difference (quotient bit 1) or keeps the shifted value
(quotient bit 0, the "restore"). If the incoming remainder is below the
divisor, so is the outgoing one.

* `restoring_const_divider` chains K rows with the divisor input of every
  row tied to the constant `D`. Since the partial remainder never reaches
  `D`, each row is only `m` bits wide. Synthesis folds the constant into the
  subtractors. Default: D = 3, 16-bit dividend.
* `restoring_generic_divider` chains W rows with the divisor as a W-bit
  input and a W-bit partial remainder. Default W = 20. Division by zero is
  not trapped: every trial subtraction succeeds, so `q` is all ones and `r`
  equals `x`; the testbenches check this behaviour.

Both restoring dividers are a ripple through K (or W) subtractors and are
far slower than they are small; they are written for clarity, not speed.

## Top level (`divider_suite`)

The architectures do not share anything; the top simply places them side by
side, each with its own ports:

| prefix | divider | default size |
|--------|---------|--------------|
| `mod_` | `divc_modular`, inputs `mod_c_in`, `mod_x` | D = 3, 32-bit dividend, 1-bit blocks |
| `g3_`  | `div3_gate_block`, one block | D = 3, 1 bit |
| `rc_`  | `restoring_const_divider` | D = 3, 16-bit dividend |
| `gen_` | `restoring_generic_divider`, inputs `gen_x`, `gen_d` | 20-bit operands |

Parameters `MOD_D`, `MOD_K`, `MOD_N_BITS`, `RC_D`, `RC_K` and `GEN_W` set
the sizes. Any divisor from 2 upwards is accepted; D = 0 and 1 are rejected
at elaboration for the constant dividers.

## Files

| file | content |
|------|---------|
| `rtl/divider_pkg.sv` | `rem_bits`, `num_blocks` |
| `rtl/divc_lut_block.sv` | look-up-table block |
| `rtl/divc_modular.sv` | cascade of look-up-table blocks |
| `rtl/div3_gate_block.sv` | gate-level divide-by-3 block |
| `rtl/restoring_stage.sv` | one restoring row |
| `rtl/restoring_const_divider.sv` | restoring divider, constant divisor |
| `rtl/restoring_generic_divider.sv` | restoring divider, divisor input |
| `rtl/divider_suite.sv` | top level |
| `tb/tb_*.sv` | self-checking testbenches |
| `tb/chk_*.sv` | per-instance checkers used by the workload testbenches |

## Verification

Every testbench compares the outputs with integer division computed inside
the testbench, and ends by printing `TB_RESULT checks=<n> failures=<n>`.
Each has a watchdog that records a failure if the run does not finish.

| testbench | what it covers |
|-----------|----------------|
| `tb_divc_lut_block` | every reachable address for D = 3/n = 1, D = 17/n = 2, D = 283/n = 4 |
| `tb_div3_gate_block` | all eight inputs, including the two unreachable ones |
| `tb_restoring_stage` | every divisor, remainder and bit for W = 5, plus divisor 0 |
| `tb_divc_modular` | defaults plus D = 17/n = 2, D = 283/n = 4 with padding; D = 5 (1-bit blocks) and D = 3 (two 2-bit blocks) on 4-bit words, exhaustive over every carry-in; corners and random carry-ins |
| `tb_restoring_const_divider` | all 16-bit dividends for D = 3, 61, 283 |
| `tb_restoring_generic_divider` | 6 bits exhaustive, 20 bits random and corners |
| `tb_divider_suite` | whole top at default parameters: 32-bit division, 64-bit division through chained carry-in, the gate block stepped over a 32-bit word against the LUT divider, restoring dividers; counts that zero remainder, largest remainder, zero quotient, division by zero and by one all occurred |
| `tb_table1_divisors` | 32-bit dividers for D = 3, 11, 17, 31, 61, 89, 113, 139, 191, 251, 257, 283 (1-bit blocks), 2- and 4-bit blocks for 3 to 61, and 16-bit restoring constant dividers for 3 to 61 over every dividend |
| `tb_fig7_exhaustive` | D = 257 and 283, LUT and restoring constant dividers, every dividend of 8, 12, 16, 20 and 24 bits (about a minute) |
| `tb_table2_generic` | generic divider, every operand pair for widths 3 to 10, random at 20 bits |

Running one with Verilator, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal \
      -y rtl -y tb +libext+.sv rtl/divider_pkg.sv tb/tb_divider_suite.sv \
      --top-module tb_divider_suite
    ./obj_dir/Vtb_divider_suite

The 32-bit dividers were tested with random vectors and corners, not
exhaustively; exhaustive runs reach 24 bits.

## Choices made in this design

* The look-up table contents are computed from the division equation at
  elaboration; unreachable entries are zero rather than don't-care.
* The modular divider is parameterised by block width `n`; the number of
  blocks follows from the dividend width. Its quotient port is `N*n` bits.
* The gate-level divide-by-3 block uses this design's own minimisation of
  its truth table; other gate networks with the same function on the
  reachable inputs are equally valid.
* The restoring rows are the textbook shift/subtract/restore row; the
  constant divider uses `m`-bit rows, the generic one `W`-bit rows with a
  W-bit divisor. Division by zero in the generic divider returns all-ones
  and the dividend.
* No registers anywhere. Pipelining, if needed, is left to the user: the
  carry signals between blocks (or rows) are the natural cut points.
