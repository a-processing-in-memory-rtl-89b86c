# Akers-array processing in memory, after a QCA design

An Akers logic array is a rectangular grid of identical three-input cells.
Each cell computes

    F(X, Y, Z) = X + Y·Z

where X comes from the cell above, Y from the cell to the left, and Z is the
cell's own control input. The cell drives F both right and down. The top edge
of the grid is tied to `0` and the left edge to `1`. The result is read at the
lower-right cell.

The processing-in-memory idea is to make Z a stored bit. The grid of stored
bits is then a memory, and the same grid, through the cell chain, also computes
a Boolean function of those bits. Which function it computes depends only on the
pattern of bits stored in it. The design this RTL follows is a proposal to
build such an array in quantum-dot cellular automata (QCA), published by
Chougule, Sen, Mukherjee, Patil, Kamat and Dongale (J. Nano- Electron. Phys.
9(1), 01021, 2017). Its worked example is a two-input exclusive-OR whose
operands sit in small QCA loop memories.

This RTL is the digital, cycle-based equivalent of that proposal. It models
the logic function and the storage. It does not model the QCA cells, their
energy or their polarization.

## How a stored pattern becomes a function

With `0` above and `1` on the left, a few rules fall out of the cell equation:

* Along the top row every cell sees X = 0, so F = Y·Z. The row is an AND chain
  of its stored bits.
* Down the left column every cell sees Y = 1, so F = X + Z. The column is an OR
  chain of its stored bits.
* An inner cell combines the two. The signal from above passes straight
  through (X is ORed in). The signal from the left passes only where the
  stored bit is 1.

The exclusive-OR uses a 2 × 2 grid whose stored bits are literals of the two
operands:

                 0         0
                 |         |
        1 -->  [ A ]  -->  [ ¬B ]
                 |         |
        1 -->  [ B ]  -->  [ ¬A ]  --> F

| cell        | X (above) | Y (left) | Z  | F               |
|-------------|-----------|----------|----|-----------------|
| upper left  | 0         | 1        | A  | A               |
| upper right | 0         | A        | ¬B | A·¬B            |
| lower left  | A         | 1        | B  | A + B           |
| lower right | A·¬B      | A + B    | ¬A | A·¬B + ¬A·B = A ⊕ B |

Other functions come from other patterns, and a larger grid holds larger
functions. The 3 × 3 array in this RTL stores nine bits. Any of its nine bits
can be rewritten one at a time, and the new function is available in the next
cycle.

## Operand memory: the loop ring and the QCA clock

This is the part whose timing needs the most care.

A QCA cell does not hold data by itself. The proposal stores each XOR operand
in a square loop of QCA wire, and the signal circulates in it. In the loop, the
input and output are two clocks apart. So after the input changes, the old
value is still seen for two more clocks. `memory_block` models the loop as a
ring of `LOOP_CLOCKS` = 2 one-bit stages:

* `adv` turns the ring by one stage.
* While `wr` is 1, the first stage takes the input `d`. While `wr` is 0, it
  takes the last stage, so the bit keeps going round.
* `q` is the last stage.

So a write becomes visible `LOOP_CLOCKS` advances after it starts. To store a
single bit cleanly, hold `wr` for `LOOP_CLOCKS` advances. That fills every
stage with the same value. If `wr` is held for fewer advances, the ring holds
a mix of old and new bits, and `q` alternates between them.

QCA logic is timed by four clock zones, clock 0 to clock 3. Each zone cycles
through *switch*, *hold*, *release* and *relax*. The zones are a quarter period
apart: when zone 0 is in switch, zone 1 is in hold, zone 2 in release and
zone 3 in relax. `qca_clock_gen` produces these four phases. It moves every
zone by one phase per enabled cycle. It raises `period_end` in the cycle in
which zone 0 is in relax, which is the last phase of a full QCA period.

In the top level, `period_end` drives the rings' `adv`. Each ring stage is
therefore one full QCA period, or four RTL cycles. With the defaults:

| event                                     | when                                      |
|-------------------------------------------|-------------------------------------------|
| ring turns                                | clock edge at which `qca_period` is 1, every 4th cycle |
| `xor_a_q`, `xor_b_q`, `xor_f` after a write started just after a turn | 8 cycles later (2 periods)     |
| `xor_f` after `xor_a_q` / `xor_b_q` change| same cycle (combinational)                |
| `arr_r_data`, `arr_f` after an array write | next cycle (visible right after the edge) |

Counting one ring stage as one full QCA period, rather than one clock zone, is
a choice this RTL makes. The published description only says "two clocks". To
use a zone per stage instead, drive `adv` every cycle. The end-to-end test
checks the 8-cycle latency, so it fails if that change is made.

## Blocks

| module            | what it is                                                        |
|-------------------|-------------------------------------------------------------------|
| `qca_pkg`         | phase enum `qca_phase_e`, `NUM_ZONES` = 4, polarization constants (−1 = 0, +1 = 1) |
| `akers_cell`      | F = X + Y·Z, two identical outputs; combinational                  |
| `akers_array`     | ROWS × COLS grid of cells (default 3 × 3), edge constants 0 / 1, control vector `z` row-major (bit r·COLS + c) |
| `memory_block`    | one-bit loop ring, `LOOP_CLOCKS` = 2                               |
| `qca_clock_gen`   | four-zone, four-phase QCA clock with a period strobe               |
| `akers_pim_array` | Akers array whose cells store their Z bits; addressed 1-bit write and read ports plus the function output |
| `akers_xor_pim`   | 2 × 2 XOR array (A, ¬B / B, ¬A) fed by two `memory_block`s         |
| `qca_akers_pim`   | top: `qca_clock_gen` clocking `akers_xor_pim`, with a 3 × 3 `akers_pim_array` beside it |

Top-level parameters: `LOOP_CLOCKS` (2), `ARR_ROWS` (3), `ARR_COLS` (3). All
resets are active-low and synchronous. They clear the rings, the array's stored
bits and the clock phase, so that after reset zone 0 is in switch.

The two halves of the top level are independent and share only the clock and
the reset. The published design connects neither to the other: the XOR gate is
its implemented example, and the general array is its proposal.

## What follows the published design, and what is chosen here

Taken from the published design:

* the cell equation
* the `0` / `1` edge constants
* the result at the lower-right cell
* the 3 × 3 array size
* the XOR cell pattern
* one memory loop per XOR operand, with two clocks from input to output
* the four clock zones, their phase order and their offsets

Chosen here, because the published description does not fix them:

* The cells have no internal delay. The QCA cell layout, with its fixed −1.00 /
  +1.00 cells, is reduced to its Boolean function.
* The memory rings have a write enable. A digital ring needs one to keep a bit
  while its input changes.
* Each ring stage lasts one full QCA period, as described above.
* The array's Z bits are written and read one cell at a time, through an
  address port. Writes to an address outside the array are ignored. Reads
  outside it return 0.
* The XOR array's control inputs come from the stored operands. The inverted
  literals come from inverting those stored bits.
* Reset values and the 2-bit phase encoding.

Not modelled:

* the physical QCA cell
* the 184-cell, 19-clock-zone XOR layout
* the power-dissipation and polarization analyses

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_akers_cell` checks all 8 input combinations on both outputs.
* `tb_akers_array` checks all 512 patterns of the 3 × 3 array against a grid
  model. It also checks the AND-row and OR-column rules, and the 2 × 2 XOR
  pattern for all four operand pairs.
* `tb_memory_block` checks:
  * the two-advance latency
  * that a bit is kept while the input toggles
  * that nothing moves while `adv` is low
  * that a continuous write behaves as a two-stage delay line
* `tb_qca_clock_gen` checks:
  * the phase of every zone at every step, against the switch → hold → release → relax order and the quarter-period offsets
  * the freeze while `en` is low
  * one `period_end` per four enabled steps
* `tb_akers_pim_array` makes 300 random single-cell writes. After each one it
  reads back every cell and checks the function against a grid model. It also
  checks that writes to addresses outside the array change nothing.
* `tb_akers_xor_pim` checks all operand pairs three times, with the exact
  write latency and with the operands held while the inputs change.
* `tb_qca_akers_pim` runs the whole top level at its default parameters:
  * XOR of each of the four operand pairs, with an 8-cycle write latency
  * operands held over three QCA periods
  * zone offsets and the period strobe, checked every cycle
  * the 3 × 3 array alternating between memory use (write and read-back) and evaluation, with results of both 0 and 1
  * ignored out-of-range writes, and the XOR pattern loaded into the array
  
  It counts each of these mechanisms. A mechanism that never happens counts as
  a failure.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/qca_pkg.sv tb/tb_qca_akers_pim.sv --top-module tb_qca_akers_pim
    ./obj_dir/Vtb_qca_akers_pim

Replace the testbench name to run another one. The package `rtl/qca_pkg.sv`
must be listed first. Each testbench finishes in well under a second.

## Changing it

* **Array size:** set `ROWS` / `COLS` on `akers_pim_array`, or `ARR_ROWS` /
  `ARR_COLS` on the top level. The address ports widen to `$clog2` of the
  size.
* **Ring length:** set `LOOP_CLOCKS`. Hold `wr` for that many advances to store
  a bit.
* **Another function:** write its stored pattern into `akers_pim_array`. For
  example, with `A` and `B` in the upper-left 2 × 2 laid out as in the XOR
  table, a 1 at (1,2), and 0 elsewhere, the 3 × 3 array also gives A ⊕ B at its
  output. The top-level test uses this pattern.
