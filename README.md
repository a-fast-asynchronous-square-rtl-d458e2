# Asynchronous square generator with box-and-ball operand merging

This is a circuit that squares a 16-bit number into a 32-bit result without
a multiplier. The square is written as a sum of eight *difference values*
(DValues), which one adder sums in turn. Two ideas make it fast:

* **Merging.** Many DValues have an all-zero lower half, and many of the
  smaller DValues are short enough to fit inside such a half. Where a small
  value fits, it is copied into the hole in the large value. That leaves a
  zero operand in its place, so there is one addition less to do.
* **Self-timed addition with zero skipping.** The adder signals when its
  carries have settled, so a short carry chain finishes early. Additions
  whose second operand is zero are skipped entirely (*ZeroPass*).

The design is a three-stage four-phase bundled-data asynchronous pipeline.
The RTL emulates its self-timed behaviour with a clock: one clock period
stands for one gate delay. That makes latency a data-dependent number of
clocks that can be measured in simulation.

## The arithmetic: recursive folding

Take a W-bit operand `x`. Split it into a 2-bit *code* `c = x[W-1:W-2]` and
the low part `M = x[W-3:0]`. Folding maps `x` to a (W-2)-bit operand
`x' = M XOR {W-2{x[W-2]}}`. This is a one's complement of `M` when bit
W-2 is set, and `M` unchanged otherwise. The fold is built so that

    x² = D(x) + x'²

where `D(x)` is a 2W-bit value that can be built from `c` and `M` with
wiring and inverters only:

| code `c` | `D(x)` (most significant first)            | lower half |
|----------|--------------------------------------------|------------|
| `00`     | 0                                          | –          |
| `10`     | `01`, `M`, W zeros                         | empty      |
| `01`     | `00`, `M`, `0`, `~M`, `1`                  | used       |
| `11`     | `1`, `M`, `00`, `~M`, `1`                  | used       |

For a W = 2 operand, `D` is just `x²` (0, 1, 4 or 9).

Applying the fold repeatedly gives operands of 16, 14, …, 2 bits and eight
DValues D32, D28, …, D4. The numbers are their widths for N = 16. The sum
of the eight DValues is `num²`. Level r (r = 0 for D32) has an operand of
N−2r bits.

## Stage 1 – one's complementer chain (`oc_chain`, `ones_complementer`)

Seven complementers in series produce the operands of levels 1…7 from
`num`. Each complementer is a row of XOR gates driven by one bit of the
previous operand, so the chain is seven XOR delays deep. The stage's
matched delay `DELAY1` is set to 7 clocks to cover that depth.

## Stage 2 – DValue generation and merging (`dvg_fa_stage`)

`dvg_high` builds the upper half of each DValue and `dvg_low` builds the
lower half. Both are pure wiring and gates selected by the level's code.
Three flags are derived per level:

* **Box**: a level with code `10`, whose lower half is empty. Only the
  three largest levels (D32, D28 and D24) are candidate boxes.
* **Ball**: a non-zero DValue among the three levels starting at the
  middle (D16, D12 and D8).
* **Zero**: the DValue is zero. These flags go to stage 3 as the
  ZeroFlag bus.

### The merging rule (`fast_algorithm`)

This is the least obvious part of the design.

Box j has a lower half of N−2j bits, so box 0 has 16 bits, box 1 has 14
and box 2 has 12. Ball k is a value of N−4k bits, so ball 0 has 16 bits,
ball 1 has 12 and ball 2 has 8. A ball fits a box when its width is no
greater than the box's hole, which works out to **j ≤ 2k**. The largest
ball (D16) therefore fits only box 0 (D32).

Assignment is greedy, largest ball first, with a scan pointer that only
moves towards smaller boxes:

    ptr = 0
    for each ball k = 0, 1, 2 that is non-zero:
        scan boxes j = ptr, ptr+1, ... while j <= 2k
            if box j is empty: put ball k there, ptr = j + 1, stop
        if no empty box was found, ptr moves past every box scanned

A placed ball is ORed into the box's lower half. Its own DValue becomes
zero, and its zero flag is set. The pointer makes the merge one pass with
no backtracking. It may miss an assignment that a full matching would
find, and that is intended. In hardware the loop is unrolled into a fixed
select matrix, `sel[j][k]`, followed by OR multiplexers.

The full algorithm allows N/4 boxes and balls (4 each for N = 16). The
generator uses three of each. The fourth ball, D4, is 4 bits wide and
would need box 3 (D20), which would be level N/4 itself. With three boxes
it cannot be placed, so dropping it costs nothing.
`tb_fast_algorithm` runs both the 3/3 and the 4/4 configurations.

**Worked example, num = 0xAA55.**
- Generated values: D32 = 6a551555, D28 = 6954680, D24 = 655060,
  D20 = 55400, D4 = 4.
- D16, D12 and D8 are zero because their codes are `00`. No ball exists,
  so nothing merges.
- Only the 5 non-zero DValues are added: four additions run and three
  are skipped.
- Result: 0x71550039. ZeroFlag = 0x0e, where bit 0 belongs to D4.

For num = 0x6655, no ball fits a box, so merging saves no addition.

## Stage 3 – hybrid adder with ZeroPass (`hybrid_adder_zeropass`)

### The adder (`hybrid_adder32`)

The adder is a 32-bit ripple adder with a dual-rail carry (true/false
rails) and single-rail sums.

- Each bit cell (`hybrid_adder_bit`) resolves its carry out locally on
  *generate* (a & b) or *kill* (neither bit set). On *propagate* it waits
  for the carry in.
- Bit 0 (`hybrid_adder_lsb`) has no carry in.
- Bit 30 (`hybrid_adder_slb`) drives only the true rail into bit 31.
- Bit 31 is a single XOR.

The done signals of bits 0…30 go to `completion_detector`. This is a
C-element with inputs AND(done) and OR(done). It rises when every carry is
known and falls only when every carry has returned to zero.

**Timing.** Each carry is registered, so it moves one bit per clock. After
`start` rises, `done` follows after *(longest propagate run + 2)* clocks.
Pulling `start` low clears both rails of every carry. That is the
return-to-zero phase.

### The sequencer (`adder_controller`)

A local four-phase loop runs the single adder seven times:

1. IDLE → REQ when `global_rin` rises.
2. REQ → RTZ when the local acknowledge arrives. The operation counter
   increments here.
3. RTZ → REQ for the next addition, or RTZ → DONE after the seventh.
4. DONE → IDLE when `global_rin` falls.

The counter reads 7 when the stage completes.

### The datapath

- Operand register Input1 takes D32 first, and the running sum afterwards.
- Input2 takes DValue *counter+1*.
- Both registers load while the local request is low, and hold while it is
  high.

**ZeroPass.** When Input2's zero flag is set, the adder is not started.
The local acknowledge is given at once, and the running sum just keeps
Input1. A skipped addition therefore costs about two clocks of handshake
instead of a carry chain.

## Pipeline control (`pipeline_stage_ctrl`, `c_element`)

Each stage has a matched delay on its incoming request, followed by a
C-element. The C-element's other input is the inverted acknowledge from
the next stage.

The C-element's output serves three roles at once:
- the request to the next stage;
- the acknowledge to the previous stage;
- the enable of the stage's data latch.

Stage 3 has no matched delay, because its request is the adder's
completion. Up to three squares can be in flight.

## Interface of the top (`async_square_gen`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | emulation time base; active-low reset (all handshakes low) |
| `req_in` | in | 1 | a new `num` is valid |
| `ack_out` | out | 1 | `num` has been taken |
| `num` | in | 16 | number to square |
| `req_out` | out | 1 | `result` is valid |
| `ack_in` | in | 1 | `result` has been taken |
| `result` | out | 32 | `num²` |

Both sides use the four-phase protocol: req↑, ack↑, req↓, ack↓. `num` must
be stable from `req_in` rising until `ack_out` rises. `result` is stable
from `req_out` rising until `ack_in` rises.

The parameters are:

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 16 | input width (must be a multiple of 4) |
| `NUM_BOX` | 3 | number of boxes used by the merging logic |
| `NUM_BALL` | 3 | number of balls used by the merging logic |
| `USE_FA` | 1 | 0 builds the same pipeline without merging |
| `DELAY1` | 7 | matched delay of stage 1, in clocks |
| `DELAY2` | 6 | matched delay of stage 2, in clocks |

## Results in the emulation

These are latencies from `req_in` rising to `req_out` rising, with
`USE_FA` = 1 and 0.

| input | with merging | without | gain |
|-------|--------------|---------|------|
| 0xAA55 (best case) | 63 clocks | 94 clocks | 33 % |
| 0x6655 (worst case) | 102 clocks | 102 clocks | 0 % |
| random, mean | 74.0 clocks | 81.2 clocks | 8.8 % |

For comparison, the original gate-level design reports 18 % for the best
case, 3 % slower for the worst case, and an expected gain of 8–11 % from
the merge statistics. In gate-level timing, the merging logic adds a little
delay to stage 2, which is what makes the worst case slightly slower. Here the logic settles within the
same matched delay in both builds, so that cost does not appear. Clock
counts are a relative measure only. They are not nanoseconds, and the
design has not been mapped to a cell library.

`tb_fa_statistics` exercises the merging logic exhaustively at N = 8, 12,
16, 20 and 24, with N/4 boxes and balls. For each width it checks:
- the mean number of operand bits removed per square: 2.3906, 5.6338,
  10.0098, 16.0452 and 23.2893 bits;
- the probability of each ball landing in a box.

`tb_fa_statistics_sampled` does the same for N = 28, 32, … 72 from random
inputs. The mean saved bits are 32.2 at N = 28, rising to 225.9 at N = 72,
which is 10.2 % to 11.3 % of all operand bits.

## Departures and own choices

- **Clocked emulation.** Registers stand in for C-elements and carry
  settling, with one clock per gate delay. Real self-timed gates would
  have no clock. All handshake orderings are kept.
- **Bit-0 adder cell.** The reference drawing of the bit-0 cell drives the
  false carry only on a kill. With that cell, the adder would never
  complete when exactly one operand bit is 1. Here, bit 0 drives the false
  rail whenever a & b is 0. This is the correct carry for a cell with no
  carry in.
- **Zero operands bypass the adder.** The original datapath has two
  operand latches, one of them holding the running sum. Here, a third
  register holds the running sum. On a skipped addition the adder is not
  started at all, and that register keeps Input1.
- **Matched delays** (`DELAY1` = 7, `DELAY2` = 6) are chosen for this
  emulation. Any value ≥ 1 is functionally safe, because combinational
  logic settles within one clock.
- **The merge** follows the algorithm's step-by-step form (moving scan
  pointer, width bound) wherever its prose summary could be read
  differently.
- **Box flag.** A box is a level whose code is exactly `10`.
- **Reset.** Everything resets to zero. No reset behaviour is specified
  for the original circuit.

## Simulating

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=<n> failures=<m>`. For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/sqgen_pkg.sv \
        tb/tb_async_square_gen.sv --top-module tb_async_square_gen -Mdir obj
    ./obj/Vtb_async_square_gen

- `tb_async_square_gen` runs the top at its default parameters. It covers
  the worked examples above, corner values and 3000 random inputs, with back-pressure on the
  output. It checks every result, and fails if merging, ZeroPass skips,
  full additions, output stalls or overlapping operations never occur.
- `tb_latency_table8` prints the latency comparison above.
- `tb_fa_statistics` (about half a minute) reproduces the merge
  statistics. It also needs `-Itb` for its helper `tb/fa_stats_probe.sv`.
- `tb_fa_statistics_sampled` (about a minute and a half) needs `-Itb` too,
  for `tb/fa_sample_probe.sv`.

`-Irtl` lets Verilator find submodules by their file names. The shared
types are in `rtl/sqgen_pkg.sv`.
