# 16-bit shift-and-add multiplier with a square-root carry-select adder

This is a sequential unsigned multiplier. It takes two 16-bit operands and
returns a 32-bit product. It uses the textbook add-and-shift method: look at
one multiplier bit per step, add the multiplicand when that bit is 1, and shift
everything right by one. The clock period of such a machine is set by the adder
in its loop. So the adder here is a 16-bit **square-root carry-select adder
(SQRT CSLA)** instead of a plain ripple-carry adder. In that adder the carry
crosses each group through a single 2-to-1 multiplexer instead of rippling
through every bit.

The RTL is structural where the original description is structural. Half
adders make full adders. Full adders make ripple-carry adders. Pairs of those
plus multiplexers make carry-select stages, and five groups make the 16-bit
adder. The controller and the accumulator are behavioural SystemVerilog.

## Block diagram

```
                 +--------------------+
 multiplicand -->| shift_register_16  |--mcand--+
                 | (block1, PIPO reg) |         |  x
                 +--------------------+         v
                                        +---------------+
                        +-------------->| sqrt_csla_16  |--sum[15:0]--+
                        | y = b_msb     | (block2)      |--carry_out--+|
                        |               +---------------+             ||
                        |                                             vv
 multiplier ------------|------------->+--------------------------------+
                        +--------------| accumulator_32 (block3)        |--> product[31:0]
                                       | {carry, high[15:0], low[15:0]} |
                                       +--------------------------------+
                                         ^ load/add/shift       | lsb
                                       +--------------------------------+
 start ------------------------------->| controller_fsm (block4)        |--> stop
                                       +--------------------------------+
```

All four blocks share one clock and one asynchronous, active-high reset.

## How a product is formed

The accumulator is a 33-bit register `{carry, high, low}`:

1. **LOAD**: `low <= multiplier`, `high <= 0`, `carry <= 0`.
2. Then, 16 times:
   - **TEST**: the controller looks at `low[0]` (the `lsb` output).
   - **ADD** (only if `lsb = 1`): `{carry, high} <= high + multiplicand`.
     The adder's carry-out goes into the carry bit, so no bit is lost.
   - **SHIFT**: `{carry, high, low} >>= 1`, with a 0 entering at the top.
     The multiplier bit just used drops out of the bottom.
3. Back to **IDLE**. `product = {high, low}` now holds
   multiplicand × multiplier.

Each ADD puts multiplicand × 2^16 into the register, and the 16 later shifts
scale each addition by the weight of its multiplier bit. As the multiplier
bits shift out of `low`, product bits shift in behind them.

Worked example, shown with 4-bit operands (multiplicand 1010 = 10,
multiplier 0010 = 2):

| step | `high low` | action |
|------|------------|--------|
| load | 0000 0010 | lsb = 0 |
| 1    | 0000 0001 | shift; lsb = 1 |
| add  | 1010 0001 | high += 1010 |
| 2    | 0101 0000 | shift; lsb = 0 |
| 3    | 0010 1000 | shift; lsb = 0 |
| 4    | 0001 0100 | shift -> 20 |

## The square-root carry-select adder

`sqrt_csla_16` is the hardest part to understand and the reason for the
design. It splits the 16 bits into five groups that grow towards the MSB:

| bits     | group                          | carry-in            |
|----------|--------------------------------|---------------------|
| [1:0]    | 2-bit ripple-carry adder       | tied to 0           |
| [3:2]    | 2-bit carry-select stage       | carry out of [1:0]  |
| [6:4]    | 3-bit carry-select stage       | carry out of [3:2]  |
| [10:7]   | 4-bit carry-select stage       | carry out of [6:4]  |
| [15:11]  | 5-bit carry-select stage       | carry out of [10:7] -> `carry_out` |

A carry-select stage (`carry_select_adder`) holds two ripple-carry adders of
its width. They add the same operand bits at the same time, one assuming an
incoming carry of 0 and one assuming 1. When the real carry arrives, one
`mux_2x1` picks the matching sum and another picks the matching carry-out.
So after the first group, the carry crosses each stage through one mux: four
mux delays in all.

Why the groups grow: a group's two adders start as soon as the operands
arrive. Its select carry arrives later, and later still for groups further
up. A group can therefore be one bit longer than the group below it and still
be ready in time. With group sizes 2, 3, 4, 5, ..., about √(2N) groups cover
N bits, hence the name. A plain carry-select adder with equal groups needs
more mux stages or longer ripples.

The RTL has no timing. The speed advantage exists only in a real
implementation, where the worst path is the 2-bit ripple followed by four muxes.

## Controller and timing

`controller_fsm` is a Moore machine:

```
IDLE  (stop=1)          --start=1--> LOAD
LOAD  (load_command=1)  ----------> TEST
TEST                    --lsb=1---> ADD      --lsb=0--> SHIFT
ADD   (add_command=1)   ----------> SHIFT
SHIFT (shift_command=1, count+1)  --16th shift--> IDLE, otherwise --> TEST
```

One multiplication therefore takes

    latency = 2 + 2·16 + ones(multiplier) = 34 + ones(multiplier) clock edges,

from the edge that samples `start` to the edge that raises `stop` again. That
is 34 to 50 cycles. At a 10 ns clock, 10 × 2 takes 35 cycles (350 ns). The
original design reports about 345 ns for this case and describes the run as
"16 clock cycles". That count matches the 16 shift iterations, not the clock
count of the state machine it specifies. This RTL follows the state machine.

## Interface of `hs_parallel_multiplier_16`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clock` | in | 1 | rising-edge clock |
| `reset` | in | 1 | asynchronous, active high; clears all registers, controller to IDLE |
| `start` | in | 1 | level: sampled high in IDLE starts a multiplication |
| `multiplicand` | in | 16 | unsigned; must stay stable from one clock before `start` until `stop` |
| `multiplier` | in | 16 | unsigned; sampled in the LOAD cycle (the cycle after `start` is taken) |
| `product` | out | 32 | valid while `stop = 1` after a run; held until the next start |
| `stop` | out | 1 | high when idle and the product is ready |

Usage: set the operands, raise `start` for one clock while `stop = 1`, lower
it, and wait for `stop` to rise. If `start` is still high when a run ends, the
next run begins straight away.

The multiplicand register (`shift_register_16`) has no enable. It is a
parallel-in, parallel-out register of 16 D flip-flops and copies its input on
every clock edge, so the multiplicand input must not change during a run. The
name "shift register" is historical: the block does not shift.

## Choices made here

The original description leaves these points open; this RTL decides them:

- Reset is asynchronous and active high everywhere. Flip-flops trigger on the
  rising edge.
- The accumulator has a 33rd carry bit that catches the adder's carry-out.
  Without it, products whose partial sums overflow 16 bits would be wrong.
- If the accumulator ever saw two commands at once, load would win over add and
  add over shift. The controller never does this, and an assertion in
  `accumulator_32` checks it.
- The shift counter is cleared in LOAD. "count = 16" means after the
  increment of the current SHIFT, so exactly 16 shifts happen.
- The state encoding is binary, 3 bits, and the counter is 5 bits wide.
- The 2-, 3-, 4- and 5-bit ripple-carry and carry-select adders are each one
  module with a `WIDTH` parameter. `mux_2x1` also has a `WIDTH` parameter, so it
  can select a whole group sum.
- Operands are unsigned. There is no signed mode.

Not included: the 16-bit carry-lookahead, plain carry-select and ripple-carry
adders that the original work built only as speed comparisons, and all timing
figures (gate and mux delays), which are properties of an FPGA implementation.

## Files

| file | content |
|------|---------|
| `rtl/mult_pkg.sv` | operand width, controller state enum, accumulator command struct |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | 1-bit adders (full adder = two half adders + OR) |
| `rtl/ripple_carry_adder.sv` | `WIDTH`-bit ripple-carry adder |
| `rtl/mux_2x1.sv` | `WIDTH`-bit 2-to-1 mux |
| `rtl/carry_select_adder.sv` | `WIDTH`-bit carry-select stage |
| `rtl/sqrt_csla_16.sv` | 16-bit square-root carry-select adder |
| `rtl/d_flip_flop.sv`, `rtl/shift_register_16.sv` | multiplicand register |
| `rtl/accumulator_32.sv` | right-shifting accumulator with carry bit |
| `rtl/controller_fsm.sv` | control state machine |
| `rtl/hs_parallel_multiplier_16.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification and simulation

Each testbench compares the module with values computed independently in the
testbench. Each prints `TB_RESULT checks=N failures=M` and has a watchdog.

- The adders are checked exhaustively up to 5 bits. The 16-bit adder gets 20,000
  random pairs plus carry-chain corner cases.
- The accumulator is checked against a 33-bit reference register under random
  command streams.
- The controller's outputs are compared cycle by cycle with the prescribed
  state sequence, and its latency is checked.
- `tb_hs_parallel_multiplier_16` runs 324 multiplications at the real 16-bit
  size: 10 × 2, corner cases, single-bit multipliers and random pairs. It
  checks each product and the latency of 34 + ones(multiplier) cycles. It also
  counts that every mechanism occurred: load, add, skipped add, shift, adder
  carry-out into the carry bit, and an immediate restart with `start` held.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/mult_pkg.sv tb/tb_hs_parallel_multiplier_16.sv \
    --top-module tb_hs_parallel_multiplier_16 -o sim
./obj_dir/sim
```

Swap in any other `tb/tb_<module>.sv` and its top-module name to test a single
block. The full multiplier test finishes in well under a second.
