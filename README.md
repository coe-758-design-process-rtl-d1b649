# Staggered reset generator

A small synchronous block that turns one external reset into three
auxiliary resets of different lengths. All three rise together when the
external reset is seen. They are then released one after another: `rstAux3`
first, then `rstAux2`, then `rstAux1`. Logic that sits behind `rstAux3`
leaves reset first, and logic behind `rstAux1` leaves it last. After the
last release the block returns to rest and waits for the next external
reset.

The design is a textbook example of the flow from specification to a
symbol, then a block diagram, then an FSM. It is built from:

- a cycle counter,
- three equality comparators on the count,
- a six-state Moore controller.

It also has debug outputs, so an on-chip logic analyser can watch its
internals.

## Symbol

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `clk`     | in  | 1     | system clock (specified at 50 MHz) |
| `rst`     | in  | 1     | external reset, active high, sampled only when the block is at rest |
| `rstAux1` | out | 1     | longest auxiliary reset, active high |
| `rstAux2` | out | 1     | middle auxiliary reset |
| `rstAux3` | out | 1     | shortest auxiliary reset |
| `debSt`   | out | 3     | debug: controller state code 0..5 |
| `debC`    | out | 5     | debug: counter value |
| `debM16`, `debM24`, `debM30` | out | 1 | debug: comparator flags |

The top module has four parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `CNT_W`   | 5       | counter width |
| `MATCH3`  | 16      | count at which `rstAux3` is released |
| `MATCH2`  | 24      | count at which `rstAux2` is released |
| `MATCH1`  | 30      | count at which `rstAux1` is released |

An elaboration-time assertion checks that `MATCH3 < MATCH2 < MATCH1 < 2**CNT_W`.

## Structure

```
                 inc, clr
 rst --->+-----------+------->+------------+  count
         |           |        | up_counter |----+----> [ == MATCH3 ] --match16--+
         | reset_fsm |        +------------+    +----> [ == MATCH2 ] --match24--+
         |           |                          +----> [ == MATCH1 ] --match30--+
         |           |<-------------------------------------------------------+
         +-----------+---> rstAux1, rstAux2, rstAux3, debSt
```

- **`up_counter`**: a 5-bit counter. On a clock edge it clears when `clr`
  is high, otherwise it increments when `inc` is high. `clr` wins over
  `inc`.
- **`match_comparator`**: raises `match` while `count == VALUE`. The block
  uses the combinational form. A `REGISTERED` parameter gives a variant
  whose flag comes one cycle later; the thresholds do not allow for that
  delay, so do not use it in this block without also lowering them by one.
- **`reset_fsm`**: the controller (next section).
- **`reset_block_pkg`**: holds the state enumeration, the output struct and
  the default constants.

## The controller

The controller is a Moore machine, so its outputs depend only on the state:

| state | meaning | `inc` | `clr` | `rstAux1` | `rstAux2` | `rstAux3` | leaves when | to |
|-------|---------|:-:|:-:|:-:|:-:|:-:|---|---|
| S0 | rest                | 0 | 0 | 0 | 0 | 0 | `rst` = 1   | S1 |
| S1 | all three asserted  | 1 | 0 | 1 | 1 | 1 | `match16` = 1 | S2 |
| S2 | two asserted        | 1 | 0 | 1 | 1 | 0 | `match24` = 1 | S3 |
| S3 | one asserted        | 1 | 0 | 1 | 0 | 0 | `match30` = 1 | S4 |
| S4 | all released        | 0 | 0 | 0 | 0 | 0 | always      | S5 |
| S5 | clear counter       | 0 | 1 | 0 | 0 | 0 | always      | S0 |

Codes 6 and 7 are never reached. If one ever occurs, all outputs are low and
the next state is S0. `rst` is only looked at in S0. A reset pulse that
arrives while a sequence runs has no effect. If the reset is still high
when S0 is reached, a new sequence starts on the next edge.

## Timing

This is the part that matters most when the block is used. Let E0 be the
clock edge that first samples `rst` = 1 in S0.

- All three auxiliary resets rise just after E0. The count is 0 in the
  first cycle and *n* in the cycle after edge E0+*n*.
- A comparator flag is high in the cycle where the count equals its value.
  The controller acts on it at the next edge. So `rstAux3` falls after edge
  E0+17, `rstAux2` after E0+25 and `rstAux1` after E0+31.
- The resets are therefore high for **17, 25 and 31 cycles** (MATCH+1 each).
- S4 and S5 take two more cycles. The block is back in S0 after edge E0+33.
- With the reset held high, sequences repeat every **34 cycles**.

The resets are released one cycle later than a strict reading of "16, 24
and 30 cycles" would give, because of the one-edge reaction to each flag.
The design keeps the compare-then-react structure and its measured lengths.
For exactly 16/24/30 cycles, set `MATCH3/2/1` to 15/23/29.

With a 4-cycle external reset pulse at 50 MHz, one sequence takes 680 ns.
The last three cycles of the pulse fall inside the sequence and are
ignored.

## Power-up and design choices

- **No power-on reset port.** The only reset input is the one the block
  monitors. The state register and the counter start at S0 and 0 through
  their declaration initial values, which an FPGA bitstream loads. On an
  ASIC, or any target that does not honour initial values, you must add a
  power-on reset to `reset_fsm` and `up_counter`.
- **Synchronous counter clear.** The counter is cleared on the clock edge
  while the controller is in S5. The alternative is an asynchronous clear
  driven by a decoded state, which can glitch. In every cycle after S5 the
  count is zero either way. The only visible difference is on `debC` during
  S5: it still shows 31 (`1F`) and reads `00` from the next cycle. A
  design with an asynchronous clear would show `00` already during S5.
- **Debug ports.** `debSt`, `debC` and `debM*` are plain outputs. They are
  meant for a vendor logic-analyser core and a virtual-I/O core that drives
  `rst`. Those cores are not part of this RTL. A typical probe word is
  `{0, debM30, debM24, debM16, debC, debSt, rstAux3, rstAux2, rstAux1, rst}`
  (16 bits), with the trigger on `rst`.
- Whether the design meets 50 MHz depends on the target. The longest path is
  a 5-bit compare into a 3-bit next-state decode.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_up_counter` | Power-up value, then 2000 cycles of random `inc`/`clr` against a reference count, including wrap-around and clear priority. |
| `tb_match_comparator` | All 32 count values and then random ones, for thresholds 16/24/30 in the combinational form (same-cycle flag) and 16 in the registered form (flag one cycle later). |
| `tb_reset_fsm` | 5000 cycles of random `rst` and match flags against a reference state table. Every arc of the state diagram must be taken. |
| `tb_reset_block` | The whole block at default parameters (below). |

`tb_reset_block` runs the whole block at its default parameters with a
20 ns clock, in four phases:

1. The specified 4-cycle reset pulse. It checks the 31/25/17-cycle lengths
   and the return to rest 33 edges after the trigger.
2. A pulse in the middle of a sequence, which must be ignored.
3. A reset held for 250 cycles, which must give 8 back-to-back sequences.
4. 3000 cycles of random reset activity.

Throughout, every output, including the debug state, count and flags, is
compared after every edge with a cycle model in the testbench. The test
counts each mechanism (trigger, each release, counter clear, ignored
reset, retrigger from a held reset) and fails if any of them never
happens.

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl +libext+.sv \
  rtl/reset_block_pkg.sv tb/tb_reset_block.sv --top-module tb_reset_block
./obj_dir/Vtb_reset_block
```

The package must come first on the command line. `-Wno-fatal` keeps
the width-extension warnings of the testbenches from stopping the build. Verilator finds the other
modules through `-y rtl`. For a lint check of a module, use
`verilator --lint-only -Wall -Irtl -y rtl rtl/reset_block_pkg.sv rtl/<module>.sv`.
With `-Wall`, Verilator reports three expected warnings:

- `PROCASSINIT` on the two registers, whose initial values are their
  power-up state;
- an unused `clk` in the combinational comparators;
- unused package constants in modules that do not need them.
