# Variable-latency bypassing multiplier with adaptive hold logic

An array multiplier's clock period is normally set by its worst-case path,
but most operand pairs never use that path. In a *column-bypassing*
multiplier, every zero bit of the multiplicand switches off a whole diagonal
of full adders. This saves power, and it also shortens the carry chain. An
operand with many zero bits therefore settles much sooner than the worst case.

This design clocks such a multiplier with a period shorter than its
worst-case delay (but at least half of it) and gives each operation one or
two cycles, as needed:

- **Adaptive hold logic (AHL).** It counts the zeros of the multiplicand
  while the multiplication runs. If there are too few zeros, it suppresses
  the next clock edge, so the operation gets a second cycle.
- **Razor flip-flops.** They capture the product, plus a second copy on a
  slightly delayed clock. If the two copies differ, the prediction was wrong.
  The correct value is restored one cycle later and the error is reported.
- **Aging indicator.** As transistors age, the multiplier slows down and
  one-cycle predictions start to fail. Once the Razor errors show this, the
  indicator moves the AHL to a stricter zero-count threshold.

The result is a multiplier whose average latency is close to one short cycle,
which stays correct, and which adapts as the silicon ages.

Everything is parameterised by the operand width `M` (default 16, so a 32-bit
product). The multiplier can also be built around a row-bypassing array
(`BYPASS = BYPASS_ROW`). In that case the multiplier operand's zero bits
switch off rows, and the AHL counts that operand's zeros instead.

## Block structure

```
             md ──►[md_q]──┬──────────────► column_bypass_multiplier ──mul_p──► razor_ff ──► product
             mr ──►[mr_q]──┼──────────────►  (or row_bypass_multiplier)          │  ▲         re_execute
                    ▲      │                                                     │  │ clk_del
                    │      └─► adaptive_hold_logic ◄──────── error ──────────────┘
                    │            zero_judge (#0s > N)     ┐
                    │            zero_judge (#0s > N+1)   ├─ mux ─ OR ─ DFF(negedge) ─► gating_n
                    │            aging_indicator ─ sel ───┘
                    └──── load = gating_n & ~error  (clock enable of md_q, mr_q and razor_ff)
```

| file | module | role |
|---|---|---|
| `rtl/vl_multiplier_top.sv` | `vl_multiplier_top` | top: input registers, clock enable, multiplier, Razor bank, AHL, handshake |
| `rtl/column_bypass_multiplier.sv` | `column_bypass_multiplier` | M×M carry-save array with column bypass and a ripple-carry last row |
| `rtl/row_bypass_multiplier.sv` | `row_bypass_multiplier` | the same array with row bypass (alternative configuration) |
| `rtl/full_adder.sv` | `full_adder` | one-bit full adder cell |
| `rtl/adaptive_hold_logic.sv` | `adaptive_hold_logic` | the one-or-two-cycle decision and the gating flip-flop |
| `rtl/zero_judge.sv` | `zero_judge` | judging block: "more than THRESH zero bits" |
| `rtl/aging_indicator.sv` | `aging_indicator` | windowed Razor-error counter with a sticky `aged` flag |
| `rtl/razor_ff.sv` | `razor_ff` | WIDTH Razor flip-flops: main, shadow, XOR, OR, restore mux |
| `rtl/vlm_pkg.sv` | `vlm_pkg` | `bypass_e` (column or row bypassing) |

## How one operation flows

The clock period is `T`. `clk_del` has the same period and rises a fraction of
`T` after `clk`; the testbenches use `T = 10` with a 3-unit offset. Edges are
rising edges of `clk`. Load edge `E0` takes operands into `md_q`/`mr_q`.

**Short operation (judged one cycle).** At the falling edge after `E0`, the
AHL flip-flop samples "zeros > N" = 1 and keeps `gating_n` = 1. At `E1`, the
Razor bank captures the product and the input registers take the next pair.
`out_valid` is high for the cycle after `E1`. Latency: 1 cycle.

**Long operation (judged two cycles).** The falling-edge sample gives 0, so
`gating_n` drops and `E1` is suppressed: nothing loads and nothing is captured.
The flip-flop's D input is `judgement | ~Q`, so at the next falling edge it
returns to 1 whatever the judgement. A hold therefore lasts exactly one edge.
`E2` captures the product. Latency: 2 cycles. There is also an assertion for
this rule in `adaptive_hold_logic`.

**Mispredicted operation (Razor error).** This is a short-judged operation
whose product settles after `E1` but before the `clk_del` edge that follows
it:

1. The main flip-flops hold a stale value and the shadow copy holds the right
   one, so `error` (`re_execute`) rises at that `clk_del` edge.
2. At `E2`, the restore multiplexer loads the shadow value into the main
   flip-flops. `load` is forced low, so the operation loaded at `E1` keeps its
   operands and gets its second cycle. `out_valid` stays low while `error` is
   high.
3. The product becomes valid after `E2`, so its latency is 2 cycles. The next
   operation is also delayed by one cycle.
4. The aging indicator counts the error.

The falling-edge flip-flop matters. It samples the operand half a cycle after
it was loaded, so `gating_n` is already stable before the next rising edge.
In a clock-gated implementation this is what makes the AND gate on the clock
glitch-free. Here the gate is written as a clock enable, but the timing is the
same.

**Short-path constraint.** The next operands enter the multiplier at the
capture edge, yet the shadow copy samples at `clk_del`. The multiplier's
*fastest* path must therefore be longer than the `clk_del` offset. Without
this, the shadow copy would catch the next product and report a false error.
This is the usual Razor hold constraint. It must be met with delay padding
in the physical design: RTL cannot express it.

## The bypassing multipliers

Both multipliers use the same carry-save array:

- Row 0 holds the partial products `a[i]&b[0]`.
- Each following row `j` has `M` full adders; adder `i` has weight `i+j`.
  It adds `a[i]&b[j]`, the sum from the row above at the same weight (drawn
  straight down), and the carry of adder `i` of the row above (drawn coming
  from the upper right, one weight lower).
- Product bit `p[j]` leaves at the right edge of row `j`.
- A ripple-carry row adds the last row's sums and carries into `p[2M-1:M]`.

**Column bypass.** Carries run along the diagonal of one multiplicand bit.
If `a[i] = 0`, every adder on that diagonal has a zero partial product and a
zero carry-in, so its output is just the sum from above. The bypass
multiplexer passes that sum down with carry 0, which is exact. The three
adder inputs are also forced to 0, so the unused adders do not toggle. The
original circuit uses tri-state gates for this isolation; this design uses
AND gates.

**Row bypass.** If `b[j] = 0`, row `j` adds nothing, but the carries it
receives are not zero. Each bypassed carry moves one position to the right,
which keeps its weight. The carry pushed out at the right edge has weight `j`.
A column of extra full adders along the right edge adds it into `p[j]` and
chains its own carries down into the ripple row's carry-in. This right-edge
wiring is this design's own reconstruction, chosen so that the product is
always exact.

## Adaptive hold logic and aging

The AHL contains:

- two `zero_judge` instances, with thresholds `N` and `N+1`;
- a multiplexer selected by `aged`;
- an OR gate with `~Q`;
- a flip-flop clocked on the falling edge.

With `M = 16` and `N = 7`, an operand with at least 8 zero bits is judged
short, about 60% of uniformly random operands. Once the chip has aged, an
operand needs at least 9 zero bits.

`aging_indicator` counts Razor errors over windows of `WINDOW` completed
operations (default 64). A window with at least `ERR_LIMIT` errors (default 4)
sets `aged`. The flag stays set until reset, because aging does not recover.

The values of `N`, `WINDOW` and `ERR_LIMIT` are not given in the original
description and are this design's choices. `N` in particular should be set
from timing analysis of the real multiplier: it must be the largest threshold
whose operands still meet one cycle on a fresh chip.

## Top-level interface (`vl_multiplier_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `clk_del` | in | 1 | clock and Razor delayed clock (same period, later phase) |
| `rst_n` | in | 1 | synchronous active-low reset (both clock domains) |
| `in_valid`, `in_ready` | in/out | 1 | operand pair taken on a rising edge when both are high |
| `md`, `mr` | in | M | multiplicand, multiplier (unsigned) |
| `out_valid` | out | 1 | `product` is valid; high for exactly one cycle per operation |
| `product` | out | 2M | the product |
| `re_execute` | out | 1 | Razor error: the product is being restored this cycle |
| `aged` | out | 1 | aging indicator state |
| `hold` | out | 1 | the AHL suppresses the next edge (two-cycle operation) |
| `predict_one` | out | 1 | AHL judgement of the operand in the input register |

Parameters: `BYPASS` (`vlm_pkg::BYPASS_COLUMN`), `M` (16), `N` (`M/2 - 1`, so 7), `WINDOW`
(64), `ERR_LIMIT` (4). Results come out in order. Latency is 1 cycle for a
short operation and 2 for a long one. An operation that is restored, or that
waits behind a restore, also takes 2. Throughput is one operation per cycle
when every operation is short.

## Departures and open points

- **Clock gating as an enable.** The AND gate on the clock is written as a
  clock enable (`load`). A clock-gating cell can replace it without changing
  behaviour.
- **Error recovery.** The original design only says that the system is told
  to re-execute the operation. Here the Razor restore multiplexer recovers the
  product in place, at a cost of one cycle, and `re_execute` is exported for
  a system that wants to know.
- **Shadow element.** It is an edge-triggered register on `clk_del`, not a
  latch. It samples only after edges on which the main flip-flops captured.
- **Added interface.** The valid/ready handshake and the exported status
  signals are additions.
- **Not built:**
  - the fixed-latency versions that serve only as comparison baselines;
  - the 8-bit variable-latency ripple-carry adder used to introduce the idea;
  - generation of the delayed clock.
- **Not modelled.** Power, area and delay cannot be measured at RTL. The
  reported savings (for example a 16×16 column-bypassing multiplier going
  from about 12 ns per operation at fixed latency to about 6.3 ns at variable
  latency) are not reproduced here.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_column_bypass_multiplier`, `tb_row_bypass_multiplier` | all 256 pairs at 4×4; corner cases, sparse and random operands at 16×16, where every bypassed adder must also see all-zero inputs |
| `tb_zero_judge` | every 8-bit operand at two thresholds; random 16-bit operands |
| `tb_aging_indicator` | a reference model, cycle by cycle: rare errors never set `aged`, frequent ones do, and it stays set |
| `tb_adaptive_hold_logic` | the falling-edge flip-flop against a model; holds never last two cycles; the threshold moves from 8 to 9 zeros after aging |
| `tb_razor_ff` | on-time data is captured silently; data arriving between `clk` and `clk_del` raises `error` and is restored even if `d` changes again; disabled edges capture nothing |
| `tb_vl_multiplier_top` | the whole design at its default parameters, 1500 operations |
| `tb_vl_multiplier_top_row` | the same with `BYPASS = BYPASS_ROW` |
| `tb_vl_multiplier_4x4`, `tb_vl_multiplier_4x4_row` | the same at 4×4 (`M = 4`, `N = 1`), column and row bypassing |

A zero-delay simulation has no late paths, so the end-to-end testbenches
give the multiplier output a path delay of their own. After each load they
force the internal net `dut.mul_p` to hold the previous product for
`(4 + (12/M)·ones(judged operand))·age` time units, and they start with the
worked examples 8×4, 2×4 (and 32×2 at 16 bits). The clock period is 10 and
`clk_del` comes 3 units after `clk`.

- **Fresh chip (`age = 1.0`).** Every operation judged short settles within
  one period, and every other operation within two.
- **After operation 400 (`age = 1.05`).** Operands with exactly `M/2` ones
  settle at 10.5 units, past the clock edge but before `clk_del`.

The testbench checks every product and every latency, and checks these
expectations:

- there are no errors before aging;
- the Razor bank catches the late operations and the aging indicator trips;
- after that, the stricter threshold gives no further errors.

It also counts how often each mechanism occurred (one-cycle operations,
holds, Razor errors, the aging switch, strict judgements, idle inputs) and
fails if any count is zero.

To run one, with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/vlm_pkg.sv \
    tb/tb_vl_multiplier_top.sv --top-module tb_vl_multiplier_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Every testbench runs in
seconds.
