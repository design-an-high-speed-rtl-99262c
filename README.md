# Aging-aware variable-latency bypassing multiplier

A bypassing array multiplier skips the adders that belong to zero bits of one
operand: a column-bypassing array skips column *i* when multiplicand bit
`a[i]` is 0, a row-bypassing array skips row *j* when multiplicator bit `b[j]`
is 0. How long a multiplication takes therefore depends on the data. Patterns
with many zeros finish early, patterns with few zeros take the full
worst-case path. Transistor aging (BTI, electromigration) makes every path
slower over the years, so a conventional design has to be clocked for the
worst pattern at end of life.

This design clocks the multiplier for the *typical* pattern instead:

* **Variable latency.** An *adaptive hold logic* (AHL) counts the zeros of the
  operand the array bypasses on. A pattern with more than `n` zeros is
  predicted to fit in one clock cycle. Any other pattern gets two cycles: the
  input registers are held for one extra cycle.
* **Error detection and repair.** The product is captured in a register of
  *Razor flip-flops*. Each has a shadow latch clocked a little later than the
  main flip-flop. If a pattern predicted as one-cycle still arrives late, main
  and shadow disagree. The register then reloads the correct shadow value, so
  the operation completes in two cycles after all.
* **Aging adaptation.** An *aging indicator* counts those errors. When they
  become frequent, the AHL switches to a stricter rule (more than `n+1`
  zeros). Fewer patterns are then tried in one cycle and the errors stop.

All of it is synthesizable SystemVerilog apart from one intentional latch per
Razor bit. Widths and thresholds are parameters.

## Block structure

```
            in_a, in_b (valid/ready)
                 |
         +-------v--------+   en (= !gating)   +-------------------------------+
         | input registers|<-------------------| adaptive_hold_logic           |
         +-------+--------+                    |  judging_block  (zeros > n)   |
                 |                             |  judging_block  (zeros > n+1) |
     +-----------v-------------+               |  mux <- aging_indicator       |
     | column_ or row_bypass_  |               |  OR + D flip-flop -> en       |
     | multiplier (combin.)    |               +-------^-----------^-----------+
     +-----------+-------------+                       | operand   | error
                 | product (2M)                        | (in_a or in_b)
     +-----------v-------------+   error               |
     | razor_register (2M x    |------------------------------------+
     | razor_ff), clk + clk_del|
     +-----------+-------------+
                 v
           out_p, out_valid
```

| Module | Role |
|---|---|
| `aging_aware_multiplier` | Top level: input registers, multiplier, Razor register, AHL, handshake and result bookkeeping |
| `column_bypass_multiplier` | Braun carry-save array. Column *i* is bypassed when `a[i] = 0`. A ripple-carry row merges the result |
| `row_bypass_multiplier` | Rows of ripple-carry adders. Row *j* is bypassed when `b[j] = 0` |
| `razor_register` | `W` Razor flip-flops with a shared restore line and an ORed error |
| `razor_ff` | Main flip-flop, shadow latch on `clk_del`, XOR comparator, restore mux |
| `adaptive_hold_logic` | Two judging blocks, aging indicator, mux, OR gate and D flip-flop |
| `judging_block` | `one_cycle = (zeros in operand) > THRESH` |
| `aging_indicator` | Error counter over a window of operations. Its output stays high once set |
| `ripple_adder`, `full_adder` | Adder cells of the arrays |
| `amul_pkg` | `bypass_e` enum and default sizes |

## Timing of an operation

Everything is on the rising edge of `clk`. Inputs use a valid/ready handshake.
A pattern is taken at an edge where `in_valid && in_ready`.

| Case | Edge E | Edge E+1 | Edge E+2 |
|---|---|---|---|
| one-cycle pattern | loaded; AHL D flip-flop stores 1 | product captured, `out_valid` high after the edge; next pattern may load | — |
| two-cycle pattern | loaded; D flip-flop stores 0 (`in_ready` low, `hold` high) | inputs held; D flip-flop forced back to 1 | product captured, `out_valid` high |
| one-cycle pattern that is late | loaded | wrong value captured; `razor_error` high and `out_valid` low during the next cycle; the next pattern was already loaded | shadow value restored, `out_valid` high; the next pattern is held one more cycle |

So the latency is 1 or 2 cycles, and throughput is one result per cycle for
one-cycle patterns. `out_valid` is a one-cycle strobe. `out_p` keeps the
result until the next capture. Sample `out_valid`, `razor_error` and `in_ready`
only at the rising edge of `clk`: inside the cycle, `razor_error` may pulse
briefly before the shadow latches settle.

## The adaptive hold logic in detail

Both judging blocks look at the operand *as it is being loaded*. That is
`in_a` for column bypassing and `in_b` for row bypassing. Their D flip-flop is
clocked together with the input registers. The mux output goes through the OR
gate (`one_cycle | !en`) into the D flip-flop, whose output `en` (the inverse
of the clock-gating signal) enables the next load.

* If a two-cycle pattern is loaded, `en` drops, so the next edge does not load.
* At that next edge `!en = 1` forces the flip-flop back to 1. A hold therefore
  never lasts more than one cycle. An assertion in the top checks this.
* At the edge that loads the following pattern, that pattern gets its own
  judgement.

A third OR input, `!load`, keeps `en` at 1 in idle cycles. Clock gating is
replaced by a load enable.

The aging indicator counts operations and qualified Razor errors. When a
window's error count exceeds `ERR_THRESH` it raises `aged`, and the mux
switches to the `n+1` judging block. Both counters clear at the end of each
`WINDOW`-operation window. `aged` stays set until reset. Aging does not
reverse, and a flag that dropped again would switch back to the lax rule as
soon as the strict rule had removed the errors.

## Razor capture and repair (the subtle part)

`razor_ff`:

* The main flip-flop samples `d` at the `clk` edge.
* The shadow latch is transparent while `clk_del` is high. `clk_del` is `clk`
  delayed by less than half a period. The latch closes on the falling edge of
  `clk_del`, some time after the main edge, and keeps what the slow path
  finally delivered.
* `error = q ^ shadow`.
* With `restore` high, the next edge loads `shadow` instead of `d`.

This rests on the usual Razor requirement: the multiplier's shortest path must
be longer than the time from the `clk` edge to the falling edge of `clk_del`.
Otherwise the shadow latch already sees the *next* operation's product.

The top qualifies the raw error (`err = raw_err && cap_valid && !restored`):

* `cap_valid`: only a capture meant to be a result can be late. The first edge
  of a two-cycle pattern captures an unfinished value, and any disagreement
  there is expected.
* `!restored`: in the cycle after a restore, the main flip-flops hold the
  repaired result while the shadow latches already follow the operation now in
  the input registers. That cycle is not checked.

On a qualified error the top:

* lowers `in_ready`, so the input registers hold the operation that was loaded
  meanwhile, which gets a second cycle;
* withholds `out_valid` for the wrong value;
* asserts `restore`;
* passes the error to the aging indicator.

### Simulating Razor behaviour

The RTL has no gate delays. In zero-delay simulation the product changes at
the same instant as the input registers, which breaks the minimum-delay
requirement above. The system testbenches therefore model the multiplier's
timing on the internal net `product` of the top:

* From 1 ns to 8 ns after every edge they `force` it to the value it had at
  the edge. This represents the minimum path delay.
* For a pattern they declare too slow, they force a wrong value just before
  the edge and the correct value 1 ns after it. This is a late arrival.

Any new testbench of the top must do the same, or every change of the product
will be flagged as an error.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `M` | 16 | operand width; the product is `2M` bits |
| `N` | 8 | judging threshold: one-cycle if zeros > `N` (fresh) or > `N+1` (aged) |
| `MODE` | `BYPASS_COLUMN` | `BYPASS_COLUMN` (AHL watches `in_a`) or `BYPASS_ROW` (AHL watches `in_b`) |
| `WINDOW` | 1024 | operations per aging-indicator window |
| `ERR_THRESH` | 16 | errors in one window above which the circuit counts as aged |

None of these values are given for this design: all five are choices made
here. The operand width and `N = M/2` follow common practice for such
multipliers. With random operands, about 40 % of 16-bit patterns have more
than 8 zeros and 23 % have more than 9, so the threshold sets directly the
share of one-cycle operations.

## Ports of `aging_aware_multiplier`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `clk_del` | in | 1 | `clk` delayed by less than half a period, for the shadow latches |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `in_valid`, `in_a`, `in_b` | in | 1, M, M | operand pair (multiplicand, multiplicator) |
| `in_ready` | out | 1 | pair is taken at this edge if `in_valid` |
| `out_valid`, `out_p` | out | 1, 2M | result strobe and product |
| `razor_error` | out | 1 | last captured result was late and is being repaired |
| `hold` | out | 1 | second cycle of a two-cycle pattern |
| `aged` | out | 1 | the stricter judging block is in use |

## Choices made in this implementation

The following points are not fixed by the architecture and were chosen here:

* The internal structure of both arrays. A Braun array has vertical carries,
  so in a column whose multiplicand bit is 0 every carry is 0 and a plain sum
  bypass is exact. The row array uses carry-propagate rows, which makes row
  bypassing exact without carry fix-up adders.
* A load enable instead of a gated clock on the input registers.
* The valid/ready handshake and the result strobe.
* Qualifying Razor errors (`cap_valid`, `!restored`), and repairing from the
  shadow latch instead of recomputing from the operands.
* The aging indicator's window, threshold and sticky output.
* `clk_del` is an input: generating the delayed clock (a delay line) is left
  to the physical implementation.
* Asynchronous active-low reset everywhere.
* Unsigned operands.

Nothing here models real path delays. Whether a pattern with more than `n`
zeros really fits in one cycle depends on the technology and the clock, and
`N` has to be set from timing analysis of the synthesized array.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_column_bypass_multiplier`, `tb_row_bypass_multiplier` | ~4000 products each, with corner values and every density of zeros in the bypassed operand |
| `tb_razor_ff`, `tb_razor_register` | late arrivals, error flag and restore against a model of main and shadow storage |
| `tb_judging_block` | all 65536 operands for thresholds 8 and 9 |
| `tb_aging_indicator` | counters, window clearing and the moment `aged` rises, against a model |
| `tb_adaptive_hold_logic` | mux output, `en` and `aged` every cycle against a cycle model |
| `tb_aging_aware_multiplier` | whole design at default parameters, 3000 operations (see below) |
| `tb_aging_aware_multiplier_row` | the same run with `MODE = BYPASS_ROW` |

The system test runs in two phases:

* For the first 400 operations no pattern is slow.
* After that, patterns with exactly `n+1` zeros become too slow for one
  cycle. They cause Razor errors until the aging indicator switches to the
  stricter rule. After the switch there must be no errors.

It checks:

* every product, in order;
* the latency of every operation (1 or 2 cycles), predicted independently;
* the edge at which `aged` rises;
* that each mechanism happened at least once: one-cycle and two-cycle
  patterns, Razor repair, the switch of judging block, a pattern reclassified
  by the stricter rule, and input stalls.

## Simulating

With Verilator 5 (lint: `verilator --lint-only -Wall`):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/amul_pkg.sv tb/tb_aging_aware_multiplier.sv \
    --top-module tb_aging_aware_multiplier -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Every testbench finishes in
well under a second.

Lint reports these warnings:

* a latch in `razor_ff` (the shadow latch, on purpose);
* unused package constants;
* one deliberately unconnected AHL output in the top;
* `rst_n` used both as an asynchronous reset and in the assertion's
  `disable iff`.
