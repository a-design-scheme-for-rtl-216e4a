# Delay-testable controller without scan: state transitions plus an invalid-transition generator

A controller (a finite state machine) has delay faults that are only caught by
**two-pattern tests**. The first vector sets up the logic, the second launches
a transition, and the result must be captured one rated clock period later.
Scan design can apply any two-pattern test. The price is a long shift phase
per test, run at a slow clock, and the jump from slow shifting to the rated
clock can cause supply droop, which fails good chips.

This design applies two-pattern tests to a controller **without a scan chain
and always at the rated clock**. It does so in three ways:

1. Every two-pattern test the state graph can apply by itself is applied that
   way: the tester drives the primary inputs and lets the machine run.
2. The state register output is brought out on extra pins, `t_out`. The state
   the register captures at the end of each test can then be read directly,
   not only through the primary outputs.
3. The remaining tests need the machine to be in a state, or to take a
   transition, that its state graph does not allow. A small extra table,
   the **ISTG** (invalid test state and transition generator), supplies these.
   In test mode (`t_mode = 1`) the state register loads the ISTG output
   instead of the controller's next state. This creates the missing
   transition for one clock.

The RTL implements this test architecture around a small example controller.
The example has five states and comes with five two-pattern tests, four of
which need the ISTG. The testbenches run the optimal order of those five tests
cycle by cycle and check it.

## Terms

* **Combinational part / CTGM.** This is the controller with its state
  register cut out. The present state becomes extra inputs and the next state
  becomes extra outputs. Test generation works on this combinational block.
  A two-pattern test for it is written `(I1&S1, I2&S2)`: the primary inputs
  and state of the first vector, then those of the second.
* **Valid state.** A state register code that is reachable from reset in the
  state graph. Every other code is an **invalid state**. With binary
  encoding, a 3-bit register holding five states has three invalid codes.
* **Valid two-pattern test.** A test where `I1` applied in state `S1` really
  leads to `S2` in the state graph. The machine can apply it on its own. Every
  other test is **invalid**. An invalid test needs the ISTG for the step
  `S1 -> S2`, and sometimes also to reach `S1` in the first place, when `S1`
  is an invalid state.

## Architecture

```
            +-------------------------+
  pi ---+-->|  combinational part     |---> po
        |   |  (example_ctrl_comb)    |
        |   +-------------------------+
        |      ^ ps          | ns
        |      |             v
        |      |          +-----+ 0
        |      |          | MUX |<---- ns
        |      |          |     | 1
        |      |          |     |<---- istg.s2
        |      |          +-----+
        |      |             | sel = t_mode
        |      |          +--v--+
        |      +----+-----| SR  |<--- rst (R)
        |           |     +-----+
        |           +-----------------> t_out (also shareable on data-path pins)
        |           v
        |   [optional AND gating with t_mode]
        |           |
        +---------->+---> ISTG (table) <--- t_sel
```

| Module | Role |
|---|---|
| `ns_dft_pkg` | Widths, state encoding `S0..S7` and the example's ISTG table |
| `example_ctrl_comb` | Combinational part of the example controller |
| `state_register` | State register with synchronous reset R |
| `sr_input_mux` | Selects the state register input: next state (`t_mode=0`) or ISTG (`t_mode=1`) |
| `istg` | Table: `(pi, state, t_sel)` gives the state for the second vector |
| `istg_input_gate` | Optional AND gating: the ISTG sees zeros in normal mode, which saves power |
| `tout_share_mux` | Optional: shows `t_out` on the data path's output pins, in batches if those are fewer |
| `ns_dft_controller` | Top level: all of the above |

### Top-level ports (`ns_dft_controller`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | Rated clock, also during test |
| `rst` | in | 1 | R, synchronous, active high: the state is `s0` after the next edge |
| `pi` | in | 1 | Primary input `x` |
| `po` | out | 2 | `{done, busy}` |
| `t_mode` | in | 1 | 0 = normal: the register loads the next state. 1 = test: it loads the ISTG output |
| `t_sel` | in | `TSEL_W` (1) | Picks among ISTG rows that share a first vector |
| `t_out` | out | 3 | State register value |
| `dp_po_i` | in | `DPO_W` (4) | Outputs of the data path. The data path itself is not part of this design |
| `obs` | in | `NB` = ceil(3/`DPO_W`) | `obs[b]=1` puts batch `b` of `t_out` on `dp_po_o` |
| `dp_po_o` | out | `DPO_W` | Shared pins: `dp_po_i` when `obs = 0` |

Parameters: `TSEL_W`, `N_ISTG`, `ISTG_I1`, `ISTG_S1`, `ISTG_SEL` and
`ISTG_S2` hold the ISTG table. `HAS_ISTG = 0` builds the reduced form for a
controller whose tests all go through its own transitions: only `t_out` is
added, the register is fed by the controller alone, and `t_mode`/`t_sel` are
ignored. `POWER_AWARE` (default 0) adds the input
gating. `DPO_W` (default 4) is the data-path output width. All defaults
describe the example.

## Applying a test, cycle by cycle

The tester drives `pi`, `rst` and `t_mode` anew in every clock cycle. It
reads `t_out` and `po`. There is no other test control.

A **valid test** `(I1&S1, I2&S2)` needs the following steps:
* Bring the machine to `S1` with ordinary inputs, or by reset.
* Drive `I1` with `t_mode = 0`. The machine moves to `S2` by its own logic.
* Drive `I2` with `t_mode = 0`. The register captures the response.
* The response appears on `t_out` one cycle later.

An **invalid test** differs only in the first vector's cycle:

| cycle | register holds | tester drives | register loads |
|---|---|---|---|
| k | `S1` | `pi = I1`, `t_mode = 1` | `S2`, from the ISTG |
| k+1 | `S2` | `pi = I2`, `t_mode = 0` | the response of the combinational part to `I2&S2` (launch and capture at speed) |
| k+2 | response | anything | response visible on `t_out` |

An invalid test state, such as `s5`, is reached by chaining ISTG rows from a
valid state. The ISTG rows that serve other tests do this job, so the table
needs no rows of its own for it.

A test sequence puts the tests in an order that keeps the idle cycles between
them to a minimum. The distance from test `a` to test `b` counts the clock
cycles from the state after `a` to the first vector of `b`. The fastest way
there may be a reset (one cycle to `s0`), normal transitions or ISTG
transitions. The distance is −1 when `a`'s second vector already is `b`'s
first vector and `b` is valid. Finding the best order is an asymmetric
travelling-salesperson problem. A test program generator solves it offline;
it is not hardware.

### The example

The controller has states `s0..s4`, binary coded, reset to `s0`:
`s0→s1`, `s1→s1 (x=0)`, `s1→s2 (x=1)`, `s2→s0 (x=0)`, `s2→s3 (x=1)`,
`s3→s4`, `s4→s0`. Its outputs are `busy = 1` in `s1..s4`, and `done = 1` on
the two arcs back to `s0`. The codes 5, 6 and 7 are invalid. The built
circuit sends them to `s0`, with outputs 0.

The five tests (first vector → second vector):

| test | type | I1, S1 | I2, S2 | state after |
|---|---|---|---|---|
| t1 | valid | 1, s2 | 0, s3 | s4 |
| t2 | invalid, valid→valid | 0, s4 | 1, s2 | s3 |
| t3 | invalid, valid→invalid | 0, s1 | 0, s5 | unknown in general (s0 here) |
| t4 | invalid, invalid→valid | 1, s6 | 0, s1 | s1 |
| t5 | invalid, invalid→invalid | 1, s5 | 1, s6 | unknown in general (s0 here) |

The ISTG therefore holds four rows: `(0,s4)→s2`, `(0,s1)→s5`, `(1,s6)→s1`
and `(1,s5)→s6`.

The best order is R → t1 → t2 → t4 → t3 → t5 → R. The distances are 2, 0, 4,
0, 3 and 1, and every test takes 2 cycles. The whole sequence therefore takes
exactly 20 cycles:

```
cyc  0 s0          1 s1          2 s2 t1.v1    3 s3 t1.v2    4 s4 t2.v1 (ISTG)
cyc  5 s2 t2.v2    6 s3 reset    7 s0          8 s1 ISTG     9 s5 ISTG
cyc 10 s6 t4.v1   11 s1 t4.v2   12 s1 t3.v1   13 s5 t3.v2   14 -- reset
cyc 15 s0         16 s1 ISTG    17 s5 t5.v1   18 s6 t5.v2   19 -- reset  -> 20 s0
```

`tb_ns_dft_controller` runs exactly this and checks that each test's vectors
sit in the register at the predicted cycles.

## The ISTG

`istg` compares `{pi, state, t_sel}` with every row and outputs the `S2` of
the first row that matches. It also outputs a `hit` flag. With no match the
output is `NO_MATCH_S2`, the reset state. The test method treats that output
as a don't-care, so the choice of reset state is arbitrary. The top level
asserts a warning when `t_mode = 1` and no row matches, because a tester
should never do that with a fault-free chip.

`t_sel` exists for tests whose first vectors are identical but whose `S2`
differ. It needs ceil(log2 m) bits when m is the largest such group. In the
example every first vector is unique, so zero bits would do. A 1-bit `t_sel`
is kept because a port cannot be zero wide. All example rows expect
`t_sel = 0`.

The table is fully specified. Don't-care bits in the tests could shrink the
ISTG, but that is an open encoding problem, and this design does not attempt
it. The ISTG sits only on the test-mode path into the register. Its delay
must stay below the clock period for test mode to run at speed. It is built
as a small compare-and-select network; its delay is not characterised here.

## Options

**Power-aware gating (`POWER_AWARE = 1`).** AND gates force the ISTG's inputs
to zero while `t_mode = 0`. The ISTG then does not switch during normal
operation. In test mode the inputs pass unchanged.

**Sharing test pins with the data path.** A controller usually drives a data
path, and when the controller is tested on its own, the data path's pins can
carry the test signals:
* `tout_share_mux` places a MUX on each data-path output. With `DPO_W ≥ 3`,
  one pin (`obs[0]`) switches all of them to `t_out`.
* With fewer data-path outputs, `t_out` is shown in `NB = ceil(3/DPO_W)`
  batches. Each batch has its own select pin, and the same test is repeated
  once per batch. Batch `b` carries bits `b*DPO_W` and up, zero-padded at the
  top.
* `t_sel` can likewise be wired from data-path inputs outside this block.

With both kinds of sharing, the test pins the controller adds come down to
`t_mode` plus the `obs` pins.

**Cost, as the method counts it.**
* Area: one MUX per state bit, plus the ISTG.
* Pins without sharing: `|t_sel| + |t_out| + 1`.
* If every test could be applied without the ISTG, only `t_out` is added
  (`HAS_ISTG = 0`). There is then no MUX, ISTG, `t_mode` or `t_sel` in use.

## Adapting to another controller

* Replace `example_ctrl_comb` with the combinational part of your controller.
* Set `PI_W`, `PO_W`, `SR_W`, `RESET_STATE` and the state type in `ns_dft_pkg`.
* Pass your invalid tests to `ns_dft_controller` as the `ISTG_*` parameters:
  one row per test, where `ISTG_I1[r]`, `ISTG_S1[r]` and `ISTG_SEL[r]` give
  `ISTG_S2[r]`.
* Set `TSEL_W` to ceil(log2 m), with at least 1 bit.

The tests themselves come from a test generator:
* **Valid tests.** The generator runs on the combinational part, constrained
  per arc `(I, P, N, O)` to the first vector `I&P` and second state `N`.
* **Remaining faults.** Next comes a sequential generator with a per-fault
  limit that uses `t_out`.
* **Last step.** A generator without constraints produces the invalid tests.

These tools are not part of this RTL.

## Simulating

Everything is plain SystemVerilog 2017. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/ns_dft_pkg.sv tb/tb_ns_dft_ref_pkg.sv tb/tb_ns_dft_controller.sv \
  --top-module tb_ns_dft_controller
./obj_dir/Vtb_ns_dft_controller
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`. Each one
has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_ns_dft_controller` | Top at default parameters. It runs the 20-cycle example sequence and checks each test's vectors against the distance table. Then come 400 random normal-mode cycles with resets and 400 cycles mixed with ISTG transitions. Every cycle it compares `t_out`, `po` and the shared pins with an arc-list reference model. It counts normal, ISTG and reset transitions, valid and invalid tests, invalid states visited, and shared-pin observation and pass-through, and requires each to occur. |
| `tb_ns_dft_controller_pa` | The same run with `POWER_AWARE = 1` and `DPO_W = 2`, where `t_out` takes two batches. It also checks that the ISTG inputs are zero in normal mode. The whole test sequence is run once per batch, and every test's 3-bit response is rebuilt from the two 2-bit batches. |
| `tb_ns_dft_controller_tout_only` | The reduced form (`HAS_ISTG = 0`): the valid test t1 applied and read on `t_out`, then random cycles showing that `t_mode` and `t_sel` have no effect. |
| `tb_ns_dft_delay_faults` | Injects slow-to-rise and slow-to-fall faults, one at a time, on each next-state line and runs the example sequence at speed. The test sequence detects all 6 faults through `t_out`. The design's behaviour must match a faulty reference model cycle for cycle. |
| `tb_istg_benchmarks` | ISTGs sized for benchmark controllers (inputs/state bits/rows): 7/4/2, 7/6/19, 3/8/112 (with a 1-bit `t_sel` and paired rows), 11/5/2 and 27/7/8. The table contents are generated. |
| `tb_example_ctrl_comb`, `tb_state_register`, `tb_sr_input_mux`, `tb_istg`, `tb_istg_input_gate`, `tb_tout_share_mux` | Unit tests. They are exhaustive where the input space is small. `tb_istg` includes a table where `t_sel` separates two rows with the same first vector. |

`tb/tb_ns_dft_ref_pkg.sv` holds the reference model, which lists the state
graph as arcs, together with the example tests, the distance table and the
per-cycle test plan.

## What is the method's, and what is this design's choice

The method fixes:
* the architecture: `t_out` taken from the register output, a MUX
  controlled by `t_mode`, an ISTG with `t_sel`, and the reset;
* the optional AND gating and the rules for sharing pins with the data path;
* the example's state graph and binary encoding;
* the example's five test transitions, with the states they start from,
  lead to and end in;
* the distance table and the test order.

This design chooses:
* **Widths and values.** One input bit and two output bits. Which input
  value takes which branch. The output values. The input values of the
  five tests, picked to agree with the distance table.
* **Invalid codes.** The circuit sends codes 5–7 to `s0`.
* **Reset.** Synchronous and active high.
* **ISTG outside its table.** It outputs the reset state when no row
  matches, and it has a `hit` output.
* **Widths kept non-zero.** A 1-bit `t_sel` where zero bits would do.
* **Data path.** A data-path width of 4.
* **Shared pins.** The batch order of the shared `t_out` pins, with the
  lowest batch winning when several `obs` pins are set.

Not included:
* the data path;
* the test generation and ordering tools;
* the benchmark controllers whose ISTG sizes are exercised above, whose
  state graphs are not available;
* any timing model of the ISTG's delay.
