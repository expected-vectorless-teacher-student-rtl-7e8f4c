# Teacher-Student Swap self-test for a dual-supply 64-core array

Many identical cores run at a supply near 0.3 V. At that voltage, device
variation decides which cores still work, and the answer differs from core to
core and from chip to chip. Checking every core against expected vectors from a
tester gets more expensive with every core added. This design checks the cores
against each other instead.

Each pair of neighbouring cores gets the same pseudo-random inputs. One core,
the **teacher**, runs on the safe high supply V_DDH, and its output serves as
the expected result. The other core, the **student**, runs on the low supply
V_DDL and is compared against it. Then the two swap roles. A core that matches
its teacher at V_DDL is left on V_DDL. A core that does not match is kept on
V_DDH. The only result that leaves a pair is a pass/fail bit. The outcome is a
per-core supply assignment that the chip works out by itself, with no expected
vectors needed.

The RTL describes the logic of that scheme for a 64-core array (32 pairs,
placed 8 x 8 on the die). Each core is a 16-bit ripple carry adder between two
register stages. The power switches that connect a core to V_DDH or V_DDL are
analog. Here they appear as a behavioural model (see "Modelling a core that
fails at low supply").

## The test flow

A test has three steps. `tss_controller` runs them for all pairs at once.

| step | `step_e` | core 0 | core 1 | a mismatch is stored in |
|---|---|---|---|---|
| 1 Initial test | `STEP_INIT` | teacher, V_DDH | teacher, V_DDH | the pair's `disabled` bit |
| 2 Test of core 0 | `STEP_CORE0` | student, V_DDL | teacher, V_DDH | core 0's V_DD memory |
| 3 Test of core 1 | `STEP_CORE1` | teacher, V_DDH | student, V_DDL | core 1's V_DD memory |
| finished | `STEP_DONE` | V_DDL if passed, else V_DDH | same | — |

Step 1 catches cores that are broken at any supply: if two teachers disagree,
one of them is defective. The pair is then flagged `disabled`, so that spare
cores can take its place. Spare cores are not part of this RTL. For a disabled
pair, the V_DD memory bits are still written in steps 2 and 3, but they mean
nothing.

Every step has the same timing, measured in clock cycles:

```
 clr (1) | settle (PIPE_DEPTH = 2) | compare (TEST_CYCLES = 1024, cmp_en = 1)
```

* **clr.** This cycle empties the result store of the step, and the rails
  switch.
* **settle.** These cycles let both cores' register stages refill with
  results computed on the new rails. Without them, a result computed before
  the switch could be blamed on the new student.
* **compare.** A single mismatching cycle in this window marks the student as
  failed.

From the cycle after `start` to `done`, a whole test takes
3 x (1 + 2 + 1024) = 3081 cycles. `start` is accepted in `STEP_IDLE` and in
`STEP_DONE`, so the test can be repeated, for example after changing V_DDL.
Each step clears its own store, so a rerun replaces the old results.

Before the first test, `test_mode` is high and both Test requests ask for
V_DDH, so every core starts on the safe rail. When the flow reaches
`STEP_DONE`, `test_mode` drops and each core's rail comes from its V_DD
memory.

## Inside a pair (`tss_pair`)

```
          +---------- lfsr32 (32 bit, one per pair) ----------+
          |                                                   |
   core 0: D-FF 32 -> 16-bit RCA -> D-FF 17     core 1: same  |
          |                                          |
          +------------> pair_comparator (XOR, OR) <-+----> pass_fail
                                  |
         vdd_memory (core 0) <----+----> vdd_memory (core 1)
              | sel_vddh                      | sel_vddh
        dual_vdd_switch                 dual_vdd_switch   -> rail of each core
```

* `lfsr32` is a Galois LFSR with polynomial x^32 + x^22 + x^2 + x + 1 and a
  nonzero seed. It steps every clock. Both cores receive the same word.
* `tss_core` registers the 32-bit word and adds its upper half (a) to its
  lower half (b) in `ripple_carry_adder`, a chain of 16 `full_adder`s with a
  carry-in of 0. It registers the 17-bit sum. Output `dout` therefore lags the
  pattern by two clocks.
* `pair_comparator` XORs the two 17-bit outputs and ORs the result into one
  bit (1 = differ). On silicon, level shifters sit between each core output
  and the comparator, because each core runs on its own rail. As logic they
  are wires, so they do not appear here.
* `vdd_memory` holds one sticky bit per core. `clr` empties it. Any cycle with
  `wr_en` and a mismatch sets it, and `clr` wins if both happen in the same
  cycle. The selector in front of the power switch passes the controller's
  Test0/Test1 request while `test_mode` is high, and the stored bit after
  that. The encoding is 1 = V_DDH (failed), 0 = V_DDL (passed).

## Modelling a core that fails at low supply

A two-state logic simulation has no voltages, so a core cannot actually fail
when its supply drops. The design represents that failure explicitly:

* `dual_vdd_switch` is a behavioural model (`assign #SWITCH_DELAY`). It is
  not synthesizable logic. It stands for the pMOS switch pair and its
  inverter. It takes the rail select and two facts about the core:
  `fails_at_vddh` and `fails_at_vddl`. It outputs the rail the core is on
  (`on_vddh`) and whether the core misbehaves on that rail (`supply_fault`).
* `tss_core` has a `supply_fault` input. While it is high, sum bit
  `FAULT_BIT` is cleared before it enters the output register. The error
  shows only for patterns that set that bit, so the test depends on the
  random patterns to expose it. With 1024 patterns per step, a miss is
  practically impossible.
* Variation-induced errors land in different places in different cores. If
  both cores of a pair failed in exactly the same way, the comparison could
  not see it. The pair therefore gives core 0 `FAULT_BIT = 16` (carry out) and
  core 1 `FAULT_BIT = 15`.

In a real implementation, `supply_fault` is tied to 0 and the switch model is
replaced by the power switches. At the chip level, the `fails_at_vddh` /
`fails_at_vddl` inputs describe which cores a simulated die has that fail on
which rail. They are not pins.

## Chip level (`tss_chip`)

`tss_chip` holds one `tss_controller` and `N_PAIRS` = 32 `tss_pair`s. All
pairs share the step, `clr`, `cmp_en`, `test_mode` and Test0/Test1 signals.
Per-core buses are indexed 2p + c, for core c of pair p.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | run the three-step test |
| `fails_at_vddh`, `fails_at_vddl` | in | 64 | supply-failure model per core (simulation only) |
| `busy`, `done` | out | 1 | test running / finished |
| `step` | out | `step_e` | current step |
| `pass_fail` | out | 32 | live comparison per pair, 1 = outputs differ |
| `core_vddh` | out | 64 | rail of each core, 1 = V_DDH |
| `core_failed` | out | 64 | V_DD memory of each core |
| `pair_disabled` | out | 32 | pair failed the initial test |

Parameters are `N_PAIRS` = 32, `WIDTH` = 16 (adder width; the LFSR is
2 x WIDTH) and `TEST_CYCLES` = 1024. Shared types and constants are in
`tss_pkg`.

## What follows the original chip and what is chosen here

These parts follow the original chip:

* 64 cores as 32 teacher-student pairs.
* Each core is a 32-bit input D-FF, a 16-bit ripple carry adder and a 17-bit
  output D-FF.
* One 32-bit LFSR per pair.
* A 17-bit XOR comparison.
* A V_DD memory per core, with a selector between it and a Test input.
* The three-step flow and the rail of each core in each step.
* Pass → V_DDL and fail → V_DDH.

These choices belong to this design:

* The LFSR polynomial and seed.
* The operand split (a = upper half of the pattern, b = lower half).
* Reset values.
* The OR reduction and the 1 = fail polarity of the comparator.
* The sticky accumulation of failures, and `test_mode` as the selector's
  select.
* The `disabled` bit.
* A single on-chip controller for all pairs. The original chip brings Test0
  and Test1 in as test inputs.
* The clr / settle / compare timing and `TEST_CYCLES` = 1024.
* The whole supply-failure model.

These parts are not built:

* The level shifters (no logic function).
* The spare cores and the mechanism that would swap them in.
* The pads.
* The analog supply network. There is a separate supply for everything except
  the cores and I/O, and that supply is not modelled.

## Simulating

Each module is in `rtl/<module>.sv` and each testbench in `tb/tb_<module>.sv`.
Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. For example, to build and run the full-size
chip test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/tss_pkg.sv tb/tb_tss_chip.sv --top-module tb_tss_chip -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_ripple_carry_adder` | corner cases and 4000 random sums against `a + b` |
| `tb_lfsr32` | reset, hold, 20000 steps against a bit-level model of the polynomial; no zero or repeated seed |
| `tb_tss_core` | two-cycle latency and the sum; the fault model clears the chosen bit |
| `tb_pair_comparator` | equal, single-bit and random differences |
| `tb_vdd_memory` | random clr/write/select sequences against a one-bit model |
| `tb_dual_vdd_switch` | every input combination, before and after the switch delay |
| `tb_tss_controller` | step order, per-step timing, Test0/Test1, total latency, a start while busy being ignored |
| `tb_tss_pair` | all 16 per-rail failure combinations through the full flow |
| `tb_tss_chip` | three full tests at the default size (32 pairs, 1024 cycles per step) |

`tb_tss_chip` checks the latency (3081 cycles), the rails of all 64 cores in
each step, the disabled pairs and the memories after each run. It also counts
that every outcome happens at least once: a pair disabled by the initial test,
a student passing and failing in each of steps 2 and 3, cores moved to V_DDL,
live mismatches, and a stored failure cleared by a later test.

`tb_vddl_sweep` uses the chip the way it is meant to be measured. Each of the
64 cores gets a random minimum working supply, and V_DDH is set to the highest
of them. V_DDL is then lowered step by step, with a full test run at each
point. At every point the testbench checks that the set of cores kept on V_DDH
is exactly the set whose minimum supply is above V_DDL. It also checks that
the count never falls as V_DDL drops. It sweeps two corners:

* A narrow 370–388 mV spread in 2 mV steps. This is typical of a fast clock,
  where gate delay limits the supply.
* A wide 178–280 mV spread in 10 mV steps. This is typical of a slow clock,
  where gates stop switching at all.

Two assertions in `tss_controller` guard the flow. The compare window opens
only inside a step, and the two cores are never students at the same time.

## Limits

* There are no voltages and no timing. The model cannot tell a delay error
  (slow gates at higher supplies) from a function error (gates that do not
  switch at all below about 0.3 V). Both appear only as `fails_at_vddl`. It
  is up to whoever runs the simulation to decide which cores a given V_DDL
  breaks.
* A fault common to both cores of a pair, with identical symptoms, cannot be
  detected by comparison. This limit belongs to the method itself. The fault
  model avoids it by placing the error in a different bit in each core.
* A core found broken in step 1 is only flagged. Nothing in this RTL powers it
  down or replaces it.
