# DARP — a dynamically adaptable, timing-error-resilient pipeline

A processor pipeline clocked close to its timing limit sees timing errors. How
often it sees them depends on the program. Two effects matter:

* **Temporal variation.** Within one stage, some instructions exercise long
  paths and others short ones. The same static instruction tends to exercise
  the same paths each time it runs.
* **Spatial variation.** Different stages have different delay profiles for
  the same workload. Some are often near the limit while others rarely are.

DARP uses both effects while the program runs:

1. **Error prediction and avoidance (temporal).** Every stage output is
   protected by a double-sampling ("Razor"-style) flip-flop. When an error is
   detected, the instruction is replayed. Its PC and failing stage are also
   written into a small content-addressable table, the *Timing Error
   Prediction Table* (TEPT). The decode stage looks up every instruction in
   that table. A predicted instruction then gets two cycles in the stage
   where it failed before, so the error is avoided instead of replayed. A
   one-cycle stall costs far less than a replay.
2. **Epoch-wise frequency and skew tuning (spatial).** Each stage counts the
   errors that prediction did not catch. At the end of every 100,000-cycle
   epoch the pipeline is drained and a small controller runs. It raises or
   lowers the clock frequency and moves the clock skew of each stage one step
   toward the stages that fail most. The skew is set through a 3-bit *clock
   vernier device* (CVD) on each stage's clock.

This RTL implements the DARP layer, in its variant with prediction, around an
11-stage pipeline. That layer is: the pipeline control with stall and replay,
the razor flip-flops, the TEPT, the error counters, the controller, the epoch
sequencer and a behavioural CVD. The processor's own stage logic, the caches
and the clock generator are not included. They connect through ports.

## Block map

```
                 fetch_* / redirect_*                      stage_d[i] (from the core's stage logic)
                        |                                            |
   +--------------------v--------------------------------------------v-----+
   | darp_pipeline: tokens tok[0..11] {valid, pc, mask}, razor_ff x 11        |
   |   decode (stage 2) --dec_pc--> tept --hit/mask--> token mask            |
   |   hold (predicted stall)     replay --ins_pc/ins_stage--> tept          |
   +----------------+---------------------------------------------+---------+
                    | stage_err[10:0]                              | empty
             error_counter x 11                                    |
                    | err_count                                    |
             darp_controller  <--start/done-->  darp_epoch_seq  <--+
                    | skew[i], freq_mhz, period_ps       | cvd_shift, cvd_sin[i], freq_change/freq_locked
                    +-------------------------------> cvd x 11 --> stage_clk[i]
```

| File | Role |
|---|---|
| `rtl/darp_pkg.sv` | constants: 11 stages, 3-bit skew code with `3'b011` = zero, 100K-cycle epoch, widths |
| `rtl/razor_ff.sv` | main + shadow sample of a stage output, error flag masked by the stall |
| `rtl/tept.sv` | prediction table: CAM of PC tags with per-stage masks, tree pseudo-LRU |
| `rtl/darp_pipeline.sv` | instruction tokens, predicted stall, replay, table lookup and insert, drain |
| `rtl/error_counter.sv` | per-stage error count for one epoch, saturating |
| `rtl/darp_controller.sv` | the per-epoch frequency and skew algorithm, and the 1/f divider |
| `rtl/darp_epoch_seq.sv` | epoch timer, drain, controller start, serial CVD load, frequency lock wait |
| `rtl/cvd.sv` | behavioural clock vernier device: 3 shift latches and a delay of `BASE_DLY + code*DELTA` |
| `rtl/darp_top.sv` | wires everything together |

## How an instruction moves, and what happens when it is late

`darp_pipeline` carries one instruction per stage as a token `{valid, pc,
mask}`. Token `tok[i]` is the instruction that stage *i* works on this cycle.
`tok[11]` holds an instruction that has left the last stage and is waiting
for that stage's error check before it retires. The stages are Fetch, Inst-B,
Decode, Rename, Dispatch, Issue, Register-Read, Execute, LSU, Writeback and
Retire.

**Detection.** Stage *i* delivers its result on `stage_d[i]`. `razor_ff`
samples it at the rising edge of `clk`, which gives `stage_q`. It samples it
again at the rising edge of `clk_shadow`, a copy of `clk` delayed by less than
one period. If the result settled between the two edges, the samples differ
and `err` rises once the shadow edge has passed. The pipeline acts on `err`
at the next `clk` edge. By then the instruction concerned has moved into
`tok[i+1]`. The short-path constraint of any double-sampling scheme applies:
a new result must not reach `stage_d` before the shadow edge.

**Replay.** If several stages report an error in one cycle, the oldest
instruction among them is replayed. At the coming edge it and all younger
instructions are squashed. Fetch is redirected to its PC
(`redirect_valid`/`redirect_pc`). Its PC and stage go to the TEPT
(`ins_*`). Older instructions keep moving. Each reported error also
increments that stage's error counter.

**Prediction.** While an instruction is in Decode, its PC is looked up in the
TEPT. The returned stage mask is merged into the token when it leaves Decode.
When a token enters a stage whose bit is set in its mask, `hold` is high for
exactly one cycle. Nothing moves and every stage sees its inputs again. The
marked stage thus gets two cycles. `hold` is also the `stall` input of every
razor flip-flop, so a mismatch sampled at a held edge is thrown away.

**Forward progress.** The first instruction fetched after a replay is the
replayed one. Its failing stage is set in its mask at fetch time. If the same
instruction is replayed again, the stages accumulate. So a replayed
instruction always gets its second cycle where it failed. This includes Fetch
and Inst-B, which come before the Decode-time lookup.

**Retirement** (`retire_valid`) happens from `tok[11]` in a cycle in which the
last stage reports no error.

## The prediction table

`tept` has 4096 entries by default. Each entry holds a valid bit, a 32-bit PC
tag and an 11-bit stage mask. Lookup is combinational. Inserts take one per
cycle:

* If the PC is already present, the stage bit is added to that entry.
* If not, the lowest free entry is used.
* Once the table is full, a binary-tree pseudo-LRU chooses the victim and
  `evict` pulses.

Lookup hits and inserts both mark their entry as recently used. `ENTRIES`
must be a power of two.

Setting `PREDICT = 0` on `darp_top` removes the table. This gives the
variant without prediction: errors are still detected, replayed, counted
and tuned per epoch, but never foreseen. Only the replay guard then holds a
stage.

## Once per epoch: frequency and skew

`darp_epoch_seq` runs the pipeline for `EPOCH` cycles (100,000), then:

1. It raises `drain` so fetch stops. It waits for `empty`, because skews may
   only change on an empty pipeline.
2. It pulses `start` to `darp_controller` and waits for `done`.
3. It shifts each stage's new 3-bit code into its CVD. All stages load in
   parallel, most significant bit first, with three pulses of `cvd_shift`.
   `cvd_sin[i]` changes while `cvd_shift` is low.
4. It pulses `freq_change` to the clock generator and waits for
   `freq_locked`.
5. It clears the error counters, pulses `epoch_done` and resumes fetch.

Without the clock generator's lock time this takes about 12 cycles to
drain, 35 to 45 for the controller (at most about 60 in the worst case of
three balancing passes) and 6 to shift.

`darp_controller` works on the counts `n[i]` of the epoch that has just ended.
It needs well under 100 cycles, and its testbench checks that bound on every
run.

* **Scan**, one stage per cycle. It finds `sum(n)`, `n_max`, `n_min` and the
  net skew `sum(s_i - 3)`.
* **Frequency.** If `n_min == 0` and `n_max <= RHO`, then `f += F_STEP`.
  Otherwise, if `n_min >= ETA`, then `f -= F_STEP`. The result is clamped to
  `[F_MIN, F_MAX]`. The frequency is kept in MHz. The period
  `period_ps = 1e6 / f` comes from a 20-cycle restoring divider that runs
  alongside the next two steps.
* **Skew step**, one stage per cycle. A stage with fewer errors than the
  average has its code decremented. A stage with more errors has it
  incremented. Codes saturate at 0 and 7. The average is never divided out:
  `n_i < avg` is tested as `11*n_i < sum(n)`.
* **Balance.** The total time of the 11 stages has to stay at 11 clock
  periods. This design reads that as keeping the net skew `sum(s_i - 3)` at
  zero. Stages are visited in order and one unit is corrected per visit. In
  the first pass, a positive net is taken only from stages that were not
  incremented, and a negative net is given only to stages that were not
  decremented. Later passes may use any stage. There are at most 3 passes.

`RHO` = 8, `ETA` = 32, `F_STEP` = 50 MHz and the 1000 to 5000 MHz range are
this design's choices. The starting frequency is 3000 MHz.

## Clock vernier device

`cvd` is a behavioural model, because the delay line is analog. Three latches
a → b → c, clocked by `shift`, take the code serially from `s_in`. The code is
`cfg = {c, b, a}`. `T_skew` follows `T_in` after `BASE_DLY + cfg*DELTA`
(40 ps + code × 10 ps by default). Relative to code 3, this gives the eight
skews −3δ … +4δ. The model uses a transport delay, so it works for delays
longer than a clock phase. The latches have no reset. The sequencer loads
them right after reset, before the first epoch.

## Interfaces of `darp_top` that leave the design

* **Stage logic.** Each cycle, the top shows for each stage
  `stage_valid[i]`, `stage_pc[i]` and `stage_first[i]` (first cycle of this
  instruction in this stage). The core answers with `stage_d[i]`. It gets the
  captured value back on `stage_q[i]`. `stage_clk[i]` is `clk` skewed by the
  stage's CVD, for the core's datapath registers. The DARP control registers
  and the razor flip-flops themselves run on `clk` and `clk_shadow`.
* **Fetch.** `fetch_valid`/`fetch_pc` in, `fetch_ready` out. When
  `redirect_valid` is high, the next fetch must come from `redirect_pc`.
  `fetch_ready` is low in that cycle.
* **Clock generator.** `freq_mhz`, `period_ps` and a one-cycle `freq_change`
  go out. `freq_locked` comes in: it must go low after `freq_change` and
  return high once the new frequency is stable.

## Where this design departs from or fills in the description

* **One instruction per stage.** The evaluated core fetches, issues and
  commits 4 instructions per cycle. Here each stage carries one instruction,
  and the TEPT has one lookup port. A 4-wide version needs 4 lookup ports and
  a mask per slot.
* **One protected word per stage.** The description protects every
  potentially critical path, and several flip-flops may share a CVD. Here
  each stage has one `DW`-bit (32) protected output, and each stage has one
  CVD, as the block diagram draws it.
* **Epoch length.** The epoch is counted in cycles (100K), not in
  instructions. The description uses both.
* **Stall masking.** Every razor flag sampled at a held edge is discarded, not
  only the one of the stalled stage.
* **Replay guard.** The guard that gives a replayed instruction its second
  cycle is this design's way of ensuring forward progress for Fetch and
  Inst-B errors.
* **Step 18** of the controller is read as "net skew zero", as described
  above.
* **Chosen values.** PC width (32), protected data width (32), the thresholds,
  the frequency step and limits, CVD step and base delay, bit order and all
  handshakes are this design's own choices.
* **Not modelled.** The skew changes the timing of the real core, which RTL
  simulation cannot show. The testbenches instead use a stage timing model
  that turns the frequency and the CVD codes into per-stage time budgets.

## Simulating

The sources are plain SystemVerilog-2017. The CVD model uses delays, so build
with `--timing` and a 1 ns / 1 ps timescale:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/darp_pkg.sv tb/tb_darp_top.sv --top-module tb_darp_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Substitute any testbench name. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_razor_ff` | early, late and stalled samples; error only for a late, changed, unstalled value |
| `tb_error_counter` | count, clear priority and saturation against a reference |
| `tb_tept` | 8-entry table under random lookup/insert traffic against a reference CAM and tree pseudo-LRU; hits and evictions must occur |
| `tb_darp_controller` | 300 epochs against a reference of the algorithm (real-valued average); frequency rises, falls and balancing all occur; each run is at most 100 cycles |
| `tb_cvd` | every code loaded serially; measured delay `BASE_DLY + code*DELTA` |
| `tb_darp_pipeline` | program-order retirement under replays, stalls and drains, with an ideal prediction table; a recorded error (Decode or later) never recurs |
| `tb_darp_epoch_seq` | exact epoch length, controller started only when empty, CVDs hold the new codes, resume only after lock |
| `tb_darp_top` | whole design, 2000-cycle epochs, 16-entry table, 16 epochs over 4 program phases |
| `tb_darp_top_nopred` | same as `tb_darp_top` with `PREDICT = 0`: no hits or evictions, frequency still rises |
| `tb_darp_top_full` | whole design at default parameters: one 100,000-cycle epoch with the 4096-entry table plus the reconfiguration |

**Common environment.** The two top-level testbenches share
`tb/darp_top_env.svh` and the stage timing model `tb/tb_stage_model.sv`. In
that model, an instruction's delay in a stage is a fixed hash of its PC and
the stage, between 150 and 349 ps. The stage's budget is
`period_ps + (s_i − s_(i−1))·10 ps`. A late result shows a wrong value at the
main sample and the right one at the shadow sample.

**What the top-level tests check:**
* retirement order;
* every error counter against the errors seen;
* the frequency decision after each epoch;
* `period_ps` against `freq_mhz`;
* the CVD codes.

**Mechanisms each run must show:** replay, stall, prediction hit, table
eviction, epoch, skew change, and, in the multi-epoch test, both a frequency
rise and a fall.

The full-size run simulates 100K cycles in a few seconds. The timing model is
deliberately harsh: about 60 % of instructions have at least one slow stage.
So the retire rates these tests print are not performance figures.
