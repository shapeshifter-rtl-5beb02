# Shapeshifter: trading pipeline width for clock speed

Within-die process variation leaves every chip with some fast and some slow
copies of the same pipeline component: one decoder, one ALU or one select tree
may be markedly slower than its neighbours. With ordinary clock binning the slowest
copy sets the clock for the whole chip. Shapeshifter keeps that slow clock
only for program phases with enough instruction-level parallelism (ILP) to
need every copy. In low-ILP phases it turns the slow copies off and runs a
narrower pipeline, built from the fast copies only, at a faster clock.

This repository holds synthesizable SystemVerilog for the hardware the scheme
adds to an out-of-order core:

* a control loop that measures the commit rate, detects ILP phases, picks a
  configuration and changes the clock;
* the parts of the pipeline that let individual ways be turned off without
  slowing down the remaining ones.

The core itself is not included: caches, decoders, map table, wakeup,
register file, functional units, reorder buffer and load/store queue. The
clock generator is not included either. The top level has ports where these
parts connect.

The scheme comes from *Shapeshifter: Dynamically Changing Pipeline Width and
Speed to Address Process Variations* (Chun, Chishti, Vijaykumar). The RTL,
and every detail that publication leaves open, are this implementation's.
Those details are listed under "Where this RTL goes beyond the scheme" below.

## Configurations

A configuration is written *front-back*: the number of ways in use in the
front end (fetch to rename) and in the back end (issue to write-back). There
are four configurations. They are ordered from widest (slowest clock) to
narrowest (fastest clock):

| configuration | front-end ways | back-end ways | slow registers | encoding (`cfg_e`) |
|---|---|---|---|---|
| 4-4 | 4 | 4 | in use | `CFG_44` = 0 |
| 3-3 | 3 | 3 | withheld | `CFG_33` = 1 |
| 3-2 | 3 | 2 | withheld | `CFG_32` = 2 |
| 2-2 | 2 | 2 | withheld | `CFG_22` = 3 |

3-2 is the only asymmetric configuration. It needs no extra buffering
because the issue queue already decouples the front end from the back end.

Each configuration has its own clock, and the chip's test program finds
that clock. The hardware sees it as an 8-bit *clock code*, where a larger
code means a faster clock. What a code means in MHz is up to the clock
generator.

## The control loop

```
 commit_cnt ─► time_block_counter ─► phase_detector ─► estimate_table ─┐
                     ▲  (pause)         (seq_divider)                  ▼ ph_req
                     │                                          reconfig_ctrl ─► pll_freq / pll_change
                     └──────── reconfig busy ◄──────────────────  ▲   │            pll_locked
                     block_done/count ─► safety_net ── sn_req ───┘   └─► cur_cfg ─► way_config ─► enables
```

### Time blocks

`time_block_counter` adds up committed instructions over blocks of
`TIME_BLOCK` cycles (default 100,000). The control loop only ever looks at
these block totals: instantaneous ILP swings are ignored. The counter is
paused while a reconfiguration is under way. Without the pause, the drain
and relock would look like a block with almost no commits.

### Phase detection (`phase_detector`)

The detector compares two rates at the end of every block:

* the block's average commit rate: its commits divided by `TIME_BLOCK`;
* the running average of the current phase: the phase's commits divided by
  its cycles.

Both divisions use one restoring divider (`seq_divider`). The divider makes
one quotient bit per cycle and takes 65 cycles. At most three divisions are
needed per block, which is negligible next to a 100,000-cycle block.

A block is *deviating* if its rate differs from the phase average by at
least `ILP_DELTA_Q` in either direction. The default is 0.5 commits per cycle.
The rules that follow from it:

* `SAMPLE_INTERVAL` deviating blocks in a row (default 10) declare a new
  phase.
* A shorter run of deviating blocks is treated as noise. It is folded back
  into the current phase's average.
* When a new phase is declared, `new_rate` is the average rate of the run
  that caused it. This is the rate the new phase actually has in the
  configuration that is still active.
* The next phase average starts afresh after the reconfiguration, so it is
  measured in the new configuration.

Rates are unsigned fixed point with 8 fraction bits: 1.0 commits per cycle is
256.

The threshold acts as a low-pass filter on ILP changes. The sample interval
is a filter on phase length. Together they keep the design from paying a
clock relock for a short phase. A relock costs tens of microseconds, which
is tens of thousands of cycles.

### Choosing a configuration (`estimate_table`)

What a phase would commit in each configuration is not known. Only its
rate in the current configuration is measured. The estimate table gets
around this with a fixed, program-independent estimate of how much each
configuration loses. The estimate is taken per range of commit rate:
<0.5, 0.5–1, 1–1.5, 1.5–2 and ≥2.

The estimates are fixed at design time, and each chip's clocks are known
after test. So the best configuration per range can be worked out at test
time, and only that choice is stored. The table is 5 rows of 2 bits, written
through `tt_table_we`, `tt_table_row` and `tt_table_cfg` on the top. It is
looked up with `new_rate`. The test
program fills each row with

    best(row) = argmax over c in {4-4, 3-3, 3-2, 2-2} of  est[row][c] * freq[c]

where `freq[c]` is the chip's clock for configuration c. The estimates
`est[row][c]`, as commit rate relative to 4-4, were obtained by profiling
SPEC2000:

| rate range | 4-4 | 3-3 | 3-2 | 2-2 |
|---|---|---|---|---|
| < 0.5 | 1.00 | 0.96 | 0.93 | 0.91 |
| 0.5–1.0 | 1.00 | 0.95 | 0.91 | 0.87 |
| 1.0–1.5 | 1.00 | 0.92 | 0.85 | 0.78 |
| 1.5–2.0 | 1.00 | 0.89 | 0.79 | 0.73 |
| ≥ 2.0 | 1.00 | 0.83 | 0.69 | 0.63 |

Take a chip whose clocks are 1.0, 1.15, 1.3 and 1.35 for 4-4, 3-3, 3-2 and
2-2. For the 1.0–1.5 row the products are 1.0, 1.06, 1.105 and 1.053, so
that row holds 3-2. A rate exactly on a range boundary belongs to the higher
range.

### Safety net (`safety_net`)

The table holds averages over many programs, so it can be wrong for a given
phase. The safety net corrects this. Every `PERIOD_BLOCKS` blocks (default
200, which is 20 million cycles) it runs one trial:

1. It asks for a neighbouring configuration in the order
   4-4 > 3-3 > 3-2 > 2-2. Trials alternate between one step narrower and one
   step wider. At either end of the order it takes the only neighbour.
2. It measures the trial for `SAMPLE_INTERVAL` blocks.
3. It compares the trial with the previous configuration's last
   `SAMPLE_INTERVAL` blocks.

Both sides of the comparison are *commits × clock code*, not commits alone,
because a narrower configuration always commits less per cycle. If the trial
wins it stays. Otherwise the safety net asks to revert. A new phase cancels
a trial in progress.

The last-`SAMPLE_INTERVAL` window is a shift register with a running sum. It
is cleared whenever a configuration is applied, so it only ever holds blocks
of the active configuration.

### Changing configuration (`reconfig_ctrl`)

Requests come from the table lookup (`ph_req`) and from the safety net
(`sn_req`). A phase request wins if both arrive in the same cycle, and a
request for the active configuration is ignored. A phase request that
arrives while a change is under way is held and carried out as soon as
that change is applied. This happens when a safety-net trial starts on the
same block that completes a new phase. The trial's request goes out at
once, but the detector needs a few hundred cycles for its divisions.

A change runs these steps:

1. `fetch_stop` goes high, and the controller waits for `pipe_empty`.
2. It drives the target's clock code on `pll_freq` and pulses `pll_change`.
3. It waits for `pll_locked` to fall and then to rise again.
4. It updates `cur_cfg`, which changes every way enable, and pulses `applied`.

`applied_phase` marks changes that a phase request caused. Only those
restart the phase average. If safety-net trials restarted it too, a phase
change that began during a trial would go unseen.

## Turning ways off without slowing the others

`way_config` turns `cur_cfg` into enables, using the speed grades measured
at test. It uses the helpers `way_select` (the K fastest of N ways) and
`frontend_steer`.

* **Back end.** Issue way n always feeds functional unit n. A select tree
  and its unit form one unit that is enabled or disabled as a whole, graded
  by the slower of the two (`tt_be_grade`). A back-end way is turned off
  simply by never issuing to it, so no extra hardware sits on the
  timing-critical back-end path.
* **Select trees (`select_logic`).** The trees have a fixed priority. Tree k
  takes the oldest ready entry that trees 0..k−1 did not take. A turned-off
  tree makes a *NULL* choice: it takes nothing and passes the earlier
  choices on. No circuit of the slow tree sits on the path, so the trees
  after it run at the fast clock. The integer queue has 32 entries and 4
  trees. The FP queue has 16 entries and 2 trees, one per FP adder.
* **Rename (`rename_depcheck`).** Way n's sources take the destination of
  the nearest earlier way in the same group that writes the same register.
  A turned-off way drives a NULL destination that matches nothing.
* **Front end (`frontend_steer`, `decode_rename_mux`).** The fast decode
  ways and the fast rename ways need not have the same numbers. A crossbar
  would fix that, but it is too expensive. Instead, decode way n may feed
  rename way n or n−1, through one 2-to-1 multiplexer per rename way.
  `frontend_steer` first picks the fastest rename ways. It then picks the
  decode ways that make the slowest decode way in use as fast as possible.
  To do so it tries each decode grade as a threshold. At each threshold it
  walks the rename ways from way 0 upwards, giving each the lowest free
  decode way it may use that meets the threshold. The highest threshold
  that feeds every rename way wins. `dec_sel[n]=1` means decode way n
  feeds rename way n−1. Because the assignment is monotonic, program order is
  preserved.
* **Fetch (`fetch_pc_incr`).** The sequential PC advances by
  width × 4 bytes.
* **Registers (`free_list`).** Registers marked slow at test (`tt_slow_reg`,
  at most 20% of the 256) are never allocated while `reg_mask_en` is high,
  which is in every configuration except 4-4. The register file itself is
  unchanged.
* **FP adders.** Both are on in 4-4. In the other configurations the slower
  adder is turned off if its grade is below the configuration's clock code.

The ways a configuration uses are recomputed combinationally from
`cur_cfg` and the static grades. They change only while the pipeline is
empty.

## Top level and timing

`shapeshifter_top` connects all of the above. Its ports fall into groups:

* `tt_*`: test-time results, expected to be static.
* `commit_cnt`, `pipe_empty`: status from the core.
* `pll_*`: the clock generator.
* `fetch_*`, `dec_*`, `ren_*`, `map_*`, `free_*`, `iq_ready`/`iss_*` and
  `fp_iq_ready`/`fp_iss_*`: the pipeline slices.
* `cur_cfg` and the enables: the configuration state.
* `ev_*`: event pulses and rates, for observation.

The rename, mux and select slices are combinational. The fetch PC and the
free list update on the clock edge. All state uses an active-low
asynchronous reset. After reset the configuration is 4-4, every table row
holds 4-4, and registers 0..63 hold the architectural state.

Parameters of the top (defaults): `TIME_BLOCK` 100000, `COMMIT_W` 4,
`SAMPLE_INTERVAL` 10, `ILP_DELTA_Q` 128 (0.5), `PERIOD_BLOCKS` 200,
`IQ_ENTRIES` 32, `FPIQ_ENTRIES` 16, `NPREG` 256, `NARCH` 64, `PC_W` 64.
Shared types and constants live in `rtl/shs_pkg.sv`. The constants are the
way counts, the rate format, `cfg_e`, `arch_uop_t` and the width and
rate-range functions.

Synthesized at the defaults, the top is about 3,600 word-level cells and
1,100 flip-flop bits. The control loop is far off the pipeline's critical
paths. Only the enables, the 2-to-1 muxes and the NULL gating touch the
pipeline.

## Where this RTL goes beyond the scheme

The scheme leaves these details open. The choices below are this
implementation's:

* Fixed-point rates with 8 fraction bits; 8-bit speed grades and clock codes.
* Deviating runs that are broken are folded back into the phase average.
  The phase average restarts only after a phase-driven reconfiguration.
* The configuration at power-up is 4-4. The first phase is only left when
  a phase change is detected or the safety net moves it.
* The scheme states that the safety net compares commit rates. Commits per
  cycle alone would always favour the wider configuration, so this RTL
  compares commits × clock code, that is, instructions per unit time. The
  first trial goes narrower, and at the ends of the order it takes the
  only neighbour.
* The pipeline is drained before every clock change, using a
  `pll_change`/`pll_locked` handshake.
* The steering order is fixed: rename ways are chosen before decode ways.
  Ties between equal grades go to the lower way number.
* The FP back end has two select ways, one per FP adder, matching the
  4 integer + 2 FP issue width. Only the FP adders are switched; FP
  multiply and divide are outside this RTL.
* The commit width is 4, with 64 architectural registers, 4-byte
  instructions and a 64-bit PC.

Known limits:

* Fetch must place instructions, in program order, into the enabled decode
  ways. That alignment logic belongs to the fetch unit and is not included.
* A slow register that still holds architectural state when a fast
  configuration starts is read at the fast clock. Draining does not move
  it. Handling this needs the core's cooperation, for example a copy
  through rename before switching.
* Wakeup, the load/store queue and the caches are assumed unaffected, or
  they limit every configuration equally. The multiply and divide units are
  assumed to absorb variation with one extra cycle. None of this needs
  logic here.
* Where two ways share one resource, for example a pair of issue ways
  sharing an FP unit, neither way can be faster than that resource. This is
  handled at test time: the grade given for each way must already be the
  lower of its own speed and the shared resource's speed.
* The table and grades are loaded through plain ports. A real chip would
  take them from fuses or a scan chain.

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/shs_pkg.sv tb/tb_shapeshifter_top.sv \
          --top-module tb_shapeshifter_top -Mdir obj && ./obj/Vtb_shapeshifter_top
```

Replace the testbench name to run another one. Each module in `rtl/` has
`tb/tb_<module>.sv`.

* `tb_shapeshifter_top` runs at reduced sizes: 400-cycle blocks, sample
  interval 4 and a 12-block safety period. It uses a behavioural core whose
  commit rate follows a four-phase program (ILP 2.5, 0.4, 2.5, 1.2),
  scaled per configuration by the estimate table above, plus a behavioural
  clock generator. It checks that each phase ends in the configuration the
  table gives. At every cycle it checks the way enables, the issue and
  rename traffic, register allocation and the fetch PC. It counts every
  mechanism, including phase change, drain, relock, safety-net trial, keep
  and revert, NULL ways, steering, register masking, free-list stall and
  FP adder off, and a phase found while a change is under way. It fails if
  any of them never happens. The table entry for rates 1.0–1.5 is
  deliberately poor (3-3 where 3-2 is better), and the safety net corrects
  it in the last phase.
* `tb_shapeshifter_full` runs the top with every parameter at its default.
  It simulates about 23 million cycles, which takes about half a minute.
  It covers a drop from ILP 2.5 to 0.4, detection after 10 blocks, a
  60,000-cycle relock into 2-2, and then a safety-net trial of 3-2 at block
  213, which is reverted.
* `tb_phase_sensitivity` runs five phase detectors side by side on one
  six-phase commit stream. They cover thresholds 0.3, 0.5 and 0.7 at sample
  interval 10, and sample intervals 30 and 100 at threshold 0.5. The test
  checks the block at which each detector declares each phase and the rate
  it reports. It shows the threshold filtering out ILP steps of 0.4 or 0.6,
  and the longer intervals ignoring shorter phases.

To change a size, override the top's parameters. `TIME_BLOCK` must exceed
about 3 × 67 cycles so that the three divisions of one block fit. An
assertion in `phase_detector` fires if a block ends while a division is
still running.
