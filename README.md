# K-hot pipelining: power controllers that keep only k pipeline stages alive

A conventional m-stage pipeline keeps every stage powered and clocked in every
cycle. K-hot pipelining powers only k of the m stages at a time, and moves the
powered set along with the instructions, so an instruction always finds its
current stage on. With k = 1 (one-hot) a single instruction walks alone through
the pipeline; with k = m (full-hot) the pipeline is a normal one. Every value in
between is a power/performance point: power falls roughly with k/m, and
throughput falls by at most m/k, much less on memory-bound code whose stall
cycles do not change with k.

This repository holds synthesizable SystemVerilog for the control side of the
technique: the logic that decides, cycle by cycle, which stages and which power
domains are on. The processor pipelines themselves, the power switches and the
retention supply are not part of it; their enables and status signals are
ports.

## The three controllers

`khot_top` places three independent controllers side by side, one for each form
the technique takes:

| part | ports | for | built from |
|------|-------|-----|-----------|
| multi-core | `mc_*` | four seven-stage, two-wide in-order cores | `khot_stagger_alloc`, `khot_stagger_inc`, 4 x `khot_core_ctrl` (`khot_cv_reg` + `khot_core_domains`) |
| canonical | `cn_*` | a scalar five-stage IF/ID/EX/MEM/WB pipeline | `khot_mix_ctrl` + `khot_cv_reg` + `khot_canon_domains` |
| throttled | `cx_*` | a two-wide five-stage pipeline with variable stage latency | `khot_fetch_throttle` + `khot_pg_ctrl` |

Shared types (power modes, domain and stage-group names, throttle modes) are in
`khot_pkg`.

## The control vector

The heart of the fixed-latency form is an N-bit register, `cv`, in
`khot_cv_reg`. Its M low bits are the stages: bit M-1 is fetch, bit 0 the last
stage. A set bit means "this stage is on". Every cycle the register rotates one
place towards the back of the pipeline (bit i takes bit i+1, bit 0 wraps to
bit N-1). A set bit is therefore a slot that carries one instruction from fetch
to writeback and then comes around again. k set bits give k-hot operation.

With N = M the possible hotness values are 1..M. Making the register longer
than the pipeline (N > M) adds empty slots ahead of fetch and gives hotness
M*k/N, so more operating points: with M = 5 and N = 8, two set bits keep each
stage on 2/8 of the time.

A stall input (`adv` low) freezes the rotation, so a stalled instruction keeps
its slot.

### Changing k without losing instructions

Clearing an arbitrary bit would cut the power of a stage that holds an
instruction. The controller avoids this by changing only the bit that is
about to enter fetch: an instruction has not been fetched into that slot yet,
so setting or clearing it only decides whether a new instruction starts.

A request (`sw_req`, `sw_target`) loads a target vector, given in the frame of
the vector as it stands in that cycle. The target rotates in lockstep with
`cv`, and on each advancing cycle the bit entering fetch is taken from it. After
at most N advancing cycles `cv` equals the target (rotated by the elapsed
cycles, which is the same operating point). `busy` is high until then.

During a switch the number of set bits can briefly exceed both the old and the
new k (bits are set before others have been cleared), which matters when k-hot
is used to bound peak power. With `no_overshoot` high a bit is only set while
the count stays at or below max(old k, new k); clears go through first and the
switch takes at most 2N cycles. This rule is this design's; the technique only
notes that overshoot can be avoided at the cost of latency. The count can also
dip below both values during a switch (a clear reaches fetch before a set).

Any rotation of a vector is the same operating point, so the switch does not
have to reach the target in the frame it was given. With `sw_any_phase` high
the controller picks, of the N rotations of the target, the one whose last
differing bit reaches fetch soonest, that is, the switch that finishes in the
fewest rotations (ties go to the frame as given, then to the smallest
rotation). A switch between two rotations of the same vector, for example,
then finishes at once. `target` shows the rotation in use.

### Fractional hotness

Spending equal time at k = 1 and k = 2 gives, on average, the power of
k = 3/2. `khot_mix_ctrl` does this: with `en` high it alternately requests
`vec_a` and `vec_b`, waits for the switch to finish (`busy` low) and then dwells
`dwell_a` or `dwell_b` cycles before the next request. `phase_b` shows which
vector is in force. The switch cycles themselves sit between the two hotness
values, so the average is close to, not exactly, the weighted mean. In the top
it drives the canonical pipeline's vector when `cn_mix_en` is high.

## From stage bits to power domains

Real stages share logic, so a stage bit is not a power domain.

**Canonical five-stage pipeline** (`khot_canon_domains`): each stage, each set
of pipeline latches, each forwarding unit and the branch unit is its own
domain.

- A latch set is used by the stage that writes it and the stage that reads it:
  on when either is on (OR).
- A forwarding unit (MEM->EX and WB->EX here) and the branch unit (fetch and
  the resolving stage, EX) are on only when both ends are on (AND).

So the choice of which k bits are set matters: EX+MEM on (`00110`) powers three
latch sets and one forwarding unit; ID+MEM on (`01010`) powers all four latch
sets.

**Seven-stage core** (`khot_core_domains`): stages F1 F2 D E M1 M2 WB (fetch and
memory take two stages each) form five groups, fetch, decode, execute, memory
and writeback. The core has twelve power domains in three classes:

| class | domains | when no enabling group is active |
|-------|---------|-----------------------------------|
| always on | core glue logic | on |
| state | branch predictor, BTB, I-cache, D-cache, ITLB, DTLB, register file | data retention voltage (`PM_DRV`), or nominal if `drv_en` = 0 |
| logic | IFU, LSU, EXEU, MMU | off (`PM_OFF`), or powered but clock gated if `cg_mode` = 1 |

A domain is on when any of its enabling groups is active. The enabling table is
the parameter `ENABLERS`; its default is this design's reading (see
"Departures"). The execution unit is enabled by both execute and writeback, so
in one-hot operation it is on two cycles per instruction.

`clk_en` is the per-domain clock enable; `pwr_mode` the requested supply.

### Power-gating latency

If a domain needs L cycles to turn on and L to turn off (`PG_LAT` = L), it must
be asked to wake L cycles before it is needed, and a domain that will be needed
again within 2L cycles is not worth turning off. Because the vector rotates,
its future is known: the controller looks at the vector rotated by 0..2L
places and requests a domain on if it is needed within L cycles, and keeps it
on if it is needed within 2L. During a switch the future vector can only hold
bits of the current vector or of the target, so `cv | target` is the lookahead.
A new target is held back 2L cycles (`HOLD` in `khot_cv_reg`) so that a domain
released just before the request can still cycle off and on in time. With the
default L = 0 all of this reduces to "on exactly when needed".

## Staggering across cores

If all cores run the same vector, the same stage is on in every core at once
and the most expensive stage sets the chip's peak power. `khot_stagger_alloc`
spreads the set bits: for core 0, then core 1 and so on, it adds that core's k
bits one at a time, each at the first position (scanning from the fetch end)
whose sum over all cores is the current minimum and which that core does not
already use. A `mc_start` pulse clears all vectors and runs the allocation for
the hotness values in `mc_k`, one bit per clock plus one clock per core
(sum(k) + 4 + 1 cycles). On `mc_alloc_done` the top loads the result into all
four cores in the same cycle, so their rotations stay aligned.

Four one-hot seven-stage cores end up on four distinct stages (the worst
per-stage count drops from 4 to 1); four two-hot cores never have more than
two cores on the same stage. An even per-stage sum does not by itself minimise
peak or variability of power, because stages differ in power; the allocator
only evens the count.

### Raising one core at run time

`khot_stagger_inc` is the same greedy step applied to cores that are already
running: it sums the live vectors of all cores, and sets, in the chosen core,
the first position from the fetch end that has the minimum sum and is still
clear. The result is handed to that core as a switch target, in the frame of
the live vectors, so it lands where it was computed. In the top, `mc_inc` with
`mc_inc_core` requests it; `mc_inc_taken` says it was accepted, which needs
every core to be idle (no switch pending, so the live vectors are the ones in
force), no allocation finishing in the same cycle, and a free position.
Lowering a core is left to a direct write.

Both staggering blocks assume that all cores rotate together. A per-core stall
shifts one core's vector against the others; the result is still correct
execution, only the column sums drift until the next allocation.

## Pipelines without a fixed vector

When instructions can spend several cycles in a stage (superscalar issue,
variable latency), a rotating vector no longer tracks them. The `cx_*` part
limits hotness by throttling fetch instead (`khot_fetch_throttle`), with the
pipeline reporting per-stage occupancy `cx_occ` (0..W instructions) and
progress `cx_hot`:

- **up2k**: fetch only while the pipeline holds fewer than k instructions, at
  most min(W, k - m). At most k instructions means at most k busy stages: a
  hard peak-power bound.
- **avgk**: fetch while m < W*k and fewer than k stages are hot, at most
  min(W, W*k - m). Hotness can exceed k briefly but averages about k; faster,
  no bound.

`khot_pg_ctrl` powers the stages. A stage wakes when any of the T stages before
it (wrapping around the pipeline) holds an instruction, or, for fetch, when the
throttle wants to fetch. A stage turns off only when neither it nor any of the
2T stages before it holds an instruction. Each switch takes T cycles to close
(`pwr_en` high, `stage_ready` low) and T cycles to drain after opening; a stage
that holds an instruction is never turned off. An instruction that reaches a
stage still waking waits for it. Because the controller reacts to occupancy
one clock after it appears, an instruction about to enter a stage that was off
waits one cycle longer than the switch latency alone would require; at low k,
where most stages are off, this is a visible part of the slowdown (see the
sweep below). Looking one stage further ahead would remove it at the cost of
more on-time.

## Interfaces and timing

All state is on `clk`, reset synchronously by `rst_n` (active low).

- `khot_cv_reg`: after reset `cv` is all ones (full hot). One rotation per
  cycle with `adv`. A request is taken on the edge where `sw_req` is high; the
  vector starts changing on the following advancing cycles.
- `khot_core_domains`, `khot_canon_domains`, `khot_fetch_throttle`:
  combinational from the vector / occupancy to the enables, except one request
  flop per domain in `khot_core_domains`.
- `khot_stagger_alloc`: `start` pulse, `busy`, one-cycle `done`; `vec` holds
  the result until the next start.
- `khot_stagger_inc`: combinational.
- `khot_pg_ctrl`: registered outputs; all stages off after reset.
- `khot_mix_ctrl`: `sw_req` / `sw_target` are combinational from its state and
  go straight to a `khot_cv_reg`; dwell counts are 16 bits by default (`DW`).

Default parameters of `khot_top`: `NCORES` 4, `MC_N` 7, `PG_LAT` 0, `CN_N` 5,
`CX_W` 2, `CX_NS` 5, `CX_T` 1.

## Departures and choices

Choices made where the technique leaves things open:

- **Rotation direction**: the source text is inconsistent about whether the set
  bit moves towards the more or less significant end. Here bit M-1 is fetch and
  bits move towards bit 0, the back of the pipeline.
- **Domain enables of the seven-stage core**: only the execution unit's two
  enablers (execute and writeback) are stated explicitly. The rest of the
  `ENABLERS` default is a reading of which pipeline step uses which unit:
  BP and BTB by fetch (predict) and execute (update); I-cache and ITLB by fetch;
  D-cache, DTLB and LSU by memory; register file by decode (read) and writeback
  (write); IFU by fetch and decode; MMU by fetch and memory. Override the
  parameter to match a real core.
- **Forwarding units** of the canonical pipeline: MEM->EX and WB->EX.
- **Reset**: full hot for the vectors; all stages off for `khot_pg_ctrl`.
- **Stall input**, **`no_overshoot` rule**, **`HOLD` delay**, the rotation
  choice of `sw_any_phase`, the dwell-based mixer, applying the staggering
  step to running cores (`khot_stagger_inc`) and its acceptance rule, the allocator's
  sequential schedule and handshake, the switch model of `khot_pg_ctrl`
  (T >= 1, default 1): this design's.
- **Throttle count m** includes the instructions sitting in the fetch stage;
  counting only later stages, as one description of the policy has it, lets
  up2k hold k + W instructions and loses its bound.
- **"Hot" in the gating rules** is read as "holds an instruction", so a stalled
  stage is never switched off under its instruction.

Not included: the alternative way of changing k by draining the pipeline, the
processor cores, the power switches, isolation and retention cells, and the
retention supply.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Each compares the block against a model
written independently in the testbench and has a cycle watchdog.

| testbench | what it establishes |
|-----------|--------------------|
| `tb_khot_cv_reg` | exact vector sequence against a reference for N = 5 and N = 8; one-hot retires one instruction every N cycles; no instruction ever in an unpowered stage across 90 random switches with random stalls; switch bounds N / 2N; no overshoot; each stage on k/N of the time; `sw_any_phase` picks a cheapest rotation (brute-force comparison) |
| `tb_khot_mix_ctrl` | request/dwell sequence; average hotness of 1-hot/2-hot mixes at 20/20 and 10/30 cycles close to 1.5 and 1.75 |
| `tb_khot_canon_domains` | all 32 vectors; the two worked examples |
| `tb_khot_core_domains` | every domain's mode and clock enable against a separate usage table in all four `drv_en`/`cg_mode` settings; EXEU on two cycles per instruction in one-hot; with L = 2, every needed domain was awake L cycles before and no request was dropped within 2L cycles of a need |
| `tb_khot_core_ctrl` | 40 random switches with stalls, with and without latency; vector ends as a rotation of the target with k bits |
| `tb_khot_stagger_alloc` | 400 allocations against a reference; worked two-core example; latency |
| `tb_khot_stagger_inc` | 3000 random vector sets against a reference; increments from zero, core by core, reproduce the allocator's vectors for 300 random k sets |
| `tb_khot_fetch_throttle` | 4000 random cases of both policies plus corners |
| `tb_khot_pg_ctrl` | behavioural pipeline with random latencies and squashes; no state loss, wake-up time, progress, power saving at k = 1 |
| `tb_khot_top` | whole design at default parameters: staggering lowers the per-stage core count 4 -> 1 (one-hot) and to 2 (two-hot); occupancy checks on all four cores; run-time increments keep the column sums within one (worst stage count 2) and a request during a switch is refused; canonical enables; fractional-hotness mixing; up2k and avgk bounds for k = 1..4; every mechanism counted |
| `tb_khot_throttle_sweep` | up2k and avgk at k = 1..4 on a behavioural two-wide five-stage pipeline with variable execute and memory latency, against an unthrottled baseline: no instruction in an unpowered stage, up2k bound, slowdown grows as k falls, avgk at least as fast as up2k, up2k saves more over k = 1..4 |
| `tb_khot_pglat_sweep` | seven-stage core with L = 0..3 at k = 1..4: needed domains always on; on-time never falls as L grows; latency costs less at k = 4 than at k = 1 |
| `tb_khot_k_sweep` | seven-stage core at k = 1..7: exactly k instructions per 7 cycles and every domain's on-cycles as predicted; four staggered cores at k = 1..4 never share a stage more than ceil(4k/7) times; prints logic-domain on-cycles per instruction (11.0 at k = 1 down to 4.0 at k = 7) |

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/khot_pkg.sv tb/tb_khot_top.sv \
  -y rtl --top-module tb_khot_top -o sim && ./obj_dir/sim
```

Replace the top module name for the other testbenches. All run in well under a
second.

### Latency sweep

`tb_khot_pglat_sweep` prints the logic-domain (IFU, LSU, EXEU, MMU) on-cycles
per instruction of the seven-stage core:

| k | L = 0 | L = 1 | L = 2 | L = 3 |
|---|-------|-------|-------|-------|
| 1 | 11.00 | 19.00 | 25.00 | 28.00 |
| 2 | 9.00 | 14.00 | 14.00 | 14.00 |
| 3 | 8.33 | 9.33 | 9.33 | 9.33 |
| 4 | 6.75 | 7.00 | 7.00 | 7.00 |

At k = 1 a three-cycle latency keeps the four logic domains on all 28
cycles of each instruction's pass, which is no gating at all; from k = 2 on
most domains are needed so often that latency adds little.

### Throttling sweep

`tb_khot_throttle_sweep` prints, for 3000 instructions of its synthetic
program (execute takes 3 cycles for a quarter of the instructions, memory 10
cycles for an eighth; the unthrottled baseline needs 5729 cycles):

| policy | k | slowdown | stage-cycles unpowered |
|--------|---|----------|------------------------|
| up2k | 1 | 5.90 | 61.8 % |
| up2k | 2 | 3.24 | 61.6 % |
| up2k | 3 | 2.22 | 40.3 % |
| up2k | 4 | 1.76 | 38.7 % |
| avgk | 1 | 3.50 | 63.0 % |
| avgk | 2 | 1.88 | 41.5 % |
| avgk | 3 | 1.34 | 12.4 % |
| avgk | 4 | 1.09 | 2.7 % |

The shape is the expected one: avgk buys speed with on-time. The absolute
values belong to this toy pipeline and its latencies, not to any real core.

What this does not establish: power numbers. Savings depend on the power of
each domain in a real core and on the workload; the controllers only decide
what is on.
