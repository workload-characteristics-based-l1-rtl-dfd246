# AdmL1D: switching off a GPU L1 data cache when it does more harm than good

A GPU streaming multiprocessor (SM) has a small private L1 data cache (L1D)
shared by thousands of threads. For many general-purpose kernels it helps. For
others it hurts: misses quickly take every MSHR and every way of a set, and the
cache then has to refuse requests over and over until fills come back. The
pipeline stalls behind those refusals. For such a kernel it is faster, and
cheaper in energy, to send every memory request straight to L2 and leave the
L1D idle.

This RTL decides at run time, separately in each SM, which of the two cases
applies. During a *warm-up period* at the start of execution it counts two
things at the L1D:

* **req-fail-num**: requests the L1D could not accept. Every refused attempt
  counts, including each retry.
* **L1D-acc-num**: requests the L1D accepted.

At the end of the period it divides the first by the second. This quotient is
the **R-to-A ratio**. If the ratio is **greater than 3** (the *B-threshold*),
the kernel is classified as one the L1D does not help ("Type-N"). From then on
every request bypasses the L1D, which can then be switched off. Otherwise
("Type-P") the L1D stays in use. The decision holds until the next launch.

The decision rule (what is counted, the ratio, the threshold 3 and the strict
"greater than") and the cache geometry come from a published proposal of this
mechanism. Everything else is this design's own choice: the request formats,
the divider, the L1D's internal policies and all handshakes. Those choices are
listed near the end.

## The decision unit (`adml1d_unit`)

This is the part that is hardest to read from the code. The unit is a chain of
four small blocks run by a four-state controller (`IDLE`, `WARMUP`, `DIVIDE`,
`DECIDED`).

```
 wup_cycles ──► adm_warmup_timer ──window──► adm_tracker (req_fail) ──fail_num─┐
 kernel_start ─┘        │                   adm_tracker (l1d_acc)  ──acc_num──┤
                        └──done──► controller ──start──► adm_divider ◄────────┘
                                                            │ quotient, rem_nz
                                                      adm_comparator (> 3) ──► bypass
```

* **Warm-up window** (`adm_warmup_timer`). A `kernel_start` pulse in cycle
  *c* loads `wup_cycles`. The window is open in cycles *c+1 … c+W*, and `done`
  pulses in cycle *c+W+1*. The period is set from outside. It is meant to be
  an estimate of the application's run length, for example one worked out at
  compile time. Measured L1D behaviour is steady over the first 50K to 1M
  cycles, so the period does not have to be precise.
* **Trackers** (`adm_tracker`, two instances). These are saturating 32-bit
  counters. They count only while the window is open, and `kernel_start`
  clears them.
* **Division** (`adm_divider`). This is a restoring divider that produces one
  quotient bit per cycle. It computes `(fail_num << 8) / acc_num`, so the ratio
  is a fixed-point number with 8 fraction bits (40 bits wide). It runs once per
  launch and takes 40 steps. It also reports whether a remainder was left
  (`rem_nz`).
* **Comparator** (`adm_comparator`). The rule "ratio > 3" is tested exactly.
  Truncating the quotient to 8 fraction bits would make ratios just above 3
  look like exactly 3. The comparator therefore reports *greater* when the
  quotient is above 3.0, or when it equals 3.0 and a remainder was left. This
  is the same as testing `fail_num > 3 * acc_num`, and the testbenches check it
  in that form.

Edge cases (own choices): no refused request in the window means a ratio of 0.
The unit then decides without dividing, one cycle after the window. Refused
requests with no accepted access count as an infinite ratio, so the L1D is
bypassed.

Timing, counted from the cycle in which `kernel_start` is high:

| event | cycle |
|---|---|
| window open | c+1 … c+W |
| division starts (if any request failed) | c+W+1 |
| `decided`, `bypass`, `r2a_ratio` valid (ratio > 0) | c+W+43 (W + N + FRAC_BITS + 3) |
| `decided` when nothing failed | c+W+2 |

`kernel_start` also clears `bypass` at once. The L1D is always in use during
the warm-up.

## Where the unit sits: the SM memory stage (`sm_mem_stage`)

```
            ┌──────────── N ───────────► l1d_cache ── miss queue ──┐
 pipeline ─► lsu ─► AdmL1D steering                                 ├─► icnt_port ◄──► lower level
            └──────────── Y (bypass) ── word read / write ─────────┘       │
 writeback ◄── lsu ◄── L1D hits and fills ◄── fills ─────────────────────────┘
                   ◄── bypassed load data ◄────────────────────────────────┘
```

* **`lsu`** holds one word request and offers it every cycle until it is taken.
  Each refused offer is one request fail. It also merges load data from the
  L1D, which has priority and cannot be stalled, with data for bypassed loads
  from the interconnect port, which waits.
* **Steering.** While `bypass` is 0 the request goes to the L1D, and the L1D's
  accept/refuse outcome feeds the trackers. When `bypass` is 1 it becomes a
  word read or write on the bypass channel. Back-pressure there is not counted
  as a request fail.
* **`icnt_port`** merges the L1D miss queue and the bypass channel onto one
  request channel towards the lower level. When both sources wait, it
  alternates between them (round-robin). It sends line responses back to the
  L1D as fills and word responses to the LSU.
* **`l1d_off`** = `bypass` and the L1D has nothing outstanding: no reserved
  line, no MSHR in use, an empty miss queue and no fill being answered. This is
  the condition under which clock or power gating of the L1D could be applied.
  The gating itself is not part of this RTL.
* `kernel_start` invalidates the L1D. Stores that bypassed the cache may have
  made its contents stale, and the L1D may be switched on again at the next
  launch.

## The L1D and what makes it refuse (`l1d_cache`)

Geometry: 32 sets × 4 ways × 128-byte lines (16 KB), 32 MSHRs and an 8-entry
miss queue. It has one word port, and each cycle a request is either accepted
or refused:

| request | accepted when | effect |
|---|---|---|
| load, hit | always (unless busy, below) | data returned the next cycle |
| load, line already being fetched | an MSHR is free | MSHR entry added, no new fetch |
| load, miss | an MSHR is free **and** a way of the set is not reserved **and** the miss queue has room | round-robin victim reserved, line read queued |
| store | miss queue has room **and** its line is not being fetched | write-through; a hit also updates the word; no allocation on a miss |
| anything | — | refused while a fill is offered or the MSHRs of a returned line are being answered (one load per cycle) |

A returning line is written into its reserved way and becomes valid. The loads
waiting for it are then answered one per cycle from a line buffer. Requests are
refused during that time because the response port is taken. Under streaming
traffic with a long memory latency, the MSHR and way limits are what drive the
fail count up. In simulation, a 200-cycle memory and a pure streaming pattern
give a ratio of about 6. A small reused working set gives about 0.1.

## Fifteen SMs (`adml1d_gpu_mem`, the top)

The top holds `NUM_SM` = 15 memory stages. All of them share `kernel_start`
and `wup_cycles`, but each has its own L1D, its own unit and its own decision.
All per-SM ports are unpacked arrays indexed by SM:

* pipeline side: `in_valid/in_req/in_ready`, `wb_valid/wb`
* interconnect side: `lo_req_valid/lo_req/lo_req_ready`,
  `lo_rsp_valid/lo_rsp/lo_rsp_ready`
* status: `bypass`, `decided`, `l1d_off`, `r2a_ratio`, `measuring`,
  `fail_num`, `acc_num`
* one-cycle event pulses: `ev_req_fail`, `ev_l1d_acc`, `ev_hit`, `ev_miss`,
  `ev_merge`, `ev_store`, `ev_bypass_req`

The network to the memory partitions, the L2, the memory controllers and DRAM
are outside the top. So are the rest of the SM pipeline and the compile-time
estimate of the warm-up period.

Types (`adml1d_pkg`): `mem_req_t` {addr[32], we, wdata[32], id[8]},
`mem_rsp_t` {id, rdata}, `lo_req_t` {op: LINE_RD / WORD_RD / WORD_WR, addr,
wdata, id}, `lo_rsp_t` {is_line, addr, id, data[1024]}. Every channel is
valid/ready. A transfer happens in a cycle where both are high. Reset is
asynchronous and active low.

## Parameters

| parameter | default | origin |
|---|---|---|
| `NUM_SM` | 15 | source configuration |
| `SETS`, `WAYS`, line size | 32, 4, 128 B | source configuration |
| `MSHRS` | 32 | source configuration |
| `B_THRESHOLD` | 3 | source decision rule |
| `MISSQ_DEPTH` | 8 | own choice |
| `CNT_W`, `WUP_W` | 32 | own choice (a whole run of the largest benchmark, about 56M cycles, fits) |
| `FRAC_BITS` | 8 | own choice (exactness does not depend on it) |

`SETS` and `WAYS` must be powers of two. The line size, word size and ID width
are package constants.

## Own choices and departures

* Requests are single 32-bit words. The coalescing of a warp's 32 thread
  addresses into line requests, which the target GPU performs, is not built.
* The internal policies of the L1D are not specified by the source and are
  chosen here: round-robin replacement, write-through with no write-allocate,
  the 8-entry miss queue, a one-cycle hit, refusing requests while a fill is
  handled, and refusing a store to a line being fetched.
* What counts as an "access": any accepted L1D request, load or store, hit or
  miss.
* The division method, the fixed-point format and the handling of zero
  accesses.
* The start of the warm-up is an external pulse (`kernel_start`). Pulse it once
  per application, or once per kernel to re-classify every kernel.
* L1D invalidation at each launch, and the `l1d_off` condition.
* The source also mentions, in passing, predicting reuse per cache block to
  save energy. It gives no mechanism for that, and nothing of the kind is
  built. The whole cache is switched per SM.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`,
and each one has a watchdog. Plain verilator is enough, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_adml1d_gpu_mem \
  -y rtl -y tb +libext+.sv rtl/adml1d_pkg.sv tb/tb_util_pkg.sv tb/tb_adml1d_gpu_mem.sv
./obj_dir/Vtb_adml1d_gpu_mem
```

| testbench | covers |
|---|---|
| `tb_adm_warmup_timer` | window length, done pulse, zero period, restart |
| `tb_adm_tracker` | random clear/enable/increment, saturation (5-bit copy) |
| `tb_adm_divider` | random and corner divisions vs 64-bit arithmetic, latency, divide by zero |
| `tb_adm_comparator` | decision vs `fail > 3*acc` around the threshold |
| `tb_adml1d_unit` | counts only inside the window, ratio, decision, decision latency, hold and clear |
| `tb_adm_workloads` | Type-N (ratios 5–8) and Type-P (0–0.3) event streams and ratios of exactly 3 and just above, with 50K and 1M-cycle warm-ups |
| `tb_lsu` | request order under random refusals, full rate, response priority |
| `tb_icnt_port` | exactly-once forwarding, alternation, response routing |
| `tb_l1d_cache` | hit timing, merge, refusal for full set / miss queue / MSHRs, stores, invalidation, random traffic with data checks |
| `tb_sm_mem_stage` | three kernels on one SM: keep, switch off (bypassed traffic, `l1d_off`), read-back, window timing, ratio |
| `tb_adml1d_gpu_mem` | all 15 SMs at default parameters, four launches: mixed Type-P/Type-N SMs decide separately; read-back; all SMs Type-N all switch off; all SMs Type-P all switch back on. All load data checked, every mechanism counted |

The testbenches use `lower_mem_model`, a behavioural model of everything below
the SM with a fixed latency. They also use `tb_traffic_gen`, a request
generator that checks load data. Neither is part of the design. The full 15-SM
test runs in well under a minute.
