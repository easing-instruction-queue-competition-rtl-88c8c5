# SRT with DDDI: keeping stalled threads out of a shared instruction queue

In a redundantly multithreaded processor every program runs twice, as a
*master* (leading) thread and a *slave* (trailing) thread, and the results
of the two copies are compared to catch soft errors. All threads share the
out-of-order core, and in particular one small instruction queue (IQ).
Master threads access the data cache. When one of their loads misses, the
instructions that need the load's value enter the IQ anyway and sit there
for tens or hundreds of cycles. They hold IQ entries that the other seven
threads could use, and a single thread can end up owning the whole queue.

**DDDI (Delay Dispatching Dependent Instructions)** fixes this with one bit
per rename register:

* when a master load is known, or predicted, to miss, the bit of its
  destination register is set;
* when the load completes, or is squashed, or its register is reallocated,
  the bit is cleared;
* at dispatch, a master instruction that reads a register whose bit is set
  is not moved into the IQ. Dispatch stops taking instructions from that
  thread for the cycle and moves on to the next thread.

The dependent instruction stays in its thread's private window and enters
the IQ only once its data is on the way. Slave threads never miss in the
data cache, because they read their load values from the master, so the
rule applies only to master threads. Independent instructions of the missing
thread keep flowing until the first dependent one. The thread as a whole is
never stopped.

This repository holds the SystemVerilog of the parts that make up this
scheme. It contains the DDDI dispatch stage, the rename-register status bits,
the load hit/miss predictor and the shared IQ. It also contains the SRT
structures of the four redundant thread pairs: load value queue, branch
outcome queue, comparing store buffer and slack-fetch control. Together they
form a dispatch/issue *slice* of an eight-thread core. The rest of the
pipeline (fetch, rename, ROB, LSQ, functional units, caches) is ordinary
out-of-order machinery and is not included. Its signals are ports of the
top level, `srt_dddi_top`.

## Threads and pairs

The core runs eight hardware threads: four programs, each in two copies.
Threads 0-3 are the masters. Thread `p+4` is the slave of master `p`
(`dddi_pkg::is_master`). Each pair `p` has its own load value queue (LVQ),
branch outcome queue (BOQ), store buffer and slack-fetch controller.
Rename registers (64) and the IQ (32 entries) are shared by all eight
threads.

## The DDDI bit (`rrf_status`)

`rrf_status` keeps two bits for each of the 64 rename registers:

| bit | set by | cleared by |
|---|---|---|
| `ready` | any writeback port | allocation of the register to a newly dispatched producer |
| `miss` (DDDI) | a master load issued with a predicted miss (`pred_set_*`); a miss reported by the D-cache (`dc_miss_*`) | load completion (`ld_done_*`); `squash_mask`; reallocation |

All updates take effect at the next clock edge. If a register is both set
and cleared in the same cycle, the clear wins. Both vectors are read
combinationally by dispatch and by the IQ.

A miss bit can be set at two moments:

1. **At issue, by prediction.** `cache_miss_predictor` is a PC-indexed table
   of 2048 two-bit saturating counters. It works like a bimodal branch
   predictor and predicts a miss when the counter is 2 or 3. Every load
   leaving the IQ is looked up in the same cycle, so the bit is set at the
   next edge, before the cache has answered.
2. **When the cache detects the miss**, for loads the predictor missed.

Only master loads train the predictor (`ld_done_tid` selects them). Slave
loads run the same code but read the LVQ, so they would otherwise teach it
that every load hits.

Timing: a dependant dispatched in the cycle in which its load issues still
gets into the IQ. So does any dependant dispatched before the miss was
detected or predicted. DDDI only catches the dependants that arrive at
dispatch after the bit is set. For this reason the predictor matters, and
the scheme works best when dispatch runs ahead of issue.

## Dispatch with thread skipping (`dddi_dispatch`)

Each cycle up to 8 instructions, and never more than the free IQ entries,
move from the thread windows into the IQ:

```
for k in 0..7:                      # threads, rotating start
  t = (start + k) mod 8
  for each instruction of t, in program order:
    if group full or window empty          -> next thread
    if dddi_en and t is a master and
       a valid source has its miss bit set -> blocked[t]=1, next thread
    else put the instruction in the next dispatch slot
start = start + 1 every cycle
```

The windows (`fq_inst`, `fq_valid`) hold each thread's oldest renamed,
not-yet-dispatched instructions. `fq_take[t]` says how many left this cycle.
The rotating start thread is this design's choice. With `dddi_en = 0` the
stage is the baseline SRT dispatch, which makes it easy to compare the two.
The stage is combinational apart from the rotating pointer.

## The shared instruction queue (`issue_queue`)

The queue has 32 entries, not partitioned between threads. Each entry holds
an instruction and two source-ready flags.

* **Insert.** Dispatched instructions go to the lowest free entries. A
  source is ready if it has no register, if its register is ready, or if
  it is written back in the same cycle. It is *not* ready if an earlier
  instruction of the same dispatch group writes it.
* **Wakeup.** Every writeback tag (8 functional-unit ports and 4
  load-completion ports) marks matching sources ready.
* **Select.** Up to 8 ready entries per cycle, lowest entry first, with at
  most 4 loads/stores (one per load/store unit). An entry is freed at the
  next edge and can be reused one cycle after that. An independent
  instruction inserted into an empty queue issues in the next cycle.
* **Squash.** Entries of `squash_tid` that are younger than the mispredicted
  branch are removed. Age is measured as the ROB distance from
  `squash_rob_head`. An entry selected in the squash cycle still goes out and
  must be dropped by its ROB.
* `free_cnt` and the per-thread `thr_cnt` expose the occupancy. This is the
  quantity DDDI is meant to improve.

## SRT structures of a thread pair

The pair's structures follow Simultaneous and Redundantly Threaded (SRT)
fault detection. Each queue is a 160-entry FIFO (`srt_fifo`; the depth need
not be a power of two).

* **`load_value_queue`**: master loads push (address, value) at commit. The
  slave's copy of the load pops the head and uses that value. It never
  touches the cache, so it cannot miss and both copies see the same data. A
  slave address that differs from the master's raises `addr_fault`.
* **`branch_outcome_queue`**: master branches push (PC, direction, target).
  The slave's fetch uses the head as a perfect prediction. A PC mismatch
  raises `pc_fault`.
* **`store_buffer_compare`**: master stores wait here. When the slave's copy
  of the same store arrives, it is compared with the oldest entry. If they
  agree, the store goes to the D-cache in the same cycle (`mem_wr_*`). If
  they differ, `fault` rises and stays high until reset, and the buffer
  stops. Stores are the only values that leave the replicated part of the
  machine, so this is where errors are detected.
* **`slack_fetch`**: counts instructions fetched by master and slave and lets
  the slave fetch only while it is at least 128 instructions behind
  (`s_fetch_max` limits how many it may fetch this cycle). `drain` lifts the
  limit when the master has finished.

Master sides fill when the master commits, and `m_ready` back-pressures the
master when a queue is full. The queue sizes (160, with a slack of 128) are
smaller than the original single-thread SRT settings. Those settings can
deadlock with several thread pairs: masters stall on full queues while
their slaves cannot get core resources to drain them.

## Parameters

| parameter | default | where |
|---|---|---|
| `NUM_THREADS` / `NUM_PAIRS` | 8 / 4 | `dddi_pkg` |
| `NUM_PREGS` (shared rename registers) | 64 | `dddi_pkg` |
| `ROB_SIZE` (per thread, sets the ROB index width) | 96 | `dddi_pkg` |
| `MACHINE_W` (fetch/dispatch/issue width), `LSU_N` | 8, 4 | `dddi_pkg` |
| `XLEN` (address/data width) | 64 | `dddi_pkg` |
| `IQ_SIZE` | 32 | `srt_dddi_top` |
| `DISP_W`, `ISSUE_W`, `NUM_LSU` | 8, 8, 4 | `srt_dddi_top` |
| `QUEUE_DEPTH` (LVQ, BOQ, store buffer) | 160 | `srt_dddi_top` |
| `SLACK` | 128 | `srt_dddi_top` |
| `PRED_ENTRIES` | 2048 | `srt_dddi_top` |

The package values fix the widths of the shared `inst_t` record, so change
them in `dddi_pkg.sv`. The module parameters can be overridden per instance.
`IQ_SIZE = 48` with `dddi_en = 0` gives the "bigger IQ instead of DDDI"
baseline.

## Instruction record

`dddi_pkg::inst_t` carries the thread id, PC, operation class
(ALU/load/store/branch), destination register, two source operands
(valid + rename-register tag) and the ROB index. Nothing else is needed by
dispatch and issue. The opcode and immediate fields that the functional units
need travel with the instruction in the surrounding pipeline.

## Timing summary

* Dispatch, IQ select, predictor lookup: combinational within the cycle.
* Miss bit set: the edge after the load issues (predicted) or after the
  cache reports the miss.
* Miss bit cleared: the edge after `ld_done`. The dependant can dispatch in
  the next cycle, and its source is already marked ready.
* IQ: insert at the edge, issue at the earliest in the next cycle.
* SRT queues: push/pop at the edge; heads are visible combinationally.
* `rst_n` is asynchronous and active low everywhere.

## What follows the source design and what does not

Taken from the design as published: the DDDI set/clear/skip rules and the
restriction to master threads; prediction of misses at load issue; 8
threads in 4 redundant pairs; 64 shared rename registers; a 32-entry shared
IQ; 8-wide dispatch/issue with 4 load/store units; 160-entry FIFO LVQ, BOQ
and store buffer; a slack of 128.

Choices made here, where the source is silent: the thread numbering; the
rotating dispatch order; lowest-entry-first issue select; the predictor's
organisation and size; the ready bit sharing the status block; clear-wins
priority; the LVQ address check and the BOQ PC check; one set of queues per
pair; holding the store buffer on a fault; counting slack at fetch with a
`drain` input; 64-bit data; all handshakes.

Not included: fetch and the I-cache, the branch predictor, rename,
the ROB and commit, the LSQ, the functional units, the L1/L2 caches and TLBs.
The source only configures these (8-wide machine, 96-entry ROB, 48-entry
LSQ, 32 KB L1 caches, 4 MB L2, etc.) and does not design them. Fault
*recovery* is also outside: the store buffer only detects.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares
against an independent model, ends with a `TB_RESULT checks=N failures=M`
line, and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_rrf_status` | random set/clear traffic against a model of the rules |
| `tb_cache_miss_predictor` | counter training, saturation, all 8 lookup ports |
| `tb_dddi_dispatch` | dispatch groups, take counts and block flags against a reference walk; slaves never blocked |
| `tb_issue_queue` | no early issue, exact issue count, LSU limit, squash, occupancy, next-cycle issue latency |
| `tb_load_value_queue`, `tb_branch_outcome_queue`, `tb_store_buffer_compare` | order, full/empty at 160, fault detection |
| `tb_slack_fetch` | lag never below 128, catch-up on drain |
| `tb_srt_dddi_top` | whole slice at default parameters (see below) |

`tb_srt_dddi_top` acts as the rest of the pipeline. It renames into the 64
shared registers, limits each thread to 96 in-flight instructions, returns
ALU results after 1-2 cycles and completes loads. Some master load PCs always
miss (80 cycles, with the miss reported 2 cycles after issue); slave loads
complete in one cycle. Master threads are squashed now and then. Five
synthetic mixes stand in for the ILP, MIX1, MIX2, MIX3 and MEM program mixes.
In these mixes 0, 1, 2, 3 or 4 of the pairs run memory-bound code (3 of 8
load PCs miss) and the rest compute-bound code (1 of 8). Each mix runs 6,000
instructions with DDDI off, then again with it on.

Each cycle the testbench checks the 64 miss bits against its own model. It
also checks that no master instruction is dispatched while a source has a
pending miss, that no instruction issues before its operands are ready, and
that every instruction issues exactly once. In parallel it drives all four
pairs' SRT queues against reference FIFOs and finally injects a corrupted
slave store. Each mechanism must occur at least once: DDDI block, full IQ,
predicted-miss set, cache-reported miss, squash, full LVQ/BOQ/store buffer,
store release, store fault and slack hold.

Cycles to finish each synthetic mix, and the average IQ residence of master
instructions (dispatch to issue):

| mix (memory-bound pairs) | cycles, DDDI off | cycles, DDDI on | master IQ residence off / on |
|---|---|---|---|
| ILP (0) | 3618 | 3036 | 30.7 / 25.2 |
| MIX1 (1) | 3236 | 3720 | 25.7 / 33.7 |
| MIX2 (2) | 3402 | 3660 | 27.6 / 32.1 |
| MIX3 (3) | 3931 | 4092 | 34.6 / 36.6 |
| MEM (4) | 4935 | 4720 | 45.3 / 46.5 |

These numbers come from a functional test and do not model performance.
The programs are random and the metric is the time for *all* threads to
finish. DDDI stops a missing thread's dispatch at its first dependent
instruction, so that thread's own independent instructions also wait, and
the slowest thread sets the finishing time. Most dependants in these
programs reach dispatch before their load issues, so they still enter the
IQ. The published improvement was measured on SPEC2000 programs over a fixed
instruction budget. Reproducing it would need the full pipeline and real
programs.

Running with plain Verilator (from the repository root):

```
verilator --binary --timing --top-module tb_srt_dddi_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/dddi_pkg.sv tb/tb_srt_dddi_top.sv
./obj_dir/Vtb_srt_dddi_top
```

Any other testbench works the same way: swap in its name. The top-level
test takes a few seconds.

## Files

* `rtl/dddi_pkg.sv`: sizes, `inst_t`, `is_master`, `rob_age`
* `rtl/rrf_status.sv`, `rtl/cache_miss_predictor.sv`,
  `rtl/dddi_dispatch.sv`, `rtl/issue_queue.sv`: the DDDI core slice
* `rtl/srt_fifo.sv`, `rtl/load_value_queue.sv`,
  `rtl/branch_outcome_queue.sv`, `rtl/store_buffer_compare.sv`,
  `rtl/slack_fetch.sv`: SRT pair structures
* `rtl/srt_dddi_top.sv`: top level
* `tb/tb_*.sv`: testbenches
