# SMQoS: QoS-aware SM allocation between a latency-sensitive and a batch GPU kernel

When two kernels share a GPU, one of them often has a service target (a
latency-sensitive, or LS, kernel) and the other just wants throughput (a batch
kernel). SMQoS splits the GPU's streaming multiprocessors (SMs) between the two
and revisits the split at every epoch of 10,000 cycles:

* the LS kernel's measured IPC is compared with its target. If it falls short,
  the LS kernel gets one more SM. If it is comfortably above the target, it
  gives one SM back;
* an SM the LS kernel gives back is not automatically handed to the batch
  kernel. The hardware searches, one SM at a time, for the smallest SM count at
  which the batch kernel stops gaining throughput (`opt_k`). SMs beyond that
  count are power gated rather than wasted on a memory-bound kernel.

This repository holds synthesizable SystemVerilog for that control hardware:
per-task IPC measurement, the decision logic, the SM ownership table with its
power-gate enables, the QoS registers set by the host, and the two task pools.
The SMs themselves and the GPU's thread-block (TB) scheduler are outside it. The
design talks to them through per-SM instruction counts and a move handshake.

## One epoch, end to end

```
 SMs --sm_inst--> Data Collector --IPC_ls, IPC_batch--> PDM --record--> DSMA --decision--> SM allocation table --swap_valid/ready--> TB scheduler
                      ^   (divide by epoch length)    (running mean,      (Alg. 1 + Alg. 2,      (owner per SM,              (moves the TBs)
                      |                                 epoch count)        bound search)          sm_gate per SM)
                      +------------------------------- sm_owner --------------------------------------+
```

1. **Data Collector** (`data_collector`). Every cycle it adds each SM's
   completed-instruction count to the total of the task that owns the SM. On the
   last cycle of the epoch it latches both totals and restarts counting. It then
   divides each total by the epoch length with a serial divider. The result is
   the epoch IPC of each task in Q10.6 fixed point (16 bits, 0 to 1023.98).
2. **PDM**, or profiling data management (`pdm`). It stores the epoch IPC, counts
   the epochs N each task has run, and updates its average IPC with
   `ave <- floor((ave*N + ipc)/(N+1))`. It also snapshots the current SM counts.
3. **DSMA**, or dynamic SM adjustment (`dsma`). It computes the decision in one
   cycle (next three sections).
4. **SM allocation table** (`sm_alloc_table`). It turns the decision into at most
   two SM moves and sends them one at a time to the TB scheduler.

The decision reaches the table about 140 cycles after the epoch ends at the
default sizes: two 31-cycle divisions in the collector, two 33-cycle divisions
in the PDM, and a few cycles of hand-over. That is tiny against the
10,000-cycle epoch. The collector is already counting the next epoch while this
runs.

`sm_manager` wraps the PDM and the DSMA. It also owns the two task slots (next
section).

## Task slots, pools and QoS registers

The host marks a kernel as LS with `cudaSetQoS(kernel, IPC_target)`. In
hardware this is a write to `qos_regs`: one bit per kernel identifier in the LS
bit vector, plus a 16-bit target per kernel. Writing a target of 0 turns the
kernel back into a batch kernel.

A launched kernel goes into the LS pool or the batch pool (`task_pools`, two
8-deep FIFOs) according to its bit. The SM manager keeps one LS slot and one
batch slot. When a slot is empty and its pool is not, it takes the oldest kernel
and pulses `ls_start` or `b_start`. It then clears that task's history and
returns the SMs to an even split. Epochs are counted, and decisions made, only
while both slots are filled.

## The LS rule (Algorithm 1)

With `ave`, `ipc` and `N` from the PDM and `T` the LS kernel's target:

| condition | action |
|---|---|
| `ave < T` or `ipc < T` | swap in one SM |
| otherwise, `ave*N/(N+1) > T` and `ipc > T` | swap out one SM |
| otherwise | keep |

The swap-out test asks whether the average would still be above the target even
if the next epoch added nothing. The hardware evaluates it without a divider, as
`ave*N > T*(N+1)`. Swapping in is easy and swapping out is hard, which biases the
controller towards keeping the QoS.

A swap-in takes a power-gated (idle) SM if there is one. Only when none is
gated does it take an SM from the batch kernel. Every task keeps at least one
SM, so a swap-in with no gated SM and a one-SM batch kernel does nothing.

## Finding the batch kernel's SM count (Algorithm 2 and the bound search)

This is the least obvious part of the design. The DSMA keeps four pieces of
batch history:

* `opt_k`, the batch kernel's best SM count found so far (8 bits);
* `upper_k` and `lower_k`, flags meaning "an upper bound on `opt_k` has been
  seen" and "a lower bound has been seen";
* `IPC_last`, the batch IPC in the epoch before the batch kernel's last SM
  change (16 bits).

**Allocation.** Algorithm 2 runs only when the LS kernel gives an SM back:

| state | what happens to the freed SM |
|---|---|
| `SM_batch < opt_k` | goes to the batch kernel |
| else `upper_k` clear | goes to the batch kernel (keep exploring upwards) |
| else `lower_k` clear | is power gated; the batch kernel also gives up one of its own SMs, which is power gated too (explore downwards) |
| else (both bounds known) | is power gated |

**Learning.** When the batch kernel has just gained or lost an SM through
Algorithm 2, the next epoch's batch IPC is compared with `IPC_last`. The
threshold `th` is 13/256, about 5%:

| last change | batch IPC this epoch | result |
|---|---|---|
| gained an SM | `<= IPC_last*(1+th)`: no real gain | `upper_k` set |
| gained an SM | `> IPC_last*(1+th)` | `lower_k` set, `opt_k = SM_batch` |
| lost an SM | `< IPC_last*(1-th)` | `upper_k` set |
| lost an SM | `>= IPC_last*(1-th)`: no real loss | `lower_k` set, `opt_k = SM_batch` |

When both flags are set, `opt_k` is frozen until the next batch kernel starts.

The learning step runs first in the same cycle, so a bound found in this epoch
already affects this epoch's allocation. `opt_k` starts at 0 with both flags
clear. A new batch kernel therefore first grows by one SM each time the LS kernel
frees one, until growth stops paying off.

**Example** (taken from `tb_sm_manager`). The batch kernel holds 8 SMs and the
LS kernel frees one. Both flags are clear, so the batch kernel takes it. Its IPC
stays flat, so `upper_k` is set. The LS kernel frees another SM: the table moves
the freed SM and one batch SM to the gated state. The batch IPC holds, so
`lower_k` is set and `opt_k` becomes the batch count. From then on, SMs the LS
kernel frees are power gated, unless LS demand has pushed the batch kernel below
`opt_k`, in which case the batch kernel gets them back.

Only SM changes made by Algorithm 2 start a learning step. SMs the LS kernel
takes from the batch kernel do not.

## SM ownership, moves and power gating

`sm_alloc_table` holds a 2-bit owner per SM: `OWN_LS`, `OWN_BATCH` or
`OWN_GATED`. An SM that no task owns is always gated. At reset and on every new
kernel, the lower half of the SMs goes to the LS kernel and the upper half to the
batch kernel.

Which SM moves:

* LS swap-in: the lowest-numbered gated SM, or else the highest-numbered batch
  SM;
* LS swap-out: the highest-numbered LS SM, which goes to the batch kernel or is
  gated;
* batch swap-out: the highest-numbered batch SM, which is gated.

Each move goes out as `swap_valid`, `swap_sm` and `swap_to`, held until the TB
scheduler answers `swap_ready` (an assertion in the RTL checks that the request
stays stable). The table entry changes on that handshake, and the gate of an SM
that is being woken opens as soon as its request is raised. A decision that
arrives while earlier moves are still pending is dropped (`dec_dropped`). With
two moves per epoch at most, this happens only if the TB scheduler takes longer
than an epoch.

The SM counts `SM_k` are derived from the table by counting owners. They are not
kept as separate registers.

## Sizes and number formats

| parameter (module) | default | origin |
|---|---|---|
| `EPOCH_CYCLES` | 10000 | source design |
| IPC width (`IPC_W`) | 16 bits | source design |
| IPC binary point (`IPC_FRAC`) | 6 fraction bits (Q10.6) | this design |
| SM count / `opt_k` width | 8 bits | source design |
| `NUM_SM` | 16 (even) | this design; the source does not state the SM count |
| `NUM_KERNELS` | 32 kernel identifiers | this design (one per hardware work queue) |
| `INST_W` | 7 bits of per-SM instructions per cycle | this design |
| `POOL_DEPTH` | 8 kernels per pool | this design |
| `TH` | 13 (threshold 13/256) | this design; the source gives no value |
| epoch counter `NEP_W` | 16 bits, saturating | this design |

Results saturate at the 16-bit maximum. The default sizes hold the evaluated
workloads: two co-running kernels for 2M cycles (200 epochs), with targets of
80 to 95% of the LS kernel's isolated IPC.

## Files

| file | contents |
|---|---|
| `rtl/smqos_pkg.sv` | widths, owner/action enums, decision struct |
| `rtl/smqos_top.sv` | top level |
| `rtl/data_collector.sv` | per-task instruction totals and epoch IPC |
| `rtl/sm_manager.sv` | task slots, PDM + DSMA chain |
| `rtl/pdm.sv` | epoch record and running-mean IPC |
| `rtl/dsma.sv` | Algorithm 1, Algorithm 2, bound search |
| `rtl/sm_alloc_table.sv` | SM owner table, move handshake, gate enables |
| `rtl/qos_regs.sv` | LS bit vector and IPC targets |
| `rtl/task_pools.sv`, `rtl/task_fifo.sv` | LS and batch pools |
| `rtl/udiv_serial.sv` | one-bit-per-cycle unsigned divider |
| `tb/tb_<module>.sv` | self-checking testbench per block |
| `tb/tb_smqos_top.sv` | end-to-end test at 8 SMs and 200-cycle epochs |
| `tb/tb_smqos_full.sv` | end-to-end test at the default sizes, about 2M cycles |
| `tb/tb_smqos_mixes.sv` | the four LS-batch mix categories under four QoS policies, default sizes |
| `tb/smqos_tb_body.svh` | signals, GPU model hook-up and reference checker of the end-to-end tests |
| `tb/smqos_tb_scenario.svh` | six-phase stimulus shared by the two end-to-end tests |
| `tb/gpu_model.sv` | behavioural SMs and TB scheduler for the end-to-end tests |

## Top-level interface (`smqos_top`)

The reset is asynchronous and active low.

* **cudaSetQoS**: `qos_wr_en`, `qos_wr_kid`, `qos_wr_target`. A write takes
  effect on the next clock.
* **Kernel offload**: `launch_valid`, `launch_kid`, and `launch_ready` (the
  kernel's pool has room). `kernel_done_ls` and `kernel_done_b` end the running
  kernels. `slot_*`, `ls_start` and `b_start` show which kernels run.
* **SM activity**: `sm_inst[i]`, the instructions SM *i* completed this cycle.
* **SM moves**: `swap_valid`, `swap_sm` and `swap_to` out, `swap_ready` in.
  `sm_owner[i]` and `sm_gate[i]` (1 = SM *i* power gated) out.
* **Observation**: epoch IPCs, averages, decision, the bound state and the SM
  counts.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself. For
example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/smqos_pkg.sv tb/tb_smqos_top.sv --top-module tb_smqos_top
./obj_dir/Vtb_smqos_top
```

Replace `tb_smqos_top` with any other testbench name. `tb_smqos_full` runs
about 2M cycles at the default sizes and finishes in a few seconds.

What the tests establish:

* The block tests compare each block with a reference model written
  independently in the testbench, using random and directed stimulus. Examples
  are the IPC arithmetic, the running mean, both algorithms with the bound
  search, the SM selection order and handshake, and pool order and
  back-pressure. They also check latencies: a decision one cycle after the
  record, and IPC and records within the divider latency.
* The end-to-end tests close the loop with `gpu_model`. In that model the LS
  kernel runs at a set rate per SM, and the batch kernel's throughput stops
  growing beyond a set SM count. The tests walk through six phases:
  1. the LS kernel runs slow;
  2. it runs fast;
  3. it runs slow again;
  4. a memory-bound batch kernel takes over;
  5. SM moves take longer than an epoch;
  6. a new LS kernel arrives.

  The tests recompute every epoch IPC, average and decision, check the SM counts
  after each decision's moves, and count each mechanism. A mechanism that never
  occurs is a failure. The mechanisms are:
  * LS swap-in from a gated SM, and from the batch kernel;
  * LS swap-out;
  * batch swap-in and batch swap-out;
  * gating of a freed SM;
  * upper bound, lower bound and freeze of `opt_k`;
  * the even re-split;
  * a dropped decision;
  * use of both pools.

## Behaviour on compute- and memory-bound mixes

`tb_smqos_mixes` runs 16 co-runs of 2M cycles each at the default sizes. They
are the four LS-batch categories CI-CI, CI-MI, MI-CI and MI-MI, each under QoS
targets of 80, 85, 90 and 95% of the LS kernel's IPC when alone on all 16 SMs.
It takes under a minute in Verilator.

The kernels are synthetic stand-ins:

* a compute-intensive (CI) kernel completes 2 instructions per SM per cycle and
  keeps scaling with SMs;
* a memory-intensive (MI) kernel completes 1 instruction per SM per cycle and
  stops gaining beyond 4 SMs.

What they show:

* **Where the target is met.** The LS average meets its target in every co-run
  except CI-LS at 95%. That case needs all 16 SMs, while the batch kernel always
  keeps one.
* **Where SMs are gated.** A memory-bound batch kernel next to an MI LS kernel
  ends with idle SMs power gated.
* **Where nothing is gated.** A compute-bound batch kernel absorbs every SM the
  LS kernel releases.
* **A limit of the bound search.** The search probes one SM around the
  allocation the batch kernel starts with. In MI-MI the batch kernel starts with
  8 SMs, and its first swap-in shows no gain, so `upper_k` is set. The next
  swap-out shows no loss, so `lower_k` is set and the search freezes at 8. The
  batch kernel keeps 8 SMs although 4 would do. The 4 SMs the LS kernel releases
  are gated, but the batch kernel's excess is not.

## How this RTL relates to the published mechanism

Taken from the source design:

* the epoch structure and 10k-cycle epoch;
* the split into Data Collector, PDM and DSMA;
* Algorithm 1;
* Algorithm 2 and the bound rules, including its exact comparisons;
* idle SMs first;
* power gating of unused SMs;
* the 16-bit IPC registers, 8-bit SM registers, 1-bit flags and LS bit vector;
* the cudaSetQoS parameters;
* the two task pools.

Choices made here where the source is silent:

* the fixed-point format;
* the threshold value;
* the SM count;
* the running-mean form of the average;
* the serial dividers;
* SM selection order;
* the move handshake and dropping decisions while busy;
* at least one SM per task;
* `opt_k` starting at 0;
* the re-split on a new kernel;
* the pool depth and kernel-ID count.

Points that were read literally and may deserve a second look:

* **Upper bound after a swap-out.** After a batch swap-out that costs more than
  `th`, the rule only sets `upper_k`. `opt_k` is not raised back, so a batch
  kernel that keeps losing throughput can be stepped down again at later LS
  swap-outs, until `lower_k` is found or it reaches one SM.
* **What the threshold applies to.** The source says the threshold controls the
  LS task's sensitivity to SM changes, but it only appears in the batch bound
  rules. It is used there.
* **Power gating of the freed SM.** When the batch kernel explores downwards,
  both the SM freed by the LS kernel and the batch SM it gives up are gated.

* **Freezing above the useful SM count.** See the MI-MI case above: the rules,
  applied literally, can freeze `opt_k` above a batch kernel's useful SM count.

Not included, because they are existing GPU parts or software that the
mechanism relies on but does not define:

* the SMs themselves;
* the TB scheduler's thread-block save and restore;
* the power switches;
* the CUDA runtime that issues `cudaSetQoS`.
