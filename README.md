# Power-aware clock gating for data-flow process networks

A data-flow circuit built as a network of processes connected by FIFO channels
(a Kahn process network) burns power in every process whose clock ticks. Plain
clock gating stops the clock of a process only while that process has nothing
to do. This design goes further: a small **clock-gating logic (CGL)** acts as a
scheduler that may also *suspend* processes that do have work, so that fewer
processes switch at the same time. It trades throughput for a lower and bounded
instantaneous power, which matters for battery life and chip temperature, not
for total energy.

The scheduler is not free to starve or freeze the network. Each tick it must
respect a fixed set of rules (the *safety objective*, below). A run-time input,
`cfg_idle`, turns the scheduler off and falls back to ordinary idleness-based
gating.

The RTL contains the complete CGL, a glitch-free clock gate, bounded FIFO
channels, and a demonstration network built from a small example process. The
network is either a three-stage pipeline or N independent processes.

## Processes, idleness and power estimates

Every process brings out, besides its functional ports, the signals the
scheduler needs:

- **idle_p**: no clocked assignment of the process can fire on the next
  edge, so stopping its clock changes nothing. It is an under-approximation: it
  may be low when the process would in fact not change.
- **P_p**: a power estimate for the coming edge. It counts the register bits
  that the branch about to execute may flip, which is the sum of the widths of
  the registers that branch assigns. It is 0 when the clock is inhibited.
- **done_p**: a one-tick pulse when the process finishes a job.
- **empty_p**: the FIFO the process reads from is empty.

The example process (`proc_p`) takes a start pulse and samples its 32-bit input
on two clocked cycles. If both samples match, the result is their sum;
otherwise it is the newer sample. The result comes with a one-cycle `done`. Its
model (`proc_p_model`) evaluates the branch conditions from the control
registers `start`, `r1` and `done`. It also uses two values the model treats as
unknown inputs: register `r2` and the comparison `i == r3`. The process brings
both out as extra ports. The flip counts per branch are:

| branch taken on the next edge               | registers assigned   | P_p |
|---------------------------------------------|----------------------|-----|
| `start & !done`                             | r1                   | 1   |
| `r1 & !done`, r2 set (either result branch) | o, done, r1, r2      | 35  |
| `r1 & !done`, r2 clear                      | r2, r3               | 33  |
| `done`                                      | done                 | 1   |
| none (idle)                                 | none                 | 0   |

`proc_node` wraps the process with a job handshake. A start pulse is issued when
the node is not busy, its input FIFO holds a job, its output FIFO has room and
`done` is low. The job word stays at the head of the input FIFO while the
process works. On the `done` cycle the head is popped and the result pushed.
Each process doubles the job word, since both samples are equal. A job
therefore takes four clocked cycles.

## The scheduler state

The CGL holds, per process p:

- **suspended_p** (`suspend_observer`) toggles whenever the scheduler's control
  bit `c_p` is set. Setting `c_p` on a running process suspends it from the
  next tick on. Setting it on a suspended process *activates* it
  (`activate_p = suspended_p & c_p`).
- **q_p**, the inactivity counter (`inactivity_counters`), is cleared when p is
  activated. It grows by one whenever some other process is activated and p is
  not, and saturates at N-1.
- **The priority list** p_1 >= p_2 >= ... (`prio_sort`) holds the counters
  sorted in decreasing order.

## The safety objective

Every tick, the controls must satisfy all of the following. `phi_monitor`
checks each rule in hardware and raises one flag per rule in `viol`:

1. **Strict progress.** At least one process is not suspended, unless every
   input FIFO is empty.
2. **Fairness.** If k processes are activated in a tick, each of them has a
   counter among the k largest (q_p >= p_k).
3. **Concurrency**, selected by `CONC`:
   - *cooperation*: when a running process finishes a job or goes idle while
     another process is stalled (suspended and not idle), some other process
     must be activated in the same tick;
   - *preemption*: when `slow_clk` is high and some process is stalled, some
     process must be activated.
4. **Inhibit only when allowed.** `inhibit_p` only if p is suspended. With
   `cfg_idle = 1` the condition becomes "only if p is idle", which is classical
   idleness gating.
5. **Peak power.** The summed estimate `power_total` must not exceed `PMAX`.
   This is not checked in idleness-only mode.

## The strategy

`cgl_strategy` is the combinational rule that picks `c` and `inhibit` each
tick. It runs the processes in *batches* of at most `MAX_RUN` processes. The
default is one process at a time.

- A hand-over is due when a running process finishes or goes idle while
  another process is stalled (cooperation), or when `slow_clk` is high while
  any process is stalled (preemption).
- On a hand-over, every running process is suspended. Up to `MAX_RUN`
  suspended processes are activated, those with the largest inactivity
  counters first. Ties go to the first process in round-robin order after the
  lowest-index running one.
- `inhibit = suspended`, or `inhibit = idle` when `cfg_idle = 1`.

Why this meets the objective:

- **Fairness.** A batch is activated in one tick, and nothing else is activated
  while it runs. Running processes therefore always hold counter 0, and every
  suspended counter is at least as large. The processes picked hold the
  largest counters of all, which is what fairness asks for.
- **Strict progress.** A batch is never empty.
- **Peak power.** The summed power of a batch is at most `MAX_RUN * P_WORST`,
  where `P_WORST` is the worst single-process estimate (35 for the example
  process). `cgl` stops elaboration with an error if this exceeds `PMAX`.
  With `MAX_RUN = 1` that is exactly the feasibility limit: for any `PMAX`
  below `P_WORST` no schedule exists.

This strategy is one valid choice among many. A controller-synthesis tool can
derive others, for instance ones that size each batch from the live power
estimates rather than the worst case, or ones that minimise energy over a
short look-ahead window. Neither is built here. The only power refinement in
this strategy is that it hands over only when a rule demands it.

## Clock gating and timing

Each process clock passes through an `icg_cell`. The cell has a latch that is
transparent while `clk` is low, and the gated clock is `clk` AND the latched
enable, with enable `!inhibit_p`. The gating decision for an edge is the one
computed during the low phase before it. A change of `inhibit` while `clk` is
high cannot cut or create a pulse.

The CGL and the FIFOs run on the free-running clock. `inhibit` is
combinational from the CGL state and the processes' status outputs, and it
applies to the edge that ends the current tick. `c` updates `suspended` and
`q` on that same edge. A process's FIFO pop and push are qualified with
`!inhibit`, so each job is popped and pushed exactly once. This holds even
when `done` stays high under a stopped clock.

Reset is asynchronous and active low everywhere, because a gated clock may not
tick during reset. After reset, process 0 runs, the other processes are
suspended and all counters are zero.

## The top level: `power_aware_kpn`

| parameter    | default      | meaning                                                        |
|--------------|--------------|----------------------------------------------------------------|
| `NPROC`      | 3            | number of processes                                            |
| `TOPO`       | `TOPO_CHAIN` | `TOPO_CHAIN`: pipeline; `TOPO_PARALLEL`: independent processes |
| `FIFO_DEPTH` | 4            | entries per channel                                            |
| `CONC`       | `CONC_BOTH`  | cooperation, preemption or both                                |
| `PMAX`       | 200          | peak-power bound in bit flips per tick                         |
| `MAX_RUN`    | 1            | processes allowed to run together; `MAX_RUN * 35 <= PMAX`      |

- **Chain.** Jobs enter on job port 0 (valid/ready) and pass through the
  processes in order. Results leave on result port 0 as `x * 2^NPROC`, modulo
  2^32. The other ports are inactive.
- **Parallel.** Process k has job port k and result port k, and returns `2x`.
- **Status outputs.** `inhibit`, `suspended`, `activate`, `q`, `handover`
  (the running process changes at the end of this tick), `power_total` and
  the rule flags `viol`.
- **`slow_clk`.** Drive it with a slow periodic pulse to get preemption. Tie
  it low to use cooperation only.
- **`cfg_idle`.** May change at any time.

Measured in simulation with random traffic and a stalling sink:

- **Chain, 40 jobs.** Idleness-only gating takes about 170 cycles. Scheduled
  mode takes about 480 cycles, with the per-tick power at most 35 instead of
  up to 105.
- **Parallel, 12 jobs per port, `MAX_RUN = 1`.** With four processes the
  scheduled run takes about 3.7x the idleness-only cycles (196 against 53).
- **Parallel with `PMAX = 70` and `MAX_RUN = 2`.** Two processes run
  together and the scheduled runs take about 2x the idleness-only cycles for
  N = 3 and 4. The peak stays at or below 70 instead of reaching 105 or 138.

In both cases the total flip count is unchanged. The saving is in
instantaneous power, paid for in time.

## Files

| file                                    | content                                                  |
|-----------------------------------------|----------------------------------------------------------|
| `rtl/cgl_pkg.sv`                        | shared widths, power types, enums, violation-flag struct |
| `rtl/proc_p.sv`, `rtl/proc_p_model.sv`  | example process and its idleness/power model             |
| `rtl/proc_node.sv`                      | process with FIFO job handshake                          |
| `rtl/sync_fifo.sv`                      | bounded FIFO channel                                     |
| `rtl/icg_cell.sv`                       | latch-based clock gate                                   |
| `rtl/suspend_observer.sv`               | suspended_p, activate_p                                  |
| `rtl/inactivity_counters.sv`            | q_p                                                      |
| `rtl/prio_sort.sv`                      | priority list                                            |
| `rtl/cgl_strategy.sv`                   | scheduling strategy                                      |
| `rtl/phi_monitor.sv`                    | rule checker                                             |
| `rtl/cgl.sv`                            | clock-gating logic                                       |
| `rtl/power_aware_kpn.sv`                | top level                                                |
| `tb/tb_<module>.sv`                     | self-checking testbench per module                       |
| `tb/tb_kpn_parallel.sv`, `tb/par_harness.sv` | parallel networks of 2, 3 and 4 processes, PMAX 70  |
| `tb/cgl_env.sv`                         | random closed-loop environment used by `tb_cgl`          |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
Each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -y rtl -y tb rtl/cgl_pkg.sv \
    tb/tb_power_aware_kpn.sv --top-module tb_power_aware_kpn -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. `tb_power_aware_kpn` runs the top
level at its default parameters. It runs three phases:

- idleness-only gating;
- scheduled mode with cooperation;
- scheduled mode with preemption.

It compares every result and checks every rule on every tick. It confirms
that no inhibited process receives a clock edge. It also counts that each
mechanism occurred: both kinds of hand-over, idleness gating, FIFO
back-pressure, sink stalls, the mode switch, and overlap of busy processes.

## Limits and departures

- **Processes.** The processes are a small example process. The designs this
  scheme was first evaluated on used a Reed-Solomon decoder, a run-length
  encoder and a Huffman decoder. Those are third-party blocks and are not
  included. Any process can be scheduled if it provides idle, done, empty and
  a power estimate. `P_WORST` must then be set to its largest estimate.
- **Strategy.** The strategy is hand-written and runs fixed-size batches
  sized by the worst-case power. The energy-minimising refinement over a
  look-ahead window is not implemented.
- **Fairness rule.** The rule is checked as "q_p is among the k largest
  counters". With tied counters this is slightly weaker than "every process
  with a strictly larger counter is also activated".
- **Chosen details.** FIFO depth, first-word-fall-through reads, the job
  handshake, the port style and the reset state are this design's choices.
- **Clock gate.** `icg_cell` contains an intentional latch, which lint tools
  report.
