# DEC-BPn: a belief-propagation scheduler for multicast input-queued switches

An input-queued switch moves at most one packet out of each input and at most
one packet into each output per timeslot. With multicast traffic a packet may
need several outputs. This design keeps one logical queue per input for every
possible set of destinations, the *MC-VOQ* arrangement: a 4 x 4 switch has
4 x 15 = 60 queues. Each timeslot the scheduler decides, for every input,

* `sigma_i`, the queue whose head packet is served, and
* `tau_i`, the subset of `sigma_i`'s outputs the packet is actually sent to.

What is left over, `sigma_i \ tau_i`, goes back into the queue of that
smaller fanout set. This is *fanout splitting*. The decision must never give
one output to two inputs.

The throughput-optimal choice maximises the sum of *max-pressure* weights,
`y[sigma_i] - y[sigma_i \ tau_i]`. Each weight is the length of the served
queue minus the length of the queue that takes the residual packet. Finding
the maximum exactly is NP-hard. DEC-BPn approximates it with min-sum belief
propagation (BP) between input and output nodes, plus decimation: it fixes
one input at a time and reruns BP on what is left.

The RTL in `rtl/` is a fixed-latency hardware version of DEC-BPn for a 4 x 4
switch with 16-bit queue lengths and 3 BP iterations. Every size is a
parameter. The scheduler sits behind a small memory-mapped register file. A
host that runs the packet datapath writes the queue lengths, starts a run,
and reads back the eight 4-bit `sigma`/`tau` fields.

## Fanout sets and queue numbering

A fanout set is an M-bit mask. Bit `k` stands for output port `M-1-k`, so the
most significant bit is port 0. The mask value is also the queue number, so
queue `s` of input `i` holds the packets whose remaining destinations are
exactly `s`. Mask 0, the empty set, is not a queue, and its length is always
taken as 0. The same masks appear in the decision: `tau_i = 4'b1100` means
"send to ports 0 and 1".

## The algorithm, step by step, as built

The names below are the module names in `rtl/`.

1. **Max pressure** (`max_pressure`, one `mp_input` per input).
   For every input `i` and every transmission set `tau` it computes

       w[i][tau]    = max over sigma containing tau of  y[i][sigma] - y[i][sigma \ tau]
       shat[i][tau] = the sigma that reaches it

   There are `3^M` pairs with `tau` inside `sigma`: each output is out of
   `sigma`, in `sigma` only, or in `tau`. A counter of M ternary digits walks
   through them, one pair per cycle. All inputs work on the same pair in
   parallel, so for M = 4 this step takes 81 cycles. Ties keep the first pair
   seen. As a result `w[i][{}] = 0` with `shat = {}`, and every `w` is at
   least 0.

2. **Decimation rounds.** There are N rounds. Each round works on the inputs
   still undecided and the outputs still free, and starts with all backward
   messages `b(j->i)` at 0.

   * **Forward messages** (`bp_forward`, one per input). The controller
     presents the fanout sets one per cycle. For the presented set each
     input computes its *belief*

         m[i][tau] = w[i][tau] - sum over j in tau of b(j->i)

     Only sets made of free outputs count. Each input keeps, per output `j`,
     the best belief over sets with `j` and over sets without `j`. After
     2^M cycles it forms

         f(i->j) = max(0, best_with_j + b(j->i) - best_without_j)

     `f` is 0 for decided inputs and taken outputs.
   * **Backward messages** (`bp_backward`, combinational, registered in one
     cycle):

         b(j->i) = max over other inputs i' of f(i'->j)

   * These two steps repeat `N_ITER` times. With `N_ITER = 0` the beliefs are
     just the weights.
   * **Decision** (`bp_decision`). The beliefs are scanned once more, one set
     per cycle, all inputs in parallel, keeping the largest. Equal beliefs are
     settled at random: every candidate carries an 8-bit key from a
     free-running 32-bit LFSR, and the larger key wins. This is what the
     algorithm asks for, for fairness.
   * **Commit.** The winning input `i` gets `tau_i = tau` and
     `sigma_i = shat[i][tau]`. If the best belief is 0, it gets the empty
     decision (`sigma_i = tau_i = 0`) instead: sending would not raise the
     objective. Input `i` and the outputs of `tau_i` are then removed.

The messages carry the BP intuition. `b(j->i)` estimates how much the other
inputs would lose if `i` took output `j`. `f(i->j)` estimates how much `i`
gains by taking `j` rather than not. Subtracting the `b`s from the local
weights makes an input avoid outputs that others value highly.

`decbp_core` is the controller that sequences all this. Each feedback loop of
the algorithm is a controller state, and everything independent runs in
parallel inside a cycle.

### Timing

| phase | cycles (general) | 4 x 4 |
|---|---|---|
| max pressure | 3^M | 81 |
| one BP iteration (forward scan + backward) | 2^M + 1 | 17 |
| decision scan + commit | 2^M + 1 | 17 |
| per decimation round | (N_ITER + 1)(2^M + 1) | 68 (n = 3) |

`done` rises `3^M + 2 + N (N_ITER + 1)(2^M + 1)` clock edges after the edge
that samples `start`. For the defaults that is 355 cycles. It is 151, 219
and 287 cycles for n = 0, 1 and 2. The latency does not depend on the data:
all N rounds always run, even when the outputs run out early.

### Number widths

Queue lengths are `LEN_W` = 16 bits, unsigned. The weights and forward
messages lie in `[0, 2^LEN_W - 1]`. A belief subtracts up to M backward
messages, so it can reach `-M (2^LEN_W - 1)`. All weights, messages and
beliefs therefore use one signed width,
`W_W = LEN_W + clog2(M+1) + 1` = 20 bits, and nothing can overflow.

## Register interface (`decbp_regif`, top `decbp_gateway`)

The top `decbp_gateway` has a plain 32-bit register bus. A write happens at
the clock edge where `wr_en` is high. A read returns `rd_data` with
`rd_valid` one cycle after `rd_en`.

| address | content |
|---|---|
| 0 - 29 | queue lengths, two per register: length `q` in register `q/2`, bits [15:0] for even `q`, [31:16] for odd `q`; `q = 15*i + s - 1` for input `i`, fanout mask `s` |
| 30 | control: write `0x1` to start; reads `0x1` while running, `0x2` when the decision is ready |
| 31 | result, read only: bits `[8i+7:8i+4]` = `sigma_i`, `[8i+3:8i]` = `tau_i` |

`ctrl_irq` is control bit 1, for an interrupt line. Writes to the lengths and
to control are ignored while a run is in progress (control = `0x1`), so the
scheduler always sees a consistent snapshot. The host may write `0x0` to
control afterwards to clear the ready flag.

A host timeslot therefore looks like this:

1. Enqueue the arrivals.
2. Write the 30 length registers.
3. Write `0x1` to register 30.
4. Wait for `0x2` or `ctrl_irq`.
5. Read register 31.
6. For each input with a non-empty `tau_i`, remove the head of queue
   `sigma_i` and send one copy to every output in `tau_i`. If `sigma_i` is not
   equal to `tau_i`, append the packet to queue `sigma_i & ~tau_i`.

The packet queues, the crossbar and this host loop are not part of the RTL.
In the intended system they live in the host's software datapath.

## Where this RTL departs from the original hardware

The original was a 4 x 4 state machine with 81 max-pressure states, 68
forward-message and 53 backward-message states per BP iteration, and 71
decision states. That adds up to 515 cycles for three iterations. Only the
81-state max-pressure phase is reproduced, one pair per state. The contents
of the other states were not published. This design scans one fanout set per
cycle and computes all backward messages in one cycle, which gives 355
cycles.

The published cycle count also suggests that BP may not have been rerun in
every decimation round. This RTL follows the algorithm as specified and
reruns it, with `b` reset, every round. Other differences and choices:

* The BP iterations are one set of units reused under the controller. A
  chain of pipeline stages, one per iteration, would be the alternative.
* The register packing order, the bus handshake, the width of the messages,
  the LFSR tie-break and the first-found tie rule of the max-pressure step
  are this design's own choices.
* The original design's description maps the decision to one 32-bit result
  register, while one drawing of it shows four. One register holds the
  8 x 4 bits and is what is built.
* Published run times for n = 0, 1 and 2 are about 275, 397 and 519 cycles.
  Here they are 151, 219 and 287. Those figures give 515 cycles for n = 2,
  while the state count gives 515 for three iterations. So it is unclear
  whether the original's n counts iterations or iterations plus one. Here
  `N_ITER` is the number of forward/backward passes per round, default 3.
* Reset is synchronous and active low everywhere.

## Files

| file | content |
|---|---|
| `rtl/decbp_pkg.sv` | default sizes, width and `3^M` helpers, controller state type |
| `rtl/decbp_gateway.sv` | top: register file + scheduler core |
| `rtl/decbp_regif.sv` | register map and start/ready protocol |
| `rtl/decbp_core.sv` | controller, decimation bookkeeping, output registers, decision trace port |
| `rtl/max_pressure.sv`, `rtl/mp_input.sv` | step 1: ternary pair sequencer, per-input weight units |
| `rtl/bp_forward.sv` | per-input beliefs and forward messages |
| `rtl/bp_backward.sv` | backward messages |
| `rtl/bp_decision.sv` | belief maximisation with random tie break |

`decbp_core` also has a trace port, `dec_valid` / `dec_in` / `dec_tau` /
`dec_sigma` / `dec_m`, that reports each round's choice in its commit cycle.
The top leaves it unconnected.

Parameters: `N` (inputs), `M` (outputs), `LEN_W` (length bits, at most 16
in the register map) and `N_ITER` (BP iterations). The result register needs
`2*N*M` bits; more than 32 bits spill into further result registers. Area
grows with `N * 2^M` (weights and best queues per input) and latency with
`3^M + N (N_ITER+1) 2^M`, so the structure suits small M.

## Verification

Every testbench in `tb/` checks itself and ends with a
`TB_RESULT checks=... failures=...` line.

* `tb_decbp_core` runs two cores, with n = 3 and n = 0, on 300 queue-length
  matrices: zero, narrow (many ties), geometric with mean 100, and near
  full scale. A reference model written from the equations recomputes
  weights, messages and beliefs for every round. It checks that each round's
  choice is a legal maximiser; with random ties any maximiser is accepted.
  It also checks the final outputs, that no output is granted twice, and the
  exact latency.
* `tb_max_pressure`, `tb_bp_forward`, `tb_bp_backward`, `tb_bp_decision` and
  `tb_decbp_regif` test the units against direct evaluations of their
  formulas. `tb_bp_decision` also checks that ties do go to different
  winners.
* `tb_decbp_gateway` runs at the default size. It plays the host of a 4 x 4
  switch through the register bus for 3000 timeslots of each of two
  two-input concentrated traffic patterns:
  * Conc-1: fanout sets {1,2}/{3,4} and {1,3}/{2,4}, load 1.0.
  * Conc-2: {1,2,3}/{2,3,4} and {1,2,4}/{1,3,4}, load 0.67.

  It checks every decision for feasibility and the busy/ready protocol, and
  measures output throughput. Measured: 0.748 for Conc-1 (0.75 expected) and
  about 0.96 for Conc-2 (0.97 to 0.98 expected). It also counts fanout
  splits, multicast transfers, empty decisions with packets waiting, and
  ignored writes, and fails if any of them never happens.
* `tb_cost_gain` compares the max-pressure objective reached by DEC-BPn with
  greedy longest-queue-first, on 2000 random matrices (geometric lengths,
  mean 100). The mean gain is about 1.11 for n = 0, 1.45 for n = 1 and 1.54
  for n = 3. The expected value for a 4 x 4 switch is about 1.5, and more
  iterations help.
* `tb_cost_gain_8x8` repeats that comparison on an 8 x 8 switch: 100
  matrices, with n = 3 and n = 0. The mean gain is about 2.19 for n = 3 and
  1.28 for n = 0, against about 2.1 and 1.25 expected. Larger switches gain
  more from the iterations.
* `tb_uniform_traffic` runs the core, with its size parameters set, at the
  2 x 10, 4 x 10 and 10 x 10 sizes. Every non-empty fanout set is equally
  likely and the load is at the admissible maximum. One decision takes
  67,000 to 100,000 cycles here, so only some tens of timeslots can be
  simulated, starting from backlogged queues. That is enough to check every
  decision for feasibility. It is not enough to reach the long-run maximum
  throughputs, which are 0.95, 0.97 and 1.00 for these sizes. Short-run
  results are about 0.78, 0.93 and 1.00, held only to loose lower bounds.
  This testbench takes about a minute.
* Not simulated: the 3 x 12 concentrated pattern, where one decision would
  take about 580,000 cycles, and the cost gain at 10 x 10 and 16 x 16.

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/decbp_pkg.sv tb/tb_decbp_gateway.sv --top-module tb_decbp_gateway -o sim
    ./obj_dir/sim

Replace the testbench name to run another. Most finish within seconds;
`tb_cost_gain_8x8` and `tb_uniform_traffic` take up to about a minute.
