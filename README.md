# Multithreaded elastic primitives, with a shared-round MD5 engine

Elastic circuits replace every pipeline register with a small buffer that talks
to its neighbours through a valid/ready handshake, so units may take a variable
number of cycles and data still flows correctly. Multithreading adds a second
idea: the cycles in which one computation has nothing to offer are filled with
the data of another, independent thread. This RTL combines the two. A
*multithreaded elastic channel* carries the data of one thread per cycle but has
one valid/ready pair per thread. The buffers and control operators on such a
channel keep the threads apart, so a thread that stalls does not stop the
others.

The main saving is in the buffers. A single-thread elastic buffer needs two
slots to keep full throughput with one-cycle handshakes. Giving every thread
its own two-slot buffer costs `2*S` registers for `S` threads. The *reduced*
multithreaded elastic buffer here uses `S+1`: one register per thread plus one
register that all threads share.

The library is used in one complete design, an 8-thread MD5 engine. All threads
share one 16-step round datapath and are kept in step by a barrier.

## The multithreaded elastic channel

A channel for `S` threads is three signals:

| signal  | width | meaning |
|---------|-------|---------|
| `valid` | `S`   | bit *i*: the data word belongs to thread *i* and is valid |
| `ready` | `S`   | bit *i*: the receiver can take an item of thread *i* |
| `data`  | `W`   | one word, shared by all threads |

An item of thread *i* moves on a clock edge where `valid[i] && ready[i]`. At
most one `valid` bit is set in any cycle, and assertions in the buffers check
this.

Two properties of the channel matter for anyone wiring these blocks together:

* **Valid may depend on ready, in the same cycle.** A buffer's output arbiter
  only picks a thread whose downstream `ready` is set. So `vout` is a
  combinational function of `rin`. It follows that a transfer is never
  offered and then refused.
* **Ready never depends on valid inside the buffers.** The reduced MEB and
  the barrier compute `ready` from registered state only. This is what keeps
  a chain of buffers and operators free of combinational loops.

Together these rules limit which operator may sit between two buffers. Join
computes ready from the other input's valid. Put a join right behind two
arbitrating buffers, and each buffer's valid waits for the other's: that is a
combinational loop. Sources feeding `m_join` must therefore offer valid
independently of ready, as the MD5 engine's input channels do. Fork, branch and
merge have no such restriction.

A thread's valid is *not* persistent. An arbiter may offer thread *i* in one
cycle and thread *j* in the next. The eager fork keeps its per-output "done"
flags until the whole transfer completes, so a copy that was delivered early
is not delivered again.

## Reduced multithreaded elastic buffer (`reduced_meb`)

Storage: one main register per thread, plus one *shared* register that at most
one thread owns at a time. Each thread has the three-state control of a normal
elastic buffer:

| state | items held | upstream ready |
|-------|-----------|----------------|
| EMPTY | 0 | yes |
| HALF  | 1, in its main register | only while the shared register is free |
| FULL  | 2, main register plus the shared one | no |

Transitions (push = input transfer, pop = output transfer, both for that
thread):

* EMPTY, push → HALF. The item goes into the main register.
* HALF, pop without push → EMPTY.
* HALF, push and pop together → stays HALF. The main register is reloaded.
* HALF, push without pop → FULL. The item goes into the shared register
  (`goFull`).
* FULL, pop → HALF. The main register is refilled from the shared register
  (`goHalf`).

A two-state flag tracks whether the shared register is used. `goFull` sets it
and `goHalf` clears it. While it is set, no HALF thread is ready, so a second
thread can never claim the shared register. Ready depends only on state, so in
the cycle of a refill the shared register does not look free yet. It is offered
upstream from the next cycle on.

On the output side, a round-robin arbiter (`rr_arbiter`) grants one thread among
those that hold data and whose `rin` is set. The grant is `vout`, and `dout` is
that thread's main register. An item written in cycle *t* can leave in cycle
*t+1*. One thread alone streams one item per cycle.

**What sharing costs.** With all threads flowing, each thread uses one slot and
the shared register stays idle. A thread that stalls uses the shared register to
absorb the one item already in flight. Throughput suffers in only one case:
every thread but one is blocked, and a blocked thread holds the shared
registers of all stages back to the source. The remaining thread then sees one
slot per stage and gets half the throughput. With private two-slot buffers it
would get full throughput.

## Control operators

Single-thread operators (`el_*`) and their multithreaded versions (`m_*`),
which use one single-thread operator per thread:

| block | single-thread rule | multithreaded version |
|-------|--------------------|-----------------------|
| join (`el_join`, `m_join`) | output valid = both valid; each input is ready when the output is ready and the other input is valid | one join per thread; the data go to the function beside it |
| eager fork (`el_fork`, `m_fork`) | each output may take its copy independently; a done flip-flop per output; the input is released when both have it | one fork per thread, each with its own done flags |
| branch (`el_branch`, `m_branch`) | condition 1 → output/path A, 0 → B; input ready = ready of the chosen side | one branch per thread, one shared condition |
| merge (`el_merge`, `m_merge`) | valid = OR of inputs; both inputs get the downstream ready | one merge per thread for the handshakes, plus one data multiplexer shared by all threads, selecting path A whenever any thread is valid on A |

A merge assumes that only one of its inputs is valid in any cycle. Its
assertion fails if both are.

## Thread barrier (`mt_barrier`)

The barrier holds every thread that reaches it until `N` threads have arrived
(default `N = S`). Each thread has a data register and a three-state FSM:

* **IDLE**: ready. An arriving item is stored. The current value of the global
  `go` flag is copied into the thread's local `lgo`, and the arrival counter
  counts it. The thread moves to WAIT.
* **WAIT**: stays while `lgo == go`.
* **FREE**: offers its item downstream, and returns to IDLE once the arbiter
  picks it.

When the counter equals `N`, `released` is high for one cycle. At that clock
edge the counter clears and `go` is inverted. Every waiting thread then sees
`lgo != go` and becomes FREE one cycle later. Timing: if the last thread arrives
in cycle 0, `released` is high in cycle 1, and the first item can leave in
cycle 3. Items then leave one per cycle through a round-robin arbiter.

A global flag with per-thread copies lets a thread that has already passed
arrive again for the next phase without being released by the current one.

## MD5 engine (`md5_mt_top`, the top level)

```
 msg ch --\                                   /-- A: round counter = 0 --> add chaining value --> M-Fork --> digest ch
           M-Join --> M-Merge --> MEB_in --> 16 steps --> MEB_out --> barrier --> M-Branch                        \--> chain ch
 ihv ch --/            ^  (busy gate)                                            |
                       \------------------------- B: next round ------------------/
```

* **Token.** Each thread carries a 768-bit token through the loop
  (`md5_pkg::md5_tok_t`): the 512-bit block, the 128-bit chaining value it
  started from, and the running state A..D.
* **Round stage.** `md5_round` computes all 16 steps of one round in one
  combinational stage. The 2-bit global round counter selects the boolean
  function, the message-word order, the constants and the rotations.
* **Barrier and round counter.** The barrier after `MEB_out` waits for all `S`
  threads. Its release increments the round counter, so all threads always run
  the same round. After round 3 the counter wraps to 0. That zero sends the
  released threads to the exit instead of round 0.
* **Exit.** On the exit path the chaining value is added word by word to the
  state. `m_fork` then offers the digest twice: once on the digest channel, and
  once on the chain channel, for the next block of the same message.
* **Input.** Input enters through `m_join`, which pairs a message block with a
  chaining value for the same thread. Use the MD5 initial value for the first
  block of a message; for later blocks, use the previous digest taken from the
  chain channel. A per-thread busy flag admits a new block only while that
  thread has none in the loop.
* **Throughput.** Each block takes 4 passes through the round stage. A pass
  takes at least one cycle per thread, because the threads share the stage
  and leave the barrier one per cycle. The barrier adds three cycles from the
  last arrival to the first departure. In the 8-thread test, with random
  handshakes, 32 blocks took 376 cycles.

Things a user must know:

* **Every thread must be fed.** The barrier waits for all `S` threads, so no
  round completes until each thread has been given a block. To run fewer
  threads, instantiate with a smaller `S`.
* **The shared MEB register stays idle in this engine.** Each thread has at
  most one token in flight, so neither MEB ever holds two items of one thread.
  The buffers still provide the per-thread elastic decoupling.
* **Words are little-endian, as in RFC 1321.** Message word *g* is
  `msg_data[32g+31:32g]`. The state and digest are `{D,C,B,A}`, with A in bits
  31:0, so the printed hex digest is the bytes of A, B, C, D, each low byte
  first.

## Where this design makes its own choices

The source description gives the structure, states and transitions of the
reduced MEB and of the barrier, the per-thread construction of the four
multithreaded operators, and the outline of the MD5 example: 4 rounds of 16
steps, one round per cycle, a barrier after the output buffer, a round counter
advanced on release, and 8 threads. The following are choices of this
implementation:

* Arbitration policy (round-robin) and all reset states.
* Default data width `W = 32` for the stand-alone primitives.
* The eager-fork done flags are held across cycles in which the input valid
  drops.
* In the barrier, an arrival in the same cycle as a release counts towards the
  next phase.
* In the MD5 engine: the loop wiring, the exit condition, the busy flag, the
  two input channels and two output channels, and the final addition.
* The MD5 step functions, constants and rotations come from the standard
  algorithm.

The 64 round constants are listed in `md5_pkg.sv`. They are
`K[i] = floor(|sin(i+1)| * 2^32)`. The testbench reference model computes them
from this formula instead of copying the table.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `md5_mt_top`, `reduced_meb`, `mt_barrier`, `m_*` | `S` | 8 | threads |
| `reduced_meb`, `mt_barrier`, `m_merge`, `el_merge` | `W` | 32 | data width (the MD5 engine uses 768) |
| `mt_barrier` | `N` | `S` | threads that must arrive before release |
| `rr_arbiter` | `N` | 8 | requesters |

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=<n> failures=<m>`, and a watchdog ends a hung run.

* `tb_reduced_meb` runs three phases on 3 threads:
  * Capacity: exactly `S+1` items are accepted while the output is stalled, and
    only one thread gets a second item.
  * Refill timing: the freed shared register is not offered in the refill
    cycle.
  * Streaming and traffic: one thread streams one item per cycle with one-cycle
    latency, and 3000 cycles of random traffic are checked against per-thread
    queues.
* `tb_meb_pipeline` runs two threads through a two-stage pipeline of reduced
  MEBs:
  * Both threads flowing: each gets half of the channel.
  * Thread B blocked at the sink: once B holds both shared registers and its
    back-pressure reaches the source, thread A gets exactly 20 items in 40
    cycles.
  * Thread A alone: 40 items in 40 cycles.
* `tb_mt_barrier`: 30 phases with random arrival order. Checked: nothing leaves
  early, each item leaves once with its own data, and the release-to-departure
  timing holds.
* `tb_el_fork`, `tb_m_fork`: every output sees every item exactly once and in
  order under random readiness. In `tb_m_fork` the offered thread changes every
  cycle.
* `tb_el_join`, `tb_el_branch`, `tb_el_merge`, `tb_m_join`, `tb_m_branch`,
  `tb_m_merge`, `tb_rr_arbiter`: exhaustive or random comparison with the
  operator rules. The arbiter is checked against a round-robin model.
* `tb_md5_round`: checks the published digests of `""` and `"abc"`, and 50
  random blocks against a step-by-step reference (`tb/md5_ref_pkg.sv`).
* `tb_md5_mt_top` runs the top level at its default size: 8 threads with 4
  blocks each.
  * Messages: the published test vectors, plus chained multi-block messages
    whose chaining values are fed back from the chain output.
  * Handshakes: random sources and sinks.
  * Mechanisms: it counts, and requires, join waits, busy-flag refusals, both
    merge paths, arbitration among released threads, barrier holds and
    releases, exits, sink back-pressure and round-counter wraps.
  * Counts: it checks 16 releases and 32 exits.
* `tb_md5_mt_top16` repeats the end-to-end test with 16 threads.

To simulate with Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mt_pkg.sv rtl/md5_pkg.sv tb/md5_ref_pkg.sv tb/tb_md5_mt_top.sv \
    --top-module tb_md5_mt_top -o sim && ./obj_dir/sim
```

Replace the testbench file and the top module name to run any other test. The
packages must come first on the command line.

## Files

* `rtl/mt_pkg.sv`: state types of the buffer and the barrier.
* `rtl/md5_pkg.sv`: MD5 constants, token type, final addition.
* `rtl/rr_arbiter.sv`, `rtl/reduced_meb.sv`, `rtl/mt_barrier.sv`: the buffer,
  its arbiter, and the barrier.
* `rtl/el_join.sv`, `rtl/el_fork.sv`, `rtl/el_branch.sv`, `rtl/el_merge.sv`:
  single-thread operators.
* `rtl/m_join.sv`, `rtl/m_fork.sv`, `rtl/m_branch.sv`, `rtl/m_merge.sv`:
  multithreaded operators.
* `rtl/md5_round.sv`, `rtl/md5_mt_top.sv`: the MD5 example.
* `tb/`: the testbenches listed above, plus `md5_ref_pkg.sv`.
