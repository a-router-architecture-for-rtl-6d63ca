# QoS wormhole router for cluster interconnects

Wormhole routers move a message as a worm of flits. They give low latency,
but a low-priority message already holding a buffer can block urgent traffic
behind it. This router supports real-time traffic classes beside best-effort
traffic in a wormhole network. It combines four mechanisms:

* **Preemption in the input buffer.** A message of a higher flow class can
  overtake a lower-class message that occupies the same input virtual
  channel (VC), even in the middle of that message.
* **Virtual Clock rate scheduling.** At the crossbar, each flow gets its
  share of bandwidth according to its class.
* **Buffer-status-aware link scheduling.** The output link skips VCs whose
  downstream buffer just refused a flit, and retries them after a bounded
  wait.
* **Flexible output-VC allocation.** A message can take any free channel in
  a small set, not one fixed channel.

The last two together do the job of a costly "flit acceleration" unit
(quadratic in the number of classes) at a cost of O(s log s).

The default configuration is 8 ports, 16 VCs per physical channel, 16 flow
classes, 128-bit flits and 36-flit buffers. Messages are typically 36 flits.

## The five pipeline stages

```
 link in ──► 1 input VC buffers ──► 2 routing ──► 3 arbitration / ──► 4 Virtual Clock ──► 5 output VC ──► link out
   RQ/ACK      + preemption          table          VC allocation       + crossbar          buffers +       RQ/ACK
               (input_vc)            (routing_unit) (vc_allocator)      (vclock_scheduler,  link scheduler
                                                                         crossbar)          (output_port)
```

Headers pass through every stage. Body and tail flits skip stages 2 and 3:
they follow the reservation their header made. Each input VC has a one-flit
stage-1 register. A header waits there while it is routed (one cycle) and
arbitrated (one cycle or more). Then it crosses the crossbar into an output VC
buffer. When nothing blocks it, a header that entered on the input link in
cycle *t* is offered on the output link in cycle *t + 5*. The following flits
come one per cycle, so an M-flit message has left by *t + M + 4*, which is
M + (P − 1) with P = 5. The testbenches check this latency.

| stage | module | what happens |
|---|---|---|
| 1 | `input_port`, `input_vc`, `flit_fifo`, `history_stack` | link handshake, VC demultiplexing, preemption, flit decoder register |
| 2 | `routing_unit` | routing-table lookup of the output port, one header per input port per cycle (lowest VC first) |
| 3 | `vc_allocator` (one per output) | reserves a crossbar subport and an output VC for the whole message |
| 4 | `vclock_scheduler` (one per input), `crossbar` | picks the VC that crosses this cycle; moves the flit into the output VC buffer |
| 5 | `output_port`, `link_scheduler` | chooses which output VC uses the link; RQ/ACK with the next router |

`qos_router` wires these stages together and holds the per-VC pipeline state:
routed, output port, reservation, subport.

## Preemption in an input VC (`input_vc`)

This is the subtlest part. Each input VC has three parts:

* the normal **input buffer** (36 flits);
* an **extra buffer** of s − 1 flits (15), where a higher-class message is
  diverted;
* a **history stack** of s − 1 entries, holding the class and destination of
  preempted messages.

**Write side.** A header arrives while the input buffer is occupied by
messages of lower class, and the extra buffer is free. That header and the
rest of its message go into the extra buffer. A header of equal or lower
class queues in the input buffer behind the occupant. The link ACK is high
when the buffer the flit would enter has room.

**Read side.** Say message m1 is being read from the input buffer and a header
(m3) reaches the head of the extra buffer. If m1's header has already passed
stage 1 and its tail has not:

1. A **dummy tail** for m1 is placed in the stage-1 register. It carries m1's
   class and destination, no payload, and `dummy = 1`. Downstream it acts as
   a normal tail: it frees m1's crossbar subport and, once it leaves, m1's
   output VC.
2. m1's class and destination are pushed on the history stack. m1's
   remaining flits stay in the input buffer.
3. m3 is read from the extra buffer until its tail.
4. A **dummy header** is built from the top of the stack. It goes through
   routing and arbitration again, and m1's remaining flits follow it.

If m1 had not yet sent its header, m3 simply goes first and no dummy flits are
needed.

A next router sees the two parts of m1 as two messages. The `dummy` bit marks
the boundary. Within this router the two parts leave in order (see below).
Further downstream they travel independently, so they can arrive in either
order. The destination must join them again, for example using a sequence
number in the payload, as the workload testbenches do.

Two points about timing:

* **A blocked flit stalls preemption.** Preemption happens at the exit of
  stage 1. If the stage-1 register holds a flit of m1 that cannot cross (its
  output VC is full), the dummy tail waits behind it. Higher-class messages
  are still diverted into the extra buffer meanwhile. The link scheduler and
  flexible VC allocation exist to make such stalls short.
* **A resumed message stays in order.** The resumed part of m1 may get a
  different output VC than the first part. It is therefore not allocated
  until the output VC that carried the first part has sent its dummy tail.
  This keeps m1's flits in order on the output link. This rule is this
  design's own addition.

## Flexible output-VC allocation (`vc_allocator`, `crossbar`)

Each output port is reached through `NUM_VCS / CH_PER_SUB` crossbar output
ports ("subports"). With the defaults that is 16 / 4 = 4. Subport *k* may
write any of the output VCs *4k … 4k+3*. It holds a 2-bit **channel
identifier** (log log s bits) naming the VC it was given. In `crossbar` that
identifier drives a decoder onto the VC buffers.

Each cycle and output port, the arbiter grants the routed header of highest
class, lowest index on a tie. The grant reserves, for the whole message:

* the first free subport that still has a free VC in its set;
* the first free VC of that set.

The subport is released when the message's tail crosses the crossbar. The VC
is released only when that tail has left on the link. A subport freed early
may therefore find its first VC still draining, and it takes another VC of
its set. This is the "flexible" case that `ev_flex_alloc` reports. A message
is blocked at this stage only when every subport of its output port is busy
or has no free VC.

## Link scheduling (`link_scheduler`, `output_port`)

Every output VC remembers the answer it got on its last try (ACK or N-ACK).
After an N-ACK it counts cycles in `cycle_wait`, a log s-bit counter that
stops at `MAX_COUNT` (15). A non-empty VC is **eligible** when its last answer
was ACK or its counter has reached `MAX_COUNT`.

A binary tree of comparators picks the channel. Each leaf presents the key
{eligible, class}. Each node passes on the larger key, or the left input on a
tie. The root therefore gives the eligible VC of highest class, the first one
on a tie. When no VC is eligible, the highest-class non-empty VC is still
tried, so the link never idles while flits wait. A new N-ACK restarts the
counter.

Set `USE_WAIT = 0` to get the simpler Highest Non N-ACK algorithm. It has no
counters, so an N-ACKed high-class flow can starve while other VCs have
traffic.

## Virtual Clock (`vclock_scheduler`)

Each input port has one crossbar input, so at most one of its VCs crosses per
cycle. A VC may cross when it holds a reservation, its stage-1 register has a
flit and its output VC buffer has room. Each such VC gets a stamp:

*max(now, vclk) + tick[class]*

The smallest stamp wins, the lowest VC on a tie, and the winner's `vclk`
becomes its stamp.

`tick[class]` is the inverse of the rate allowed to a class, in cycles per
flit. A class sending faster than its rate runs its clock ahead and yields to
the others. The `max` with real time keeps an idle flow from saving credit.
Ticks are programmable and reset to 1.

## Interfaces

**Flit** (`router_pkg::flit_t`, 141 bits):

| field | bits | meaning |
|---|---|---|
| `kind` | 2 | `FLIT_HEAD`, `FLIT_BODY`, `FLIT_TAIL` (messages have at least 2 flits) |
| `dummy` | 1 | dummy header/tail made by preemption, no payload |
| `prio` | 4 | flow class, larger is more urgent; carried by every flit |
| `dest` | 8 | destination node |
| `data` | 128 | payload |

**Links.** Each input and output port has:

* `rq`, a VC number and a flit, driven by the sender;
* `ack`, answered by the receiver in the same cycle.

The flit moves in a cycle where `rq && ack`. `rq` with `ack` low is an N-ACK:
the sender keeps the flit and records the refusal. `ack` is combinational
from the offered VC and flit, but `rq` never depends on `ack`, so two routers
can be wired back to back. One flit crosses a link per cycle.

**Configuration.** Write with `cfg_we`:

* `cfg_sel = 0` sets routing-table entry `cfg_addr` (a destination node) to
  output port `cfg_data`. The table has 256 entries and resets to port 0.
* `cfg_sel = 1` sets the Virtual Clock tick of class `cfg_addr` to
  `cfg_data`.

**Events.** The `ev_*` outputs pulse per port when a mechanism acts. They are
for observation only:

| output | event |
|---|---|
| `ev_divert` | a header was diverted into the extra buffer |
| `ev_preempt` | a dummy tail was created |
| `ev_resume` | a dummy header was created |
| `ev_alloc_block` | a header could not be allocated this cycle |
| `ev_flex_alloc` | a VC other than the first of its set was allocated |
| `ev_xbar_stall` | a reserved flit was held because its output VC buffer is full |
| `ev_nack` | the output link got an N-ACK |
| `ev_wait_retry` | an N-ACKed VC was retried after its counter expired |

**Reset** is asynchronous and active low (`rst_n`). It clears all control
state. Buffer storage is not reset.

## Parameters of `qos_router`

| parameter | default | notes |
|---|---|---|
| `NUM_PORTS` | 8 | physical input/output port pairs |
| `NUM_VCS` | 16 | VCs per physical channel |
| `NUM_CLASSES` | 16 | flow classes s; sets the extra buffer and history stack to s − 1; at most 16 (`PRIO_W`) |
| `BUF_DEPTH` | 36 | input and output VC buffer depth in flits |
| `CH_PER_SUB` | log2(NUM_VCS) = 4 | VCs per crossbar subport; `NUM_VCS` must be a multiple |
| `USE_WAIT` | 1 | 1: Modified Highest Non N-ACK, 0: plain Highest Non N-ACK |

`FLIT_DATA_W` (128), `PRIO_W` and `DEST_W` are in `router_pkg`. At the
defaults the router holds about 1.6 Mbit of buffer storage: 8 × 16 × (36 + 15
+ 36) flits of 141 bits.

## What is taken from the source design and what is chosen here

Taken from the source design:

* the five-stage organisation;
* input-buffer preemption with an extra buffer and history stack of s − 1
  entries, and dummy tail and dummy header;
* the Virtual Clock scheduler at the crossbar;
* message-level crossbar-port reservation;
* the channel identifier of log log s bits per crossbar output port;
* both link-scheduling algorithms and the log s-bit wait counter;
* the RQ/ACK link with stored ACK status;
* the sizes 8 ports, 16 VCs, 128-bit flits and 36-flit buffers.

Chosen here, where the source is silent:

* **Link.** The handshake is synchronous with a same-cycle answer, and a flit
  is one phit. The source runs the RQ/ACK protocol asynchronously and
  serialises a flit into phits. It quotes 1.6 Gbit/s links, but does not
  state the phit width.
* **Flow classes.** There are 16 classes, one per VC count. Each flit carries
  its class, and larger numbers mean higher priority.
* **Extra buffer.** It takes one diverted message at a time. So at most one
  preemption per input VC is outstanding, and the history stack never holds
  more than one entry in practice.
* **Routing.** A programmable 256-entry table, with no dedicated
  processor-interface port. Routing is deterministic and uses no adaptive
  routing.
* **Arbitration.** Highest class first, ties to the lowest index. The channel
  is released when the tail leaves the link.
* **`MAX_COUNT` = 15.** When nothing is eligible, the link scheduler falls
  back to the highest-class ready VC. Any N-ACK restarts the wait counter,
  including one on such a fallback attempt. The source describes the restart
  only for a retry made after the counter was full.
* **Virtual Clock ticks** are set per class and are 32-bit stamps that do not
  handle wrap-around (about 43 s at 100 MHz).
* **Resumed messages** are held until their earlier part has left, so their
  flits stay in order.

Not built:

* the flit acceleration unit, which the two link and allocation mechanisms
  replace;
* the processor and node around the router;
* any deadline accounting, which belongs to the traffic endpoints.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_flit_fifo` | random push/pop against a queue model, including push and pop at once when full |
| `tb_history_stack` | random push/pop/replace against a LIFO model, filled to s − 1 |
| `tb_input_vc` | in-order pass-through; the exact preemption sequence (m1 header, dummy tail, m3, dummy header, rest of m1); lower classes queue; ACK falls when full |
| `tb_input_port` | random RQ traffic over 4 VCs: ACK exactly when there is room, in-order delivery per VC |
| `tb_routing_unit` | table writes and 8 parallel lookups against a model |
| `tb_vc_allocator` | priority, subport/channel choice, flexible reuse, blocking; 4000 random cycles against a model |
| `tb_vclock_scheduler` | 3:1 bandwidth split for ticks 2 and 6, 1:1 for equal ticks, no credit for an idle flow, every grant against a model |
| `tb_crossbar` | random switch settings against a model |
| `tb_link_scheduler` | highest class, first on a tie, N-ACK skip, retry exactly `MAX_COUNT` cycles after an N-ACK, fallback; every cycle against a model |
| `tb_output_port` | offered flit is the VC head, pop only on ACK, full flags, release on tail |
| `tb_qos_router` | 4 ports × 4 VCs × 8-flit buffers, end to end (below) |
| `tb_qos_router_full` | the same at the default size, with 36-flit messages |
| `tb_qos_single`, `tb_qos_mesh` (core in `tb_qos_traffic`) | the workload below on one router and on a 2x2 mesh of four routers, at the default size |

The router testbenches:

* drive the links with whole messages per VC;
* answer the output links with random ACK/N-ACK;
* rebuild every output VC's stream and check that each message arrives at
  its routed port, complete and in order;
* check the 5-cycle header latency and the M + 4 message latency;
* run a directed preemption in which the higher-class message finishes first;
* count each mechanism (`ev_*`) and fail if any never happened.

## Behaviour under load

The workload testbenches mix two kinds of traffic:

* real-time variable-bit-rate streams: video-like frames, each a burst of
  36-flit messages in one of classes 1–15;
* best-effort messages of class 0 with random arrivals.

The total is offered at 80% and then 85% of the link bandwidth. At each load,
the real-time : best-effort ratio steps through 1:4, 2:3, 1:1, 3:2 and 4:1. A
frame must be delivered within one frame period after it arrives. The frame
period is scaled down from 33.3 ms (3.33 million cycles at 100 MHz) to 1500
cycles, and frame sizes scale with it. Stages run back to back, so backlog
carries over from one stage to the next.

The mesh routes x first, then y. Each router serves two endpoints, and every
mesh link carries the offered load. The table shows frames missing their
deadline, out of 48 per stage, with the mean lateness in cycles:

| load | x:y | one router | 2x2 mesh |
|---|---|---|---|
| 80% | 1:4 | 0 | 0 |
| 80% | 2:3 | 0 | 9 (2011) |
| 80% | 1:1 | 4 (1110) | 25 (3865) |
| 80% | 3:2 | 8 (1315) | 29 (4642) |
| 80% | 4:1 | 27 (1143) | 39 (5062) |
| 85% | 1:4 | 31 (1813) | 45 (5712) |
| 85% | 2:3 | 35 (3247) | 45 (7128) |
| 85% | 1:1 | 32 (4062) | 48 (7669) |
| 85% | 3:2 | 36 (3386) | 48 (6969) |
| 85% | 4:1 | 36 (2820) | 48 (5409) |

Misses grow as the real-time share grows. Most of the lateness is queueing at
the sending endpoint, which serves its VCs round robin whatever their class.
Inside the network the classes are clearly separated. Mean latency from
injection to delivery:

| topology | real-time | best-effort |
|---|---|---|
| one router | 120 cycles | 362 cycles |
| 2x2 mesh | 192 cycles | 598 cycles |

The testbench fails if real-time latency is not the lower of the two. In the
mesh run, each of these mechanisms happened hundreds to thousands of times:
divert, preempt, resume, flexible allocation, N-ACK and wait-counter retry.
Exact figures depend on the simulator's random seed.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/router_pkg.sv rtl/*.sv \
    tb/tb_qos_router.sv --top-module tb_qos_router -Mdir obj -o sim && obj/sim
```

For the other testbenches, replace the file and the top module. The
workload tests also need `tb/tb_qos_traffic.sv`. The full-size builds take
about two minutes each. The mesh run then takes about 25 seconds, and the
others a few seconds or less.
