# PFS: priority forwarded packet splitting for a non-preemptive wormhole NoC

A plain wormhole network-on-chip with priority arbitration cannot keep its promises to urgent
packets. Once a low-priority packet owns an output port it keeps it until its tail has gone,
and nothing stops it. Two effects follow:

* **Head-of-line blocking.** An urgent packet can sit behind a less urgent packet whose header
  is itself waiting at the next router. There, that header competes with its own low priority
  and loses to everything else.
* **Tail backing.** An urgent packet can find its output held by a long, less urgent packet that
  is still streaming, or stalled further down.

Virtual channels or time-division multiplexing solve this, but they cost a lot of buffers and
area. PFS answers each effect with a small addition to a simple Hermes-style router:

* **Priority forwarding.** When an urgent packet is blocked by a blocked, less urgent packet,
  the urgent priority travels down the blocked path on a narrow side-band link. It stops at
  the header of the blocking packet and raises that header's *arbitration* priority. The
  packet itself is not changed.
* **Selective packet splitting.** A less urgent packet holding an output that a more urgent
  packet wants is cut. The flit being sent goes out as a tail flit and the output is freed.
  The rest of the packet asks for the output again under a newly built header. Two thresholds
  decide when to cut:
  * the priority difference **PD** between the two packets;
  * the number of remaining flits **RF**.

This repository holds synthesizable SystemVerilog for a 4 x 4 mesh of such routers, plus packet
generators/receivers on every node. Together they form the whole evaluation system.

## Files

| file | contents |
|---|---|
| `rtl/pfs_pkg.sv` | flit, header, state and configuration types |
| `rtl/pfs_fifo.sv` | input buffer (2 flits) |
| `rtl/pfs_xy_route.sv` | XY routing function |
| `rtl/pfs_input_port.sv` | input port: buffer, request/priority/out-port/flits-left/header registers, the 5-state connection FSM with splitting |
| `rtl/pfs_arbiter.sv` | priority arbiter, round robin among equals |
| `rtl/pfs_split_ctrl.sv` | PD half of the split decision |
| `rtl/pfs_prio_fwd.sv` | alpha/beta registers and their round-robin service |
| `rtl/pfs_crossbar.sv` | 5 x 5 switch |
| `rtl/pfs_router.sv` | one router |
| `rtl/pfs_mesh.sv` | W x H mesh, side-band links included |
| `rtl/pfs_pkt_gen.sv` | periodic packet generator and latency-measuring receiver |
| `rtl/pfs_noc_top.sv` | top: mesh + one generator per node + cycle counter |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Flits and packets

Flits are 32 bits wide. Bit 31 of *every* flit is the tail bit. A packet is one header flit
followed by `size` payload flits, and its last payload flit carries the tail bit.

```
header : [31] tail=0 | [30:27] prio | [26:16] size | [15:12] src_x | [11:8] src_y | [7:4] dst_x | [3:0] dst_y
payload: [31] tail   | [30] last    | [29:0] release time stamp (written by the generator)
```

* Priority value 0 is the most urgent. Values 0..15 stand for the priority labels 1..16.
* `size` is the number of payload flits that follow the header. An input port loads it into
  its 'flits left' counter.
* `last` marks the final flit of the *original* packet. A split moves the tail bit but never
  `last`, so the receiver can tell a fragment's end from the packet's end.
* The payload layout is only what the generators use. The routers look at nothing but bit 31
  of a payload flit.

Coordinates are 4 bits each. Rows grow southwards, so (1,0) lies north of (1,1). The node index
is `y*W + x`. Port vectors are one-hot in the order East, West, North, South, Local, and zero
means "no port".

## The input port and its connection state machine

Every router has five input ports (`pfs_input_port`). Each one holds these registers:

* a 2-flit buffer;
* a header register;
* 'port request' and 'priority' registers, which the arbiter reads;
* an 'out port' register, written when the arbiter grants;
* a 'flits left' counter.

The state machine has five states:

| state | name | what happens |
|---|---|---|
| 1 | `ST_REQ` | waits for a header at the buffer head, then moves it into the header register. XY routing sets 'port request'; the header's priority sets 'priority'. |
| 2 | `ST_ARB` | the request is visible to the arbiter. Forwarded priorities may raise 'priority' here, and only towards more urgent values. A grant loads 'out port' and 'flits left'. |
| 3 | `ST_XFER` | sends the header register, then the payload straight from the buffer, one flit per accepted cycle, counting down 'flits left'. |
| 4 | `ST_CLOSE` | reached after the flit with the tail bit; clears 'out port'. Then back to 1. |
| 5 | `ST_SPLIT` | reached after a split flit; clears 'out port' and re-enters state 2 with the remainder's header. |

A split happens in state 3 when all of the following hold for the payload flit being sent:

* `split_ok` is high, meaning some other input waits for the same output with a priority at
  least PD levels more urgent than this connection's 'priority' register;
* the flits that would remain after this one are at least 1 and at least the RF threshold;
* the flit is not already a tail flit.

The flit then leaves with bit 31 forced to 1. The header register is rewritten with
`size = remaining flits`, and keeps the packet's original priority, source and destination.
The port then releases the output and asks for it again. The urgent requester, already
waiting, wins the free output in the next arbitration. The remainder follows later under its
new header.

There are three RF modes (`cfg_rf_mode`):

* `RF_ABS`: at least `cfg_rf` flits must remain;
* `RF_3Q`: at least 3/4 of the packet size must remain;
* `RF_HALF`: at least 1/2 of the packet size must remain.

"Packet size" is the `size` of the header as it arrived at this port. Lower RF or PD values
split more often: urgent packets gain and less urgent packets lose. Note that "at least 1/2 of
the size remains" is a looser test than "at least 3/4 remains". RF = 1/2 therefore splits more
often than RF = 3/4 in this implementation. In the workload test (see Verification) the split counts
were 657, 190 and 319 for RF = 1, 3/4 and 1/2. PD and RF are plain inputs
and may be changed while the network runs.

**Connections end on the tail bit, not on 'flits left' = 0.** Suppose a packet was split
upstream. Its first fragment still carries the original `size`, but it ends early with a
tail flit. Every downstream router closes on that tail flit. For such a fragment, 'flits left'
over-counts. That only makes a further split downstream slightly more willing, and it makes
that split's new header report a size that is too large. Neither affects correctness: every
router and the receiver rely on tail and `last` bits only.

## Priority forwarding

`pfs_prio_fwd` holds nine registers:

* one **alpha** register per input port (5);
* one **beta** register per neighbour-facing input (4).

**Alpha load.** An alpha register loads when both of these hold:

* its input waits (state 2) for an output held by a *less urgent* input;
* that output is stalled: a flit is offered there and the next router does not accept it.

This is the "blocked by a blocked packet" case. The register stores the waiting packet's
priority and the direction of the blocked output. It keeps the more urgent value if it is
loaded again before being serviced.

**Beta load.** A beta register loads from the side-band link of its neighbour.

**Service.** One register per cycle is serviced, chosen round robin:

* **alpha:** the stored priority is sent on the side-band link of the blocked output. The next
  router captures it in the beta register of the input port that holds the blocking packet.
* **beta, input waiting in state 2:** the blocking header has been found. The input's
  'priority' register takes the forwarded value if it is more urgent.
* **beta, input transferring to a neighbour (state 3):** the header is further down the line,
  so the value is passed on over that output's side-band link.
* **beta, otherwise:** the message is dropped.

Each side-band link is a `valid` bit plus a 4-bit priority, in both directions between
neighbours, separate from the data links. Blocked outputs towards the Local port are not
forwarded, because no router lies beyond them.

Priority forwarding changes only the arbitration request. The split remainder re-requests with
the packet's own priority, and the packet's header on the wire never changes. A low-priority
packet therefore cannot keep a borrowed priority.

### The two mechanisms together

`tb_pfs_noc_top` replays the standard example on column x = 1 of the mesh:

* a priority-4 packet occupies the Local output of (1,3);
* a priority-7 packet from (1,2) is stuck behind it and holds the South output of (1,2);
* packets of priority 2 (from the west), 3 (from the east) and 5 (from (1,1)) queue for that
  output;
* a priority-1 packet comes down from (1,0).

What happens then:

1. Priority 1 waits behind the stalled priority-5 packet in (1,1), so it loads an alpha
   register there.
2. The value reaches the beta register of the North input of (1,2), where the priority-5
   header waits. That header now bids with priority 1.
3. In (1,2) the priority-7 packet is split, and priority 5 goes ahead of 2 and 3.
4. Back in (1,1), priority 1 splits priority 5 and follows right behind its first fragment.

The testbench checks that the priority-1 packet arrives before the priority 2, 3, 5 and 7
packets. It also checks that splits, alpha loads, side-band messages and priority updates all
occurred.

## Arbitration, crossbar, routing

* **Arbitration (`pfs_arbiter`).** For each free output, the arbiter grants the requester with
  the smallest priority value. Among equal values, it grants round robin from the last input
  granted on that output.
* **Crossbar (`pfs_crossbar`).** Each output carries the flit of the input whose 'out port'
  names it.
* **Routing (`pfs_xy_route`).** Routing is dimension-ordered: X first, then Y, then Local.
* **Links.** Data links use valid/ready handshaking, where ready means "the input buffer is
  not full". Each link carries one flit per cycle.

## Timing

* An idle router takes a header **3 cycles** after it lands in the input buffer:
  1. the header moves to the header register;
  2. the grant comes;
  3. the header goes out.
* Payload then streams at one flit per cycle.
* Closing or splitting a connection costs one idle cycle on that output.
* From release to the arrival of the final flit, an uncontended packet takes
  `2 + 3*R + S` cycles, where R is the number of routers on the path and S the number of
  payload flits. For example, (0,0) to (3,3) with 4 flits takes 27 cycles.

## Packet generators (`pfs_pkt_gen`) and the top (`pfs_noc_top`)

**Generator settings.** Each node's generator is set through a `gen_cfg_t` with these fields:

* `enable`;
* `start`: cycle of the first release;
* `period`: cycles between releases (0 releases a single packet);
* `size`: payload flits;
* `prio`: priority;
* `dst_x`, `dst_y`: destination.

**Release and send.** Release times are queued, four deep. A release that finds the queue full
is dropped and pulses `drop`. Packets are sent back to back, and every payload flit carries
its release time.

**Receive.** The receiver is always ready. When the flit carrying `last` arrives, it pulses
`rx_valid[n]` at the destination, with source, priority and latency in `rx_info[n]`.

**Top-level outputs.** The top adds a free-running counter `now` and brings out these event
vectors, one bit per node:

* `rel_evt`: a packet was released;
* `drop`: a release was dropped;
* `frag_evt`: a header (whole packet or fragment) was delivered;
* `ev_split`: a split;
* `ev_alpha`: an alpha load;
* `ev_fwd`: a side-band message;
* `ev_upd`: a priority update.

## Parameters and settings

| name | default | where | meaning |
|---|---|---|---|
| `W`, `H` | 4, 4 | top, mesh | mesh size (the evaluated 4 x 4 NoC) |
| `BUF_DEPTH` | 2 | top, mesh, router, input port | input buffer depth (2-position buffers as evaluated) |
| `FLIT_W`, `PRIO_W`, `SIZE_W` | 32, 4, 11 | package | flit width, 16 priority levels, packets of up to 2047 payload flits |
| `REL_DEPTH` | 4 | generator | release queue depth |
| `cfg_pd` | input | router | PD threshold; 0 acts as 1 |
| `cfg_rf_mode`, `cfg_rf` | input | router | RF threshold (absolute, 3/4, 1/2) |

## What follows the original PFS proposal and what is this design's own

Taken from the proposal:

* five-port Hermes-like router with XY routing and wormhole switching;
* the header carries a priority, and the arbiter decides by it;
* the input-port registers ('port request', 'priority', 'out port', 'flits left') and a
  header register for split remainders;
* the five connection states, including the split state;
* tail marking by the flit's most significant bit;
* PD and RF split conditions, including RF as 1, 3/4 and 1/2 of the packet size;
* alpha registers on all inputs and beta registers on the neighbour-facing inputs, serviced
  round robin;
* priority updates applied to waiting headers only;
* dedicated side-band links;
* 2-flit input buffers and the 4 x 4 mesh;
* periodic generators set by start, period, size, priority and destination.

Chosen here where the proposal is silent:

* flit width and header layout;
* the valid/ready link protocol;
* one-hot port encoding and the Hermes port order;
* the round-robin tie-break;
* the exact alpha trigger, a *stalled* lower-priority holder;
* the beta-service rules and keeping the more urgent of two pending values;
* the split-flit convention: no extra flit, and RF counts the flits left after the split flit;
* connections close on the tail bit;
* state 5 returns straight to arbitration rather than through state 1, because the header is
  already in its register;
* the latency definition (release to final flit) and the generators' release queue;
* PD compared against the holder's current priority register, which may carry a forwarded
  value.

Not built:

* the FPGA mapping and the LUT/register comparison;
* the software that generated generator settings and analysed latencies. Here, generator
  settings are top-level inputs and latencies are top-level outputs.

Reusing the data links for forwarding messages is mentioned only as a possible extension, and
was not built.

## Verification

Each testbench checks its module against values worked out independently, and prints one line
`TB_RESULT checks=N failures=M`:

* **`tb_pfs_fifo`:** random push/pop against a queue model, plus a one-per-cycle streaming check.
* **`tb_pfs_xy_route`:** all 16 destinations from router (1,2).
* **`tb_pfs_arbiter`:** random requests against a model with its own round-robin state, plus
  rotation among equals.
* **`tb_pfs_split_ctrl`:** random connections against a PD model for PD = 0, 1, 2, 4.
* **`tb_pfs_crossbar`:** random partial permutations.
* **`tb_pfs_prio_fwd`:** alpha load and send; no load when the holder is more urgent or not
  stalled; header-found update; pass-on; drop; one service per cycle.
* **`tb_pfs_input_port`:** register loading, forwarded priority (kept only if more urgent),
  exact flit sequence and close timing. Split with absolute RF: tail-marked flit and a
  remainder header of the right size. Split with RF = 1/2: fragments of 1, 1, 1, 1 and 4 flits.
  Split with RF = 3/4: fragments of 1, 1 and 6 flits.
* **`tb_pfs_router`:** pass-through and 3-cycle header latency; a split giving the urgent
  packet the output mid-packet; alpha leaving on the side-band; a beta update letting a
  priority-9 packet win over a priority-3 one.
* **`tb_pfs_mesh`:** default 4 x 4 mesh, 400 random packets. All arrive; per-source order and
  counts are checked; splits and forwarding occur.
* **`tb_pfs_pkt_gen`:** release times, flit format, latency reports, fragment handling and
  queue overflow.
* **`tb_pfs_noc_top`:** the full default system. It checks the exact zero-load latency (27
  cycles), then the blocking scenario above, then random periodic traffic from all 16 nodes.
  In that last phase every release must be delivered, per source.
* **`tb_pfs_workload`:** the evaluation workloads on the full system, 100,000 cycles each. It
  uses one random pattern of 16 periodic flows with priorities 1..16, run 13 times:
  * as is;
  * with payload sizes scaled 0.7, 0.9, 1.3 and 1.5 times;
  * with packet rates scaled 0.7, 0.9, 1.3 and 1.5 times;
  * with RF = 3/4 and RF = 1/2;
  * with PD = 2 and PD = 4.

  Every run must deliver every packet, and no packet may beat its zero-load latency. The
  testbench prints per-priority latency minimum, median and maximum, and counts splits,
  side-band messages and priority updates. It takes about 30 s.

Run any of them with Verilator 5, for example:

```
verilator --binary --timing --assert -Wall -Wno-fatal rtl/pfs_pkg.sv -y rtl \
          tb/tb_pfs_noc_top.sv --top-module tb_pfs_noc_top
./obj_dir/Vtb_pfs_noc_top
```

Assertions check three things:

* each output is held by at most one input;
* 'out port' is one-hot or zero;
* grants only go to waiting inputs.

**How far to trust it.** The mechanisms behave as intended in the directed scenarios and under
random load, and the network delivered every packet in every test. Two things have not been
done:

* the latency statistics of the original evaluation have not been reproduced;
* the design has not been mapped to an FPGA.
