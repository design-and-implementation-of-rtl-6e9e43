# Content switching network processor and scalable switch fabric

Content-aware switching lets a network device choose a server, apply a
security policy or give a flow a service class from what is inside a
packet: a URL, a cookie, a CGI name. The device cannot read those fields at
fixed offsets. They have variable length and variable position, so the
whole payload must be scanned at line rate.

This RTL covers two cooperating chips built around that idea:

* **The network processor.** It runs on a 2 Gbps stream at 250 MHz, which
  is one byte per clock. Fixed-function engines do the work that must
  happen at wire speed:
  * a protocol classifier;
  * a pattern-matching engine that scans every payload byte;
  * a traffic manager.

  A cluster of four programmable packet processors then makes the final
  decision for each packet. The engines hand each packet to a processor
  already classified, together with the address of the routine that must
  handle it.
* **The switch fabric.** It is a 16 x 16 port shared-memory switch with
  2 Gbps per port. Several fabrics and processors form a larger system of
  up to 512 ports without a central supervisor. Each fabric learns how
  congested every destination is from its downstream neighbours, through
  backward channels. It passes only changes in that information further
  upstream.

The two chips stand side by side in the top module `csnp_top`. The
protocol on the link between them is not defined here, so each chip
brings out all of its own ports, prefixed `np_` and `sf_`. One clock and
one active-low asynchronous reset drive both.

## Building blocks

| Module | Role |
|---|---|
| `csnp_top` | network processor core and switch fabric side by side |
| `np_core` | network processor: packet analyzer, job scheduler, ingress buffer, traffic manager |
| `np_classifier` | L3-4 classification of the 5-tuple into 256 classes (ternary rules) |
| `np_pattern_match` | payload scanner: prefix table plus state machine in memory |
| `np_decision_logic` | per-packet summary: class, and the highest-priority rule matched |
| `np_job_scheduler`, `np_jump_table` | job queue for 4 packet processors; class to routine address |
| `np_ingress_buffer` | packet store with single-cycle unaligned 2- and 4-byte reads |
| `np_traffic_manager` | 8 priority queues of descriptors, with bandwidth filter, WRED and WFQ |
| `np_bw_filter`, `np_wfq_sched` | windowed per-flow bandwidth check; earliest-finish-time selection |
| `switch_fabric` | 16-port fabric |
| `sf_in_buf`, `sf_out_buf` | byte stream to 32-byte cells and back |
| `sf_shared_mem`, `sf_free_cell_mgr` | 4096-cell shared memory and its free list |
| `sf_queue_mgr` | per-output, per-priority linked lists of packets; read scheduling |
| `sf_fabric_router` | switching table, path choice, trunking, WRED decision |
| `sf_path_analyzer` | path-information tables, difference updates, refresh |
| `wred_drop` | weighted random early drop curve (shared by both chips) |
| `np_pkg`, `sf_pkg` | shared types and sizes |

Every file starts with a comment on:
* how the block works;
* its timing;
* which parts follow the original architecture and which are local
  choices.

## Network processor

### Packet path

1. The ingress controller is not part of this RTL. It does three things
   for each packet:
   * writes the packet as aligned 32-bit words into a 1 KB slot of the
     ingress buffer;
   * streams the same bytes to the pattern matcher;
   * presents the parsed 5-tuple (`key_t`, 104 bits) to the classifier.
2. The classifier compares the key with 32 ternary rules (value, care
   mask, class). The first enabled rule that matches, in table order,
   gives the 8-bit class. The result is registered.
3. The pattern matcher reports every content rule it finds (see below).
4. The decision logic keeps the lowest-numbered rule seen for the packet.
   A rule's position is its priority. When the packet has ended and its
   class is known, the decision logic issues `{class, hit, rule}` for one
   cycle.
5. The job scheduler queues `{slot, decision}` (8 entries). Each cycle it
   hands the oldest job to one idle processor, choosing round-robin among
   them. `pp_pc` carries the routine's start address, which the jump table
   (256 x 12 bits) looks up from the class.
6. The processors are not built. They read their packet from the ingress
   buffer at any byte address with `rd_dword` set for 4 bytes or clear
   for 2. Data comes back one cycle later in network byte order. The
   buffer has four byte-wide banks, and a read takes byte `a+k` from
   bank `(a+k) mod 4`. An unaligned access therefore reads each bank
   once and costs no extra cycle.
7. The processors enqueue a descriptor into the traffic manager:
   * priority;
   * flow;
   * length;
   * allowed bytes per window;
   * finish time (the processors compute it);
   * packet-memory pointer.

**Timing rule in `np_core`.** The matcher needs `PM_LAT = log2(NPT)+2 = 8`
cycles. Packet start and end are delayed by the same amount so that every
match lands in its own packet. Two consequences:
* `key_valid` must come at least `PM_LAT-1` cycles after the first byte,
  and no later than the last byte. A real IPv4 5-tuple is only complete
  near byte 34, so this holds naturally.
* The decision leaves `PM_LAT+1 = 9` cycles after the last byte.

### Pattern matching engine (`np_pattern_match`)

This is the part that needs the most explanation. Rules are byte strings
compiled into a trie. The engine walks that trie one byte per clock using
two kinds of memory.

**Prefix table (PT).** Every cycle, the last two bytes form a 16-bit key.
The table holds `NPT = 64` sorted lower bounds. Each bound opens a range,
and each range stores a start transition.

The search is a pipelined binary range search with one step per stage.
Each stage has its own copy of the bound table, so one key is resolved
every cycle after `log2(NPT)` stages. The compiler gives each two-byte
prefix of a rule its own range `[k, k+1)`. It maps every gap between
prefixes to an invalid entry. Unused entries at the end hold `0xFFFF`.

A start transition either starts an attempt at a state, or accepts at
once. A two-byte rule is reported straight from the PT.

**State memories.** A state number is `SW = log2(NSTATE)+1` bits. Its top
bit selects one of two memories:
* the non-branching memory holds one transition per state;
* the branching memory holds `NB = 4` transitions per state.

A transition word is `{valid, ch[7:0], next[SW-1:0], acc, rule[9:0]}`,
31 bits wide. The comparator checks all transitions of the running state
against the current byte in parallel:
* a hit moves to `next`, and reports `rule` if `acc` is set;
* a miss ends the attempt.

**Search policy.** Only one attempt runs at a time. A new attempt starts
from the PT only when none is running. This keeps the engine to one state
memory read per cycle. The cost is that a rule which starts inside the
bytes of a failed attempt is missed. Rule sets with overlapping prefixes
need care, or a wider engine.

**Programming.** Tables are written through `wr_sel`, `wr_addr` and
`wr_data`:

| `wr_sel` | Target | Address |
|---|---|---|
| 0 | PT bound | entry |
| 1 | PT start transition | entry |
| 2 | non-branching word | state |
| 3 | branching word | `state*NB + slot` |

The testbench include `tb/tb_pm_rules.svh` contains a complete rule
compiler written in SystemVerilog. It is the best reference for the table
formats.

**Not built.** The original architecture shares words of the branching
memory among states that have few branches. The word format of that
scheme is not known, so every branching state here owns `NB` slots.

**Sizes.** The memories hold 1024 states of each kind, which is about
21 KB of table. The original engine targets about 1000 rules of 10 bytes
each. Without shared prefixes that needs roughly 8000 states, so
`NSTATE` and `NPT` must grow for a full rule set. Both are parameters.

### Traffic manager (`np_traffic_manager`)

A descriptor first passes the bandwidth filter, which is registered.

**Bandwidth filter.** It keeps, per flow (256 flows), the bytes accepted
in the current window and in the previous window. The window is
`2^win_shift` cycles long. The estimate is

`cur + prev * (W - elapsed) / W + len`

This is a sliding-window average that smooths bursts. The packet passes
if the estimate does not exceed the descriptor's `alloc`.

**WRED.** It is checked on the depth of the packet's priority queue:
* no drop below `min`;
* always drop at or above `max`;
* in between, drop when a 16-bit LFSR value is below
  `(depth - min) << shift`.

**Full queue.** A full queue (16 descriptors) also drops.

Each drop reason pulses its own event output.

**Dequeue.** The WFQ selector serves the non-empty queue whose head has
the earliest finish time. Times are compared modulo 2^16 with a signed
difference, so wrap-around is harmless. This requires that live finish
times span less than half the range.

## Switch fabric

### Cells and headers

Each port carries one byte per clock, which is 2 Gbps at 250 MHz. The
input buffer cuts each packet into 32-byte cells and reads the 4-byte
fabric header at the front of every packet:

| Byte | Contents |
|---|---|
| 0 | `mcast`, `prio[2:0]`, three zero bits, `dest[8]` |
| 1 | `dest[7:0]` |
| 2–3 | 16-bit flow id |

The header stays in the packet and is delivered unchanged.

### Data path

* **Write side.** A round-robin arbiter writes one cell per clock into the
  4096-cell shared memory, at an index taken from the free cell manager.
  The free list is a counter of never-used cells plus a FIFO of recycled
  cells, so no initialisation sweep is needed after reset.
* **Bandwidth.** The memory reads one cell per clock. That gives 32 bytes
  per clock in each direction, against the 16 that 16 ports need.
* **Queue manager.** It links the cells of a packet. When the packet's
  last cell is stored (store and forward), it appends the packet to a
  list per output and priority. Multicast packets sit in several lists,
  and each of their cells carries a reference count. The cell is freed
  after the last read.
* **Reads.** Each clock, one output with room in its output buffer gets a
  cell. Outputs are chosen round-robin. A new packet comes from the
  highest non-empty priority (7 is highest).

### Fabric router

The router acts on a packet's first cell. The switching table has four
sub-tables, written through `tbl_*` with `tbl_sel_e`:

| Sub-table | Contents |
|---|---|
| destination | 16-bit port mask for each of 512 destination ids |
| loop | per input port, the outputs a multicast may use |
| trunk | per port, the code of its group size: 0, 1, 2, 3 for 1, 2, 4, 8 adjacent ports, aligned to the size |
| flow | per 8-bit flow hash (`flow[7:0] ^ flow[15:8]`), the trunk member to use |

Per-priority WRED settings share the same write port. The address
`{field, prio}` selects min (field 0), max (field 1) or shift (field 2).

**Unicast.** Every port in the destination mask is an alternative path.
The one whose path cost is lowest wins, with ties going to the lowest
port. If that port belongs to a trunk, the flow table picks the member,
so a flow always uses the same link.

**Multicast.** The outputs are the destination mask ANDed with the loop
mask of the input. The loop mask normally excludes the input port itself.

**WRED.** The router compares the deepest queue among the chosen
outputs, at the packet's priority, against that priority's curve.

### Admission, stalls and `rx_pause`

A packet is dropped whole at its input in three cases:
* WRED says drop;
* no output remains;
* fewer than `ADMIT_CELLS` cells are free. The default is one 9 KB jumbo
  packet, 288 cells.

A later cell of an admitted packet can still find no free cell. It then
waits in the input buffer (`ev_stall_nocell`). When that buffer is almost
full, `rx_pause` asks the sender to hold. This pause signal is an addition
of this design. Without it a stalled input would lose cells, which is
counted by `ev_overflow`.

### Path analyzer

This is the block that makes the fabric scalable. Path information is a
4-bit congestion cost for each destination id.

**PI tables.** Each output port `p` has a table (`PI p`) of the costs last
received on its backward channel. They describe what lies behind that
port.

**Path processor.** It recomputes one destination per clock, sweeping
all 512 in turn:

`cost(d) = min over ports p in mask(d) of max(level(p), PI_p(d))`

Here `level(p) = min(15, queue_length(p) >> 5)`. A destination with no
route gets 15.

**Sending changes.** The *sent-information recorder* holds the last cost
sent for every destination. The *difference updater* sends `(d, cost)`
only when the new cost differs from the recorded one. In a cycle with
nothing to send, the *consistency maintainer* re-sends the recorded cost
of a rotating destination. A neighbour that missed a message is
therefore corrected within one rotation.

**Outputs.** Messages go out on `bwd_out`, to the backward channel of
every input. The router asks for `port_cost` of the destination it is
routing.

## What follows the original architecture and what does not

**Taken from the original architecture:**
* the block structure of both chips;
* 16 ports of 2 Gbps at 250 MHz;
* shared-memory switching with an input and an output buffer;
* the four switching sub-tables;
* trunks of 2, 4 or 8 adjacent ports;
* flow pinning;
* WRED in the fabric and in the traffic manager;
* the path analyzer's parts (PI tables, path processor, difference
  updater, sent-information recorder, consistency maintainer);
* 256 classes;
* rule priority by position;
* the prefix table with pipelined binary range search, and the
  branching/non-branching state memories;
* four processors behind a job scheduler with a jump table;
* single-cycle unaligned ingress reads;
* the bandwidth filter over a time window;
* 8-level WFQ.

**Choices made here, where no detail was available:**
* cell size;
* memory sizes;
* header layout;
* table entry formats;
* the cost formula and the refresh policy;
* the WRED curve;
* strict priority in the fabric;
* store-and-forward enqueue;
* reference counting for multicast;
* the classifier's ternary rule table (32 rules);
* 2-byte prefixes;
* the descriptor format;
* all handshakes.

**Not built:**
* the packet processors, whose instruction set is not available;
* MACs;
* ingress and egress controllers;
* DRAM, SRAM, tCAM and PCI controllers;
* the processor-to-fabric link;
* the distributor and aggregator;
* word sharing in the pattern matcher;
* the management interface of the fabric.

Their signals are ports of `np_core` and `switch_fabric`.

## Verification

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one:
* compares the block with an independent model;
* ends with a line `TB_RESULT checks=N failures=M`;
* has a watchdog.

Notable ones:

* **`tb_np_pattern_match`** compiles seven rules into the tables. The
  rules share prefixes, branch, and include a two-byte rule. The test
  streams random packets with planted rule strings. The sequence of
  reported rules must equal a byte-level reference search.
* **`tb_switch_fabric`** runs the full-size fabric.
  * 16 senders and 16 receivers carry packets whose id and payload can be
    checked byte by byte. Each packet must arrive on the ports its
    destination allows.
  * Every packet must reach all its ports or none. The lost packets must
    equal the reported drops.
  * Phases: mixed traffic, one congested priority-0 port (WRED), and jumbo
    frames that exhaust the shared memory (refusals, stalls, pauses).
* **`tb_np_core`** covers the whole network processor: classification,
  matching, decisions, dispatch with jump addresses, unaligned reads,
  job-queue overflow, and all three traffic-manager drops. Bytes arrive
  back to back at one per clock. Every decision must leave exactly 9
  clocks after its packet's last byte.
* **`tb_csnp_top`** runs both of the above at once on `csnp_top`, at the
  default parameters. It counts every mechanism and fails if one never
  happens. It runs in well under a minute.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_csnp_top \
    rtl/sf_pkg.sv rtl/np_pkg.sv tb/tb_csnp_top.sv
./obj_dir/Vtb_csnp_top
```

The other modules are found through `-Irtl`. The same command works for
any `tb_*` module.

## Known limits

* The pattern matcher runs one attempt at a time and has no word sharing.
  Its default tables are far smaller than a 1000-rule set needs.
* The L3-4 classifier is a 32-rule ternary table. It stands in for the
  original engine, whose internals are not described.
* The decision leaves 9 cycles after a packet's last byte. The
  original figure for the complete L7 path is around 40 cycles, measured from
  packet arrival and including stages not built here.
* Assertions use `disable iff (!rst_n)`. Lint reports the reset used both
  asynchronously and in assertions (`SYNCASYNCNET`). This is harmless.
