# GraphWave: a compute-at-memory graph processing accelerator in SystemVerilog

Graph algorithms are slow on ordinary processors because following edges scatters memory
accesses. GraphWave takes the opposite approach. Every vertex of the graph gets its own small
processing unit, the **VPU**, which holds the vertex value next to the ALU that updates it. The
edges are never stored as a list that something must walk. Instead, each vertex sends **one**
message per superstep, and routing tables next to the VPUs fan that message out to all its
neighbours:

* inside a processing element (**PE**, 256 VPUs), one *bit-masking table* entry drives the
  write enables of up to 256 VPUs in the same cycle;
* between PEs, a per-PE *inter table* relays the message hop by hop along a multicast tree, so
  a vertex with thousands of out-edges still injects one packet into the network.

The default configuration is a 6 × 7 array of PEs, or 10,752 vertices. It runs the vertex-centric
model of computation. Each superstep, every active vertex propagates its value and reduces the
values it receives. When all messages have arrived, every vertex applies the result. Three
algorithms are built in: PageRank (PR), breadth-first search (BFS) and connected components (CC).

## Vertex-centric processing and the superstep

A run is a sequence of supersteps, each with two phases.

1. **Propagate / Reduce.** Each active vertex offers one message: its route (the *outbound
   register*) and its current value (the *output register*). While messages flow, every VPU that
   receives one combines it into its accumulator in the same cycle:

   | algorithm | Reduce            | Apply                                         | value sent          |
   |-----------|-------------------|-----------------------------------------------|---------------------|
   | PR        | `acc = acc + m`   | `val = (α + (1 − α)·acc) / degree`, `acc = 0`  | `val`               |
   | BFS       | `acc = min(acc,m)`| `val = acc`                                   | `val + 1` (level)   |
   | CC        | `acc = min(acc,m)`| `val = min(acc, val)`                         | `val`               |

   PR values are Q16.16 fixed point and α is a run input (`pr_alpha`). The PR value already
   includes the division by the out-degree, so senders just forward `val`. BFS uses all-ones for
   "unreached".
2. **Apply.** When the whole array is quiet, the controller pulses `apply` and every VPU updates
   its output register from its accumulator. For BFS and CC, a vertex whose value changed becomes
   *active*; only active vertices send in the next superstep. PR vertices are always active.

The `superstep_controller` decides when a superstep is over. It counts packets injected into
the network against packets ejected from it. When every PE reports idle and no packet is in
flight for two consecutive cycles, it applies. The run ends when no vertex is active, or after
`max_supersteps` (for PageRank).

## Inside a processing element

```
          VPU 0 .. VPU 255  (req / grant, one message each per superstep)
                 │
            vpu_arbiter ── round-robin, one message per cycle, steers by route type
            │          │
   local-intra FIFO  local-inter FIFO        NoC-in FIFO ◄── noc_in_*
            │          │                      │       │
            │          └──────► inter_pe_datapath ◄───┘ (relay packets)
            │                    inter table
            │                    ├─ to_pe_addr_gen  (address table) ─► to-PE FIFO ─┐
            │                    └─ to_noc_addr_gen (address table) ─► NoC-out FIFO ─► noc_out_*
            ▼                                                                      │
      intra_pe_datapath ◄──────────────────────────────────────────────────────────┘
      ◄── NoC-in packets that need no relaying
        bit-masking table (256-bit masks) + unicast_unit
            │
            └─► vpu_we[255:0], vpu_val   (every selected VPU reduces in the same cycle)
```

A route (`route_t` in `graphwave_pkg`) has one of four kinds:

| kind      | `addr` means                      | handled by                            |
|-----------|-----------------------------------|---------------------------------------|
| `K_UCAST` | VPU index in the PE               | unicast unit: one-hot write enable    |
| `K_MCAST` | bit-masking table entry           | mask bits become the write enables    |
| `K_INTER` | inter table entry                 | to-PE and to-NoC address generators   |
| `K_NONE`  | the vertex has no out-edges       | nothing is sent                       |

**Intra-PE path.** This path accepts one message per cycle from three sources, round-robin: the
PE's own VPUs, the to-PE generator, and packets from the network. A multicast reads its
256-bit mask from the bit-masking table (single-port SRAM, one cycle). In the next cycle, each
mask bit is the write enable of one VPU. A single message therefore reaches up to 256 vertices
in one cycle without any per-edge memory access.

**Inter-PE path.** An inter table entry holds two bursts: `pe_base/pe_cnt` words of the to-PE
address table, and `noc_base/noc_cnt` words of the to-NoC address table. The two address
generators play their bursts in parallel, at one word per cycle after a two-cycle start:

* each to-PE word is a local unicast or multicast route, fed back into the intra-PE path;
* each to-NoC word is `{next-hop PE, route at that PE}`. The route at the next hop is either a
  plain delivery (unicast/multicast) or another inter table entry, when that PE has to pass the
  message on.

Packets only ever go to a neighbouring PE. Which PE relays for which is worked out offline by
the mapper, and the hardware simply replays the tables. The design does not depend on the mapper's
policy: shortest-distance trees and congestion-aware orderings (making central PEs receive last)
produce the same kind of table contents.

**In-flight reduction.** An unmapped VPU can be configured as a *relay* (`vpu_cfg_t.relay`).
Suppose several vertices of one PE all point at the same vertex in another PE. The mapper points
them at the relay instead, and the relay points at the remote vertex. The relay reduces what it
receives like any VPU. Once all ordinary vertices of its PE have sent and the PE's FIFOs and
datapaths are empty, the PE pulses `flush` once. Each relay that holds something then sends one
combined message and returns to the identity value. Many network packets become one. A relay
never applies, and it must only be fed by vertices of its own PE.

**Back-pressure.** All internal links use valid/ready. The arbiter grants nothing while the FIFO
for the chosen message is full (a *stall*, visible on the `stall` output). The NoC-out FIFO
holds the to-NoC generator when the network refuses a packet.

## Loading and running

The tables and vertex state are written over the load bus before a run (`cfg_we`, `cfg_pe`,
`cfg_target`, `cfg_addr`, `cfg_data`), one word per cycle, while `busy` is low:

| `cfg_target`   | `cfg_addr`         | `cfg_data` (low bits)                               |
|----------------|--------------------|-----------------------------------------------------|
| `CFG_BITMASK`  | mask entry         | 256-bit mask, bit *i* = VPU *i*                     |
| `CFG_INTER`    | inter entry        | `inter_entry_t {pe_base, pe_cnt, noc_base, noc_cnt}`|
| `CFG_TOPE`     | to-PE table word   | `route_t`                                           |
| `CFG_TONOC`    | to-NoC table word  | `noc_route_t {dest PE, route_t}`                    |
| `CFG_VPU_CFG`  | VPU index          | `vpu_cfg_t {enable, relay, outbound, degree}`       |
| `CFG_VPU_INIT` | VPU index          | `vpu_init_t {active, val}`                          |

Write `CFG_VPU_CFG` before `CFG_VPU_INIT`, because the initial accumulator depends on the
algorithm and on the relay bit. Set `alg`, `pr_alpha` and `max_supersteps`, then pulse `start`.
When `done` rises, read results with `rd_pe`/`rd_idx` (`rd_val` one cycle later). `cycles`,
`edges` (VPU writes) and `supersteps` give the throughput in traversed edges per cycle.

PEs are numbered `row * PE_COLS + column`. The network itself is **not** part of the RTL. Each
PE's injection port (`noc_out_valid/ready/pkt`) and ejection port (`noc_in_valid/ready/pkt`)
are top-level ports. A `pkt_t` carries its destination PE, and any mesh network that delivers
packets to that PE can be attached. The network needs enough buffering that a PE blocked on
output cannot block its own input indefinitely. The testbench model has unbounded queues.

## Parameters

| parameter       | default | meaning                                                     |
|-----------------|---------|-------------------------------------------------------------|
| `PE_ROWS`, `PE_COLS` | 6, 7 | PE array                                               |
| `NUM_VPU`       | 256     | VPUs per PE, also the bit-masking entry width               |
| `BITMASK_DEPTH` | 8192    | bit-masking table entries per PE                            |
| `INTER_DEPTH`   | 8192    | inter table entries per PE                                  |
| `TOPE_DEPTH`    | 8192    | to-PE address table words per PE                            |
| `TONOC_DEPTH`   | 16384   | to-NoC address table words per PE                           |
| `FIFO_DEPTH`    | 8       | depth of each of the five message FIFOs per PE              |

The array size and VPU count are the reference configuration. The table depths are sized so the
largest evaluated graphs fit. A vertex's multicast tree visits each PE at most once, so a PE
needs at most one bit-masking, inter and to-PE entry per source vertex that reaches it. With up
to about 9,000 vertices per graph that gives 8192 entries, and twice that for the to-NoC table
(one word per tree child). Value widths are fixed in `graphwave_pkg` (32-bit values, 16-bit
table indices, 8-bit PE numbers, 16-bit degrees).

## What is modelled and what is not

* The table RAMs are synthesizable single-port arrays (`sram_sp`) with one cycle of read latency.
  A real chip would use low-power SRAM macros.
* Power gating of unused PEs and VPUs is physical. Its logical effect is the VPU `enable` bit:
  a disabled VPU ignores all traffic.
* The NoC, and the software mapper that computes routes and table contents, are outside the RTL.
  The testbenches include a behavioural mesh (`tb/noc_model.sv`) and a simple mapper
  (`tb/graphwave_tb_pkg.sv`). The mapper builds X-then-Y multicast trees, so every packet
  travels one hop, and it adds relays for fan-in.
* An optional weight table between the bit-masking table and the VPUs, for weighted
  algorithms, is not built.
* Choices made here where a detail was open: the bit widths and table entry formats, Q16.16
  arithmetic, BFS sending `val + 1`, the activity rule, the one-message-per-cycle round-robin
  arbiter, the five FIFOs' positions and depth, the packet-count quiescence test, the relay flush
  rule, the load bus and the readback port. Each RTL file's header says which parts are fixed by
  the architecture and which are local choices.
* The apply step uses a combinational 32-bit divider and a 32 × 32 multiplier per VPU
  (PageRank). This is simple but large. A cheaper implementation would store the reciprocal of
  the degree or share the divider over several cycles.
* The inter-PE path handles one inter message at a time: it takes a new one only when both
  address generators have finished.
* A VPU has no direct path to the network. A message for another PE always goes through
  an inter table entry, even with a single destination (`noc_cnt = 1`). An 18-bit route has no
  room for a PE number and a remote route together. That costs one inter entry and one to-NoC
  word per such vertex.
* The throughput figures the testbenches print (VPU writes per cycle) come from small random
  graphs and the behavioural network. They are functional checks, not performance estimates
  of the full array.

## Files

`rtl/` (one module or package per file):

| file | role |
|------|------|
| `graphwave_pkg.sv` | widths, message, packet and table-entry types, encodings |
| `graphwave_top.sv` | PE array + controller, load bus, readback, NoC ports |
| `superstep_controller.sv` | superstep sequencing, quiescence detection, statistics |
| `pe.sv` | processing element |
| `vpu.sv` | vertex processing unit |
| `vpu_arbiter.sv` | one message per cycle from the VPUs, steered by type |
| `intra_pe_datapath.sv` | bit-masking table + unicast unit |
| `unicast_unit.sv` | index to one-hot write enable |
| `inter_pe_datapath.sv` | inter table + both address generators |
| `to_pe_addr_gen.sv`, `to_noc_addr_gen.sv` | address generators with their tables |
| `sync_fifo.sv` | valid/ready FIFO |
| `sram_sp.sv` | single-port RAM |

`tb/` holds one self-checking testbench per module (`<module>_tb.sv`). There is also
`graphwave_top_pe256_tb.sv`, which runs full-size PEs (see below), plus the
behavioural NoC and the mapper/reference package. Every testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

## Simulating

With Verilator 5 (any module; the top-level test shown):

```
verilator --binary --timing --assert -Wno-fatal -j 4 -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/graphwave_pkg.sv tb/graphwave_tb_pkg.sv tb/graphwave_top_tb.sv \
    --top-module graphwave_top_tb -o sim
./obj_dir/sim
```

`graphwave_top_tb` works on a 2 × 3 array of 16-VPU PEs. It builds a random 72-vertex graph with
a high fan-in vertex and wide fan-out vertices, maps it with relays, and runs BFS, CC and four
PageRank supersteps. Every vertex and the superstep count are compared with a software model of
the same arithmetic. It also checks that each mechanism actually occurred: unicast and
multicast delivery, wide multicasts, relayed and leaf packets, arbiter stalls, relay flushes,
and both ways a run can end. Lint is clean apart from width and unused-bit warnings, plus
Verilator's note that `rst_n` is also sampled by the assertions.

`graphwave_top_pe256_tb` keeps every default of the top except the array size, which is 2 × 2.
That gives 256 VPUs per PE, full table depths and 8-entry FIFOs. It maps a 1,000-vertex graph,
including vertices that fan out to 500 others, and runs BFS and CC to completion. All 1,000
values are checked against the reference. Single cycles reach up to 199 VPU writes through
one bit-masking entry. This is the largest configuration that has been simulated. The complete
6 × 7 array (10,752 VPUs) passes Verilator lint and the slang front end. Its Verilator C++ model,
however, takes far longer to compile than the simulation itself would run, so no full-array
simulation is part of the test set.

Results of the test set:

| testbench | checks | result |
|-----------|-------:|--------|
| `sram_sp_tb` | 562 | pass |
| `sync_fifo_tb` | 8213 | pass |
| `unicast_unit_tb` | 81 | pass |
| `vpu_tb` | 30 | pass |
| `vpu_arbiter_tb` | 11159 | pass |
| `intra_pe_datapath_tb` | 4002 | pass |
| `to_pe_addr_gen_tb` | 2034 | pass |
| `to_noc_addr_gen_tb` | 2022 | pass |
| `inter_pe_datapath_tb` | 1889 | pass |
| `superstep_controller_tb` | 21 | pass |
| `pe_tb` | 41 | pass |
| `graphwave_top_tb` | 233 | pass |
| `graphwave_top_pe256_tb` | 2009 | pass |

Check counts depend on the random seed for the tests that draw random traffic.

## Capacity for the evaluated graphs

At the default size the array holds 10,752 vertices. Each PE has 8192 × 256-bit mask entries
(256 KiB) and 8192 inter entries. It also has 8192 to-PE and 16,384 to-NoC address words.

* **Graphs of 6k–9k vertices** fit in the vertex count. This covers a peer-to-peer network
  (9k vertices, 31k edges), a voting network (7k, 103k), a protein network (6k, 314k) and a
  web-spam graph (9k, 506k). A PE is on one multicast tree per source vertex at most, so no
  table needs more entries than there are vertices.
* **A 7,057-vertex social graph with 9.4M edges on 30 PEs** needs about 180 KB of masks per
  PE, within the 256 KiB built. Its inter and to-PE entries are bounded by 7,057 per PE.
* **Synthetic 4k-vertex graphs with average degree 10 to 3,999** fit all tables.
