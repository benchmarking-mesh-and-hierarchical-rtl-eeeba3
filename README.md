# Hierarchical bus and 2-D mesh: two on-chip networks with one agent interface

This is synthesizable SystemVerilog for two packet networks that connect the
processing elements ("agents") of a system-on-chip, built so that they can be
compared fairly:

* a **hierarchical bus**: a chain of short bus segments of four agents each,
  joined by bridges, every segment working in parallel;
* a **2-D mesh**: a grid of store-and-forward routers, one agent per router,
  with dimension-order routing.

Both take the same fixed-size packets through the same agent interface, use
the same one-packet buffer everywhere, forward a packet only once all of it is
stored, and deliver packets from one source to one destination in order. The
design follows a published benchmark study of these two networks (which also
compares a plain single bus and finds the hierarchical bus the better
area/performance trade-off, the mesh the faster but 2.3-3.4 times larger
network). That study gives the structure of each element, the packet and
buffer sizes, the bus arbitration policy and the routing policy; the signal
level protocols are this design's own and are described below.

`noc_top` puts both networks side by side (36 agents each by default: nine
bus segments, a 6 x 6 mesh) with separate agent ports, so the same traffic
can be applied to both.

## Packets and the agent interface

A packet is 11 words of 32 bits: a three-word header and eight payload words.
Every buffer in both networks (`packet_fifo`, depth 11) holds exactly one
packet, 352 bits.

| word | meaning |
|------|---------|
| 0 | destination agent index (the only word the networks look at; low bits decoded) |
| 1 | source agent index (carried, not decoded) |
| 2 | free for the agents (sequence number, tag) |
| 3-10 | payload |

The header layout is this design's choice. Agents are numbered 0..N-1.

Each agent has two valid-ready word streams (a word moves in a cycle where
both valid and ready are high):

* `tx_valid`, `tx_ready`, `tx_data`: the agent writes packets, always whole
  packets of 11 words, word 0 first;
* `rx_valid`, `rx_ready`, `rx_data`: the agent reads delivered packets; word
  boundaries between packets are found by counting to 11.

An agent may hold `rx_ready` low as long as it likes; the network then stops
delivering to it, and traffic for it waits in the network.

## The hierarchical bus

### Structure

```
 a0  a1  a2  a3          a4  a5  a6  a7
 w0  w1  w2  w3          w4  w5  w6  w7
 |   |   |   |           |   |   |   |
 ==== segment 0 ==== b0 ==== segment 1 ==== b1 ==== segment 2 ...
```

Agent i is on segment i / 4 through its own `bus_wrapper` (two packet FIFOs,
transmit and receive, plus a control unit). A `bus_bridge` is simply two
wrappers back to back: the lower side takes every packet for an agent above
the bridge, the upper side every packet for an agent below it, and each
side's receive FIFO feeds the other side's transmit FIFO. A packet therefore
hops from segment to segment along the chain. With SEG_AGENTS = N_AGENTS
the same module is a single flat bus.

There are no tri-state lines: every master drives zeros on the lines it does
not use and `bus_or_resolver` ORs all masters' copies into the segment value.

### Segment lines

| line | driven by | meaning |
|------|-----------|---------|
| `av` | owner | address valid: the owner offers header word 0 on `data` |
| `data[31:0]` | owner | header or payload word |
| `ack` | receiver | "that destination is mine and I have room for the whole packet" |
| `dv` | owner | a word is transferred this cycle |
| `last` | owner | this is the packet's last word |

`av`, `last` and `data` never depend on `ack`, and are ORed in a separate
resolver from `ack` and `dv`, so the combinational path owner -> receiver ->
owner inside a cycle is not a loop.

### Distributed round-robin ownership (the subtle part)

There is no central arbiter. Every master on a segment (its agents first,
then the bridge side towards the lower segment, then the one towards the
upper segment) holds its own copy of an `owner` counter, reset to 0, and all
copies advance together because they are computed from the same resolved
lines:

* after a cycle with `dv` and `last` (a packet ended), or
* after a cycle with neither `dv` nor a packet in progress (the owner did not
  start one).

So ownership moves on after every packet, and a master with nothing to send
costs its segment one idle cycle. A segment cycle looks like this:

```
cycle      t      t+1    t+2 ... t+10   t+11
owner      k      k      k       k      k+1       (every master's copy)
av         1      0      0       0      ...
ack        1      -      -       -
dv         1      1      1       1
last       0      0      0       1
data       w0     w1     w2      w10
```

In cycle t the owner has a whole packet in its transmit FIFO, raises `av`
and shows the destination; the wrapper whose address range holds it raises
`ack` in the same cycle if its receive FIFO is empty enough for 11 words; the
owner sees `ack`, raises `dv`, and the header word is taken. Ten more words
follow back to back. If nobody acknowledges (the receiver is full) the owner
simply loses its turn and tries again when ownership comes back, which also
keeps a full receiver from blocking the segment. A packet thus takes 11
cycles on a segment after ownership reaches its sender, and a sender waits at
most one round (up to six masters) for its turn.

### Crossing a bridge

The bridge side that acknowledged a packet copies it word by word into the
other side's transmit FIFO as it arrives; once all 11 words are there (the
earliest is one or two cycles after the last word crossed the first
segment) it is sent on the next segment in that side's turn. Both directions
of a bridge work independently, and all segments run in parallel, which is
where the hierarchical bus gains over a single bus.

## The mesh

### Router

```
            North in  ^ North out
                  [F] |
 West out <--         Control &        <-- [F] East in
 West in  -->[F]      switching         --> East out
                  [F] |
            South in  v South out
      Agent in -->[F]   [F]--> Agent out
```

`mesh_router` has input FIFOs for North, East, South, West and the agent, and
an output FIFO towards the agent: six one-packet buffers. The links to the
neighbours are unbuffered and write straight into the neighbour's input FIFO.
A link is a word with a valid flag one way (`link_t`) and a `room` flag the
other way.

Router (r, c) of a ROWS x COLS mesh serves agent r * COLS + c; row 0 is the
North edge, column 0 the West edge.

### Scanning, routing, switching

A pointer visits one input per clock cycle (N, E, S, W, agent, N, ...), so a
new packet waits 5/2 cycles on average for its turn. When the visited input
is not already being forwarded and holds a whole packet, its destination is
routed **row first**: North or South until the row matches, then East or
West until the column matches, then to the agent. This dimension order keeps
the mesh free of deadlock. If that output is free and the buffer behind it has
room, the input is connected to it and, from the next cycle, the 11 words
move one per cycle; input and output are then released. Up to five
connections can be active in one router at once. An input that cannot go
(output busy, no room) waits for its next turn.

### The room flag

`room_out[d]` tells the upstream neighbour that input FIFO d can take a
packet. It is high when the FIFO has space for 11 words **or when the FIFO
is being forwarded**. A granted connection never stalls (a link cannot refuse
a word, and the agent output FIFO is only granted with room for all 11), so a
FIFO being forwarded loses one word per cycle and may be refilled at the same
rate. Without this, one-packet buffers would let only every second packet
slot of a link be used. Forwarding still starts only when a whole packet is
in a FIFO. This rule is this design's choice.

## Timing at a glance

| path | cycles |
|------|--------|
| packet over one bus segment | 11, after waiting at most one ownership round |
| idle bus master | 1 per round |
| packet over a bridge | store-and-forward: starts on the next segment no earlier than after its last word crossed the first one |
| mesh hop | 1 (grant) + 11, after waiting 0-4 cycles for the scan pointer |
| a stream of packets through the mesh | about one packet per 13-17 cycles on a path |

Measured with the testbenches (cycles from start to the last word delivered):

| traffic | hierarchical bus | mesh |
|---------|-----------------:|-----:|
| all-to-all, one packet per pair, 8 agents | 614 | 347 |
| all-to-all, one packet per pair, 36 agents (default size) | 12116 | 2733 |

### The benchmark test cases

`tb_workload` runs the benchmark's five synthetic applications on both
networks at the four system sizes of the study. Every agent hosts one
computation process per test case; a process waits for a whole transfer of
D = 1024 words (128 packets) from its predecessor, computes for P = 16 cycles
and sends D words to its successor. Each process fires once here. The
process graphs are rings, with agent i feeding agent i + 1:

| case | ring | start tokens (S) | character |
|------|------|-----------------|-----------|
| 1 | all agents | 1 | sequential |
| 2 | all agents | N/2 | pipelined version of 1 |
| 3 | each group of four consecutive agents | N/4 | sequential, local |
| 4 | each group of four | N | parallel, local |
| 5 | cases 1-4 at once, one process of each per agent | 7N/4 + 1 | mixed |

Execution time in cycles, hierarchical bus / mesh (mesh speedup):

| agents | case 1 | case 2 | case 3 | case 4 | case 5 |
|-------:|--------|--------|--------|--------|--------|
| 4  | 7269 / 8470 (0.86) | 6167 / 4525 (1.36) | 7269 / 8470 (0.86) | 5619 / 2565 (2.19) | 23605 / 14190 (1.66) |
| 16 | 32443 / 34015 (0.95) | 9221 / 4525 (2.04) | 8281 / 8440 (0.98) | 5873 / 2560 (2.29) | 48073 / 36575 (1.31) |
| 36 | 73993 / 74735 (0.99) | 9219 / 4525 (2.04) | 8281 / 9155 (0.90) | 5873 / 5105 (1.15) | 89623 / 78865 (1.14) |
| 64 | 132163 / 131255 (1.01) | 9229 / 4525 (2.04) | 8281 / 8440 (0.98) | 5873 / 2560 (2.29) | 147793 / 131255 (1.13) |

As in the study, the bus and the mesh are close on the sequential cases 1
and 3, and the mesh is about twice as fast on the parallel cases 2 and 4. The
testbench also prints the closed-form estimate
t = sum(P) / min(N, S) + sum(D k) / min(N, L, S), with L the number of links
(N/4 for the bus, 4(N - sqrt N) for the mesh) and k = (8 + 3 + a) / 8 for
an arbitration cost a of 6 cycles (bus) or 2.5 (mesh). It comes within
about 20% on the sequential cases, but is off by up to a factor of three
elsewhere (mesh, case 4, 36 agents), since it ignores how the processes are
placed.

Two things make these numbers differ from the study's own. Agents are
mapped in index order (row-major in the mesh), not laid out so that ring
neighbours are mesh neighbours: a ring step from the end of one mesh row to
the start of the next costs several hops, which is why the mesh loses on case
1 with four agents and on case 4 with 36 agents (groups of four straddle
rows of six). And the iteration count and traffic generator of the study are
not reproduced, so only ratios are comparable.

## Files

`rtl/`

| file | content |
|------|---------|
| `noc_pkg.sv` | word and packet sizes, `link_t`, `bus_req_t`, direction encoding |
| `packet_fifo.sv` | one-packet FIFO with fill level |
| `bus_or_resolver.sv` | OR resolution of a group of bus lines |
| `bus_wrapper.sv` | agent-to-segment wrapper: FIFOs, round-robin, address decode |
| `bus_bridge.sv` | two wrappers back to back |
| `hier_bus.sv` | the chain of segments (`N_AGENTS`, `SEG_AGENTS`) |
| `mesh_router.sv` | store-and-forward router (`ROWS`, `COLS`, `MY_ROW`, `MY_COL`) |
| `mesh.sv` | ROWS x COLS mesh |
| `noc_top.sv` | both networks side by side (`MESH_ROWS`, `MESH_COLS`, `SEG_AGENTS`) |

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), the
full-size end-to-end test `tb_noc_top_full.sv`, the test-case run
`tb_workload.sv` (with `tb_workload_run.sv`, one system size), and two behavioural agents: `tb_agent_model.sv` (sends a
fixed pattern of packets and checks everything it receives) and
`tb_tg_agent.sv` (runs the test-case process graphs). Every testbench prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/noc_pkg.sv \
    tb/tb_noc_top.sv --top-module tb_noc_top -Mdir obj_tb
obj_tb/Vtb_noc_top
```

Replace `tb_noc_top` by any other testbench (`tb_workload`, with its four
system sizes, takes several minutes to compile). `tb_noc_top` runs 8 agents and
counts, and requires at least once, every mechanism: idle ownership passes,
refused headers, bridge crossings in both directions, parallel segments,
waits on busy outputs and on missing room, local delivery, parallel router
outputs and hops in all four directions. `tb_noc_top_full` does the same at
the default 36 agents. The design uses two-state logic only and resets
everything that is read.

Assertions in the RTL check the protocols: one owner and one acknowledging
receiver per segment, packets sent back to back, no FIFO written when full or
read when empty, and no packet routed off the edge of the mesh.

## Changing it

* System size: `noc_top #(.MESH_ROWS(r), .MESH_COLS(c))`; the agent count
  r * c must be a multiple of `SEG_AGENTS`. The benchmark sizes are 4, 16, 36
  and 64 agents.
* Segment size: `SEG_AGENTS` (four keeps the bus lines short; equal to the
  agent count it gives a single bus).
* Packet format: `HDR_WORDS`, `PAY_WORDS` and `WORD_W` in `noc_pkg`.
* Deeper buffers: the `DEPTH` parameter of `bus_wrapper` and `mesh_router`
  (default one packet).

## Limits and departures

* The signal-level handshakes (bus `av`/`ack`/`dv`/`last`, the mesh `room`
  flag, the agent valid-ready streams), the header layout, the reset and the
  round-robin order on a segment are this design's own; the study gives the
  policies but not the signals.
* Destinations must be valid agent indices; the networks do not check them
  beyond an assertion at the mesh edge.
* A bus receiver acknowledges only with room for a whole packet, so an agent
  that reads slowly makes senders lose turns instead of blocking the segment.
* The study's agents are processors replaced by a traffic generator; neither
  is part of this RTL. The behavioural agents in `tb/` stand in for them.
* Area and clock frequency were not evaluated here. Storage dominates both
  networks: at 36 agents the bus has 104 one-packet buffers (two per wrapper,
  four per bridge) and the mesh 216 (six per router, of which the 24 on the
  mesh edge never receive anything and are removed by synthesis): 36.6 and
  67.6 kbit of buffer storage.
