# Self-reconfiguring mesh NoC with local rerouting

A 2-D mesh network on chip that keeps delivering packets when some of its
links are broken. Nothing is configured by hand. First, an offline test
session has every switch find out which of its ports work. Then each switch
routes packets around its dead ports, using a handful of local rules and no
global routing table. Packets that the local rules send round in circles are
caught by a per-switch packet history: when a switch sees the same packet for
the fifth time, it floods that packet instead of routing it. The copies reach
the destination if any fault-free path to it exists.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). The default
instance is a 10 x 10 mesh of 100 switches.

## The mesh

```
 y
 ^   (0,2)-(1,2)-(2,2)         switch (x,y) = index y*MESH_W + x
 |     |     |     |           every line is two valid/ready links,
 |   (0,1)-(1,1)-(2,1)         one in each direction, one packet wide
 |     |     |     |
 |   (0,0)-(1,0)-(2,0)
 |    PI          PO
 +-----------------------> x
```

Each switch has five ports: north, east, south, west and a local port to its
processor. The processor is not part of this RTL, so every local port is
brought out of `noc_mesh` (`pe_in_*` and `pe_out_*`). PI is switch (0,0),
bottom-left, where the test session starts. PO is switch (MESH_W-1,0),
bottom-right. Links that would leave the mesh are tied off: nothing arrives
on them and anything sent into them is lost. So a port on the mesh edge looks
exactly like a broken port, and the test session finds it faulty with no
special case.

**Fault model.** A faulty port drops every packet, in both directions.
`port_fault[i][p]` injects this fault on port `p` of switch `i`. A dead
switch is one with all five ports faulty.

## Finding the faulty ports: the test session

After reset, and at the start of every session, each switch suspects all
four of its neighbour ports to be faulty. A port is marked fault-free only
when an acknowledgement comes back through it. An acknowledgement proves that
a packet left through that port and that an answer came back.

1. A pulse on `start_test` puts every switch in test mode and clears all port
   status (`test_controller`, states CLEAR then INJECT).
2. The controller hands one test packet to PI's local input.
3. When a switch receives a test packet on port `p`, it queues an
   acknowledgement back out of `p`. On the **first** test packet of the
   session only, it also copies the packet to all four neighbour ports,
   including `p`, and to its processor. Later test packets are only
   acknowledged.
4. When an acknowledgement arrives on port `p`, the switch sets `port_ok[p]`.
   Acknowledgements are never forwarded.
5. When no switch has held a packet or a pending acknowledgement for
   `QUIET_CYCLES` cycles, the controller ends the session and raises
   `test_done`. `test_reached_po` reports whether PO's processor got a copy
   of the test packet.

Two details make this work:

- The test packet is copied back through the port it arrived on. That
  neighbour then acknowledges it, so the receiving side of every link gets
  tested as well.
- Each switch floods only once. So each direction of each link carries at
  most one test packet and one acknowledgement, the session always ends, and
  a 2-entry input FIFO can never block it.

Ports of switches that PI cannot reach stay marked faulty, because they
cannot be tested.

On the 10 x 10 mesh a session takes about 45 clock cycles.

## Routing around faults: the local rules

`reroute_unit` decides what happens to the data packet at the head of the
selected input. The rules apply in this order:

| # | condition | action | event |
|---|-----------|--------|-------|
| 1 | destination is this switch | hand it to the local port | `deliver` |
| 2 | no usable neighbour port | drop it | `drop` |
| 3 | exactly one usable neighbour port | send it there, even back where it came from | `rt_single` |
| 4 | otherwise, treat the incoming port as unusable, then: | | `rt_excl_in` if that port was usable |
| 4a | history requests flooding | copy it to every remaining usable port | `flood_start` / `flood_fwd` |
| 4b | the XY direction (x first, then y) is usable | take it | `rt_normal` |
| 4c | else | take a random remaining usable port | `rt_random` |

The random choice comes from a 16-bit LFSR per switch, seeded differently in
every switch. The rule starts at neighbour port `1 + rnd[1:0]` and takes the
first usable port it meets.

### A worked example

On a 3 x 3 mesh, switches (1,1) and (2,1) are dead. A packet goes from (0,0)
to (2,2). It takes the path

```
(0,0) -XY-> (1,0) -XY-> (2,0) -only port-> (1,0) -not back-> (0,0)
      -not back-> (0,1) -east dead, so random-> (0,2) -XY-> (1,2) -XY-> (2,2)
```

`tb_noc_mesh` checks exactly this sequence of hops and rules.

### Loops and flooding

The local rules cannot always escape a cycle. An example: four switches form
a ring, and the only exit leaves from a switch whose random choice keeps
picking the ring. To catch such packets, each switch keeps a `packet_history`
table with 8 entries. The table is keyed by a packet's source coordinates and
sequence number, and it counts how often the switch has handled that packet.
The injection at the source switch counts as an encounter.

On the fifth encounter, the switch floods the packet instead of routing it.
Flooding copies the packet to every usable port except the incoming one, and
sets the packet's `flood` bit. A switch that receives a copy with the flood
bit set forwards it once, the same way, and records in its history that it
did. Any later copy of that packet is dropped. So every copy dies after
visiting each reachable switch at most once. The destination switch delivers
the first copy and drops the others, so each packet arrives exactly once. A
packet whose destination cannot be reached is flooded too and then dies out,
so no traffic circulates for ever.

## Inside a switch (`noc_switch`)

```
in[p] -> pkt_fifo (2) --+                        +-> out reg[L] -> processor
 (x5)                   |   round-robin arbiter  +-> out reg[N] -> neighbour
                        +-> one head per cycle --+-> out reg[E]
   port_status ---------+-> reroute_unit         +-> out reg[S]
   packet_history ------+   + test/ack logic     +-> out reg[W]
   lfsr16 --------------+      ack pending[p] ---^
```

- **One decision per cycle.** The arbiter picks the next non-empty input FIFO
  in round-robin order. The head packet moves when every output it needs is
  free in that cycle. A flooded packet needs several outputs at once.
- **The arbiter never waits.** Its pointer moves on every cycle, so a head
  packet that cannot move does not block the other inputs.
- **One-entry output registers.** Each output holds one packet and presents
  it on a valid/ready link.
- **Acknowledgements.** An acknowledgement waits in a pending bit for its
  port. It takes the output register in a cycle when no routed packet claims
  that register.
- **Latency.** A packet written into an input FIFO at clock edge *n* leaves
  the output register on edge *n+2*, if nothing blocks it. One hop therefore
  costs two clocks.
- **Wrong mode.** Data packets that arrive during a test session are dropped.
  So are test and acknowledgement packets that arrive outside one.
- **Avoiding a port that works.** `link_off[p]` makes the router avoid a port
  that tested good, for example to steer traffic around a congested link.

`ev` reports one pulse per cycle for each event kind (see `sw_event_t` in
`noc_pkg`). The testbenches use these pulses to trace paths and to check
that every mechanism happened.

## Packet format (`noc_pkg::pkt_t`, 51 bits)

| field | bits | meaning |
|-------|------|---------|
| `ptype` | 2 | `PKT_DATA`, `PKT_TEST`, `PKT_ACK` |
| `flood` | 1 | copy made by flooding |
| `src_x`, `src_y` | 4 + 4 | source switch |
| `dst_x`, `dst_y` | 4 + 4 | destination switch |
| `seq` | 8 | sequence number (with the source, the history key) |
| `payload` | 16 | data |

A packet is a single word and crosses a link in one cycle. The 4-bit
coordinates allow meshes of up to 16 x 16.

## Parameters

| module | parameter | default | origin |
|--------|-----------|---------|--------|
| `noc_mesh` | `MESH_W`, `MESH_H` | 10, 10 | largest size evaluated for this scheme (100 switches); square shape chosen here |
| `noc_mesh`, `noc_switch`, `packet_history` | `FLOOD_THRESHOLD` / `THRESHOLD` | 5 | from the scheme |
| `noc_mesh`, `noc_switch`, `pkt_fifo` | `FIFO_DEPTH` / `DEPTH` | 2 | this design |
| `noc_mesh`, `noc_switch`, `packet_history` | `HIST_DEPTH` / `DEPTH` | 8 | this design |
| `test_controller` | `QUIET_CYCLES` | 2 | this design |
| `noc_switch` | `MY_X`, `MY_Y`, `LFSR_SEED` | set by `noc_mesh` | |

## What follows the scheme and what is this design's own

These parts follow the scheme:

- the five ports per switch;
- PI and PO at the two bottom corners;
- the drop-everything port fault model;
- all ports suspected faulty until an acknowledgement arrives;
- acknowledging a test packet, flooding it and copying it to the processor;
- ending the session when no test or acknowledgement packet is travelling;
- the four routing rules and XY as the normal direction;
- flooding on the fifth encounter;
- using "mark a link faulty" to avoid congestion.

These parts are this design's own:

- the packet format and all widths;
- the valid/ready links and FIFO depth;
- copying the test packet back through its incoming port;
- flooding the test packet only once;
- the global idle detection that ends the session;
- the arbitration;
- the LFSR and its search order for the random choice;
- the history size, replacement policy and key;
- suppressing duplicate flooded copies;
- dropping packets that arrive in the wrong mode;
- dropping a packet that has no usable port.

### Limits

- The scheme was first evaluated as a transaction-level model. This RTL is
  one way to build it in hardware, not a reproduction of that model.
- **No deadlock avoidance.** The links use plain back-pressure, with no
  virtual channels or escape paths. Under heavy traffic, a cycle of full
  buffers can deadlock the mesh. The testbenches send one data packet at a
  time.
- **History overflow.** With many packets in flight, the 8-entry history can
  forget a packet before it is flooded, or after. If it forgets a packet
  before the fifth encounter, the switch may flood it late. If it forgets a
  packet it has already flooded, the switch forwards that packet's copies
  again.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_reroute_unit` compares every combination on a 3 x 3 grid of positions
  against a reference model: destination, incoming port, port status, flood
  request and random value (51,840 cases). It also replays the four
  single-switch rule cases and every hop of the worked example.
- `tb_packet_history` checks flooding on exactly the fifth encounter,
  duplicate suppression, replacement and clear.
- `tb_port_status`, `tb_pkt_fifo` and `tb_test_controller` check their blocks
  directly. The FIFO test uses random traffic against a queue model.
- `tb_noc_switch` checks a single switch at (1,1), with its neighbours played
  by the testbench: the test session, the routing rules, the two-clock
  latency, back-pressure, flooding and the dropping of copies.
- `tb_noc_mesh` runs a 3 x 3 mesh end to end:
  - the worked example, hop by hop;
  - a packet sent to a dead switch, which must be flooded and then die out;
  - a ring closed with `link_off`, where a packet must circle until its fifth
    encounter and then be flooded;
  - 100 packets through the ring with its exit open, each of which must
    arrive exactly once (about a third of them need flooding).

  It also checks that every event kind occurs at least once.
- `tb_noc_mesh_full` runs the default 10 x 10 mesh with 25 % random port
  faults. It checks all 400 port statuses against the fault map. It then
  sends 150 packets between random pairs. Each reachable packet must arrive
  exactly once with its payload intact, and no unreachable one may arrive.

To run one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -o sim --top-module tb_noc_mesh \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/noc_pkg.sv tb/tb_noc_mesh.sv
./obj_dir/sim
```

Replace `tb_noc_mesh` with any other testbench name. Every testbench runs in
a few seconds; the full-size one needs about 2 s of simulation.
