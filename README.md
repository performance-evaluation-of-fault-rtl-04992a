# Fault-tolerant networks on chip: an adaptive mesh and a butterfly fat tree with spares

Permanent faults in a network on chip can cut a switch or a link out of the
fabric. This RTL contains two 64-IP wormhole networks that keep delivering
packets when that happens, each with a different approach:

* **Mesh with adaptive routing.** This is an 8 x 8 mesh. Its switches route
  with a fault-tolerant *negative-first* turn model: a packet may go further
  west or south than its destination to get around a dead switch or link,
  then turn back. A second routing unit, the *odd-even* turn model, can be
  selected by parameter.
* **Butterfly fat tree (BFT) with spare hardware.** Routing stays plain
  least-common-ancestor (LCA). Fault tolerance comes from extra hardware
  instead: every block of 16 IPs gets two spare switches, S1 and S2, and a
  crossbar that lets S1 reach any of the 16 IPs.

Both networks sit side by side in `ft_noc_top`. Each has its own ports and
its own fault inputs.

## Flits, packets and handshakes

* A packet is a sequence of flits, each a `noc_pkg::flit_t`: `head`, `tail`
  and 32 data bits.
* The head flit carries the destination IP id in bits 5:0 and the source id
  in bits 11:6. The other data bits are free.
* Packets of any length work, including one-flit packets with both flags set.
  The testbenches use 16 flits.
* Every channel is valid/ready. A flit moves on a clock edge when both are
  high.
* Reset is asynchronous and active low.

## The wormhole switch (`wh_switch`, `flit_fifo`)

Both networks use the same switch core:

* **Buffers.** Each input has a 2-flit FIFO.
* **Routing.** When a head flit reaches the front of an input that holds no
  path, the attached routing unit returns two output masks:
  * `route_pref`: the outputs the flit wants;
  * `route_alt`: fallbacks, used only when no wanted output is free.
* **Allocation.** The allocator serves inputs in round-robin order. Each
  waiting head gets the lowest-numbered free output from its masks.
* **Paths.** The input-to-output path is then held until the tail flit has
  left. Flits behind a blocked head wait in place, which is the wormhole
  backpressure.

**Timing:**

* A head written into a buffer at edge E0 is allocated at E1 and leaves at
  E2, so each switch adds 2 cycles.
* Body flits then stream at one flit per cycle.
* One mesh hop therefore costs 2 cycles. A corner-to-corner packet (14 hops
  plus injection) shows its head after 30 cycles and its tail 15 cycles
  later. `tb_mesh_noc` checks exactly this.

## Mesh (`route_nf`, `route_oe`, `mesh_router`, `mesh_noc`)

**Layout**

* Node `y*8+x` sits at column x, row y.
* Ports: 0 local, 1 north (y+1), 2 east (x+1), 3 south (y-1), 4 west (x-1).
* `node_fault[n]` kills a switch together with its IP.
* `hlink_fault[y*7+x]` kills the link between (x,y) and (x+1,y).
* `vlink_fault[y*8+x]` kills the link between (x,y) and (x,y+1).
* A dead link or switch carries nothing. Each switch sees only whether its own
  four neighbour links are usable (`link_ok`).

**Negative-first (default)**

This unit is the hardest part of the mesh. It works in two phases.

1. **Negative phase.** While either offset is negative, the packet moves
   west or south.
   * It prefers a hop that does not land on a west or south edge.
   * If both productive negative hops are blocked, it goes further west or
     south than the destination.
   * If no negative hop exists at all, it takes one hop perpendicular, as
     described for packets running along the edge.
2. **Positive phase.** Once both offsets are zero or positive, the packet
   moves east or north.
   * It prefers the hop that keeps both offsets non-zero, which keeps two
     options open.
   * If the productive hops are blocked, it steps sideways (west or south)
     and re-enters the negative phase from a new row or column.

A move back through the port the packet came in on is only ever a fallback.
Without that rule, a packet next to a fault bounces between two switches.

**Odd-even**

This is the standard odd-even ROUTE function:

* It forbids the east-north and east-south turns in even columns.
* It forbids the north-west and south-west turns in odd columns.

For faults, the unit takes any usable productive move those rules allow. If
there is none, it takes any usable link other than the one the packet came
from.

**Limits, both measured with the testbenches**

* **Deadlock (negative-first).** The sideways steps of the positive phase are
  turns that the turn model forbids. Near a fault, packets can then form a
  cycle and deadlock. With a dead switch in the middle of the mesh and every
  IP sending four 16-flit packets within 4000 cycles, that happened. At half
  that load all packets arrived.
* **Circling (odd-even).** The fallback can send a packet round a group of
  faults for ever. 52 of the 3969 source/destination pairs failed that way on
  the fault map in `tb_route_oe`.
* **Recommendation.** Negative-first is the better of the two, and it is the
  default.

## Fault-tolerant butterfly fat tree (`lca_route`, `bft_switch`, `ft_crossbar`, `ft_bft_cluster`, `ft_bft`)

**LCA routing**

A switch at level l compares bits 5:2l of the source and destination ids:

* If any bit differs, the packet goes up.
* Otherwise it goes down to child `dst[2l-1:2l-2]`.

Going up, either regular parent will do, and the allocator takes whichever is
free. There is only one way down.

**The block of 16 IPs (`ft_bft_cluster`)**

All eight switches in a block are the same `bft_switch`, with five child and
three parent ports:

| Index | Switch | Role |
|---|---|---|
| 0..3 | L1 | Level-1 switches, four IPs each |
| 5, 6 | L2 | Level-2 switches, lead up to level 3 |
| 4 | S1 | Spare level-1 switch. Its four children go to the crossbar. It is the fifth child of L2[0], L2[1] and S2. |
| 7 | S2 | Spare level-2 switch. It is the third parent of every L1 switch and of S1. |

The block recovers from faults in three ways:

* **Dead up links.** An L1 switch whose two regular up links are dead sends
  packets up to S2. S2 then sends them down to the destination's L1 switch,
  or through S1 and the crossbar.
* **Broken way down.** If the link from an L2 switch (or S2) down to the
  wanted L1 switch is dead, or that L1 switch is dead, the switch uses its
  fifth child, S1. S1 hands the packet to the crossbar.
* **Dead L1 switch.** Each IP has a second pair of ports, `ipx_*`, to the
  crossbar. An IP whose L1 switch is dead injects there, and the crossbar
  feeds S1. Choosing the port is up to the IP.

**The crossbar (`ft_crossbar`)**

* **Downward.** Each of S1's four child channels is a multiplexer path. The
  path is bound, for one packet, to the IP named in bits 3:0 of the head's
  destination.
* **Upward.** The crossbar is a demultiplexer. A free channel is given to a
  requesting IP in round-robin order and held until the tail.
* Four packets can cross in each direction at once.

**Whole tree (`ft_bft`)**

* Four blocks, each with a crossbar.
* Four level-3 switches, each with four children and one dummy parent. Up
  port `2s+p` of block c connects to top switch `2s+p`.

**Fault inputs**

| Input | Index | Kills |
|---|---|---|
| `sw_fault` | `8c+i` | Switch i of block c |
| `l1_link_fault` | `8c+2g+s` | Link L1[g]–L2[s] in block c |
| `top_sw_fault` | t | Level-3 switch t |
| `top_link_fault` | `4c+t` | Link from block c to top switch t |

Links to and between the spare switches are assumed good.

**Limits**

* **S2 stays inside its block.** S2 has no parents, so it only carries traffic
  whose destination is in the same block. An L1 switch with both regular up
  links dead can reach only its own block.
* **No spare at level 3.** A dead L2 switch, or a dead top link on the way
  down, is not recovered. The counting formula for the fault-tolerant tree
  implies five level-3 switches for 64 IPs; this RTL has four.
* **IP links.** Faults of the link between an IP and its L1 switch are not
  modelled.

## Where this RTL departs from the design it follows, or fills gaps

| Topic | This RTL |
|---|---|
| Virtual channels | Not used: one 2-flit buffer per input port. |
| Up-link choice | First free parent, rather than a random one. Neither waits while another parent is free. |
| Negative directions | Taken as west and south. One description of negative-first says "west or north" while the worked example uses south and west; the example is followed. |
| Negative-first detours in the positive phase | Own choice, as are the perpendicular edge hop and the back-port rule. |
| Odd-even fault fallback | Own choice. |
| Placement of S1 and S2 | Own reading. S2's lack of parents, the IP's second port pair and the missing level-3 spare are also this design's choices. |
| Mesh shape | 8 x 8 is chosen for the 64 IPs. Flit width is 32 data bits. |
| Baselines | X-Y routing, random walk and the regular BFT are not included. They serve only as comparisons. |

## Simulating

Every testbench in `tb/` is self-checking and ends by printing
`TB_RESULT checks=<n> failures=<n>`. It builds with plain verilator 5. List
the package first:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ft_noc_top \
  rtl/noc_pkg.sv $(ls rtl/*.sv | grep -v noc_pkg) tb/tb_noc_pkg.sv tb/tb_ft_noc_top.sv
./obj_dir/Vtb_ft_noc_top
```

`tb_noc_pkg.sv` holds the shared flit builder and the packet checker `rx_port`.

**What each testbench covers**

| Testbench | Checks |
|---|---|
| `tb_flit_fifo`, `tb_wh_switch`, `tb_bft_switch` | Ordering, backpressure, path holding and the 2-cycle switch latency. |
| `tb_route_nf`, `tb_route_oe`, `tb_lca_route` | The routing functions against reference models, plus random walks on faulty meshes. |
| `tb_mesh_router`, `tb_mesh_noc` | Single-switch behaviour, then the full 8 x 8 mesh: corner-to-corner latency, uniform traffic with both routings, and traffic around a fault map. |
| `tb_ft_crossbar`, `tb_ft_bft_cluster`, `tb_ft_bft` | Channel binding, spare-path use and full-tree traffic with faults. |
| `tb_ft_noc_top` | Runs both networks at full size: fault-free traffic, then traffic with five mesh faults and six BFT faults. It counts injection stalls, mesh detours, crossbar deliveries and injections, and cycles in which S2 forwards, and fails if any of them never happened. It takes about ten seconds. |

To change sizes:

* **Mesh.** Set `MESH_X`/`MESH_Y` on `mesh_noc`. Ids are 6 bits (`ID_W` in
  `noc_pkg`), so at most 64 nodes.
* **BFT.** The tree is fixed at 64 IPs.
