# A circuit switch for 10GBASE-T Ethernet

This RTL models a **circuit-switched** interconnect for hosts that talk 10GBASE-T over
CAT6a cable. A packet switch stores and forwards frames. This switch does not buffer the
data at all. A host first asks for a connection. A small control plane settles any
contention and answers. It then closes an analog crosspoint that joins the two cables,
and the Ethernet symbols flow straight through in both directions until the
requesting host sends a disconnect.

The control signalling shares the data wires. A host sends short pulses called
**primitives** on the same pairs that later carry its Ethernet symbols. A set of
tri-state switches on each cable decides whether those wires currently face the
control plane or the crosspoint array.

The switch is built from:

* one **tri-state switch** per host cable (segment);
* a **control plane** (CP) with, per segment, a primitive interface, a routing
  demultiplexer tree, a contention-resolution multiplexer tree and a CTS/CC
  multiplexer;
* four **physical planes** (PP), one per wire pair DA, DB, DC and DD. Each is a
  triangular crossbar with one crosspoint per pair of segments.

The default size is 4 segments (`N = 4`). Practical switches would be 32 x 32 or larger.
Every block is parameterised by `N`, which must be a power of two and at least 2.

## Primitives

Segment addresses are `log2(N)` bits wide, so at `N = 4` the segments are 00, 01, 10
and 11. A host that wants to reach segment *D* sends an RTS frame, one primitive per
clock cycle:

| Primitive | Meaning |
|---|---|
| `RTS_SOF` | start of the request |
| `RTS_DSA0` / `RTS_DSA1` | destination address, one bit per primitive, most significant bit first |
| `RTS_CR` | contention resolution: claims the path through the contention tree |
| `RTS_CC` | connect command request: asks for the answer |
| `RTS_EOF` | end of the request |

The switch answers with one of:

| Primitive | Meaning |
|---|---|
| `CTS` | clear to send |
| `NCTS` | not clear to send: lost the contention, or the destination is busy |

Towards the crosspoints, the control plane sends **CC** (connect command) on both the
source and the destination segment in the same cycle. The host ends a connection with
**DC** (disconnect command).

Several primitives share one pulse shape, and that sharing is kept here:

| Code | Shared by |
|---|---|
| `P_DSA0` | `RTS_DSA0`, `RTS_CR`, `RTS_CC` |
| `P_CTS` | `CTS`, `CC` |
| `P_NCTS` | `NCTS`, `DC` |

Which one is meant follows from where the code appears (inside an RTS frame or not) and
from who receives it (a host or a crosspoint).

The analog pulse levels on the wires are abstracted. Each segment carries a `line_t`
(`rtl/sw_pkg.sv`) every cycle, with three fields:

* a 3-bit primitive code `prim` (`P_IDLE`, `P_SOF`, `P_DSA0`, `P_DSA1`, `P_EOF`,
  `P_CTS`, `P_NCTS`, `P_DATA`);
* an 8-bit `tag`;
* one 4-bit PAM16 symbol per wire pair, in `sym`.

A crosspoint must close only between the two segments of one connection. Two unrelated
connections can send their CCs in the same cycle, so the two CCs of one connection must
differ from those of another. Every CC carries the destination address in `tag`. A
crosspoint closes when both of its segments show `P_CTS` with the **same tag** in the
same cycle.

## Life of a connection

Take host 01 asking for segment 10 at `N = 4`.

1. **Request.** Host 01 sends `SOF, DSA1, DSA0, CR, CC, EOF`.
2. **Decode.** Its tri-state switch has `HBA_CP_EN` high at rest, so the frame reaches
   primitive interface 01. The primitive interface turns the address primitives into
   `RTS_DSA0`/`RTS_DSA1` impulses, and each of `RTS_CR` and `RTS_CC` into one `RTS_EN`
   impulse.
3. **Routing.** The impulses go down segment 01's demultiplexer tree. It has
   `log2(N)` levels of 2-way nodes. The first address impulse that reaches a node sets
   that node's direction, and later impulses pass through it. After the address
   bits, the `RTS_EN` impulses come out at leaf 10. That leaf is wired to input 01 of
   segment 10's contention tree.
4. **Contention.** Segment 10's contention tree is a tree of 2-input first-come
   first-served contention resolvers, with a CTS/CC generator at its bottom. The
   `RTS_CR` impulse connects each free resolver it reaches to its input. A resolver
   that is already connected marks the late input as the loser.
5. **Answer.**
   * *Win.* The winner's `RTS_CR` arms the generator and its `RTS_CC` fires it. The
     generator sends one CTS impulse back up the winning path. In the same cycle it
     sends a CC impulse to segment 10's own primitive interface.
   * *Lose.* The loser's `RTS_CC` fires the NCTS generator of the resolver where it
     lost. NCTS goes back up only the loser's path.
6. **Drive.** Two primitive interfaces may now drive at once. The source interface
   (01) drives `P_CTS` with tag 10. The destination interface (10) drives `P_CTS`
   with its own address, also 10. While either of them drives, it raises `CP_HBA_EN`
   and `CP_PP_EN` and drops `HBA_CP_EN`. The primitive therefore goes to its host and
   into all four physical planes.
7. **Close.** In every plane, crosspoint (01,10) sees identical CCs on both sides and
   closes on the next clock edge. Host 01 has its CTS and starts sending `P_DATA`
   symbols. Those symbols pass through the closed crosspoint to host 10, and host
   10's symbols pass back. No register sits on the data path.
8. **Release.** Host 01 sends DC:
   * The crosspoint sees it and opens.
   * Primitive interface 01 sees the same DC outside an RTS frame. It sends a release
     impulse to every contention tree. Only the tree held by source 01, here segment
     10's, frees its resolvers.

### What is held, and for how long

Routing state and contention state live for different times. This is the subtle part of
the design.

* **Demultiplexer nodes** hold their direction only while the request is in flight. A
  returning CTS or NCTS clears every node it passes.
* **Contention resolvers on the winning path** stay connected after the CTS. They stay
  connected for the whole connection, until the source's DC.
  * That hold is how a busy destination is refused. A later request for the same
    destination finds the top resolver taken. It loses, and gets NCTS just as if it
    had lost a race.
* **A loser** is remembered only until its `RTS_CC` fires the NCTS generator.
* **The NCTS impulse** is also driven into the physical planes. The shared pulse shape
  makes it a DC there, so it opens any crosspoint on the loser's segment.

### Ties

"First come" is decided per clock cycle. When two requests reach a free resolver in the
same cycle, the lower-numbered input wins. In the contention tree's numbering, that is
the lower source address.

### CTS/CC contention on one segment

One segment can get two answers in the same cycle: its own CTS/NCTS as a source, and a CC
as somebody's destination. The CTS/CC multiplexer passes one of them and holds the other
for a cycle.

The order is:

1. an answer already held from an earlier cycle;
2. the segment's own CTS/NCTS;
3. a CC for the segment as a destination.

The delayed CC then no longer coincides with the CC on the other segment, so that
crosspoint does not close. See the limitations below.

## Timing

All state is clocked by one clock, with an active-low synchronous reset. One primitive
or one PAM16 symbol per pair moves per cycle.

| Event | Cycles |
|---|---|
| Request to answer. The edge that puts `RTS_SOF` on the line to the edge where the host can sample CTS/NCTS | `log2(N) + 6`, so 8 at `N = 4` |
| Crosspoint switching. After the CC (or DC) cycle | 1 edge |
| Data through a closed crosspoint | 0 (combinational) |

The request-to-answer count is made up of:

* the `log2(N) + 3` primitives up to `RTS_CC`;
* three registered stages: primitive interface decode, generator, primitive interface
  drive.

Pulses from the CTS/CC generator and the NCTS generators are `WIDTH` cycles long
(`rtl/pulse_gen.sv`, default 1).

## Modules

| File | Role |
|---|---|
| `sw_pkg.sv` | primitive codes, line structs, the forward (`dsa0`, `dsa1`, `en`) and backward (`cts`, `ncts`) impulse structs |
| `switch_plane.sv` | top: N tri-state switches, the control plane, 4 physical planes |
| `tristate_switch.sv` | gates the host, CP and PP directions of one segment with `HBA_CP_EN`, `CP_HBA_EN`, `CP_PP_EN`, `HBA_PP_EN` |
| `control_plane.sv` | per segment: primitive interface, demux tree, contention tree, CTS/CC multiplexer; wires leaf *d* of source *s* to input *s* of tree *d* |
| `primitive_interface.sv` | RTS decoder and primitive driver; generates the four enables |
| `demux_tree.sv`, `demux_node.sv` | routing tree, one address bit per level |
| `mux_tree.sv`, `cr_node.sv` | FCFS contention tree with NCTS generators and the CTS/CC generator |
| `pulse_gen.sv` | edge-triggered impulse generator (delay line and AND gate in spirit) |
| `cts_cc_mux.sv` | serialises CTS/NCTS and CC arriving at one segment |
| `physical_plane.sv` | triangular crossbar of `N(N-1)/2` crosspoints for one wire pair |
| `cross_point.sv` | CC/DC detection and the switch for one pair of segments |

Each file opens with a comment giving its interface, timing, and which choices are this
design's own.

## Departures and choices

These points are not fixed by the architecture and were chosen here:

* **Digital abstraction.**
  * The primitive sense amplifiers and the CMOS pi-switches are analog. Here they are a
    primitive code on a bus and a gated copy of that bus.
  * Termination of an open line is not modelled; an open path shows `P_IDLE`.
  * Nanosecond figures of the analog circuit have no counterpart in the RTL; only
    cycle counts are meaningful.
* **Distinguishable CCs.** The CC carries the destination address as a tag.
* **`HBA_PP_EN`** is driven as the complement of `CP_PP_EN`.
* **DC detection in the CP.** The primitive interface, not the crosspoint, tells the
  control plane that a connection ended. It broadcasts a release to every contention
  tree.
* **A DC on either side opens a crosspoint.** When the crosspoint is closed, both sides
  carry it anyway.
* **Ties** go to the lower input.
* **RTS frames.**
  * An `RTS_SOF` restarts a frame at any point, and `RTS_EOF` ends it.
  * A DC inside a frame is ignored.
  * `HBA_CP_EN` is high at rest, so a host's `P_DATA` symbols also reach its primitive
    interface, which ignores them.
* **Four planes** are all driven with the same primitives. The primitive a host
  receives is taken from plane DA.

## Limitations

* **A destination that is itself a source is not refused.** The control plane only
  knows a segment is busy as a destination. Suppose host B has a connection of its own
  and host A asks for B. Then:
  * A's tree to B is free, so A gets CTS.
  * B's CC can collide with B's own traffic in the CTS/CC multiplexer. If it does, the
    crosspoint does not close.
  * A then holds a CTS with no path.

  Hosts should not address a segment that is busy as a source. The end-to-end test
  provokes this case once on purpose and checks that the crosspoint stays open.
* **No host-side logic.** Host adapters (PCIe, MAC, PHY, address tables) and the
  discovery handshake that tells hosts the segment addresses are outside this RTL.
  `tb/hba_model.sv` is a small behavioural host used by the tests.
* **Duplicate closures.** Nothing in the physical plane stops two closed crosspoints on
  one segment. If that happens, the segment receives from its lowest-numbered peer.

## Simulation

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=<n> failures=<m>` and has a cycle-count watchdog. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb --top-module tb_switch_plane \
  rtl/sw_pkg.sv tb/tb_switch_plane.sv -Mdir obj_tb_switch_plane -o sim
obj_tb_switch_plane/sim
```

Replace `tb_switch_plane` with any other testbench in `tb/`. The other modules are found
by file name through `-I`.

### End-to-end test

`tb_switch_plane` runs the top at its default size (`N = 4`) with four behavioural hosts.
Its phases are:

* the contention example: 11 and 01 both ask for 10, and 11 asks first;
* a request to a busy destination;
* a same-cycle tie;
* two connections closing in the same cycle;
* release and re-use;
* 200 random rounds;
* a forced CTS/CC collision.

For every closed connection it checks:

* the crosspoint state in all four planes;
* the answer latency;
* the symbols on every pair in both directions.

It counts how often each mechanism happened and fails if one never did. The mechanisms
are grants, NCTS for a lost race, NCTS for a busy destination, ties, simultaneous
closings, release, data, full duplex, and CTS/CC contention.

### Block tests

The block tests override `N` to exercise deeper trees:

| Testbench | Size and stimulus |
|---|---|
| `tb_demux_tree`, `tb_mux_tree`, `tb_primitive_interface`, `tb_control_plane` | `N = 8`, random requests against a reference model |
| `tb_physical_plane` | `N = 6`, random CC/DC traffic against a reference model |
| `tb_cross_point`, `tb_tristate_switch`, `tb_cts_cc_mux` | random stimulus against a reference model |
| `tb_pulse_gen` | pulse width and retriggering |

The block tests take the address width from their local `N`. They have also been run
with `N` set to 32, and all pass. That covers `tb_control_plane`, `tb_demux_tree`,
`tb_mux_tree`, `tb_primitive_interface` and `tb_physical_plane`. The end-to-end test's
scripted phases assume four segments.

To build a larger switch, override `N` on `switch_plane`, for example `#(.N(32))`. The
address width, tree depths and crosspoint count follow from it. `NPAIR`, `SYM_W` and
`TAG_W` are package constants. `TAG_W` must hold `log2(N)` bits.
