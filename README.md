# Dynamic Virtual Circuits on a 2-D mesh

This is a packet network that routes by connection. Before a source sends data to
a destination, it sets up a *dynamic virtual circuit* (DVC). A circuit
establishment packet (CEP) travels from source to destination and reserves a
small identifier on every link it crosses. These identifiers are *routing
virtual channels* (RVCs). Every switch records, per input RVC, the output port
and output RVC the circuit continues on. A data packet header then needs little
more than its RVC number. Each switch swaps that number at every hop with a
single table lookup, so no routing decision is taken per data packet.

The circuit path is chosen adaptively when it is set up, and any switch may later
tear a circuit down and have it rebuilt on another path. A circuit destruction
packet (CDP) does the tearing down. Packets that are blocked too long leave their
circuit. They take a deadlock-free escape network that uses dimension-order
routing (DOR). This keeps the network deadlock free and lets it adapt to
congestion. Because of it, packets can arrive out of order, and a few sequence
numbers in the headers let the destination restore FIFO order per circuit.

The RTL models an 8 x 8 mesh of 5-port switches (four neighbours plus a host),
with a host interface at every node.

## Packets and links

A packet is a header followed by data phits. The header fields are:

| field | present when | phits |
|---|---|---|
| RVC | always; carries 2 type bits (data / CEP / CDP), a sequence-present bit and a maximum-length bit | 1 |
| DVC id (source, destination) | CEPs, and data packets on the diversion RVC | 1 |
| sequence number | when the sequence-present bit is set | 1 |
| length | data packets shorter than the maximum | 1 |
| data | data packets, 0..31 phits | len |

In the RTL a packet moves as one `pkt_t` struct (`dvc_pkg.sv`). The data phits
are stood for by a 32-bit payload word plus the length. An output link stays
busy for the packet's phit count, given by `pkt_phits()`. This gives the timing
of a phit-serial link without carrying every phit. The receiver sees the packet
in the cycle its first phit leaves, so switching is virtual cut-through: a packet
can be forwarded before its tail has arrived, while buffer space is reserved for
all of it. A maximum-length data packet is 32 phits: one RVC phit and 31 data
phits.

Every link has three *buffering virtual channels* (BVCs), each with its own
ready signal from the receiver:

* **primary**: data packets on their circuits. It goes into a DAMQ
  (dynamically allocated multi-queue) buffer of 2 packet slots, i.e. 64 phits.
* **diversion**: data packets that left their circuit. It goes into a
  one-packet buffer. RVC 0 on every link is reserved for this BVC, so a data
  packet with RVC 0 is a diverted packet.
* **control**: CEPs and CDPs. Storage is 3 entries per RVC plus one
  (25 entries with 8 RVCs).

A sender starts a packet only when the BVC it uses is ready at that moment.
Ready is sampled before the packet is started, so a packet never has to be
refused.

## The switch (`dvc_switch`)

Each of the five inputs has an `input_port`, which holds:

* the **Input Mapping Table** (`imt`), indexed by input RVC. Each entry holds
  the output port, output RVC, source, destination and the sequence number of
  the last packet sent on the circuit. It also holds a state:
  * `FREE`;
  * `MAPPED`;
  * `TORN` (torn down here, but its information is kept for re-establishment).

  Each entry also has a `need_seq` flag and a count of data packets queued
  under that RVC.
* the **DAMQ** (`damq_buffer`). It has one logical queue per output port,
  linked through shared slots. An arriving data packet is looked up in the IMT
  *before* it is stored, so it joins the queue of the port it will leave by.
  This avoids head-of-line blocking between outputs.
* a **single unmapped slot**. A data packet whose RVC is not mapped here waits
  in it until a mapping exists. While the slot is full, the primary BVC is not
  ready, so at most one unmapped packet is held per input.
* the **diversion buffer** and the **control storage** (`pkt_fifo`).

Per output, an `age_arbiter` picks among the inputs' candidates. It gives the
link to the packet that has been in the switch longest, using arrival time
stamps from a free-running counter. Control packets waiting for an output go
ahead of data when the output link is free and the next switch has control
room. An `output_link` then holds the link for the packet's phit count.

### Forwarding and sequence numbers

When a data packet leaves on its circuit, the RVC field is replaced by the
output RVC. The IMT sequence number is incremented: either taken from the
packet, if it has a number, or as the previous number plus one. The packet
carries the number in its header only if it already had one, or if the entry's
`need_seq` flag is set. So most packets carry no sequence number at all.

### Diversion

A queue head blocked for `TIMEOUT` cycles becomes a diversion candidate, and the
oldest candidate of an input is offered to the crossbar. Diversion works as
follows:

* The packet is sent on RVC 0 to the DOR output (`dor_route`: X first, then
  Y, then the host). It needs room in the next diversion buffer.
* Source, destination and the next sequence number from the IMT are added to
  its header.
* `need_seq` is set in the IMT entry. The next packet sent normally on that
  circuit therefore also carries its number, and each switch it passes through
  writes that number into its IMT.
* A diverted packet stays in the diversion network up to its destination.

The diversion network has acyclic buffer dependencies. A packet that is blocked
on its circuit therefore always has a way forward.

## Control: setting up, tearing down, rebuilding (`ctrl_unit`)

This is the subtle part of the design. One control unit per switch handles one
control packet per cycle. It serves the inputs round robin.

**CEP.** The candidate outputs are the host port if the destination is this
node. Otherwise they are the productive (minimal) mesh directions. The CEP takes
the candidate with the most free output RVCs and the lowest free RVC there. It
writes the IMT entry of its input RVC as `MAPPED` (with `need_seq` set) and is
queued for that output with the new RVC. If no candidate has a free RVC, the
unit picks a *victim* on the first candidate and tears it down. A victim is a
mapped entry using that output, with no data packets queued under it, and not
the RVC of a held unmapped packet. Teardown sends a CDP down the victim's path,
frees the output RVC and marks the entry `TORN`. The CEP stays at the head and
takes the freed RVC on a later cycle.

**CDP.** If the entry is mapped, the CDP waits until no data packet of that RVC
is queued, then follows the circuit and frees the entry. Otherwise the entry is
freed and the CDP is dropped. Two ordering rules keep data and control on the
same RVC consistent:

* a data packet counts as mapped only if no control packet for its RVC is
  still waiting at that input;
* a CDP waits while the input holds an unmapped packet of its RVC that arrived
  before it.

Each input counts, per RVC, its control packets that are still waiting. The
unmapped slot also records how many of them arrived ahead of its packet.

**Re-establishment.** An unmapped packet whose entry is `TORN`, with nothing
ahead of it, asks the control unit directly. The control unit then builds a CEP
from the source and destination kept in the entry. This request is served before
ordinary control packets. It remaps the entry and sends the CEP on, after which
the waiting packet follows it through the new path.

## Host interface (`host_if`)

On the sending side, the host interface:

* keeps one circuit per destination. The first packet to a new destination
  sends a CEP first. The following data packets use the same host-link RVC.
* sends the circuit's own sequence number in the header of the circuit's first
  packet.
* releases a circuit when the 7 usable host-link RVCs are all in use. It
  chooses a victim round robin and sends a CDP for it.

On the receiving side, it remembers the source and last sequence number of each
host-link RVC, so that packets without a number get the previous number plus
one. Packets are handed to the host in consecutive order per source. Early
packets wait in a reorder buffer of `ROB_DEPTH` entries.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `MESH_X`, `MESH_Y` | 8, 8 | mesh size (node id = y*8 + x, at most 8 x 8) |
| `NRVC` | 8 | RVCs per link (RVC 0 reserved for diversion) |
| `DAMQ_SLOTS` | 2 | primary buffer in 32-phit packets (64 phits) |
| `DIV_DEPTH` | 1 | diversion buffer in packets |
| `TIMEOUT` | 40 | cycles a queue head waits before it may be diverted |
| `ROB_DEPTH` | 64 | reorder buffer entries per host |

For the 32-phit primary + 32-phit diversion configuration, set `DAMQ_SLOTS=1`.
The diversion buffer is always counted in whole packets.

## Where this design departs from, or adds to, the DVC scheme

* **Flow control on the control BVC.** The DVC scheme sizes the control
  storage so that a control packet can always be stored or else is
  unnecessary and can be dropped. The rule for recognising unnecessary control
  packets is not specified here, so nothing is dropped. Instead, the control
  BVC has a ready signal like the other BVCs. This adds an inter-switch
  dependency the original scheme avoids. No deadlock from it has been seen in
  simulation, but it is not proven free of one.
* **CEP routing.** Minimal adaptive routing, choosing the direction with the
  most free RVCs. The scheme allows any routing, including routing tables.
* **Victim choice, control ordering, `need_seq` on (re)mapping, the unmapped
  slot's ahead count, and the host interface organisation** are this design's
  own.
* **Reorder buffer size.** The host link is the sink of the diversion network.
  If the reorder buffer fills with early packets, the host link stops. If the
  packet they are waiting for is behind it, the network deadlocks. With 8
  entries this happened on the 8 x 8 mesh. 64 entries avoided it in every run
  made, but no size guarantees it without end-to-end flow control.
* **Path placement.** Paths are set up on line by CEPs. There is no central
  precomputation of circuit paths.
* **Phit timing.** The link timing follows the phit count, but a packet moves as
  one word. The DAMQ is managed in whole packet slots.
* **Table storage.** The IMT and the control storage are registers. The DVC
  scheme allows both to live in slow RAM, since they are rarely used, and
  merges the control storage with the circuit tables there. That memory
  organisation is not modelled.

## Files

`rtl/`: `dvc_pkg` (types), `dvc_mesh` (top), `dvc_switch`, `input_port`,
`imt`, `damq_buffer`, `pkt_fifo`, `ctrl_unit`, `age_arbiter`, `dor_route`,
`output_link` and `host_if`.

`tb/`: one self-checking testbench per module (`tb_<module>`), plus the
following system tests:

* `tb_dvc_mesh`: a 4 x 4 mesh with 3 RVCs and a short timeout, so that every
  mechanism happens. It counts diversions, unmapped arrivals,
  re-establishments, teardowns, host CDPs and out-of-order arrivals, and fails
  if any count is zero.
* `tb_dvc_mesh_full`: the default 8 x 8 mesh running transpose, bit reversal
  and uniform traffic in turn.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/dvc_pkg.sv tb/tb_dvc_mesh.sv \
          --top-module tb_dvc_mesh -o sim
./obj_dir/sim
```

Any testbench can be built the same way. Add `-Wno-WIDTH -Wno-UNUSED` to quieten
width and unused-signal warnings. The 8 x 8 test takes a few minutes to compile
and to run.
