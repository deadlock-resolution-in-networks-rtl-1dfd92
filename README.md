# Deadlock resolution for Dynamic Virtual Circuit networks

A Dynamic Virtual Circuit (DVC) network sends packets along virtual circuits
that are set up hop by hop: a circuit establishment packet (CEP) takes a
virtual channel on every link it crosses and records, in each switch's Input
Mapping Table, which output port and output channel the input channel leads
to. Data packets then follow the table. A circuit disestablishment packet
(CDP) frees the channels again. A switch can also cut a circuit in the middle
to free a channel and later rebuild the rest of it from the cut point, because
it keeps the circuit's destination.

With adaptive or table-driven routing such a network can deadlock: a ring of
full buffers, each waiting for the next. Circuits add a second kind of
waiting: a packet that has no output channel yet (an *unmapped* packet) cannot
move even when the buffer ahead has room. This RTL does not try to avoid
deadlock. It lets it happen, finds it, and breaks it by *rotation*: every
buffer on the ring forwards one packet to the next one at the same time, out
of turn, so the ring moves one step without needing any free space. A free
channel bank at every output port guarantees that unmapped packets can take
part in a rotation too.

The top level, `dvc_mesh`, is a 6 x 6 mesh of five-port switches (host plus
four neighbours) with a host port at every node.

## Virtual nodes

Switches here are input buffered. For deadlock purposes every input port
buffer is treated as one *virtual node*: its successor is the input port of
the neighbour behind the output port its head packet waits for. A virtual node
is named `node*5 + port`. The host input port cannot be on a ring and never
starts a search.

Each input port (`input_port`) holds:

* an Input Mapping Table (`input_mapping_table`), one entry per input channel:
  mapped flag, output port, output channel, and the destination of the circuit,
  kept after the circuit is cut;
* a DAMQ buffer (`damq_buffer`): one shared pool of packet slots with a linked
  queue per output port, so a packet waiting for a busy output never blocks one
  behind it that wants another output;
* an Auxiliary Buffer of one packet. Every packet that needs an output channel
  (a CEP, or a data packet on a cut circuit) waits here until the output
  port's allocator (`vc_allocator`) grants one. While it is occupied the port
  refuses new packets from the link.

A data packet on a cut circuit is sent as a fresh CEP (carrying the kept
destination, this node's id and the current timestamp) followed by the data
packet: the circuit is re-established from this switch on.

## Finding a ring

`blocked_detector` keeps one status bit per input buffer. Every `TIMEOUT`
cycles (default 400) it sets the bit of each non-empty buffer; any packet
leaving a buffer clears its bit. At the end of the period one buffer whose bit
is still set is declared Blocked, chosen round robin so that no buffer is
skipped forever.

The Blocked virtual node's `cycle_detector` starts a search with three control
messages, which travel on their own wires next to each data link and so get
through even when data buffers are full:

* **TEST(seq, max)** goes to the successor. A blocked receiver remembers the
  sender as predecessor, raises `max` to its own id if larger, and forwards it.
  A receiver that is not blocked answers NOCYCLE.
* A node that receives back the very `max` it forwarded has closed a ring; it
  becomes the **leader** and sends **CYCLE** around. Each member enters cycle
  mode (takes no new packets from its link, does no circuit work) and forwards
  it. When CYCLE returns, the leader starts the rotation.
* **NOCYCLE** travels backwards and returns each node to idle. A node also
  cancels its own search when its buffer moves.

Sequence numbers separate search iterations: older messages are dropped, a
newer number is adopted. Because the leader test compares with the forwarded
maximum rather than the node's own id, a search started by a node outside the
ring (whose id may be larger than every member's) still finds the ring. A node
that sits in cycle mode for `COMMIT_TIMEOUT` cycles without a rotation leaves
it, which recovers from searches that were overtaken by newer iterations.

## Rotation and the free channel bank

On rotation each member sends one packet towards its successor, ahead of
normal traffic and without waiting for the neighbour's ready; the receiving
port puts it into a small rotation queue and handles it once it has rotated
its own packet. The packet sent is chosen in this order:

1. the head of the DAMQ queue for the successor: it already has a channel and
   goes as is;
2. an unmapped packet in the Auxiliary Buffer that wants the successor: it is
   moved onto the *free channel bank*. The top five channels of every link
   (11..15 with 16 channels) are never handed out by the allocators; input
   port p owns channel 11+p on every output. The packet leaves as a short
   circuit on that channel: CEP, the packet, CDP (a CEP becomes CEP+CDP, a
   CDP stays a CDP). The CEP and CDP carry this node's id and timestamp, and
   the switch timestamp is advanced, so a receiver can order such groups;
3. otherwise a dummy packet, which the successor drops.

A packet arriving on a bank channel is forwarded on the receiving port's own
bank channel, so bank channels are always free for their owner.

## Switch and mesh

`dvc_switch` joins the routing table (`route_table`, reset to row-first routes
and rewritable), five input ports, an allocator and a round-robin arbiter per
output, the blocked detector, four cycle detectors, the routing of control
messages between links and a set of event counters (`stats_t`). A CDP leaving
an output returns its channel to that output's allocator. `dvc_mesh` wires 36
switches; edge ports are tied off. Hosts inject CEP / data / CDP sequences on
channels of their host link and receive packets with a ready signal.

## Where this departs from the described scheme

* The scheme runs detection and rotation as software on a Routing Processor in
  each node, with off-chip queues that extend the DAMQ buffers and an
  Alternate Auxiliary Buffer. Here all of it is logic; there is no processor,
  no off-chip queue, and the Auxiliary Buffer simply keeps its packet during
  rotation.
* Tearing down a victim circuit to free a channel is not implemented. A packet
  without a channel waits until one is released or a rotation moves it.
* Packets arriving on a bank channel are not collected until their CDP
  before being forwarded; each is forwarded on arrival.
* Control messages cross a link in one cycle (the scheme was evaluated with
  16-cycle control links).
* The destination host does not reorder packets by teardown id and timestamp;
  the fields are carried.
* The alternative to the free channel bank that uses a new packet type is not
  built.
* Buffer depth (8), channels per link (16), packet format and counter widths
  are this design's choices.

## Testbenches

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_damq_buffer` | random enqueue/dequeue against a queue model |
| `tb_input_mapping_table` | random writes and reads against a model |
| `tb_route_table` | row-first reset routes, rewrites |
| `tb_vc_allocator` | one-hot grants, no channel granted twice, bank never granted, release |
| `tb_blocked_detector` | only buffers that stayed unmoved for a whole period are declared |
| `tb_cycle_detector` | three-node ring: search, leader, CYCLE, rotation start, NOCYCLE |
| `tb_input_port` | mapping, Auxiliary Buffer, re-establishment, mapped / unmapped / dummy rotation |
| `tb_dvc_switch` | routes, channel translation and release, blocked buffer to TEST and NOCYCLE |
| `tb_dvc_mesh` | full 6 x 6 mesh at default parameters |

`tb_dvc_mesh` loads column-first routes towards two opposite corners of the
inner square (nodes 10 and 25, numbering `row*6+col` from 0) and runs light
uniform traffic alternating with bursts in which those corners, and the other
two corners (7 and 28), send only to each other. This closes rings of
dependencies. Injection then stops and every data packet must arrive exactly
once at its destination; the counters must show blocked buffers, searches,
found rings, rotations and waiting for channels. In this traffic rotations of
unmapped packets, dummies and re-establishments are rare and only reported;
`tb_input_port` exercises them directly.

To run one, for example the mesh:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dvc_pkg.sv tb/tb_dvc_mesh.sv --top-module tb_dvc_mesh
./obj_dir/Vtb_dvc_mesh
```

`TIMEOUT` on `dvc_mesh` sets the detection period. Short periods find rings
sooner but start many searches that fail; long ones leave rings standing
longer.
