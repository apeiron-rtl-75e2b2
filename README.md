# APEIRON-style communication IP for multi-FPGA dataflow

Dataflow applications written as HLS kernels usually stop at the edge of one
FPGA. This design is the hardware that lets such kernels ("tasks") exchange
messages with tasks on the same FPGA or on other FPGAs, as if the whole
cluster were one device. FPGAs are the nodes of a small n-dimensional torus,
linked point to point. A task sends by writing a message on an AXI4-Stream
channel, with the destination (node coordinate, task number, channel number)
in the stream's side channel. The message arrives on the named input channel
of the named task, wherever that task sits.

It also contains the kernel of the example application: the Imagifier of a
particle-identification pipeline. The Imagifier turns photomultiplier hit
lists into 16x16 images and spreads them over CNN kernels on other nodes.

Everything is synthesizable SystemVerilog-2017 in `rtl/`. Self-checking
testbenches are in `tb/`.

## Structure

```
apeiron_top                 preprocessing node of the use case
 ├─ apeiron_node            one FPGA's communication IP
 │   ├─ apr_routing_ip      the Routing IP
 │   │   ├─ apr_switch        crossbar + VCT admission
 │   │   │   ├─ apr_dor_router  (one per input) route computation
 │   │   │   └─ apr_rr_arbiter  (one per output) contention
 │   │   ├─ apr_intranode_if  (N_INTRA) task ports, header/data FIFOs
 │   │   ├─ apr_internode_if  (2*N_DIMS) links, 2 VCs, credits
 │   │   └─ apr_csr           configuration/status registers
 │   ├─ apr_aggregator      (per task) channels -> packets
 │   └─ apr_dispatcher      (per task) packets -> channels
 └─ apr_imagifier           hit list -> image, on the last task port
apr_pkg    packet formats and constants
apr_fifo   the FIFO used everywhere
```

The design runs on one clock, with a synchronous active-low reset `rst_n`.
The nominal clock is 100 MHz.

## Packets and flits

All traffic moves in 128-bit flits. A packet has three parts:

* one **header** flit;
* 1 to 256 **payload** flits (16 B to 4 kB);
* one **footer** flit.

A 2-bit flit kind (`FK_HEAD`, `FK_DATA`, `FK_FOOT`) travels beside the data.
Inside the switch a flit is therefore 130 bits. On a link it is 132 bits,
with a valid bit and a VC bit added (`link_t`).

Header layout, from the least significant bit (`apr_pkg::header_t`):

| bits     | field      | meaning                                   |
|----------|------------|-------------------------------------------|
| 6:0      | dst_ch     | destination channel (0-127)               |
| 8:7      | dst_task   | destination task (0-3)                    |
| 20:9     | dst_coord  | destination node, 4 bits per dimension    |
| 27:21    | src_ch     | source channel                            |
| 29:28    | src_task   | source task                               |
| 41:30    | src_coord  | source node                               |
| 50:42    | len        | payload words, 1..256                     |
| 51       | eom        | last packet of a message                  |
| 127:52   | reserved   | zero                                      |

The footer holds a 32-bit checksum in bits 31:0 and the length in bits 40:32.
The checksum is the XOR of every 32-bit lane of every payload word. The
footer is built when the packet enters the network. It is checked when the
packet leaves.

A message longer than 256 words is sent as several packets. Only the last
one has `eom` set, and the receiving side turns `eom` back into TLAST.

## Routing and virtual channels

Each node has a coordinate in an `N_DIMS`-dimensional torus with `DIM_SIZE`
nodes per dimension. The default is a ring of four nodes (`N_DIMS = 1`,
`DIM_SIZE = 4`), so each node has two links. Switch ports are numbered as
follows:

* `0 .. N_INTRA-1`: the task (IntraNode) ports. Port *t* is task *t*.
* `N_INTRA + 2d`: the link to the neighbour at +1 in dimension *d*.
* `N_INTRA + 2d + 1`: the link to the neighbour at -1 in dimension *d*.

Wire the plus link of one node to the minus link of its neighbour.

**Dimension-order routing.** A packet fixes its offset in one dimension
completely before it moves in the next. The highest-numbered dimension
comes first. In each dimension it takes the shorter way round the ring; on
a tie it goes plus. When all offsets are zero it leaves on the task port
named by `dst_task`. If this node has no such port, the packet is dropped
and counted.

**Deadlock freedom.** A torus ring can deadlock under dimension-order
routing, because packets waiting on each other can close a cycle round the
ring. Each link carries two virtual channels (VCs) with separate buffers to
break it. The rule, in `apr_dor_router`:

1. A packet entering a dimension (from a task, or turning from another
   dimension) starts on VC0.
2. While it continues straight on, it keeps its VC.
3. When it crosses the wrap-around link (plus from `DIM_SIZE-1`, minus
   from 0) it moves to VC1.

No ring can then hold a cycle of waiting packets on one VC.

## Virtual Cut-Through and credits

The switch (`apr_switch`) has one input per task port and one input per VC
of each link. With the defaults that is 2 + 2x2 = 6 inputs and 4 outputs.
Each output is owned by one packet at a time, from header to footer.

A header at the head of an input is routed. The input then asks for its
output only if the buffer ahead can hold the **whole** packet, `len + 2`
flits. This is Virtual Cut-Through: forwarding starts as soon as the
packet has a direction and room. The first flits leave while the rest are
still arriving. A packet that has started therefore never blocks in the
middle of a link, and an output needs no back-pressure.

The room ahead depends on the output:

* **Link output:** one credit counter per VC in `apr_internode_if`. It
  starts at the neighbour's VC buffer depth (`VC_DEPTH`), loses one per flit
  sent, and gains one per credit pulse returned by the neighbour. The
  neighbour returns a credit each time its switch takes a flit from that VC
  buffer.
* **Task output:** the free space of the task port's incoming data FIFO,
  plus 2. It is zero while that port's header FIFO is full.

Among the inputs that ask, a round-robin arbiter per output picks one
(`apr_rr_arbiter`). The grant is registered, so the header leaves one cycle
after it was offered, and then one flit per cycle follows.

**Buffer sizing rule.** Every VC buffer must hold the largest packet
(`VC_DEPTH >= 258`), and so must every task-port data FIFO
(`DATA_DEPTH >= 256`). Otherwise a long packet could never be admitted.
`apr_routing_ip` stops elaboration with an error if either rule is broken.

## Task ports: header/data FIFOs, Aggregator and Dispatcher

On the switch side, a task port (`apr_intranode_if`) has a header FIFO and a
data FIFO in each direction.

* **Injection.** When a header is waiting in the outgoing header FIFO, the
  port emits the header flit, then `len` words from the outgoing data FIFO,
  then the footer with the checksum it accumulated.
* **Ejection.** Header flits go to the incoming header FIFO and payload
  words to the incoming data FIFO. The footer is checked and dropped. A
  mismatch pulses `csum_err`, which the registers count.

On the task side, every task has up to `N_CH` output and `N_CH` input
channels, each a 128-bit AXI4-Stream with TLAST. These are the hardware
side of a non-blocking `send()` and a blocking `receive()`.

* **Aggregator** (`apr_aggregator`). Each output channel first fills its own
  message FIFO. A round-robin choice picks a channel with data, and its
  message is copied word by word into the outgoing data FIFO. At the end of
  the message, or after 256 words, the header goes into the header FIFO.
  The destination comes from TUSER = `{coord, task, ch}`, 21 bits. The
  header is written *after* the payload, so the length is known and the
  port never waits for data once a packet has started. Another channel is
  chosen only at a message boundary.
* **Dispatcher** (`apr_dispatcher`). It reads a header, then copies `len`
  words into the message FIFO of channel `dst_ch`. It sets TLAST on the last
  word if `eom` is set, and TUSER = the sender's `{coord, task, ch}`. A full
  channel stalls it, which is the blocking receive. A packet for a channel
  the task does not have is read and discarded, with a pulse on `bad_ch`.

## Configuration and status registers

`apr_csr` has a 32-bit word-addressed register port: `cfg_addr` (8 bits),
`cfg_wr`, `cfg_wdata` and `cfg_rdata`. Writes take effect on the clock
edge. Read data appears one cycle after the address.

| addr      | name   | access | content                                        |
|-----------|--------|--------|------------------------------------------------|
| 0x00      | ID     | R      | `32'hA9E1_0001`                                |
| 0x01      | COORD  | RW     | node coordinate, 4 bits per dimension, dim 0 in 3:0; reset 0 |
| 0x02      | CTRL   | RW     | bit 0: switch enable (no new packet starts when 0); reset 1 |
| 0x03      | ERRORS | R      | packets delivered with a bad checksum          |
| 0x04      | DROPS  | R      | packets dropped for a missing task port        |
| 0x10+p    | PKTS_p | R      | packets sent out of switch port *p*            |

Every node leaves reset at coordinate 0. Software must write COORD on each
node before traffic starts.

## The Imagifier and the use case

The example application identifies particles from the hit pattern of
photomultipliers (PMTs). Node 0, the preprocessing node (`apeiron_top`),
holds three kernels:

* a sender that streams events in from host memory;
* the Imagifier;
* a receiver that collects the CNN results.

The other nodes each hold one or two CNN kernels.

`apr_imagifier` works as follows:

* **Input.** Each 128-bit word holds eight 16-bit hit slots. In each slot,
  bit 15 marks a hit and bits 7:0 give the PMT index. TLAST ends the event.
* **Image.** Bit `index` of a 256-bit image is set for every hit, so the
  row is `index[7:4]` and the column is `index[3:0]`.
* **Output.** The image leaves as a 2-word message, low half first.
* **Targets.** It goes to one of `n_targets` configured CNN targets
  (`img_target[]`, each a `{coord, task, ch}`), taken in turn.
* **Timing.** The image leaves in the two cycles after the event's last
  word.

In `apeiron_top` the Imagifier sits on task port `N_INTRA-1` (port 1). It
uses input channel 0 and output channel 0. Its other input channels are
drained, and its other output channels stay idle. Task port 0, for the
sender and receiver, is brought out as AXI4-Stream ports. So are the two
links and the register port.

Not included:

* the transceiver link layer between FPGAs;
* the PCIe host interface;
* the CNN itself;
* the host-memory kernels.

The top's link and stream ports are where they attach.

## Parameters

| parameter    | default | where                    | note                            |
|--------------|---------|--------------------------|---------------------------------|
| `N_DIMS`     | 1       | node, top                | torus dimensions (up to 3)      |
| `DIM_SIZE`   | 4       | node, top                | nodes per dimension (up to 16)  |
| `N_INTRA`    | 2       | node, top                | task ports per node (up to 4)   |
| `N_CH`       | 4       | node, top                | channels per task (up to 128)   |
| `CH_DEPTH`   | 16      | node, top                | words per message FIFO          |
| `VC_DEPTH`   | 512     | routing IP               | flits per VC buffer, >= 258     |
| `DATA_DEPTH` | 512     | routing IP               | words per task data FIFO, >= 256|
| `HDR_DEPTH`  | 8       | routing IP               | headers per task header FIFO    |
| `N_TARGETS`  | 6       | Imagifier, top           | CNN targets                     |

With the defaults, the top (one node plus the Imagifier) synthesizes to
about 2,000 generic cells and 1,600 flip-flops, plus 0.55 Mbit of FIFO
memory. That memory is split roughly in half. One half is the four link VC
buffers (2 links x 2 VCs x 512 x 130 bits). The other half is the task-port
data FIFOs (2 ports x 2 directions x 512 x 128 bits).

## Measured behaviour

These numbers come from the testbenches, at 100 MHz.

**Rate and latency.**

* A 256-word packet crosses the switch in 257 cycles. The header leaves
  one cycle after it is offered.
* A 256-word message enters the Aggregator at one word per cycle.
* An output port idles for one cycle between packets. A 4 kB packet
  therefore takes 259 cycles of a port, so the payload rate is at most
  256/259 of 12.8 Gbit/s, or 12.65 Gbit/s.

`apeiron_perf_tb` sweeps the message size between two default-size nodes.
Latency runs from the first word accepted to the last word delivered.
Roundtrip is halved and crosses a link with a 4-cycle delay. Bandwidth
sends 256 kB and includes a one-word acknowledgement at the end.

| message | localloop | roundtrip / 2 | one-way     | loopback    |
|---------|-----------|---------------|-------------|-------------|
| 16 B    | 9 cycles  | 16 cycles     | 3.20 Gbit/s | 3.20 Gbit/s |
| 64 B    | 15        | 22            | 7.31        | 7.31        |
| 256 B   | 39        | 46            | 10.75       | 10.76       |
| 1 kB    | 135       | 142           | 12.16       | 12.17       |
| 4 kB    | 519       | 526           | 12.44       | 12.45       |

Small messages are limited by the header and footer: three flits and an
idle cycle per 16 B word. Large-message latency grows by one cycle per
word, because the Aggregator holds a packet until its last word has
arrived (see below). A real system adds the kernels, memory and
transceivers to these numbers.

**Use case.** The CNN stand-in accepts one image per 344 cycles, which is
3.44 µs per event for one CNN. The full-size testbench measured:

| CNN targets | cycles per event |
|-------------|------------------|
| 1           | 348.4            |
| 2           | 175.2            |
| 3           | 116.8            |
| 4           | 87.5             |
| 6           | 58.6             |

The design scales with the number of CNN kernels. The network itself is
never the limit here. A real system with 6 CNNs is expected to be limited
by the rate at which its sender kernel reads events from host memory; the
testbench's sender has no such limit.

## Simulation

The testbenches need no files besides `rtl/` and `tb/`. Build one with
Verilator 5, for example the full-size end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/apr_pkg.sv tb/apeiron_top_tb.sv --top-module apeiron_top_tb
./obj_dir/Vapeiron_top_tb
```

`-Wno-fatal` keeps Verilator's style warnings from stopping the build.
They are about FIFO count outputs left open and header bits a block does
not read.

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog that counts a failure if it hangs.

* **Unit tests:** `apr_fifo_tb`, `apr_rr_arbiter_tb`, `apr_dor_router_tb`,
  `apr_csr_tb`, `apr_internode_if_tb`, `apr_intranode_if_tb`,
  `apr_switch_tb`, `apr_aggregator_tb`, `apr_dispatcher_tb`,
  `apr_imagifier_tb`.
  * The router test compares every route on a 4x4x3 torus with a
    reference model.
  * The switch test checks VCT waits, contention, drops and the one-flit-per-cycle rate.
* **`apr_routing_ip_tb`** covers one Routing IP with scripted link traffic:
  local delivery, every link route, transit, credits and the counters.
* **`apeiron_node_tb`** joins two nodes in a ring. They exchange random
  all-to-all messages, 16,479 words, including messages longer than one
  packet.
* **`apeiron_perf_tb`** is the latency and bandwidth sweep above. It
  checks every word, the 4 kB rate (12.0 to 12.8 Gbit/s), the growth of
  bandwidth with size, and the 16 B latencies.
* **`apeiron_top_tb`** is the end-to-end test, at the default parameters.
  * **Setup.** One `apeiron_top` is the preprocessing node, and three
    `apeiron_node`s hold six CNN models. The four nodes form a ring
    through link models with a 4-cycle delay. One link model corrupts one
    payload word once.
  * **Checks.** It checks every image and every result. It also measures the
    per-event times above and the two latencies.
  * **Mechanisms.** It counts each mechanism it exercises and fails if any
    never happened:
    * output contention;
    * VCT waits;
    * VC1 use on wrap links;
    * multi-packet messages;
    * multi-hop routes;
    * a dropped packet;
    * a bad channel;
    * a checksum error, which it also reads back from the registers.
  * **Run time.** Well under a second.

`tb/link_model.sv` stands in for the transceiver link. `tb/cnn_model.sv`
stands in for a CNN kernel: it answers each image with a result after a
fixed interval.

## Departures and assumptions

What comes from the framework:

* the split into Routing IP and task adapters;
* the switch, router, arbiter and register roles;
* dimension-order routing on a torus;
* two VCs per link;
* Virtual Cut-Through;
* header/payload/footer packets;
* header and data FIFOs at the task port;
* the task and channel number ranges;
* the 128-bit, 100 MHz port;
* the Imagifier's function;
* the use-case layout.

The following are this design's own choices.

**Packets and routing.**

* The header and footer layouts.
* The XOR checksum.
* The 256-word packet limit.
* The default geometry, a ring of four nodes with two links each. The
  published four-node setup draws two link ports per node; other torus
  sizes are a parameter change.
* The order of dimensions: "anti-lexicographic" is read as highest
  dimension first.
* The tie-break to the plus direction.
* The dateline VC rule.

**Flow control and buffering.**

* Credit-based link flow control.
* Buffer depths.
* Per-packet locking of switch outputs.
* Round-robin arbitration.

**Task side.**

* Writing the header after the payload. A packet therefore enters the
  network only when its last word has reached the Aggregator. Within one
  node this is store-and-forward for up to 256 words. Beyond that point it
  is cut-through.
* Splitting long messages.
* Dropping packets for missing tasks or channels.
* The same channel count for every task.

**Registers and the Imagifier.**

* The register map and the register port.
* The hit-list encoding.
* Round-robin CNN targets.

**Not modelled.**

* The transceiver link layer: links are plain flit/credit ports, with no
  error recovery and no fault tolerance.
* The host PCIe interface and its runtime.
* Partial-word payloads: lengths count 128-bit words, not bytes.

The register map's COORD field has 4 bits per dimension. `DIM_SIZE` above 16
or `N_DIMS` above 3 needs a change to `apr_pkg`.
