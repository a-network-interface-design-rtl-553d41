# A pipelined network interface between a WISHBONE node bus and a virtual-channel NoC

A many-core chip built as a mesh of tiles has two kinds of interconnect.
Inside a tile, cores, caches and memory talk over a shared WISHBONE bus.
Between tiles, a packet-switched network-on-chip (NoC) with wormhole
routers, virtual channels and credit-based flow control carries the
traffic. The network interface (NI) joins the two:

- It turns a bus transaction that targets another tile into a packet.
- It turns an arriving packet back into a bus transaction on the local bus.

The NI is built as two independent pipelines, one per direction, in the
same style as the router it connects to:

| Direction | Stages |
|---|---|
| NoC to node | **BW** (buffer write) → **PKT2MSG** (packet to message) → **BA** (bus access) |
| Node to NoC | **MW** (message write) → **MSG2PKT** (message to packet) → **VA** (VC allocation) → **LA** (link allocation) |

The two pipelines share one structure, the **On-the-Fly table**. It exists
because WISHBONE has no split transactions. A bus master that reads a
remote address keeps its bus cycle open until the data arrive. The NI must
remember which reply will complete that cycle.

Each pipeline stage takes one clock. Every buffer holds whole packets or
whole messages, so no stage ever sees a partial packet.

## Block map

```
            NoC-to-node pipeline (ni_noc2wb)
 router ──► Input Port ──► PKT2MSG ──► Message Queue ──► WB Master Wrapper ──► node bus
  link        (BW)                                             (BA)              (master port)
  in/out                                      ┌── On-the-Fly table ──┐
 router ◄── Output Port ◄── Link Alloc ◄── VC Alloc ◄── Packet Buffer ◄── MSG2PKT ◄── WB Slave Wrapper ◄── node bus
               (LA)                          (VA)                                        (MW)              (slave port)
            node-to-NoC pipeline (ni_wb2noc)
```

| File | Role |
|---|---|
| `rtl/ni_pkg.sv` | Sizes, flit, header, message, packet and credit types |
| `rtl/ni_top.sv` | The whole NI: `ni_noc2wb`, `ni_wb2noc` and the On-the-Fly table |
| `rtl/ni_noc2wb.sv` | NoC-to-node pipeline |
| `rtl/ni_input_port.sv` | BW: one whole-packet buffer per VC; returns credits |
| `rtl/ni_pkt2msg.sv` | PKT2MSG: picks a complete packet and rebuilds the message |
| `rtl/ni_message_queue.sv` | Message Queue: FIFO of whole messages |
| `rtl/ni_wb_master.sv` | BA: WISHBONE master; performs writes and reads; delivers replies |
| `rtl/ni_otf_table.sv` | On-the-Fly table: remote reads that are waiting for a reply |
| `rtl/ni_wb2noc.sv` | Node-to-NoC pipeline |
| `rtl/ni_wb_slave.sv` | MW: WISHBONE slave; builds request messages; stalls the bus when full |
| `rtl/ni_msg2pkt.sv` | MSG2PKT: message to head, body and tail flits |
| `rtl/ni_packet_buffer.sv` | Packet Buffer: whole packets waiting for a VC and for the link |
| `rtl/ni_vc_allocator.sv` | VA: one N:1 round-robin arbiter per virtual network |
| `rtl/ni_link_allocator.sv` | LA: one N:1 round-robin arbiter for the single link |
| `rtl/ni_output_port.sv` | Output VC state, credit counters and link register |
| `rtl/ni_rr_arbiter.sv` | Round-robin arbiter used by PKT2MSG, VA and LA |

## Master and slave roles, and remote reads

The roles on the bus are fixed:

- The NI's **slave** port takes every access a local master makes to a
  remote tile. It only ever sends requests into the NoC.
- The NI's **master** port carries out every request arriving from the
  NoC. It only ever receives requests.

**A remote write** is one-way. The slave wrapper acknowledges the beats,
builds a write-request message and sends it. At the destination, the master
wrapper writes the words on that tile's bus. No reply is sent.

**A remote read** crosses the NI four times:

1. **Requesting tile, slave wrapper (MW).** A local master reads a remote
   address. The slave wrapper sends a read-request message and records
   `(destination, sequence number, length, address)` in the On-the-Fly table.
   It then withholds ACK, so the master's bus cycle stays open.
2. **Serving tile, master wrapper (BA).** Before it starts the bus read, the
   master wrapper asks the local slave wrapper to reserve a Packet Buffer
   slot (`rsv_req` / `rsv_gnt`). A read whose reply could not be stored is
   therefore never started. The master wrapper then reads the words, builds
   a read-reply message and hands it to the slave wrapper (`rsp_valid` /
   `rsp_ready`). The slave wrapper writes it into the reserved slot.
3. The reply crosses the NoC on its own virtual network.
4. **Requesting tile, master wrapper.** The master wrapper looks up
   `(source, sequence number)` in the On-the-Fly table. On a hit it passes
   the data to the slave wrapper (`otf_valid` / `otf_ready`) and clears the
   entry. The slave wrapper then returns the words, one per beat, and the
   waiting bus cycle ends. A reply with no matching entry is dropped and
   reported on `stat_stray_reply`.

The On-the-Fly table has one entry by default (`OTF` parameter of
`ni_top`). A slave that has no split transactions holds the bus during a
read, so only one read per tile can be waiting.

**Caution: mutual remote reads can deadlock.** Suppose tile A reads from
tile B while tile B reads from tile A at the same moment, and both tiles
use one shared bus. Each read holds its own bus, so neither master wrapper
can get the bus to serve the other tile's request. This comes from WISHBONE
having no split transactions; the NI cannot avoid it. A system needs either
a bus that lets the NI master in while the slave side holds a cycle, or a
rule against such traffic. The end-to-end testbench connects each NI's
master port directly to the tile memory, so it does not show this case.

## Message and packet formats

Each message is one bus transaction, and each message becomes exactly one
packet. The three message types each have their own virtual network:

| Type | Virtual network | Data words | Flits |
|---|---|---|---|
| read request | 0 | 0 | 1 (head/tail) |
| write request | 1 | 1 to 8 | 2 to 9 |
| read reply | 2 | 1 to 8 | 2 to 9 |

Each virtual network has two VCs. VC `v*2 + k` is VC `k` of virtual network
`v`. Because requests and replies never share a VC, a reply can never be
blocked behind a request.

**Flit.** Each flit is `{type[1:0], vc[2:0], data[63:0]}`. The type
encoding is HEAD = 0, BODY = 1, TAIL = 2, HEAD_TAIL = 3.

**Head flit.** `data[57:0]` holds the header. Bits 63:58 are zero.

| Bits | Field | Meaning |
|---|---|---|
| 57:56 | `mtype` | Message type |
| 55:50 | `dst` | Destination node; the router routes on this field |
| 49:44 | `src` | Source node |
| 43:36 | `seq` | Sequence number |
| 35:32 | `len` | Number of data words |
| 31:0 | `addr` | Byte address of the first word |

**Body and tail flits.** Each carries one 64-bit data word, in address
order.

**Address map.** The top 6 bits of a WISHBONE byte address select the
destination node. The whole address travels in the header and appears
unchanged on the destination bus, where the memory decodes the bits it
needs. Words are 8 bytes apart.

**Bursts.** The slave wrapper reads CTI (cycle type identifier):

- On a write, each beat adds one word. The message ends on a beat with CTI
  `000` or `111`, when CYC drops, or after 8 words.
- A read with CTI `010` (incrementing burst) asks for a whole 64-byte line
  (8 words).
- Any other read asks for one word.

The master wrapper makes an incrementing burst for a multi-word message: CTI
`010`, then `111` on the last beat. It uses a classic cycle (`000`) for a
single word. SEL is always all ones, and the slave wrapper ignores SEL:
every access moves whole 64-bit words, so byte writes are not supported.

**Sequence numbers.** Every request a slave wrapper sends takes the next
value of an 8-bit counter.

## Flow control: credits and VC ownership

**Towards the router.** The Output Port has one credit counter per VC,
starting at the router's buffer depth (4 flits):

- A flit may win link allocation only if its VC has a credit.
- Each flit sent takes one credit.
- Each `credit_in` gives back `count` credits for one VC.

The VC allocator hands a VC to a new packet only when the VC is idle. A VC
is idle again once two things are true:

- The previous packet's tail has been sent.
- All credits for that VC are back.

This means the router's buffer for that VC is empty before a new packet
starts on it. The router needs no VC-free signal.

**From the router.** The Input Port has a whole-packet buffer (9 flits) for
each of the 6 VCs, so an arriving packet is never refused. PKT2MSG moves a
packet into the Message Queue, which frees that VC's buffer. One cycle
later the Input Port sends a single `credit_out` on that VC, with `count`
equal to the packet's flit count. The router must not start a new packet on
that VC before that credit arrives.

**Stalls.** These are the places where traffic waits:

- **Packet Buffer full.** The slave wrapper withholds ACK until a slot is
  free (`stat_pb_stall`).
- **No idle VC.** A packet waits in the Packet Buffer without a VC
  (`stat_va_stall`).
- **No credit.** A packet holds its VC but cannot use the link
  (`stat_credit_stall`).
- **Message Queue full.** Complete packets stay in the Input Port, which
  holds back their credits (`stat_mq_full`).

## Timing

All state is on a single rising-edge clock with an asynchronous active-low
reset. Storage arrays are not reset; only entries that have been written
are read. ACK on the slave port is registered, so each bus beat takes two
clocks.

Edges are counted the way a receiver samples. Edge 0 is the rising edge
where the event is first seen, and the result is counted at the edge where
the next stage or the bus first samples it.

| Path | Clock edges |
|---|---|
| Tail flit sampled by the Input Port → WISHBONE strobe from the master wrapper sampled | 3 |
| First strobe sampled on the slave port → head flit sampled by the router | 5 |
| One-word remote write, strobe on tile 0 → strobe on tile 1 | 11 |

On the NoC-to-node side the edges are:

- Edge 0: BW stores the tail flit.
- Edge 1: PKT2MSG writes the Message Queue.
- Edge 2: the master wrapper starts the bus cycle (BA).
- Edge 3: the bus samples the strobe.

On the node-to-NoC side the edges are:

- Edge 0: MW starts the message.
- Edge 1: ACK.
- Edge 2: MSG2PKT writes the Packet Buffer.
- Edge 3: VA grants a VC.
- Edge 4: LA grants the link and loads the head flit into the link register.
- Edge 5: the router samples the head flit.

The 11-edge figure includes the two-edge behavioural link used by the
testbench.

The Message Queue and the Packet Buffer each free an entry at the clock
edge after its last use:

- A Message Queue entry is freed on the edge where its bus delivery ends.
- A Packet Buffer slot is freed on the edge after its tail flit wins the
  link.

The freed entry can be refilled in the next cycle.

## Parameters

| Name | Default | Where | Meaning |
|---|---|---|---|
| `NUM_VNET` | 3 | `ni_pkg` | Virtual networks |
| `VC_PER_VNET` | 2 | `ni_pkg` | VCs per virtual network |
| `FLIT_W`, `BUS_W` | 64 | `ni_pkg` | Link and bus width |
| `ROUTER_BUF` | 4 | `ni_pkg` | Router input buffer per VC, in flits (initial credits) |
| `MAX_WORDS` | 8 | `ni_pkg` | Longest message, one 64-byte line |
| `NODE_W` | 6 | `ni_pkg` | Node id width (up to 64 tiles) |
| `MQD` | 6 | `ni_top` | Message Queue entries (messages) |
| `PBD` | 4 | `ni_top` | Packet Buffer slots (packets) |
| `RBUF` | 4 | `ni_top` | Credits per output VC |
| `OTF` | 1 | `ni_top` | On-the-Fly table entries |

Synthesised with the defaults, the NI has about 5,500 flip-flop bits and
about 5,800 bits of buffer arrays. Most of that is the Input Port (6 × 9
flits) and the Packet Buffer (4 × 9 flits).

## Where this design follows its source and where it chooses

**Follows the source:**

- The four-stage node-to-NoC and three-stage NoC-to-node pipelines.
- The block set and its connections.
- Whole-packet buffers per VC in the Input Port.
- A Message Queue of 6 whole messages, with an entry filled the cycle after
  the request.
- A Packet Buffer of 4 packets, with a slot freed the cycle after its tail
  wins the link.
- One N:1 VC arbiter per virtual network, and an N:1 link arbiter.
- A bus stall while the Packet Buffer is full.
- A master read started only when its reply has room.
- The On-the-Fly table.
- The network sizes: 3 virtual networks × 2 VCs, 64-bit link and bus,
  4-flit router buffers.

**This design's own choices:**

- All formats and encodings above: header layout, message types, the
  mapping from message type to virtual network, and the address map.
- The burst rules.
- Registered ACK.
- Round-robin arbitration, and taking the lowest idle VC.
- A FIFO Message Queue.
- One counted credit per freed Input Port packet.
- The VC-idle rule.
- The reservation handshake.
- The master wrapper collects read data before handing it over.
- One On-the-Fly entry.
- One clock for both sides.

**Not included:**

- Versions of the NI with stages merged into 1, 2 or 3 cycles. Only the
  four-stage NI is built.
- The router, the WISHBONE bus and its arbiter, and the cores and caches.
  The NI's ports are where they connect.

**Ordering.** Reads and writes travel on different virtual networks, so a
read sent after a write to the same remote address can overtake it.
Software, or a coherence protocol above the NI, must order such accesses.

## Simulating

Each block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and stops. Two behavioural models
support the larger tests:

- `tb/tb_noc_link.sv` is a point-to-point link standing in for the router.
  It has per-VC queues, returns credits and can be held to create back
  pressure.
- `tb/tb_wb_mem.sv` is a WISHBONE memory with a programmable wait.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/ni_pkg.sv tb/tb_ni_top.sv --top-module tb_ni_top -o sim && ./obj_dir/sim
```

`-y` lets Verilator find each module in the file of the same name.
Replace `tb_ni_top` with any other `tb_ni_*` testbench. The end-to-end test
runs in well under a second.

### End-to-end test

`tb_ni_top` uses the defaults. It builds two tiles and gives each of them:

- an `ni_top`,
- a memory on the NI's master port (wait 1 on tile 0, wait 12 on tile 1),
- a bus master on the NI's slave port.

Behavioural links in both directions join the two tiles. The test runs:

1. A one-word write, checking the 11-edge latency.
2. Line writes.
3. Line and single-word reads, with the data checked.
4. Traffic in both directions at once.
5. A phase where one link is held, to fill every buffer.

It counts each mechanism and fails if any of them never happens. The
mechanisms are:

- write messages,
- read requests,
- reply hand-overs through the On-the-Fly table,
- Packet Buffer reservations,
- Packet Buffer stalls,
- credit stalls,
- VC allocation stalls,
- a full Message Queue.

### Synthetic traffic on a mesh

`tb_ni_traffic` builds a K × K mesh of tiles, with K = 8 (64 tiles) by
default. Each tile has:

- an `ni_top` with default parameters,
- a memory on the master port, with a wait of 1 to 3 cycles,
- a traffic generator on the slave port.

`tb/tb_noc_mesh.sv` joins the tiles. It is a behavioural network:

- It takes flits in at once and returns credits on the next edge.
- It delivers a packet 4 cycles per XY hop after its tail arrives.
- It ejects one flit per cycle into each NI.
- It starts a packet only on a destination VC that the NI has freed.

It is a load model, not a router, so it never runs out of credits.

Three destination patterns run in turn:

- uniform random,
- tornado (x + K/2 − 1 in the same row),
- bit complement.

Each tile issues 24 transactions per pattern, back to back. The mix is
writes of 2, 4 or 8 words (3-, 5- and 9-flit packets) and reads of 1 or 8
words (1-flit requests, with 2- or 9-flit replies). The test checks that:

- every read returns the right data,
- every written word is in the right memory,
- all four packet lengths occur in each pattern,
- no reply goes unmatched.

It also prints the average bus time of a transaction for each pattern.
Change `K` for other mesh sizes; for example, `K = 2` gives a 2 × 2 mesh.
The 8 × 8 run takes about 20 seconds.

