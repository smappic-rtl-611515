# SMAPPIC custom logic: multi-FPGA manycore prototyping glue

SMAPPIC builds large manycore prototypes out of cloud FPGAs (AWS F1). It takes
an existing tiled manycore (BYOC/OpenPiton tiles with Ariane RISC-V cores) and
adds the logic that turns it into a prototype spread over one or more FPGAs. A
prototype is named **A×B×C**: A FPGAs, B nodes per FPGA, C tiles per node. A
node stands for one chip of the modelled system. Nodes can be independent, or
joined into one cache-coherent shared-memory machine by tunnelling their
network-on-chip (NoC) traffic over PCIe.

This repository holds the SystemVerilog for that added logic, the part of the
FPGA around the BYOC node. The defaults describe the main configuration,
**4×1×12**: four FPGAs, one 12-tile node on each, 48 cores, with every node
able to reach every other node's memory. Per node the logic consists of:

* a **NoC-to-AXI4 memory controller**. It turns the node's memory requests into
  AXI4 bursts on the FPGA's DRAM interface and contains a **virtual SD card**
  mapping.
* an **inter-node bridge**. It packs NoC flits into AXI4 writes that the FPGA
  shell carries over PCIe, with credit-based flow control.
* **traffic shapers** in both of the above. They add configurable latency and
  bandwidth limits, so the prototype can model slower off-chip links and
  memory than the FPGA really has.
* an **interrupt packetizer and depacketizers**. They carry RISC-V interrupt
  wires as NoC packets, so that no wire has to cross a node or an FPGA.
* the **routing and homing rules** a node needs to work in a multi-node system.
  Inter-node packets leave through tile 0's north port, and cache lines are
  homed across all nodes.

The cores, caches, routers and chipset are BYOC's. The AWS shell, DDR4
controllers and PCIe are vendor logic. None of these are here. They meet this
logic at the ports of the top module, `smappic_fpga`.

## Module map

```
smappic_fpga                    one FPGA: NODES_PER_FPGA nodes of TILES_PER_NODE tiles
├─ noc_axi4_mem_ctrl            per node, on the node's own DRAM interface
│  ├─ noc_deserializer          NoC packet -> request word
│  ├─ vsd_addr_map              main memory / virtual SD card -> DRAM address
│  ├─ traffic_shaper            memory latency / bandwidth model
│  ├─ mc_management             request buffer (sync_fifo), read/write steering, response merge
│  ├─ mc_read_engine            AXI4 AR/R, ID table, byte selection
│  ├─ mc_write_engine           AXI4 AW/W/B, ID table, strobes
│  └─ noc_serializer            response -> NoC packet
├─ inter_node_bridge            per node, above tile 0
│  ├─ bridge_send               credits, flit packing, traffic_shaper, AXI4 master
│  └─ bridge_recv               AXI4 slave, per-source buffers (sync_fifo), credit return
├─ intr_packetizer              per node: interrupt wires -> NoC packets
└─ per tile: intr_depacketizer  NoC packets -> the core's interrupt wires
             noc_route_sel      router output-port rule
             home_map           home node and LLC slice of an address
smappic_pkg                     flit, header, request/response and AXI4 types; constants
```

`sync_fifo` is a plain register FIFO used for every buffer.

## NoC packets as this design sees them

BYOC has three physical NoCs, each carrying 64-bit flits. A packet is a header
flit followed by `len` payload flits. This RTL uses the OpenPiton header
layout:

| bits  | field |
|-------|-------|
| 63:50 | destination node (chip ID) |
| 49:42 | destination tile x |
| 41:34 | destination tile y |
| 33:30 | final-destination bits (`0010` = off-chip/chipset) |
| 29:22 | payload length in flits |
| 21:14 | message type |
| 13:6  | requester's MSHR tag |

A memory request to the memory controller is laid out as follows:

* the header;
* one flit with the address in bits [47:0] and log2 of the byte count (1 to
  64 bytes) in bits [50:48];
* one flit naming the requester's node, x and y in the header positions;
* for a store, the data flits.

Message codes are 19/20 for load/store and 24/25 for their acknowledgements.
Interrupt packets use code 32. The SMAPPIC paper does not print the packet
format, so the field positions and codes are assumptions (OpenPiton practice).
All of them live in `smappic_pkg`.

## The inter-node bridge (the core of multi-FPGA operation)

A load that misses in a core's private cache goes to the line's home LLC
slice, and that home may be on another node. In that case:

1. `home_map` says which node, and the request packet carries that node ID.
2. `noc_route_sel` steers any packet for another node west to column 0, then
   north to tile 0, then out of tile 0's north port into the bridge.
3. `bridge_send` packs the flit into an AXI4 write. The FPGA shell turns the
   write into a PCIe transfer to the other FPGA.
4. On the far side `bridge_recv` unpacks the write and hands the flits to that
   node's tile 0, and the far node's routers take it from there.

The response comes back the same way.

**Encapsulation.** One AXI4 write (a single 64-byte beat) carries up to three
flits, one per NoC, in data bits [64n+63:64n]. The write address carries the
rest:

| address bits | meaning |
|--------------|---------|
| 47:40 | destination node ID |
| 39:32 | source node ID |
| 14:12 | one valid bit per NoC |

All flits in one write go to the same node. The sender takes the first NoC
that is waiting and has a credit, in rotation. It then adds every other NoC
whose waiting flit goes to the same node. The flits of one packet stay on their
NoC and in order, and all go to the packet's destination. AW and W are issued
together, and either may be accepted first. B responses are taken and ignored,
because the writes are posted.

**Credits.** The receiver keeps a buffer of `CREDITS` (8) flits for every
(source, NoC) pair. The sender holds one counter per (destination, NoC), starts
it at 8, and spends one credit per flit. Credits come back through **AXI4
reads**. The sender issues a read to a destination every `CREDIT_PERIOD` (64)
cycles, taking the destinations in turn. It also issues one at once to a
destination that a waiting flit has no credit for. Only one read is in flight
at a time. The receiver answers with the number of flits drained since that
source's last read, one 8-bit field per NoC, and clears its count. Because
buffers are per source and senders never exceed their credits, every inbound
write finds room. The receiver therefore never blocks the shared inbound bus,
which is what keeps the multi-node NoC free of deadlock.

**Whole packets.** The receive side has one output per NoC. Packets from
different sources must not interleave on that output, so the arbiter picks a
non-empty source buffer in rotation. It then stays with that buffer until the
packet's announced length has passed.

**Host access.** Source ID `NUM_NODES` (4 by default) is the host. The host
can write NoC flits into any node's inbound port, for example store packets
that fill the virtual SD card. It must follow the same credit protocol. This
matters for deadlock. Suppose a write that found no room were made to wait,
and the arbiter was part-way through another source's packet. That write
would block the remaining flits of that packet, and the bridge would stop. An
early version let the host write without credits and hit exactly that case.

**Timing.** A flit enters `bridge_send` combinationally: it is accepted in the
cycle its credit is available. It then spends at least one cycle in the
shaper, plus `cfg_link_latency` cycles. On the receive side B and R are
registered, and a flit can leave for the node the cycle after its write. The
physical PCIe round trip (1.25 µs, 125 cycles at 100 MHz) is outside the FPGA.

## The memory controller

Each node has its own DRAM interface and memory controller. Requests come in
from the chipset on one NoC port and flow through these stages:

1. `noc_deserializer` collects the packet into a request word. One request is
   held at a time.
2. `vsd_addr_map` maps the address. Main memory at `MEM_BASE` (0x8000_0000)
   goes to the **bottom** half of the node's DRAM. A virtual SD card window at
   `SD_BASE` (0xF0_0000_0000) goes to the **top** half. The F1 board has no
   SD slot, so the card is an image in DRAM that the host fills.
3. `traffic_shaper` adds `cfg_mem_latency` cycles and keeps `cfg_mem_gap`
   cycles between requests.
4. `mc_management` buffers `REQ_DEPTH` (4) requests and issues them in order.
   Loads go to the read engine and stores to the write engine. It merges the
   two response streams, alternating when both have one.
5. **Read engine.** It takes the lowest free of `NUM_IDS` (8) AXI4 IDs and
   records the MSHR tag, the requester and the byte offset for that ID. It
   reads the whole aligned 64-byte line. When the response arrives, it uses
   the ID to find the tag again and shifts the requested bytes down to bit 0.
6. **Write engine.** It uses the same ID scheme. It shifts the data to its
   offset in the line and sets the byte strobes to match. Each B response
   becomes a store acknowledgement.
7. `noc_serializer` returns a header addressed to the requester with its MSHR
   tag. For a load it is followed by max(1, bytes/8) data flits.

AXI4 responses may come back in any order, and the ID table handles that.
Nothing orders a load after an earlier store to the same line once both are in
the engines, just as AXI4 does not order AR against AW. BYOC's caches keep at
most one request per line outstanding.

## Traffic shapers

`traffic_shaper` is a FIFO that time-stamps each item on arrival. An item
leaves only when both of these hold:

* it is at least `cfg_latency` cycles old;
* at least `cfg_gap` cycles have passed since the previous item left.

`cfg_gap` is therefore the inverse of bandwidth in items per cycle. 0 or 1
means full rate. One copy sits in each memory controller and one in each
bridge's send path. The configuration is on top-level ports
(`cfg_mem_*`, `cfg_link_*`). Full throughput at latency L needs a FIFO at
least L deep. The default depth is 16.

## Interrupts over the NoC

RISC-V interrupt controllers drive a wire into each core. In a 48-core,
four-FPGA system those wires cannot be routed, so:

* **`intr_packetizer`** sits at the interrupt controller. It visits one core
  per cycle (`NUM_CORES` = 48 cores). When that core's `IRQ_W` (4) wires
  differ from what was last sent to it, it sends a two-flit packet of type 32
  to the core's node and tile. The payload carries the new levels and the core
  number. Every change is delivered, de-assertion included. A change waits at
  most one scan of all cores plus the time the NoC holds it.
* **`intr_depacketizer`** sits on the NoC input of each tile and follows packet
  boundaries. It removes interrupt packets from the stream and registers their
  levels onto the core's wires. All other packets pass through unchanged.

Core c is tile c mod 12 of node c / 12. Tiles are numbered row-major on a mesh
4 columns wide and 3 rows high, with the chipset to the west of column 0.

## Routing and homing rules

* **`noc_route_sel`** selects the output port (0 local, 1 N, 2 E, 3 S, 4 W).
  - A packet for another node, or one marked for the chipset, goes west until
    column 0 and then north until tile 0.
  - At tile 0, packets for other nodes leave north into the bridge, and
    chipset packets leave west.
  - Everything else uses X-then-Y dimension-order routing.
* **`home_map`** gives the home of an address. Main memory is split into one
  contiguous 2^33-byte (8 GiB) region per node. That region is the bottom half
  of the node's 16 GiB DRAM, so a node's lines live in its own DRAM. Within a
  region, 64-byte lines are interleaved over the node's 12 LLC slices.
  Addresses outside main memory are homed on node 0.

  The result is a NUMA machine that needs no software support. A NUMA-aware
  kernel can place data on the local node, and a kernel that is not NUMA-aware
  still works.

## Where this design departs from or adds to the paper

The paper describes what each block does and the structure of the memory
controller and the bridge. It does not give formats or sizes. Everything below
is this design's choice:

* NoC packet layout and message codes (OpenPiton style). Interrupt packet
  format.
* Bridge address layout. One flit per NoC per write. 8 credits per
  (source, NoC). A 64-cycle credit period, plus a read issued at once when a
  flit is blocked.
* Per-source receive buffers and packet-locked arbitration. The host as source
  4, bound by credits.
* The traffic shaper mechanism. In the memory controller it sits before the
  management module.
* Homing by node region with line interleaving over slices.
* The address bases for main memory and the SD card window. The DRAM size per
  node (16 GiB).
* In-order issue from the request buffer. 8 AXI4 IDs per engine.
* The routing rule is given here as a per-tile lookup. The BYOC router that
  would use it is not part of this code.

Not built here, because it comes from elsewhere: the BYOC node (cores,
caches, routers, chipset), the AXI4 crossbar needed when one FPGA holds
several nodes, the AWS shell and PCIe, the DDR4 controllers, the UART16550 and
host programs, the interrupt controller itself, and the GNG/MAPLE
accelerators. With `NODES_PER_FPGA` > 1 the top has one bridge port set per
node, and a crossbar outside must join them.

## Parameters of `smappic_fpga`

| parameter | default | meaning |
|-----------|---------|---------|
| NUM_FPGAS | 4 | FPGAs in the system (paper's main configuration) |
| NODES_PER_FPGA | 1 | nodes per FPGA (the paper supports up to 4) |
| TILES_PER_NODE | 12 | tiles per node |
| X_TILES | 4 | mesh width (12 tiles = 4 × 3) |
| IRQ_W | 4 | interrupt wires per core |
| NUM_IDS | 8 | AXI4 IDs per memory engine |
| REQ_DEPTH | 4 | memory request buffer |
| CREDITS | 8 | bridge buffer per source and NoC |
| CREDIT_PERIOD | 64 | cycles between periodic credit reads |
| SHAPER_DEPTH | 16 | traffic shaper FIFO depth |
| NODE_MEM_BITS | 33 | log2 of main memory per node |

`fpga_id` is an input, so every FPGA gets the same bitstream. Node IDs are
`fpga_id * NODES_PER_FPGA + n`.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The main
ones:

* **`tb_smappic_fpga`** runs four `smappic_fpga` instances at their default
  parameters. The testbench supplies what lies outside the custom logic:
  - a behavioural DRAM per FPGA (`axi_mem_model`, 60-cycle latency, responses
    out of order);
  - a PCIe fabric that routes writes and reads by destination field, with a
    20-cycle delay each way;
  - the glue a node would provide.

  Every node makes random 1–64-byte loads and stores to lines homed on all
  four nodes, with loads checked against a reference memory. Node 2 drains its
  inbound flits slowly, so senders run out of credits. The host writes a store
  into node 3's SD window and node 3 reads it back. Node 0's interrupt
  controller raises wires of cores on all four nodes. Router lookups are
  compared with a reference. Each mechanism is counted, and one that never
  happens is a failure. A typical run completes:
  - 44 local and 122 remote loads, and 30 local and 124 remote stores;
  - about 1200 credit reads and 34,000 credit-stall cycles;
  - one host write and its read-back;
  - 4 interrupts.

  The shortest remote load takes about 9 times as long as the shortest local
  one in that run, with the slow node and the fabric delay included.
* `tb_inter_node_bridge` wires two bridges back to back. It checks order,
  whole-packet delivery, credit stalls, and that the link latency setting
  shows.
* `tb_bridge_send` and `tb_bridge_recv` check the address encoding, credit
  limits and credit return. In `tb_bridge_recv` four senders, the host
  included, write interleaved packets.
* `tb_noc_axi4_mem_ctrl` runs the memory controller against the DRAM model. It
  checks random sized loads and stores, the SD window and the shaper's added
  latency. The engine, management, serializer and deserializer testbenches
  check their parts, including 8 AXI4 IDs in flight and one flit per cycle out
  of the serializer.
* `tb_intr_packetizer` runs 48 cores and checks that the wire levels match
  after random changes. It also checks that a single change arrives within one
  scan. `tb_intr_depacketizer` checks filtering and pass-through.
* `tb_home_map`, `tb_noc_route_sel`, `tb_vsd_addr_map` and
  `tb_traffic_shaper` check the lookups and the shaper's timing.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/smappic_pkg.sv tb/tb_noc_pkg.sv tb/tb_smappic_fpga.sv --top-module tb_smappic_fpga
./obj_dir/Vtb_smappic_fpga +verilator+rand+reset+2
```

The testbenches use only `$urandom` and reset everything they read, so they
behave the same on two-state simulators. The full-size end-to-end test takes
under a minute.

What the tests cannot show: nothing here has run against real BYOC tiles, the
AWS shell or real DRAM and PCIe. The NoC format is assumed to be OpenPiton's,
so connecting real tiles means checking `smappic_pkg` against the BYOC version
in use.
