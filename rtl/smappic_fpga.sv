// smappic_fpga: the SMAPPIC custom logic of one FPGA.
//
// A SMAPPIC prototype is written AxBxC: A FPGAs, B nodes per FPGA, C tiles
// per node; the defaults give the 4x1x12 system (four FPGAs, one 12-tile
// node each, 48 cores). Each node is a BYOC manycore; the node itself
// (cores, private caches, LLC slices, routers, chipset) is outside this
// module and meets it at the ports. Per node this module holds:
//   - noc_axi4_mem_ctrl: the node's memory controller on its own DRAM
//     interface (the chipset's memory NoC port in, AXI4 master out);
//   - inter_node_bridge: above tile 0, packing the three NoCs' inter-node
//     flits into AXI4 writes on the FPGA's outbound bus and unpacking
//     inbound writes; credits come back as AXI4 reads;
//   - intr_packetizer: watches interrupt-controller wires for every core of
//     the system and sends changes as NoC packets (entering at the chipset);
//   - per tile an intr_depacketizer on the NoC stream into the tile, which
//     drives that core's interrupt wires, a noc_route_sel giving the router
//     its output port (inter-node packets go to tile 0 and out north) and a
//     home_map giving the private cache a line's home node and slice.
// With one node per FPGA the bridge's AXI4 ports go straight to the shell's
// PCIe ports; with several, an AXI4 crossbar outside this module joins them.
// Node IDs are fpga_id * NODES_PER_FPGA + local index.
//
// cfg_mem_* and cfg_link_* set the added latency (cycles) and minimum gap
// between items (bandwidth) of the memory controller's and bridge's shapers.
module smappic_fpga
  import smappic_pkg::*;
#(
  parameter int unsigned NUM_FPGAS      = 4,
  parameter int unsigned NODES_PER_FPGA = 1,
  parameter int unsigned TILES_PER_NODE = 12,
  parameter int unsigned X_TILES        = 4,
  parameter int unsigned IRQ_W          = 4,
  parameter int unsigned NUM_IDS        = 8,
  parameter int unsigned REQ_DEPTH      = 4,
  parameter int unsigned CREDITS        = 8,
  parameter int unsigned CREDIT_PERIOD  = 64,
  parameter int unsigned SHAPER_DEPTH   = 16,
  parameter int unsigned NODE_MEM_BITS  = 33,
  localparam int unsigned NN = NODES_PER_FPGA,
  localparam int unsigned NT = TILES_PER_NODE,
  localparam int unsigned NUM_CORES = NUM_FPGAS * NODES_PER_FPGA * TILES_PER_NODE
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  fpga_id,
  input  logic [15:0] cfg_mem_latency,
  input  logic [15:0] cfg_mem_gap,
  input  logic [15:0] cfg_link_latency,
  input  logic [15:0] cfg_link_gap,

  // memory controller <-> node chipset NoC
  input  logic        mc_in_valid  [NN],
  output logic        mc_in_ready  [NN],
  input  flit_t       mc_in_flit   [NN],
  output logic        mc_out_valid [NN],
  input  logic        mc_out_ready [NN],
  output flit_t       mc_out_flit  [NN],
  // memory controller -> DRAM interface (AXI4 master)
  output logic    ddr_aw_valid [NN], input  logic ddr_aw_ready [NN], output axi_ax_t ddr_aw [NN],
  output logic    ddr_w_valid  [NN], input  logic ddr_w_ready  [NN], output axi_w_t  ddr_w  [NN],
  input  logic    ddr_b_valid  [NN], output logic ddr_b_ready  [NN], input  axi_b_t  ddr_b  [NN],
  output logic    ddr_ar_valid [NN], input  logic ddr_ar_ready [NN], output axi_ax_t ddr_ar [NN],
  input  logic    ddr_r_valid  [NN], output logic ddr_r_ready  [NN], input  axi_r_t  ddr_r  [NN],

  // bridge <-> tile 0 north port, three NoCs
  input  logic [NUM_NOCS-1:0] br_tx_valid [NN],
  output logic [NUM_NOCS-1:0] br_tx_ready [NN],
  input  flit_t               br_tx_flit  [NN][NUM_NOCS],
  output logic [NUM_NOCS-1:0] br_rx_valid [NN],
  input  logic [NUM_NOCS-1:0] br_rx_ready [NN],
  output flit_t               br_rx_flit  [NN][NUM_NOCS],
  // bridge outbound AXI4 (master, towards PCIe / crossbar)
  output logic    ob_aw_valid [NN], input  logic ob_aw_ready [NN], output axi_ax_t ob_aw [NN],
  output logic    ob_w_valid  [NN], input  logic ob_w_ready  [NN], output axi_w_t  ob_w  [NN],
  input  logic    ob_b_valid  [NN], output logic ob_b_ready  [NN], input  axi_b_t  ob_b  [NN],
  output logic    ob_ar_valid [NN], input  logic ob_ar_ready [NN], output axi_ax_t ob_ar [NN],
  input  logic    ob_r_valid  [NN], output logic ob_r_ready  [NN], input  axi_r_t  ob_r  [NN],
  // bridge inbound AXI4 (slave, from PCIe / crossbar)
  input  logic    ib_aw_valid [NN], output logic ib_aw_ready [NN], input  axi_ax_t ib_aw [NN],
  input  logic    ib_w_valid  [NN], output logic ib_w_ready  [NN], input  axi_w_t  ib_w  [NN],
  output logic    ib_b_valid  [NN], input  logic ib_b_ready  [NN], output axi_b_t  ib_b  [NN],
  input  logic    ib_ar_valid [NN], output logic ib_ar_ready [NN], input  axi_ax_t ib_ar [NN],
  output logic    ib_r_valid  [NN], input  logic ib_r_ready  [NN], output axi_r_t  ib_r  [NN],

  // interrupt controller wires in, interrupt packets out to the chipset NoC
  input  logic [IRQ_W-1:0] irq_ctrl [NN][NUM_CORES],
  output logic        ipk_valid [NN],
  input  logic        ipk_ready [NN],
  output flit_t       ipk_flit  [NN],

  // per tile: NoC into the tile, passed on to the core; the core's interrupts
  input  logic        tile_in_valid  [NN][NT],
  output logic        tile_in_ready  [NN][NT],
  input  flit_t       tile_in_flit   [NN][NT],
  output logic        core_in_valid  [NN][NT],
  input  logic        core_in_ready  [NN][NT],
  output flit_t       core_in_flit   [NN][NT],
  output logic [IRQ_W-1:0] core_irq  [NN][NT],
  // per tile: router port lookup and cache-line homing lookup
  input  noc_hdr_t    route_hdr  [NN][NT],
  output logic [2:0]  route_port [NN][NT],
  input  logic [47:0] home_addr  [NN][NT],
  output logic [CHIP_W-1:0] home_node [NN][NT],
  output logic [XY_W-1:0]   home_x    [NN][NT],
  output logic [XY_W-1:0]   home_y    [NN][NT],

  // activity counters
  output logic [31:0] sd_accesses    [NN],
  output logic [31:0] writes_sent    [NN],
  output logic [31:0] credit_reads   [NN],
  output logic [31:0] credit_stalls  [NN],
  output logic [31:0] flits_received [NN],
  output logic [31:0] irq_packets    [NN]
);
  localparam int unsigned NUM_NODES = NUM_FPGAS * NODES_PER_FPGA;

  for (genvar n = 0; n < NN; n++) begin : g_node
    logic [NODE_W-1:0] node_id;
    assign node_id = NODE_W'(int'(fpga_id) * NODES_PER_FPGA + n);

    noc_axi4_mem_ctrl #(.NUM_IDS(NUM_IDS), .REQ_DEPTH(REQ_DEPTH),
                        .SHAPER_DEPTH(SHAPER_DEPTH), .DRAM_BITS(NODE_MEM_BITS + 1)) u_mc (
      .clk, .rst_n, .cfg_latency(cfg_mem_latency), .cfg_gap(cfg_mem_gap),
      .noc_in_valid(mc_in_valid[n]), .noc_in_ready(mc_in_ready[n]), .noc_in_flit(mc_in_flit[n]),
      .noc_out_valid(mc_out_valid[n]), .noc_out_ready(mc_out_ready[n]), .noc_out_flit(mc_out_flit[n]),
      .m_aw_valid(ddr_aw_valid[n]), .m_aw_ready(ddr_aw_ready[n]), .m_aw(ddr_aw[n]),
      .m_w_valid(ddr_w_valid[n]),   .m_w_ready(ddr_w_ready[n]),   .m_w(ddr_w[n]),
      .m_b_valid(ddr_b_valid[n]),   .m_b_ready(ddr_b_ready[n]),   .m_b(ddr_b[n]),
      .m_ar_valid(ddr_ar_valid[n]), .m_ar_ready(ddr_ar_ready[n]), .m_ar(ddr_ar[n]),
      .m_r_valid(ddr_r_valid[n]),   .m_r_ready(ddr_r_ready[n]),   .m_r(ddr_r[n]),
      .sd_accesses(sd_accesses[n])
    );

    inter_node_bridge #(.NUM_NODES(NUM_NODES), .CREDITS(CREDITS),
                        .CREDIT_PERIOD(CREDIT_PERIOD), .SHAPER_DEPTH(SHAPER_DEPTH)) u_bridge (
      .clk, .rst_n, .my_node(node_id),
      .cfg_latency(cfg_link_latency), .cfg_gap(cfg_link_gap),
      .tx_valid(br_tx_valid[n]), .tx_ready(br_tx_ready[n]), .tx_flit(br_tx_flit[n]),
      .rx_valid(br_rx_valid[n]), .rx_ready(br_rx_ready[n]), .rx_flit(br_rx_flit[n]),
      .om_aw_valid(ob_aw_valid[n]), .om_aw_ready(ob_aw_ready[n]), .om_aw(ob_aw[n]),
      .om_w_valid(ob_w_valid[n]),   .om_w_ready(ob_w_ready[n]),   .om_w(ob_w[n]),
      .om_b_valid(ob_b_valid[n]),   .om_b_ready(ob_b_ready[n]),   .om_b(ob_b[n]),
      .om_ar_valid(ob_ar_valid[n]), .om_ar_ready(ob_ar_ready[n]), .om_ar(ob_ar[n]),
      .om_r_valid(ob_r_valid[n]),   .om_r_ready(ob_r_ready[n]),   .om_r(ob_r[n]),
      .is_aw_valid(ib_aw_valid[n]), .is_aw_ready(ib_aw_ready[n]), .is_aw(ib_aw[n]),
      .is_w_valid(ib_w_valid[n]),   .is_w_ready(ib_w_ready[n]),   .is_w(ib_w[n]),
      .is_b_valid(ib_b_valid[n]),   .is_b_ready(ib_b_ready[n]),   .is_b(ib_b[n]),
      .is_ar_valid(ib_ar_valid[n]), .is_ar_ready(ib_ar_ready[n]), .is_ar(ib_ar[n]),
      .is_r_valid(ib_r_valid[n]),   .is_r_ready(ib_r_ready[n]),   .is_r(ib_r[n]),
      .writes_sent(writes_sent[n]), .credit_reads(credit_reads[n]),
      .credit_stalls(credit_stalls[n]), .flits_received(flits_received[n])
    );

    intr_packetizer #(.NUM_CORES(NUM_CORES), .TILES_PER_NODE(TILES_PER_NODE),
                      .X_TILES(X_TILES), .IRQ_W(IRQ_W)) u_ipk (
      .clk, .rst_n, .irq_in(irq_ctrl[n]),
      .flit_valid(ipk_valid[n]), .flit_ready(ipk_ready[n]), .flit(ipk_flit[n]),
      .packets_sent(irq_packets[n])
    );

    for (genvar t = 0; t < NT; t++) begin : g_tile
      intr_depacketizer #(.IRQ_W(IRQ_W)) u_idp (
        .clk, .rst_n,
        .in_valid(tile_in_valid[n][t]), .in_ready(tile_in_ready[n][t]), .in_flit(tile_in_flit[n][t]),
        .out_valid(core_in_valid[n][t]), .out_ready(core_in_ready[n][t]), .out_flit(core_in_flit[n][t]),
        .irq(core_irq[n][t]), .irq_packets()
      );

      noc_route_sel u_route (
        .my_chip(CHIP_W'(node_id)), .my_x(XY_W'(t % X_TILES)), .my_y(XY_W'(t / X_TILES)),
        .hdr(route_hdr[n][t]), .port(route_port[n][t])
      );

      home_map #(.NUM_NODES(NUM_NODES), .TILES_PER_NODE(TILES_PER_NODE), .X_TILES(X_TILES),
                 .NODE_MEM_BITS(NODE_MEM_BITS)) u_home (
        .addr(home_addr[n][t]), .is_mem(),
        .home_node(home_node[n][t]), .home_x(home_x[n][t]), .home_y(home_y[n][t])
      );
    end
  end
endmodule
