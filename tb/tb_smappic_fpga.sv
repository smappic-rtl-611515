// tb_smappic_fpga: end-to-end test of a 4x1x12 SMAPPIC prototype.
//
// Four copies of smappic_fpga at their default size (four FPGAs, one 12-tile
// node each), FPGA IDs 0 to 3. The testbench supplies what lies outside the
// custom logic:
//   - a DRAM model per FPGA on the memory controller's AXI4 port;
//   - a PCIe fabric: each outbound AXI4 write or read is routed, after a
//     fixed delay, by its destination-node field to that FPGA's inbound port,
//     and the response is returned; the host reaches inbound ports too;
//   - per node, the routing a BYOC node would do with the bridge's, the
//     memory controller's, the interrupt packetizer's and the tiles' NoC
//     streams: memory requests arriving from the bridge go to the memory
//     controller, responses for other nodes go back out through the bridge,
//     interrupt packets go to the addressed tile.
// Traffic and checks:
//   - every node issues random loads and stores (1 to 64 bytes) to lines homed
//     on all four nodes, the home node taken from the tile's home lookup;
//     each load's data is checked against a reference memory, each store
//     must be acknowledged; remote loads must take longer than local ones;
//   - every node sends ordinary packets to the other nodes while node 2
//     accepts inbound flits slowly, so senders run out of credits;
//   - the host writes a store packet into node 3 through the inbound port;
//     it lands in the virtual SD card region, and a later load from node 3
//     must read it back;
//   - interrupt wires of cores on all four nodes are raised at node 0's
//     interrupt controller and must reach the right cores;
//   - tile router port lookups are compared with a reference.
// Every mechanism has a counter; a counter left at zero is a failure.
module tb_smappic_fpga;
  import smappic_pkg::*;
  import tb_noc_pkg::*;
  localparam int NF = 4, NT = 12, NC = 48, IW = 4;
  localparam logic [47:0] MEM_BASE = 48'h8000_0000;
  localparam logic [47:0] SD_BASE  = 48'hF0_0000_0000;
  localparam int PCIE_DELAY = 20;     // one-way fabric delay, cycles

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  bit up = 0;                      // set once reset is released
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- DUT wiring ----------------
  logic    mc_in_valid [NF][1], mc_in_ready [NF][1], mc_out_valid [NF][1], mc_out_ready [NF][1];
  flit_t   mc_in_flit [NF][1], mc_out_flit [NF][1];
  logic    d_aw_v [NF][1], d_aw_r [NF][1], d_w_v [NF][1], d_w_r [NF][1], d_b_v [NF][1], d_b_r [NF][1];
  logic    d_ar_v [NF][1], d_ar_r [NF][1], d_r_v [NF][1], d_r_r [NF][1];
  axi_ax_t d_aw [NF][1], d_ar [NF][1]; axi_w_t d_w [NF][1]; axi_b_t d_b [NF][1]; axi_r_t d_r [NF][1];
  logic [NUM_NOCS-1:0] br_tx_valid [NF][1], br_tx_ready [NF][1], br_rx_valid [NF][1], br_rx_ready [NF][1];
  flit_t   br_tx_flit [NF][1][NUM_NOCS], br_rx_flit [NF][1][NUM_NOCS];
  logic    ob_aw_v [NF][1], ob_aw_r [NF][1], ob_w_v [NF][1], ob_w_r [NF][1], ob_b_v [NF][1], ob_b_r [NF][1];
  logic    ob_ar_v [NF][1], ob_ar_r [NF][1], ob_r_v [NF][1], ob_r_r [NF][1];
  axi_ax_t ob_aw [NF][1], ob_ar [NF][1]; axi_w_t ob_w [NF][1]; axi_b_t ob_b [NF][1]; axi_r_t ob_r [NF][1];
  logic    ib_aw_v [NF][1], ib_aw_r [NF][1], ib_w_v [NF][1], ib_w_r [NF][1], ib_b_v [NF][1], ib_b_r [NF][1];
  logic    ib_ar_v [NF][1], ib_ar_r [NF][1], ib_r_v [NF][1], ib_r_r [NF][1];
  axi_ax_t ib_aw [NF][1], ib_ar [NF][1]; axi_w_t ib_w [NF][1]; axi_b_t ib_b [NF][1]; axi_r_t ib_r [NF][1];
  logic [IW-1:0] irq_ctrl [NF][1][NC];
  logic    ipk_valid [NF][1], ipk_ready [NF][1];
  flit_t   ipk_flit [NF][1];
  logic    tile_in_valid [NF][1][NT], tile_in_ready [NF][1][NT], core_in_valid [NF][1][NT], core_in_ready [NF][1][NT];
  flit_t   tile_in_flit [NF][1][NT], core_in_flit [NF][1][NT];
  logic [IW-1:0] core_irq [NF][1][NT];
  noc_hdr_t route_hdr [NF][1][NT];
  logic [2:0] route_port [NF][1][NT];
  logic [47:0] home_addr [NF][1][NT];
  logic [CHIP_W-1:0] home_node [NF][1][NT];
  logic [XY_W-1:0] home_x [NF][1][NT], home_y [NF][1][NT];
  logic [31:0] sd_accesses [NF][1], writes_sent [NF][1], credit_reads [NF][1], credit_stalls [NF][1];
  logic [31:0] flits_received [NF][1], irq_packets [NF][1];
  int n_dram_reads [NF], n_dram_writes [NF];

  for (genvar f = 0; f < NF; f++) begin : g_fpga
    smappic_fpga u_fpga (
      .clk, .rst_n, .fpga_id(8'(f)),
      .cfg_mem_latency(16'd0), .cfg_mem_gap(16'd0), .cfg_link_latency(16'd10), .cfg_link_gap(16'd0),
      .mc_in_valid(mc_in_valid[f]), .mc_in_ready(mc_in_ready[f]), .mc_in_flit(mc_in_flit[f]),
      .mc_out_valid(mc_out_valid[f]), .mc_out_ready(mc_out_ready[f]), .mc_out_flit(mc_out_flit[f]),
      .ddr_aw_valid(d_aw_v[f]), .ddr_aw_ready(d_aw_r[f]), .ddr_aw(d_aw[f]),
      .ddr_w_valid(d_w_v[f]),   .ddr_w_ready(d_w_r[f]),   .ddr_w(d_w[f]),
      .ddr_b_valid(d_b_v[f]),   .ddr_b_ready(d_b_r[f]),   .ddr_b(d_b[f]),
      .ddr_ar_valid(d_ar_v[f]), .ddr_ar_ready(d_ar_r[f]), .ddr_ar(d_ar[f]),
      .ddr_r_valid(d_r_v[f]),   .ddr_r_ready(d_r_r[f]),   .ddr_r(d_r[f]),
      .br_tx_valid(br_tx_valid[f]), .br_tx_ready(br_tx_ready[f]), .br_tx_flit(br_tx_flit[f]),
      .br_rx_valid(br_rx_valid[f]), .br_rx_ready(br_rx_ready[f]), .br_rx_flit(br_rx_flit[f]),
      .ob_aw_valid(ob_aw_v[f]), .ob_aw_ready(ob_aw_r[f]), .ob_aw(ob_aw[f]),
      .ob_w_valid(ob_w_v[f]),   .ob_w_ready(ob_w_r[f]),   .ob_w(ob_w[f]),
      .ob_b_valid(ob_b_v[f]),   .ob_b_ready(ob_b_r[f]),   .ob_b(ob_b[f]),
      .ob_ar_valid(ob_ar_v[f]), .ob_ar_ready(ob_ar_r[f]), .ob_ar(ob_ar[f]),
      .ob_r_valid(ob_r_v[f]),   .ob_r_ready(ob_r_r[f]),   .ob_r(ob_r[f]),
      .ib_aw_valid(ib_aw_v[f]), .ib_aw_ready(ib_aw_r[f]), .ib_aw(ib_aw[f]),
      .ib_w_valid(ib_w_v[f]),   .ib_w_ready(ib_w_r[f]),   .ib_w(ib_w[f]),
      .ib_b_valid(ib_b_v[f]),   .ib_b_ready(ib_b_r[f]),   .ib_b(ib_b[f]),
      .ib_ar_valid(ib_ar_v[f]), .ib_ar_ready(ib_ar_r[f]), .ib_ar(ib_ar[f]),
      .ib_r_valid(ib_r_v[f]),   .ib_r_ready(ib_r_r[f]),   .ib_r(ib_r[f]),
      .irq_ctrl(irq_ctrl[f]), .ipk_valid(ipk_valid[f]), .ipk_ready(ipk_ready[f]), .ipk_flit(ipk_flit[f]),
      .tile_in_valid(tile_in_valid[f]), .tile_in_ready(tile_in_ready[f]), .tile_in_flit(tile_in_flit[f]),
      .core_in_valid(core_in_valid[f]), .core_in_ready(core_in_ready[f]), .core_in_flit(core_in_flit[f]),
      .core_irq(core_irq[f]), .route_hdr(route_hdr[f]), .route_port(route_port[f]),
      .home_addr(home_addr[f]), .home_node(home_node[f]), .home_x(home_x[f]), .home_y(home_y[f]),
      .sd_accesses(sd_accesses[f]), .writes_sent(writes_sent[f]), .credit_reads(credit_reads[f]),
      .credit_stalls(credit_stalls[f]), .flits_received(flits_received[f]), .irq_packets(irq_packets[f])
    );

    axi_mem_model #(.LATENCY(60)) u_ddr (
      .clk,
      .aw_valid(d_aw_v[f][0]), .aw_ready(d_aw_r[f][0]), .aw(d_aw[f][0]),
      .w_valid(d_w_v[f][0]),   .w_ready(d_w_r[f][0]),   .w(d_w[f][0]),
      .b_valid(d_b_v[f][0]),   .b_ready(d_b_r[f][0]),   .b(d_b[f][0]),
      .ar_valid(d_ar_v[f][0]), .ar_ready(d_ar_r[f][0]), .ar(d_ar[f][0]),
      .r_valid(d_r_v[f][0]),   .r_ready(d_r_r[f][0]),   .r(d_r[f][0]),
      .n_reads(n_dram_reads[f]), .n_writes(n_dram_writes[f]), .last_aw_addr(), .last_ar_addr()
    );
  end

  // ---------------- mechanism counters ----------------
  int n_local_ld = 0, n_local_st = 0, n_remote_ld = 0, n_remote_st = 0;
  int n_req_via_bridge = 0, n_resp_via_bridge = 0, n_generic_tx = 0, n_generic_rx = 0;
  int n_host_writes = 0, n_sd_readback = 0, n_irq_remote = 0, n_irq_local = 0;
  int n_route = 0, n_home = 0, n_passthru = 0;
  longint lat_local = 0, lat_remote = 0;

  // ---------------- PCIe fabric ----------------
  bit wlock [NF], rlock [NF];

  task automatic fabric_write(input int d, input axi_ax_t a, input axi_w_t wd);
    bit aw_t, w_t;
    while (wlock[d]) @(negedge clk);
    wlock[d] = 1;
    @(negedge clk);
    ib_aw_v[d][0] = 1; ib_aw[d][0] = a; ib_w_v[d][0] = 1; ib_w[d][0] = wd;
    aw_t = 0; w_t = 0;
    while (!(aw_t && w_t)) begin
      bit ta, tw;
      #1;
      ta = ib_aw_v[d][0] && ib_aw_r[d][0];
      tw = ib_w_v[d][0] && ib_w_r[d][0];
      @(posedge clk);
      #1;
      if (ta) begin ib_aw_v[d][0] = 0; aw_t = 1; end
      if (tw) begin ib_w_v[d][0] = 0; w_t = 1; end
      @(negedge clk);
    end
    while (!ib_b_v[d][0]) @(negedge clk);
    checks++;
    if (ib_b[d][0].resp != 2'b00) begin failures++; $display("FAIL node %0d write response %b", d, ib_b[d][0].resp); end
    wlock[d] = 0;
  endtask

  task automatic fabric_read(input int d, input axi_ax_t a, output axi_r_t rd);
    while (rlock[d]) @(negedge clk);
    rlock[d] = 1;
    @(negedge clk);
    ib_ar_v[d][0] = 1; ib_ar[d][0] = a;
    #1;
    while (!ib_ar_r[d][0]) begin @(negedge clk); #1; end
    @(posedge clk);
    #1;
    ib_ar_v[d][0] = 0;
    @(negedge clk);
    while (!ib_r_v[d][0]) @(negedge clk);
    rd = ib_r[d][0];
    rlock[d] = 0;
  endtask

  for (genvar f = 0; f < NF; f++) begin : g_fab
    initial begin
      ib_aw_v[f][0] = 0; ib_w_v[f][0] = 0; ib_ar_v[f][0] = 0;
      ib_aw[f][0] = '0; ib_w[f][0] = '0; ib_ar[f][0] = '0;
      ib_b_r[f][0] = 1; ib_r_r[f][0] = 1;
      wlock[f] = 0; rlock[f] = 0;
    end
    // writes leaving FPGA f
    initial begin
      ob_aw_r[f][0] = 0; ob_w_r[f][0] = 0; ob_b_v[f][0] = 0; ob_b[f][0] = '0;
      wait (up);
      forever begin
        @(negedge clk);
        #2;
        if (ob_aw_v[f][0] && ob_w_v[f][0]) begin
          axi_ax_t a;
          axi_w_t  wd;
          int d;
          a = ob_aw[f][0]; wd = ob_w[f][0];
          d = int'(a.addr[BR_DST_LSB +: NODE_W]);
          checks++;
          if (d >= NF || d == f || a.addr[BR_SRC_LSB +: NODE_W] != NODE_W'(f)) begin
            failures++; $display("FAIL FPGA %0d write address %h", f, a.addr); d = (f + 1) % NF;
          end
          ob_aw_r[f][0] = 1; ob_w_r[f][0] = 1;
          @(posedge clk);
          #1;
          ob_aw_r[f][0] = 0; ob_w_r[f][0] = 0;
          repeat (PCIE_DELAY) @(posedge clk);
          fabric_write(d, a, wd);
          @(negedge clk);
          ob_b_v[f][0] = 1;
          @(posedge clk);
          #1;
          ob_b_v[f][0] = 0;
        end
      end
    end
    // credit reads leaving FPGA f
    initial begin
      ob_ar_r[f][0] = 0; ob_r_v[f][0] = 0; ob_r[f][0] = '0;
      wait (up);
      forever begin
        @(negedge clk);
        #2;
        if (ob_ar_v[f][0]) begin
          axi_ax_t a;
          axi_r_t  rd;
          a = ob_ar[f][0];
          ob_ar_r[f][0] = 1;
          @(posedge clk);
          #1;
          ob_ar_r[f][0] = 0;
          repeat (PCIE_DELAY) @(posedge clk);
          fabric_read(int'(a.addr[BR_DST_LSB +: NODE_W]) % NF, a, rd);
          repeat (PCIE_DELAY) @(posedge clk);
          @(negedge clk);
          ob_r_v[f][0] = 1; ob_r[f][0] = rd;
          #1;
          while (!ob_r_r[f][0]) begin @(negedge clk); #1; end
          @(posedge clk);
          #1;
          ob_r_v[f][0] = 0;
        end
      end
    end
  end

  // ---------------- node-side NoC glue ----------------
  flit_t txq  [NF][NUM_NOCS][$];   // to the bridge
  flit_t mcq  [NF][$];             // to the memory controller
  flit_t tileq [NF][NT][$];        // into a tile
  flit_t ptq  [NF][NT][$];         // expected out of a tile to its core

  // outstanding memory operations, by requester and MSHR tag
  typedef struct {
    bit            wr;
    int            size;
    logic [511:0]  exp;
    longint        start;
    bit            remote;
    bit            sd;
  } op_t;
  op_t pend [NF][int];
  logic [7:0] refmem [logic [47:0]];

  function automatic bit is_mem_msg(input logic [7:0] m);
    return m == MSG_LOAD_MEM || m == MSG_STORE_MEM;
  endfunction

  function automatic void check_resp(input int f, input flits_t pkt);
    noc_hdr_t h;
    op_t o;
    int tag;
    h = noc_hdr_t'(pkt[0]);
    tag = int'(h.mshr);
    checks++;
    if (h.chipid != CHIP_W'(f) || !pend[f].exists(tag)) begin
      failures++; $display("FAIL node %0d unexpected response %h", f, pkt[0]); return;
    end
    o = pend[f][tag];
    pend[f].delete(tag);
    checks++;
    if (o.wr) begin
      if (h.msg != MSG_STORE_MEM_ACK) begin failures++; $display("FAIL node %0d tag %0d expected store ack, msg %0d", f, tag, h.msg); end
      else if (o.remote) n_remote_st++; else if (!o.sd) n_local_st++;
      if (o.sd) n_host_writes++;
    end else begin
      logic [511:0] got;
      got = '0;
      for (int i = 1; i < pkt.size(); i++) got[(i-1)*64 +: 64] = pkt[i];
      if (h.msg != MSG_LOAD_MEM_ACK || pkt.size() != 1 + int'(data_flits(3'(o.size))) || got !== o.exp) begin
        failures++; $display("FAIL node %0d tag %0d load got %h expected %h", f, tag, got[127:0], o.exp[127:0]);
      end else begin
        if (o.sd) n_sd_readback++;
        else if (o.remote) begin
          n_remote_ld++;
          if (lat_remote == 0 || cyc - o.start < lat_remote) lat_remote = cyc - o.start;
        end else begin
          n_local_ld++;
          if (lat_local == 0 || cyc - o.start < lat_local) lat_local = cyc - o.start;
        end
      end
    end
  endfunction

  // a packet arriving at node f from the bridge
  function automatic void from_bridge(input int f, input int n, input flits_t pkt);
    noc_hdr_t h;
    h = noc_hdr_t'(pkt[0]);
    checks++;
    if (h.chipid != CHIP_W'(f)) begin failures++; $display("FAIL node %0d got packet for node %0d", f, h.chipid); return; end
    if (is_mem_msg(h.msg)) begin
      foreach (pkt[i]) mcq[f].push_back(pkt[i]);
      n_req_via_bridge++;
    end else if (h.msg == MSG_LOAD_MEM_ACK || h.msg == MSG_STORE_MEM_ACK) begin
      check_resp(f, pkt);
      n_resp_via_bridge++;
    end else if (h.msg == MSG_INTERRUPT) begin
      foreach (pkt[i]) tileq[f][int'(h.y) * 4 + int'(h.x)].push_back(pkt[i]);
    end else begin
      n_generic_rx++;
      checks++;
      if (pkt.size() > 1 && pkt[1][63:56] != 8'(f)) begin failures++; $display("FAIL node %0d generic payload %h", f, pkt[1]); end
    end
  endfunction

  for (genvar f = 0; f < NF; f++) begin : g_glue
    for (genvar n = 0; n < NUM_NOCS; n++) begin : g_noc
      // bridge transmit
      initial begin
        br_tx_valid[f][0][n] = 0; br_tx_flit[f][0][n] = '0;
        forever begin
          @(negedge clk);
          if (txq[f][n].size() > 0) begin
            br_tx_valid[f][0][n] = 1; br_tx_flit[f][0][n] = txq[f][n][0];
            #1;
            while (!br_tx_ready[f][0][n]) begin @(negedge clk); #1; end
            @(posedge clk);
            void'(txq[f][n].pop_front());
          end else br_tx_valid[f][0][n] = 0;
        end
      end
      // bridge receive; node 2 drains slowly
      initial begin
        flits_t pkt;
        int need;
        br_rx_ready[f][0][n] = 0;
        pkt.delete();
        need = 0;
        forever begin
          @(posedge clk);
          #1;
          br_rx_ready[f][0][n] = (f == 2) ? ($urandom_range(0, 9) == 0) : 1'b1;
          @(negedge clk);
          #2;
          if (br_rx_valid[f][0][n] && br_rx_ready[f][0][n]) begin
            if (pkt.size() == 0) need = 1 + int'(br_rx_flit[f][0][n][29:22]);
            pkt.push_back(br_rx_flit[f][0][n]);
            if (pkt.size() == need) begin from_bridge(f, n, pkt); pkt.delete(); end
          end
        end
      end
    end

    // memory controller input
    initial begin
      mc_in_valid[f][0] = 0; mc_in_flit[f][0] = '0;
      forever begin
        @(negedge clk);
        if (mcq[f].size() > 0) begin
          mc_in_valid[f][0] = 1; mc_in_flit[f][0] = mcq[f][0];
          #1;
          while (!mc_in_ready[f][0]) begin @(negedge clk); #1; end
          @(posedge clk);
          void'(mcq[f].pop_front());
        end else mc_in_valid[f][0] = 0;
      end
    end
    // memory controller output: local responses checked, others to the bridge
    initial begin
      flits_t pkt;
      int need;
      mc_out_ready[f][0] = 1;
      pkt.delete();
      need = 0;
      forever begin
        @(negedge clk);
        #2;
        if (mc_out_valid[f][0] && mc_out_ready[f][0]) begin
          if (pkt.size() == 0) need = 1 + int'(mc_out_flit[f][0][29:22]);
          pkt.push_back(mc_out_flit[f][0]);
          if (pkt.size() == need) begin
            noc_hdr_t h;
            h = noc_hdr_t'(pkt[0]);
            if (h.chipid == CHIP_W'(f)) check_resp(f, pkt);
            else foreach (pkt[i]) txq[f][2].push_back(pkt[i]);
            pkt.delete();
          end
        end
      end
    end
    // interrupt packets: to a local tile or out through the bridge (NoC 0)
    initial begin
      flits_t pkt;
      ipk_ready[f][0] = 1;
      pkt.delete();
      forever begin
        @(negedge clk);
        #2;
        if (ipk_valid[f][0] && ipk_ready[f][0]) begin
          pkt.push_back(ipk_flit[f][0]);
          if (pkt.size() == 2) begin
            noc_hdr_t h;
            h = noc_hdr_t'(pkt[0]);
            if (h.chipid == CHIP_W'(f)) foreach (pkt[i]) tileq[f][int'(h.y) * 4 + int'(h.x)].push_back(pkt[i]);
            else foreach (pkt[i]) txq[f][0].push_back(pkt[i]);
            pkt.delete();
          end
        end
      end
    end
    for (genvar t = 0; t < NT; t++) begin : g_tile
      initial begin
        tile_in_valid[f][0][t] = 0; tile_in_flit[f][0][t] = '0;
        forever begin
          @(negedge clk);
          if (tileq[f][t].size() > 0) begin
            tile_in_valid[f][0][t] = 1; tile_in_flit[f][0][t] = tileq[f][t][0];
            #1;
            while (!tile_in_ready[f][0][t]) begin @(negedge clk); #1; end
            @(posedge clk);
            void'(tileq[f][t].pop_front());
          end else tile_in_valid[f][0][t] = 0;
        end
      end
      initial begin
        core_in_ready[f][0][t] = 1;
        forever begin
          @(negedge clk);
          #2;
          if (core_in_valid[f][0][t]) begin
            checks++;
            if (ptq[f][t].size() == 0 || ptq[f][t][0] !== core_in_flit[f][0][t]) begin
              failures++; $display("FAIL node %0d tile %0d passed %h", f, t, core_in_flit[f][0][t]);
            end else begin void'(ptq[f][t].pop_front()); n_passthru++; end
          end
        end
      end
    end
  end

  // ---------------- traffic ----------------
  localparam int OPS = 80;
  int done_req = 0, done_gen = 0;
  int pend_line [NF][int];     // line (home * 16 + index) of each outstanding tag

  function automatic logic [47:0] line_addr(input int home, input int f, input int l);
    return MEM_BASE + (48'(home) << 33) + 48'((l * NF + f) * 64);
  endfunction

  function automatic bit line_busy(input int f, input int hl);
    foreach (pend_line[f][t]) if (pend[f].exists(t) && pend_line[f][t] == hl) return 1;
    return 0;
  endfunction

  // loads and stores from every node
  for (genvar f = 0; f < NF; f++) begin : g_req
    initial begin
      for (int t = 0; t < NT; t++) begin home_addr[f][0][t] = '0; route_hdr[f][0][t] = '0; end
      wait (up);
      repeat (10) @(posedge clk);
      for (int k = 0; k < OPS; k++) begin
        int home, l, size, off, tile;
        bit wr;
        logic [47:0] addr;
        logic [511:0] data;
        flits_t q;
        op_t o;
        home = $urandom_range(0, NF - 1);
        l = $urandom_range(0, 15);
        while (line_busy(f, home * 16 + l) || pend[f].size() >= 8) begin
          @(posedge clk);
          home = $urandom_range(0, NF - 1);
          l = $urandom_range(0, 15);
        end
        size = $urandom_range(0, 6);
        off = $urandom_range(0, (64 >> size) - 1) << size;
        addr = line_addr(home, f, l) + 48'(off);
        // the home lookup of a random tile names the node to send to
        tile = $urandom_range(0, NT - 1);
        @(negedge clk);
        home_addr[f][0][tile] = addr;
        #1;
        checks++; n_home++;
        if (home_node[f][0][tile] != CHIP_W'(home)) begin
          failures++; $display("FAIL home of %h is %0d, expected %0d", addr, home_node[f][0][tile], home);
        end
        wr = 1'($urandom_range(0, 1));
        data = {$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom(),
                $urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
        o.wr = wr; o.size = size; o.start = cyc; o.remote = (home != f); o.sd = 0; o.exp = '0;
        for (int i = 0; i < (1 << size); i++) begin
          if (wr) refmem[addr + 48'(i)] = data[i*8 +: 8];
          else o.exp[i*8 +: 8] = refmem.exists(addr + 48'(i)) ? refmem[addr + 48'(i)] : 8'h00;
        end
        pend[f][k] = o;
        pend_line[f][k] = home * 16 + l;
        q = mk_mem_req(wr, k, addr, size, f, tile % 4, tile / 4, data, int'(home_node[f][0][tile]));
        if (home == f) foreach (q[i]) mcq[f].push_back(q[i]);
        else foreach (q[i]) txq[f][1].push_back(q[i]);
        repeat ($urandom_range(0, 6)) @(posedge clk);
      end
      while (pend[f].size() > 0) @(posedge clk);
      done_req++;
    end

    // ordinary packets to the other nodes on NoC 0
    initial begin
      wait (up);
      repeat (20) @(posedge clk);
      for (int k = 0; k < 40; k++) begin
        int d, len;
        d = (f + $urandom_range(1, NF - 1)) % NF;
        len = $urandom_range(1, 6);
        txq[f][0].push_back(mk_hdr(d, $urandom_range(0, 3), $urandom_range(0, 2), len, 8'd1, k));
        for (int i = 0; i < len; i++) txq[f][0].push_back({8'(d), 8'(f), 16'(k), 32'($urandom())});
        n_generic_tx++;
        repeat ($urandom_range(0, 10)) @(posedge clk);
      end
      done_gen++;
    end
  end

  // host access: a store packet written into node 3's inbound port (source
  // ID 4 = host), one flit per write on NoC 1, into the SD-card window
  logic [47:0]  sd_addr = SD_BASE + 48'h1_2340;
  logic [511:0] sd_data;
  task automatic host_store();
    flits_t q;
    op_t o;
    sd_data = {448'd0, $urandom(), $urandom()};
    o.wr = 1; o.size = 3; o.start = cyc; o.remote = 0; o.sd = 1; o.exp = '0;
    pend[3][200] = o;
    for (int i = 0; i < 8; i++) refmem[sd_addr + 48'(i)] = sd_data[i*8 +: 8];
    q = mk_mem_req(1, 200, sd_addr, 3, 3, 0, 0, sd_data, 3);
    foreach (q[i]) begin
      axi_ax_t a;
      axi_w_t  wd;
      a = '0; wd = '0;
      a.addr[BR_DST_LSB +: NODE_W] = 8'd3;
      a.addr[BR_SRC_LSB +: NODE_W] = 8'(NF);
      a.addr[BR_VLD_LSB +: NUM_NOCS] = 3'b010;
      a.size = 3'd6; a.burst = 2'b01;
      wd.data[64 +: 64] = q[i]; wd.strb = '1; wd.last = 1;
      fabric_write(3, a, wd);
    end
  endtask

  function automatic int ref_port(input int my_chip, input int t, input noc_hdr_t h);
    int x, y;
    x = t % 4; y = t / 4;
    if (int'(h.chipid) != my_chip || h.fbits == 4'b0010) begin
      if (x != 0) return 4;
      if (y != 0) return 1;
      return (int'(h.chipid) != my_chip) ? 1 : 4;
    end
    if (int'(h.x) > x) return 2;
    if (int'(h.x) < x) return 4;
    if (int'(h.y) > y) return 3;
    if (int'(h.y) < y) return 1;
    return 0;
  endfunction

  initial begin
    int irq_core [4];
    logic [IW-1:0] irq_lvl [4];
    for (int f = 0; f < NF; f++) for (int c = 0; c < NC; c++) irq_ctrl[f][0][c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    up = 1;
    repeat (30) @(posedge clk);

    // router port lookups
    for (int k = 0; k < 200; k++) begin
      int f, t;
      noc_hdr_t h;
      f = $urandom_range(0, NF - 1); t = $urandom_range(0, NT - 1);
      h = '0;
      h.chipid = CHIP_W'(($urandom_range(0, 1) == 1) ? f : $urandom_range(0, NF - 1));
      h.x = XY_W'($urandom_range(0, 3)); h.y = XY_W'($urandom_range(0, 2));
      h.fbits = ($urandom_range(0, 5) == 0) ? 4'b0010 : 4'b0000;
      @(negedge clk);
      route_hdr[f][0][t] = h;
      #1;
      checks++; n_route++;
      if (int'(route_port[f][0][t]) != ref_port(f, t, h)) begin
        failures++; $display("FAIL node %0d tile %0d port %0d for %h, expected %0d", f, t, route_port[f][0][t], h, ref_port(f, t, h));
      end
    end

    // an ordinary packet through a tile's interrupt filter to its core
    for (int k = 0; k < 4; k++) begin
      flits_t q;
      q.delete();
      q.push_back(mk_hdr(k, 1, 1, 2, 8'd7, k));
      q.push_back({$urandom(), $urandom()});
      q.push_back({$urandom(), $urandom()});
      foreach (q[i]) begin ptq[k][5].push_back(q[i]); tileq[k][5].push_back(q[i]); end
    end

    host_store();
    while (pend[3].exists(200)) @(posedge clk);
    begin
      op_t o;
      flits_t q;
      o.wr = 0; o.size = 3; o.start = cyc; o.remote = 0; o.sd = 1; o.exp = '0;
      for (int i = 0; i < 8; i++) o.exp[i*8 +: 8] = refmem[sd_addr + 48'(i)];
      pend[3][201] = o;
      q = mk_mem_req(0, 201, sd_addr, 3, 3, 2, 1, '0, 3);
      foreach (q[i]) mcq[3].push_back(q[i]);
    end

    while (done_req < NF || done_gen < NF) @(posedge clk);

    // interrupts raised at node 0's controller for a core on every node
    irq_core = '{2, 13, 30, 47};
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      irq_lvl[i] = IW'($urandom_range(1, (1 << IW) - 1));
      irq_ctrl[0][0][irq_core[i]] = irq_lvl[i];
    end
    repeat (600) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      int nd, t;
      nd = irq_core[i] / NT; t = irq_core[i] % NT;
      checks++;
      if (core_irq[nd][0][t] != irq_lvl[i]) begin
        failures++; $display("FAIL core %0d wires %b expected %b", irq_core[i], core_irq[nd][0][t], irq_lvl[i]);
      end else if (nd == 0) n_irq_local++; else n_irq_remote++;
    end
    // other cores stay quiet
    for (int nd = 0; nd < NF; nd++) for (int t = 0; t < NT; t++) begin
      bit raised;
      raised = 0;
      for (int i = 0; i < 4; i++) if (irq_core[i] == nd * NT + t) raised = 1;
      checks++;
      if (!raised && core_irq[nd][0][t] != '0) begin failures++; $display("FAIL node %0d tile %0d wires %b", nd, t, core_irq[nd][0][t]); end
    end
    repeat (400) @(posedge clk);

    // every packet delivered, every mechanism seen
    checks += 4;
    if (n_generic_rx != n_generic_tx) begin failures++; $display("FAIL %0d of %0d ordinary packets delivered", n_generic_rx, n_generic_tx); end
    for (int f = 0; f < NF; f++) if (ptq[f][5].size() != 0) begin failures++; $display("FAIL node %0d tile 5 kept flits", f); end
    if (lat_remote <= lat_local) begin failures++; $display("FAIL remote load %0d cycles not slower than local %0d", lat_remote, lat_local); end
    if (sd_accesses[3][0] < 2) begin failures++; $display("FAIL SD window accesses %0d", sd_accesses[3][0]); end
    begin
      int st, cr, fr, ip;
      st = 0; cr = 0; fr = 0; ip = 0;
      for (int f = 0; f < NF; f++) begin
        st += int'(credit_stalls[f][0]); cr += int'(credit_reads[f][0]);
        fr += int'(flits_received[f][0]); ip += int'(irq_packets[f][0]);
      end
      $display("INFO loads local %0d remote %0d, stores local %0d remote %0d, min load latency local %0d remote %0d cycles",
               n_local_ld, n_remote_ld, n_local_st, n_remote_st, lat_local, lat_remote);
      $display("INFO bridge: requests %0d responses %0d ordinary %0d, flits %0d, credit reads %0d, credit stall cycles %0d",
               n_req_via_bridge, n_resp_via_bridge, n_generic_rx, fr, cr, st);
      $display("INFO host writes %0d, SD read-back %0d, interrupts local %0d remote %0d (%0d packets), routes %0d, homes %0d, pass-through %0d",
               n_host_writes, n_sd_readback, n_irq_local, n_irq_remote, ip, n_route, n_home, n_passthru);
      if (n_local_ld == 0)  begin failures++; $display("FAIL no local load"); end
      if (n_remote_ld == 0) begin failures++; $display("FAIL no remote load"); end
      if (n_local_st == 0)  begin failures++; $display("FAIL no local store"); end
      if (n_remote_st == 0) begin failures++; $display("FAIL no remote store"); end
      if (n_req_via_bridge == 0 || n_resp_via_bridge == 0) begin failures++; $display("FAIL no memory traffic over the bridge"); end
      if (n_generic_rx == 0) begin failures++; $display("FAIL no ordinary packets"); end
      if (cr == 0) begin failures++; $display("FAIL no credit reads"); end
      if (st == 0) begin failures++; $display("FAIL no credit stalls"); end
      if (n_host_writes == 0) begin failures++; $display("FAIL no host write"); end
      if (n_sd_readback == 0) begin failures++; $display("FAIL no SD read-back"); end
      if (n_irq_local == 0 || n_irq_remote == 0 || ip == 0) begin failures++; $display("FAIL interrupts missing"); end
      if (n_route == 0 || n_home == 0 || n_passthru == 0) begin failures++; $display("FAIL lookups missing"); end
      checks += 12;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: requesters done %0d, senders done %0d", done_req, done_gen);
    for (int f = 0; f < NF; f++)
      $display("  node %0d: %0d outstanding, queues bridge %0d/%0d/%0d memory %0d, loads %0d/%0d stores %0d/%0d",
               f, pend[f].size(), txq[f][0].size(), txq[f][1].size(), txq[f][2].size(), mcq[f].size(),
               n_local_ld, n_remote_ld, n_local_st, n_remote_st);
    for (int f = 0; f < NF; f++)
      $display("  node %0d bridge: writes %0d, credit reads %0d, stall cycles %0d, flits in %0d",
               f, writes_sent[f][0], credit_reads[f][0], credit_stalls[f][0], flits_received[f][0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
