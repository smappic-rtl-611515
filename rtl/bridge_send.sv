// bridge_send: sending half of the SMAPPIC inter-node bridge.
//
// Flits of the three BYOC NoCs that leave the node through tile 0's north
// port arrive here. Each cycle the bridge packs at most one flit of each NoC
// into a single AXI4 write: the write data carries the flits (NoC n in bits
// [64n+63:64n]) and the address carries the destination node ID, this node's
// ID and one valid bit per NoC (field positions in smappic_pkg). All flits of
// one write go to the same node; a NoC whose flit is for another node waits.
// Body flits follow their packet's header to the header's node.
//
// Flow control is credit based: for every destination node and NoC the
// sender holds CREDITS credits, one per receive-buffer slot, and spends one
// per flit. To get credits back it issues an AXI4 read to the receiving node
// every CREDIT_PERIOD cycles (rotating over the other nodes), or at once to a
// node a waiting flit has no credit for; the read data holds the number of
// credits freed per NoC (CREDIT_W bits each). One credit read is in flight at
// a time.
//
// The encapsulation, the address fields, the credit scheme and the periodic
// credit reads follow the SMAPPIC paper. Bit positions, credit counts, the period,
// the rotating choice of destination and the single outstanding read are this
// design's choices. A traffic_shaper sits between packing and the AXI4
// write channels and models the link's latency and bandwidth.
//
// Timing: a write is packed in the cycle its flits are accepted; it leaves on
// AW and W after the shaper's delay. B responses are accepted and counted.
module bridge_send
  import smappic_pkg::*;
#(
  parameter int unsigned NUM_NODES     = 4,
  parameter int unsigned CREDITS       = 8,
  parameter int unsigned CREDIT_PERIOD = 64,
  parameter int unsigned SHAPER_DEPTH  = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NODE_W-1:0]  my_node,
  input  logic [15:0]        cfg_latency,
  input  logic [15:0]        cfg_gap,
  // flits from the node, one stream per NoC
  input  logic [NUM_NOCS-1:0] noc_valid,
  output logic [NUM_NOCS-1:0] noc_ready,
  input  flit_t               noc_flit [NUM_NOCS],
  // AXI4 outbound (master)
  output logic    aw_valid,
  input  logic    aw_ready,
  output axi_ax_t aw,
  output logic    w_valid,
  input  logic    w_ready,
  output axi_w_t  w,
  input  logic    b_valid,
  output logic    b_ready,
  input  axi_b_t  b,
  output logic    ar_valid,
  input  logic    ar_ready,
  output axi_ax_t ar,
  input  logic    r_valid,
  output logic    r_ready,
  input  axi_r_t  r,
  // statistics
  output logic [31:0] writes_sent,
  output logic [31:0] credit_reads,
  output logic [31:0] credit_stalls
);
  localparam int unsigned NW = (NUM_NODES > 1) ? $clog2(NUM_NODES) : 1;
  localparam int unsigned CW = $clog2(CREDITS + 1);
  localparam int unsigned PKT_W = AXI_ADDR_W + NUM_NOCS * FLIT_W;

  logic [CW-1:0]     credits   [NUM_NODES][NUM_NOCS];
  logic [NUM_NOCS-1:0] in_pkt;
  logic [7:0]        remaining [NUM_NOCS];
  logic [NW-1:0]     cur_dst   [NUM_NOCS];
  logic [NW-1:0]     fdst      [NUM_NOCS];
  logic [NUM_NOCS-1:0] has_credit;
  logic [1:0]        rr;                 // NoC examined first
  logic              sel_any;
  logic [NW-1:0]     sel_dst;
  logic [NUM_NOCS-1:0] take;
  logic              blocked;
  logic [NW-1:0]     blocked_dst;

  // Destination node of the flit waiting on each NoC.
  always_comb begin
    for (int n = 0; n < NUM_NOCS; n++) begin
      noc_hdr_t h;
      h       = noc_hdr_t'(noc_flit[n]);
      fdst[n] = in_pkt[n] ? cur_dst[n] : NW'(h.chipid);
      has_credit[n] = credits[fdst[n]][n] != '0;
    end
  end

  // Pick a destination: the first waiting NoC (from rr) that has a credit.
  always_comb begin
    int k;
    sel_any     = 1'b0;
    sel_dst     = '0;
    blocked     = 1'b0;
    blocked_dst = '0;
    for (int i = 0; i < NUM_NOCS; i++) begin
      k = (int'(rr) + i) % NUM_NOCS;
      if (noc_valid[k] && has_credit[k] && !sel_any) begin
        sel_any = 1'b1;
        sel_dst = fdst[k];
      end
      if (noc_valid[k] && !has_credit[k] && !blocked) begin
        blocked     = 1'b1;
        blocked_dst = fdst[k];
      end
    end
  end

  logic             pk_valid, pk_ready;
  logic [PKT_W-1:0] pk_data;
  logic [NUM_NOCS-1:0] vbits;
  logic [NUM_NOCS*FLIT_W-1:0] flits;

  always_comb begin
    for (int n = 0; n < NUM_NOCS; n++) begin
      take[n] = sel_any && pk_ready && noc_valid[n] && has_credit[n] && (fdst[n] == sel_dst);
      vbits[n] = take[n];
      flits[n*FLIT_W +: FLIT_W] = take[n] ? noc_flit[n] : '0;
    end
    noc_ready = take;
    pk_valid  = sel_any;
  end

  logic [AXI_ADDR_W-1:0] pk_addr;
  always_comb begin
    pk_addr = '0;
    pk_addr[BR_DST_LSB +: NODE_W]   = NODE_W'(sel_dst);
    pk_addr[BR_SRC_LSB +: NODE_W]   = my_node;
    pk_addr[BR_VLD_LSB +: NUM_NOCS] = vbits;
    pk_data = {pk_addr, flits};
  end

  // Link model between packing and the AXI4 write channels.
  logic             sh_valid, sh_ready;
  logic [PKT_W-1:0] sh_data;
  traffic_shaper #(.WIDTH(PKT_W), .DEPTH(SHAPER_DEPTH)) u_shaper (
    .clk, .rst_n, .cfg_latency, .cfg_gap,
    .in_valid(pk_valid), .in_ready(pk_ready), .in_data(pk_data),
    .out_valid(sh_valid), .out_ready(sh_ready), .out_data(sh_data)
  );

  logic aw_done, w_done;
  assign aw_valid = sh_valid && !aw_done;
  assign w_valid  = sh_valid && !w_done;
  assign sh_ready = sh_valid && (aw_done || aw_ready) && (w_done || w_ready);
  always_comb begin
    aw       = '0;
    aw.addr  = sh_data[NUM_NOCS*FLIT_W +: AXI_ADDR_W];
    aw.size  = 3'd6;
    aw.burst = 2'b01;
    w        = '0;
    w.data   = AXI_DATA_W'(sh_data[NUM_NOCS*FLIT_W-1:0]);
    w.strb   = AXI_STRB_W'({(NUM_NOCS*FLIT_W/8){1'b1}});
    w.last   = 1'b1;
  end
  assign b_ready = 1'b1;

  // Credit-return reads.
  logic [$clog2(CREDIT_PERIOD+1)-1:0] timer;
  logic              cr_busy;
  logic [NW-1:0]     cr_dst, rot_dst, next_rot;
  logic              cr_want;

  always_comb begin
    next_rot = rot_dst;
    for (int i = 1; i <= NUM_NODES; i++) begin
      logic [NW-1:0] c;
      c = NW'((int'(rot_dst) + i) % NUM_NODES);
      if (next_rot == rot_dst && c != NW'(my_node)) next_rot = c;
    end
  end

  assign cr_want  = !cr_busy && (blocked || timer == '0) && (NUM_NODES > 1);
  assign ar_valid = cr_want;
  always_comb begin
    ar       = '0;
    ar.addr[BR_DST_LSB +: NODE_W] = NODE_W'(blocked ? blocked_dst : next_rot);
    ar.addr[BR_SRC_LSB +: NODE_W] = my_node;
    ar.size  = 3'd6;
    ar.burst = 2'b01;
  end
  assign r_ready = cr_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < NUM_NODES; d++)
        for (int n = 0; n < NUM_NOCS; n++) credits[d][n] <= CW'(CREDITS);
      in_pkt        <= '0;
      for (int n = 0; n < NUM_NOCS; n++) begin
        remaining[n] <= '0;
        cur_dst[n]   <= '0;
      end
      rr            <= '0;
      aw_done       <= 1'b0;
      w_done        <= 1'b0;
      timer         <= '0;
      cr_busy       <= 1'b0;
      cr_dst        <= '0;
      rot_dst       <= '0;
      writes_sent   <= '0;
      credit_reads  <= '0;
      credit_stalls <= '0;
    end else begin
      // packet tracking per NoC
      for (int n = 0; n < NUM_NOCS; n++) begin
        if (take[n]) begin
          if (!in_pkt[n]) begin
            noc_hdr_t h;
            h = noc_hdr_t'(noc_flit[n]);
            cur_dst[n]   <= fdst[n];
            remaining[n] <= h.len;
            in_pkt[n]    <= (h.len != 0);
          end else begin
            remaining[n] <= remaining[n] - 1'b1;
            if (remaining[n] == 8'd1) in_pkt[n] <= 1'b0;
          end
        end
      end
      if (sel_any && pk_ready) rr <= (rr == 2'(NUM_NOCS - 1)) ? '0 : rr + 1'b1;
      if (blocked) credit_stalls <= credit_stalls + 1'b1;

      // credit bookkeeping: spend on send, refill on read data
      for (int d = 0; d < NUM_NODES; d++)
        for (int n = 0; n < NUM_NOCS; n++) begin
          logic [CW:0] c;
          c = {1'b0, credits[d][n]};
          if (take[n] && fdst[n] == NW'(d)) c = c - 1'b1;
          if (r_valid && r_ready && cr_dst == NW'(d))
            c = c + (CW+1)'(r.data[n*CREDIT_W +: CREDIT_W]);
          credits[d][n] <= CW'(c);
        end

      // AXI4 write split
      if (sh_ready) begin
        aw_done     <= 1'b0;
        w_done      <= 1'b0;
        writes_sent <= writes_sent + 1'b1;
      end else begin
        if (aw_valid && aw_ready) aw_done <= 1'b1;
        if (w_valid && w_ready)   w_done  <= 1'b1;
      end

      // credit-return read
      if (timer != '0) timer <= timer - 1'b1;
      if (ar_valid && ar_ready) begin
        cr_busy      <= 1'b1;
        cr_dst       <= blocked ? blocked_dst : next_rot;
        if (!blocked) rot_dst <= next_rot;
        timer        <= ($clog2(CREDIT_PERIOD+1))'(CREDIT_PERIOD);
        credit_reads <= credit_reads + 1'b1;
      end
      if (r_valid && r_ready) cr_busy <= 1'b0;
    end
  end

  a_credit_bound: assert property (@(posedge clk) disable iff (!rst_n)
    r_valid && r_ready |-> r.data[CREDIT_W-1:0] <= CREDIT_W'(CREDITS));
endmodule
