// bridge_recv: receiving half of the SMAPPIC inter-node bridge.
//
// It is the slave on the FPGA's inbound AXI4 bus. An AXI4 write is one
// encapsulated transfer: the address gives the source node ID and one valid
// bit per NoC, the data holds one flit per NoC (NoC n in bits [64n+63:64n]).
// Each valid flit is put in a buffer kept per NoC and per source, CREDITS
// flits deep; the write is answered on B. Keeping sources apart lets packets
// from different nodes be handed to the node whole: per NoC an arbiter picks
// a non-empty source buffer in rotation and stays with it until the packet
// (header plus its announced length) has left.
//
// Every flit handed to the node frees a credit of its source. An AXI4 read
// from a source node returns, in CREDIT_W-bit fields per NoC, the credits
// freed for that source since its last read, and clears them.
//
// Source ID NUM_NODES stands for the host: writes it makes inject NoC flits
// (used, for example, to fill the virtual SD card's memory). The host follows
// the same credit protocol as a node. Should a sender overrun its credits,
// the write waits on W until every buffer it needs has room; a well-behaved
// sender never sees this, and it cannot cause a deadlock between senders that
// keep to their credits.
//
// The decoding, credit accounting and credit-return read follow the
// SMAPPIC paper; buffering per source, the packet-locked arbitration and the host
// source ID are this design's choices. One write and one read are handled at
// a time; B and R are registered (one cycle after W and AR are accepted).
module bridge_recv
  import smappic_pkg::*;
#(
  parameter int unsigned NUM_NODES = 4,
  parameter int unsigned CREDITS   = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  // AXI4 inbound (slave)
  input  logic    aw_valid,
  output logic    aw_ready,
  input  axi_ax_t aw,
  input  logic    w_valid,
  output logic    w_ready,
  input  axi_w_t  w,
  output logic    b_valid,
  input  logic    b_ready,
  output axi_b_t  b,
  input  logic    ar_valid,
  output logic    ar_ready,
  input  axi_ax_t ar,
  output logic    r_valid,
  input  logic    r_ready,
  output axi_r_t  r,
  // flits to the node, one stream per NoC
  output logic [NUM_NOCS-1:0] noc_valid,
  input  logic [NUM_NOCS-1:0] noc_ready,
  output flit_t               noc_flit [NUM_NOCS],
  output logic [31:0]         flits_received
);
  localparam int unsigned NSRC = NUM_NODES + 1;   // nodes plus the host
  localparam int unsigned SW   = $clog2(NSRC);

  // ---------------- write path ----------------
  logic                aw_held;
  axi_ax_t             aw_q;
  logic [SW-1:0]       w_src;
  logic [NUM_NOCS-1:0] w_vld;
  logic [NUM_NOCS-1:0] q_in_ready [NSRC];
  logic [NUM_NOCS-1:0] room;
  logic                w_fire;

  assign w_src = (aw_q.addr[BR_SRC_LSB +: NODE_W] < NODE_W'(NUM_NODES))
               ? SW'(aw_q.addr[BR_SRC_LSB +: NODE_W]) : SW'(NUM_NODES);
  assign w_vld = aw_q.addr[BR_VLD_LSB +: NUM_NOCS];

  always_comb begin
    for (int n = 0; n < NUM_NOCS; n++) room[n] = !w_vld[n] || q_in_ready[w_src][n];
  end

  assign aw_ready = !aw_held;
  assign w_ready  = aw_held && (&room) && (!b_valid || b_ready);
  assign w_fire   = w_valid && w_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_held        <= 1'b0;
      aw_q           <= '0;
      b_valid        <= 1'b0;
      b              <= '0;
      flits_received <= '0;
    end else begin
      if (b_valid && b_ready) b_valid <= 1'b0;
      if (aw_valid && aw_ready) begin
        aw_held <= 1'b1;
        aw_q    <= aw;
      end
      if (w_fire) begin
        aw_held        <= 1'b0;
        b_valid        <= 1'b1;
        b.id           <= aw_q.id;
        b.resp         <= 2'b00;
        flits_received <= flits_received + 32'($countones(w_vld));
      end
    end
  end

  // ---------------- buffers and per-NoC arbiters ----------------
  logic [NUM_NOCS-1:0] q_out_valid [NSRC];
  logic [NUM_NOCS-1:0] q_out_ready [NSRC];
  flit_t               q_out       [NSRC][NUM_NOCS];
  logic [NUM_NOCS-1:0] locked;
  logic [SW-1:0]       lock_src  [NUM_NOCS];
  logic [SW-1:0]       rr_src    [NUM_NOCS];
  logic [7:0]          remaining [NUM_NOCS];
  logic [SW-1:0]       cur_src   [NUM_NOCS];
  logic [NUM_NOCS-1:0] pop;

  for (genvar s = 0; s < NSRC; s++) begin : g_src
    for (genvar n = 0; n < NUM_NOCS; n++) begin : g_noc
      sync_fifo #(.WIDTH(FLIT_W), .DEPTH(CREDITS)) u_q (
        .clk, .rst_n,
        .wr_valid(w_fire && w_vld[n] && w_src == SW'(s)),
        .wr_ready(q_in_ready[s][n]),
        .wr_data(w.data[n*FLIT_W +: FLIT_W]),
        .rd_valid(q_out_valid[s][n]),
        .rd_ready(q_out_ready[s][n]),
        .rd_data(q_out[s][n]),
        .count()
      );
    end
  end

  always_comb begin
    int k;
    k = 0;
    pop = '0;
    for (int s = 0; s < NSRC; s++) q_out_ready[s] = '0;
    for (int n = 0; n < NUM_NOCS; n++) begin
      cur_src[n] = lock_src[n];
      if (!locked[n]) begin
        cur_src[n] = rr_src[n];
        for (int i = NSRC - 1; i >= 0; i--) begin
          k = (int'(rr_src[n]) + i) % NSRC;
          if (q_out_valid[k][n]) cur_src[n] = SW'(k);
        end
      end
      noc_valid[n] = q_out_valid[cur_src[n]][n];
      noc_flit[n]  = q_out[cur_src[n]][n];
      pop[n]       = noc_valid[n] && noc_ready[n];
    end
    for (int s = 0; s < NSRC; s++)
      for (int n = 0; n < NUM_NOCS; n++)
        q_out_ready[s][n] = pop[n] && (cur_src[n] == SW'(s));
  end

  // ---------------- credit return ----------------
  logic [CREDIT_W-1:0] freed [NSRC][NUM_NOCS];
  logic [SW-1:0]       ar_src;
  assign ar_src   = (ar.addr[BR_SRC_LSB +: NODE_W] < NODE_W'(NUM_NODES))
                  ? SW'(ar.addr[BR_SRC_LSB +: NODE_W]) : SW'(NUM_NODES);
  assign ar_ready = !r_valid || r_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked  <= '0;
      r_valid <= 1'b0;
      r       <= '0;
      for (int n = 0; n < NUM_NOCS; n++) begin
        lock_src[n]  <= '0;
        rr_src[n]    <= '0;
        remaining[n] <= '0;
        for (int s = 0; s < NSRC; s++) freed[s][n] <= '0;
      end
    end else begin
      for (int n = 0; n < NUM_NOCS; n++) begin
        if (pop[n]) begin
          if (!locked[n]) begin
            noc_hdr_t h;
            h = noc_hdr_t'(noc_flit[n]);
            lock_src[n]  <= cur_src[n];
            remaining[n] <= h.len;
            locked[n]    <= (h.len != 0);
            rr_src[n]    <= SW'((int'(cur_src[n]) + 1) % NSRC);
          end else begin
            remaining[n] <= remaining[n] - 1'b1;
            if (remaining[n] == 8'd1) locked[n] <= 1'b0;
          end
        end
      end
      if (r_valid && r_ready) r_valid <= 1'b0;
      for (int s = 0; s < NSRC; s++)
        for (int n = 0; n < NUM_NOCS; n++) begin
          logic clr, inc;
          clr = ar_valid && ar_ready && ar_src == SW'(s);
          inc = pop[n] && cur_src[n] == SW'(s);
          freed[s][n] <= clr ? '0 : freed[s][n] + CREDIT_W'(inc);
        end
      if (ar_valid && ar_ready) begin
        r_valid <= 1'b1;
        r.id    <= ar.id;
        r.resp  <= 2'b00;
        r.last  <= 1'b1;
        r.data  <= '0;
        for (int n = 0; n < NUM_NOCS; n++)
          r.data[n*CREDIT_W +: CREDIT_W] <= freed[ar_src][n]
                                          + CREDIT_W'(pop[n] && cur_src[n] == ar_src);
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    w_fire |-> &room);
endmodule
