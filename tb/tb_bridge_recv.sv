// tb_bridge_recv: the testbench is the PCIe side. Three remote nodes
// (sources 0, 2, 3) and the host (source 4) send random packets on all three
// NoCs as AXI4 writes, one flit per NoC per write. Node sources keep 8 credits
// per NoC and, when out of credits, fetch returned ones with an AXI4 read; the
// host keeps to the same credits. The node side stalls at random. Checks: every
// packet leaves whole (no interleaving on a NoC), each source's flits keep
// their order, every write gets an OKAY response, the credits returned equal
// the flits delivered, and every flit is delivered.
module tb_bridge_recv;
  import smappic_pkg::*;
  import tb_noc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic aw_valid = 0, aw_ready, w_valid = 0, w_ready, b_valid, b_ready = 1;
  logic ar_valid = 0, ar_ready, r_valid, r_ready = 1;
  axi_ax_t aw = '0, ar = '0; axi_w_t w = '0; axi_b_t b; axi_r_t r;
  logic [NUM_NOCS-1:0] noc_valid, noc_ready = '0;
  flit_t noc_flit [NUM_NOCS];
  logic [31:0] flits_received;

  bridge_recv #(.NUM_NODES(4), .CREDITS(8)) dut (.*);

  localparam int NS = 5;
  flit_t stream [NS][NUM_NOCS][$];   // still to send
  flit_t expq   [NS][NUM_NOCS][$];   // still to be delivered
  int    cred   [NS][NUM_NOCS];
  int    total = 0, got = 0, writes = 0, reads = 0, stalls = 0;

  // random back-pressure from the node
  initial forever begin
    @(posedge clk);
    #1;
    for (int n = 0; n < NUM_NOCS; n++) noc_ready[n] = ($urandom_range(0, 3) != 0);
  end

  // delivery checker
  bit lock [NUM_NOCS];
  int lsrc [NUM_NOCS], lrem [NUM_NOCS];
  initial begin
    for (int n = 0; n < NUM_NOCS; n++) begin lock[n] = 0; lsrc[n] = 0; lrem[n] = 0; end
    forever begin
      @(negedge clk);
      #2;
      for (int n = 0; n < NUM_NOCS; n++) if (noc_valid[n] && noc_ready[n]) begin
        noc_hdr_t h;
        int s;
        checks++; got++;
        h = noc_hdr_t'(noc_flit[n]);
        s = lock[n] ? lsrc[n] : int'(h.x);
        if (s >= NS || expq[s][n].size() == 0 || expq[s][n][0] !== noc_flit[n]) begin
          failures++; $display("FAIL NoC %0d flit %h (locked %0d to source %0d)", n, noc_flit[n], lock[n], s);
        end else begin
          void'(expq[s][n].pop_front());
          if (!lock[n]) begin
            lsrc[n] = s; lrem[n] = int'(h.len); lock[n] = (h.len != 0);
          end else begin
            lrem[n]--; if (lrem[n] == 0) lock[n] = 0;
          end
        end
      end
    end
  end

  task automatic axi_write(input logic [63:0] addr, input logic [AXI_DATA_W-1:0] data);
    bit aw_t, w_t;
    @(negedge clk);
    aw = '0; aw.addr = addr; aw.size = 3'd6; aw.burst = 2'b01; aw_valid = 1;
    w = '0; w.data = data; w.strb = '1; w.last = 1; w_valid = 1;
    aw_t = 0; w_t = 0;
    while (!(aw_t && w_t)) begin
      bit a, d;
      #1;
      a = aw_valid && aw_ready; d = w_valid && w_ready;
      if (!a && !d) stalls++;
      @(posedge clk);
      #1;
      if (a) begin aw_valid = 0; aw_t = 1; end
      if (d) begin w_valid = 0; w_t = 1; end
      @(negedge clk);
    end
    while (!b_valid) @(negedge clk);
    checks++;
    if (b.resp != 2'b00) begin failures++; $display("FAIL write response %b", b.resp); end
    writes++;
  endtask

  task automatic axi_read(input int src, output logic [AXI_DATA_W-1:0] data);
    @(negedge clk);
    ar = '0; ar.addr[BR_SRC_LSB +: NODE_W] = NODE_W'(src); ar.addr[BR_DST_LSB +: NODE_W] = 8'd1;
    ar.size = 3'd6; ar.burst = 2'b01; ar_valid = 1;
    #1;
    while (!ar_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1;
    ar_valid = 0;
    while (!r_valid) begin @(negedge clk); #1; end
    data = r.data;
    checks++;
    if (!r.last || r.resp != 2'b00) begin failures++; $display("FAIL read response"); end
    @(posedge clk);
    reads++;
  endtask

  task automatic fetch_credits(input int s);
    logic [AXI_DATA_W-1:0] d;
    axi_read(s, d);
    for (int n = 0; n < NUM_NOCS; n++) cred[s][n] += int'(d[n*CREDIT_W +: CREDIT_W]);
  endtask

  initial begin
    for (int s = 0; s < NS; s++)
      for (int n = 0; n < NUM_NOCS; n++) begin
        cred[s][n] = 8;
        if (s == 1) continue;           // the receiver's own ID
        for (int p = 0; p < 25; p++) begin
          int len;
          len = $urandom_range(0, 4);
          stream[s][n].push_back(mk_hdr(1, s, n, len, 8'd1, p));
          for (int i = 0; i < len; i++)
            stream[s][n].push_back({8'(s), 8'(n), 16'(p), 16'(i), 16'($urandom())});
        end
        foreach (stream[s][n][i]) expq[s][n].push_back(stream[s][n][i]);
        total += stream[s][n].size();
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    forever begin
      int s;
      bit pending;
      logic [NUM_NOCS-1:0] v;
      logic [AXI_DATA_W-1:0] data;
      logic [63:0] addr;
      pending = 0;
      for (int k = 0; k < NS; k++) for (int n = 0; n < NUM_NOCS; n++)
        if (stream[k][n].size() > 0) pending = 1;
      if (!pending) break;
      s = $urandom_range(0, NS - 1);
      if (s == 1) continue;
      v = '0; data = '0;
      for (int n = 0; n < NUM_NOCS; n++)
        if (stream[s][n].size() > 0 && cred[s][n] > 0 && $urandom_range(0, 9) < 7) begin
          v[n] = 1;
          data[n*64 +: 64] = stream[s][n].pop_front();
          cred[s][n]--;
        end
      if (v == '0) begin
        bit starved;
        starved = 0;
        for (int n = 0; n < NUM_NOCS; n++) if (stream[s][n].size() > 0 && cred[s][n] == 0) starved = 1;
        if (starved) fetch_credits(s);
        continue;
      end
      addr = '0;
      addr[BR_DST_LSB +: NODE_W] = 8'd1;
      addr[BR_SRC_LSB +: NODE_W] = NODE_W'(s);
      addr[BR_VLD_LSB +: NUM_NOCS] = v;
      axi_write(addr, data);
    end
    while (got < total) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int s = 0; s < NS; s++) if (s != 1) begin
      fetch_credits(s);
      for (int n = 0; n < NUM_NOCS; n++) begin
        checks++;
        if (cred[s][n] != 8) begin failures++; $display("FAIL source %0d NoC %0d holds %0d credits after drain", s, n, cred[s][n]); end
      end
    end
    checks++;
    if (flits_received != 32'(total)) begin failures++; $display("FAIL flits_received %0d of %0d", flits_received, total); end
    $display("INFO %0d flits, %0d writes, %0d credit reads, %0d write stall cycles", got, writes, reads, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
