// tb_bridge_send: node 1 of 4 sends random packets on all three NoCs to
// nodes 0, 2 and 3. The testbench is the AXI4 slave: it decodes every write
// (destination, source, valid bits, flits) and checks, per NoC, that the
// flits arrive in the order sent, that each is carried in a write addressed
// to its packet's node, and that the source field is 1. It plays the remote
// receive buffers: a flit is "drained" 40 cycles after it arrives, and a
// credit read returns the drained flits. Checks that no destination ever
// holds more than 8 unreturned flits per NoC, that credit stalls and credit
// reads both happen, and that every flit gets through.
module tb_bridge_send;
  import smappic_pkg::*;
  import tb_noc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NUM_NOCS-1:0] noc_valid = '0, noc_ready;
  flit_t noc_flit [NUM_NOCS];
  logic aw_valid, aw_ready = 1, w_valid, w_ready = 1, b_valid = 0, b_ready, ar_valid, ar_ready = 1, r_valid = 0, r_ready;
  axi_ax_t aw, ar; axi_w_t w; axi_b_t b = '0; axi_r_t r = '0;
  logic [31:0] writes_sent, credit_reads, credit_stalls;

  bridge_send #(.NUM_NODES(4), .CREDITS(8), .CREDIT_PERIOD(64), .SHAPER_DEPTH(16)) dut (
    .clk, .rst_n, .my_node(8'd1), .cfg_latency(16'd3), .cfg_gap(16'd0), .*);

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected per NoC: flit and its destination
  flit_t exp_f [NUM_NOCS][$];
  int    exp_d [NUM_NOCS][$];
  int    held [4][NUM_NOCS];       // unreturned flits at each destination
  longint arrive [4][NUM_NOCS][$];  // arrival cycles not yet credited
  int total = 0, got = 0;

  initial forever begin
    @(negedge clk);
    #2;
    if (aw_valid && aw_ready && w_valid && w_ready) begin
      int d, s;
      logic [NUM_NOCS-1:0] v;
      d = int'(aw.addr[BR_DST_LSB +: NODE_W]);
      s = int'(aw.addr[BR_SRC_LSB +: NODE_W]);
      v = aw.addr[BR_VLD_LSB +: NUM_NOCS];
      checks++;
      if (s != 1 || v == 0 || d > 3) begin failures++; $display("FAIL write address %h", aw.addr); end
      for (int n = 0; n < NUM_NOCS; n++) if (v[n]) begin
        checks++; got++;
        if (exp_f[n].size() == 0 || w.data[n*64 +: 64] !== exp_f[n][0] || exp_d[n][0] != d) begin
          failures++; $display("FAIL NoC %0d flit %h to node %0d exp %h to %0d (%0d left)", n, w.data[n*64 +: 64], d, exp_f[n][0], exp_d[n][0], exp_f[n].size());
        end else begin void'(exp_f[n].pop_front()); void'(exp_d[n].pop_front()); end
        held[d][n]++;
        arrive[d][n].push_back(cyc);
        checks++;
        if (held[d][n] > 8) begin failures++; $display("FAIL credit overrun node %0d NoC %0d", d, n); end
      end
    end else if ((aw_valid && aw_ready) != (w_valid && w_ready)) begin
      checks++; failures++; $display("FAIL AW and W split although both ready");
    end
  end

  // credit responder: one read at a time, answered on the next cycle
  initial forever begin
    @(negedge clk);
    #2;
    if (ar_valid && ar_ready) begin
      int dd, c;
      dd = int'(ar.addr[BR_DST_LSB +: NODE_W]);
      @(negedge clk);
      r = '0;
      for (int n = 0; n < NUM_NOCS; n++) begin
        c = 0;
        while (arrive[dd][n].size() > 0 && cyc - arrive[dd][n][0] >= 40) begin
          void'(arrive[dd][n].pop_front()); c++;
        end
        held[dd][n] -= c;
        r.data[n*CREDIT_W +: CREDIT_W] = CREDIT_W'(c);
      end
      r.last = 1;
      r_valid = 1;
      #1;
      while (!r_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      #1;
      r_valid = 0;
    end
  end

  // one driver per NoC
  for (genvar n = 0; n < NUM_NOCS; n++) begin : g_drv
    initial begin
      noc_flit[n] = '0;
      repeat (4) @(posedge clk);
      for (int p = 0; p < 60; p++) begin
        int d, len;
        flits_t q;
        d = $urandom_range(0, 2); if (d >= 1) d++;   // nodes 0, 2, 3
        len = $urandom_range(0, 4);
        q.delete();
        q.push_back(mk_hdr(d, $urandom_range(0, 3), $urandom_range(0, 2), len, 8'($urandom_range(1, 15)), p));
        for (int i = 0; i < len; i++) q.push_back({$urandom(), $urandom()});
        foreach (q[i]) begin
          exp_f[n].push_back(q[i]); exp_d[n].push_back(d); total++;
          @(negedge clk);
          noc_valid[n] = 1; noc_flit[n] = q[i];
          #1;
          while (!noc_ready[n]) begin @(negedge clk); #1; end
          @(posedge clk);
        end
        @(negedge clk);
        noc_valid[n] = 0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    while (got < total) @(posedge clk);
    checks++;
    if (credit_stalls == 0 || credit_reads == 0) begin
      failures++; $display("FAIL stalls %0d reads %0d", credit_stalls, credit_reads);
    end
    $display("INFO %0d flits in %0d writes, %0d credit reads, %0d stall cycles", got, writes_sent, credit_reads, credit_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
