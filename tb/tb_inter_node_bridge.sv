// tb_inter_node_bridge: two bridges, nodes 0 and 1, wired back to back (the
// outbound master of each drives the inbound slave of the other, as the PCIe
// fabric would). Each node sends random packets to the other on all three
// NoCs while the receiving node accepts flits only some of the time, so
// credits run out. Checks: every flit arrives at the other node, in order per
// NoC, and credit reads, credit stalls and the link latency (50 cycles set on
// node 0's link, 0 on node 1's) all show.
module tb_inter_node_bridge;
  import smappic_pkg::*;
  import tb_noc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NUM_NOCS-1:0] tx_valid [2], tx_ready [2], rx_valid [2], rx_ready [2];
  flit_t tx_flit [2][NUM_NOCS], rx_flit [2][NUM_NOCS];
  logic aw_v [2], aw_r [2], w_v [2], w_r [2], b_v [2], b_r [2], ar_v [2], ar_r [2], r_v [2], r_r [2];
  axi_ax_t aw [2], ar [2]; axi_w_t w [2]; axi_b_t b [2]; axi_r_t r [2];
  logic [31:0] writes_sent [2], credit_reads [2], credit_stalls [2], flits_received [2];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // node i's outbound master (index i) feeds node 1-i's inbound slave.
  for (genvar i = 0; i < 2; i++) begin : g_node
    inter_node_bridge #(.NUM_NODES(2), .CREDITS(8), .CREDIT_PERIOD(64), .SHAPER_DEPTH(16)) u_br (
      .clk, .rst_n, .my_node(8'(i)), .cfg_latency(i == 0 ? 16'd50 : 16'd0), .cfg_gap(16'd0),
      .tx_valid(tx_valid[i]), .tx_ready(tx_ready[i]), .tx_flit(tx_flit[i]),
      .rx_valid(rx_valid[i]), .rx_ready(rx_ready[i]), .rx_flit(rx_flit[i]),
      .om_aw_valid(aw_v[i]), .om_aw_ready(aw_r[i]), .om_aw(aw[i]),
      .om_w_valid(w_v[i]),   .om_w_ready(w_r[i]),   .om_w(w[i]),
      .om_b_valid(b_v[i]),   .om_b_ready(b_r[i]),   .om_b(b[i]),
      .om_ar_valid(ar_v[i]), .om_ar_ready(ar_r[i]), .om_ar(ar[i]),
      .om_r_valid(r_v[i]),   .om_r_ready(r_r[i]),   .om_r(r[i]),
      .is_aw_valid(aw_v[1-i]), .is_aw_ready(aw_r[1-i]), .is_aw(aw[1-i]),
      .is_w_valid(w_v[1-i]),   .is_w_ready(w_r[1-i]),   .is_w(w[1-i]),
      .is_b_valid(b_v[1-i]),   .is_b_ready(b_r[1-i]),   .is_b(b[1-i]),
      .is_ar_valid(ar_v[1-i]), .is_ar_ready(ar_r[1-i]), .is_ar(ar[1-i]),
      .is_r_valid(r_v[1-i]),   .is_r_ready(r_r[1-i]),   .is_r(r[1-i]),
      .writes_sent(writes_sent[i]), .credit_reads(credit_reads[i]),
      .credit_stalls(credit_stalls[i]), .flits_received(flits_received[i])
    );
  end

  flit_t  expq [2][NUM_NOCS][$];   // indexed by receiving node
  longint sent_at [2][NUM_NOCS][$];
  int total = 0, got = 0;
  longint min_lat [2];

  initial begin
    rx_ready[0] = '0; rx_ready[1] = '0;
    forever begin
      @(posedge clk);
      #1;
      for (int i = 0; i < 2; i++)
        for (int n = 0; n < NUM_NOCS; n++) rx_ready[i][n] = ($urandom_range(0, 9) < 3);
    end
  end

  initial begin
    min_lat[0] = 1000000; min_lat[1] = 1000000;
    forever begin
      @(negedge clk);
      #2;
      for (int i = 0; i < 2; i++)
        for (int n = 0; n < NUM_NOCS; n++) if (rx_valid[i][n] && rx_ready[i][n]) begin
          checks++; got++;
          if (expq[i][n].size() == 0 || expq[i][n][0] !== rx_flit[i][n]) begin
            failures++; $display("FAIL node %0d NoC %0d got %h", i, n, rx_flit[i][n]);
          end else begin
            void'(expq[i][n].pop_front());
            if (cyc - sent_at[i][n][0] < min_lat[1-i]) min_lat[1-i] = cyc - sent_at[i][n][0];
            void'(sent_at[i][n].pop_front());
          end
        end
    end
  end

  for (genvar i = 0; i < 2; i++) begin : g_drv
    for (genvar n = 0; n < NUM_NOCS; n++) begin : g_noc
      initial begin
        tx_valid[i][n] = 0;
        tx_flit[i][n] = '0;
        repeat (5) @(posedge clk);
        for (int p = 0; p < 40; p++) begin
          int len;
          flits_t q;
          len = $urandom_range(0, 4);
          q.delete();
          q.push_back(mk_hdr(1 - i, $urandom_range(0, 3), $urandom_range(0, 2), len, 8'd1, p));
          for (int k = 0; k < len; k++) q.push_back({$urandom(), $urandom()});
          foreach (q[k]) begin
            expq[1-i][n].push_back(q[k]); total++;
            @(negedge clk);
            tx_valid[i][n] = 1; tx_flit[i][n] = q[k];
            sent_at[1-i][n].push_back(cyc);
            #1;
            while (!tx_ready[i][n]) begin @(negedge clk); #1; end
            @(posedge clk);
          end
          @(negedge clk);
          tx_valid[i][n] = 0;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    while (got < total) @(posedge clk);
    for (int i = 0; i < 2; i++) begin
      checks += 3;
      if (credit_reads[i] == 0)  begin failures++; $display("FAIL node %0d made no credit reads", i); end
      if (credit_stalls[i] == 0) begin failures++; $display("FAIL node %0d never stalled on credits", i); end
      if (flits_received[i] == 0) begin failures++; $display("FAIL node %0d received nothing", i); end
    end
    checks += 2;
    if (min_lat[0] < 50) begin failures++; $display("FAIL node 0 link latency %0d below 50", min_lat[0]); end
    if (min_lat[1] >= 50) begin failures++; $display("FAIL node 1 link latency %0d, expected short", min_lat[1]); end
    $display("INFO %0d flits; minimum latency %0d / %0d cycles; credit reads %0d / %0d; stalls %0d / %0d",
             got, min_lat[0], min_lat[1], credit_reads[0], credit_reads[1], credit_stalls[0], credit_stalls[1]);
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
