// tb_mc_write_engine: drives random stores (1..64 bytes, naturally aligned)
// with AW and W accepted independently at random, so the two channels are
// taken in the same or in different cycles. Checks every AW for alignment,
// that W carries the data at the right byte offset with strobes covering
// exactly the stored bytes, that AW and W of one store carry the same ID,
// and that each B (returned in random order) produces an acknowledgement
// with the right tag and requester. Also checks the 8-ID limit is reached.
module tb_mc_write_engine;
  import smappic_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_valid = 0, req_ready, aw_valid, aw_ready = 1, w_valid, w_ready = 1;
  logic b_valid = 0, b_ready, resp_valid, resp_ready = 1;
  mem_req_t req = '0;
  axi_ax_t aw; axi_w_t w; axi_b_t b = '0;
  mem_resp_t resp;
  logic [3:0] outstanding;

  mc_write_engine #(.NUM_IDS(8)) dut (.*);

  mem_req_t by_tag [256];
  bit live [256];
  logic [5:0] pend_id[$];
  int pend_wait[$];
  logic [5:0] aw_id_q[$];
  axi_ax_t aw_seen[$];
  axi_w_t  w_seen[$];
  int got = 0, max_out = 0;
  bit taken, bad;
  mem_req_t cur;

  initial forever begin
    @(negedge clk);
    #2;
    if (int'(outstanding) > max_out) max_out = int'(outstanding);
    if (aw_valid && aw_ready) aw_seen.push_back(aw);
    if (w_valid && w_ready)   w_seen.push_back(w);
    // pair AW and W in order and check them against the current store
    while (aw_seen.size() > 0 && w_seen.size() > 0) begin
      axi_ax_t a; axi_w_t d;
      logic [63:0] strb; logic [511:0] data;
      a = aw_seen.pop_front(); d = w_seen.pop_front();
      strb = '0; data = '0;
      for (int i = 0; i < (1 << cur.size); i++) begin
        strb[cur.addr[5:0] + i] = 1'b1;
        data[(cur.addr[5:0] + i)*8 +: 8] = cur.data[i*8 +: 8];
      end
      checks++;
      bad = 0;
      for (int i = 0; i < 64; i++) if (strb[i] && d.data[i*8 +: 8] != data[i*8 +: 8]) bad = 1;
      if (a.addr != {16'd0, cur.addr[47:6], 6'b0} || a.size != 3'd6 || d.strb != strb
          || bad || !d.last) begin
        failures++; $display("FAIL AW/W for tag %0d: addr %h strb %h", cur.mshr, a.addr, d.strb);
      end
      pend_id.push_back(a.id);
      pend_wait.push_back($urandom_range(5, 60));
    end
    taken = b_valid && b_ready;
    if (resp_valid && resp_ready) begin
      mem_req_t e;
      e = by_tag[resp.mshr];
      checks++; got++;
      if (!live[resp.mshr] || !resp.wr || resp.dst_chip != e.src_chip || resp.dst_x != e.src_x || resp.dst_y != e.src_y) begin
        failures++; $display("FAIL ack tag %0d", resp.mshr);
      end
      live[resp.mshr] = 0;
    end
    @(posedge clk);
    #1;
    if (taken) b_valid = 0;
    foreach (pend_wait[i]) if (pend_wait[i] > 0) pend_wait[i]--;
    if (!b_valid) begin
      int c[$];
      c = pend_wait.find_index with (item == 0);
      if (c.size() > 0) begin
        int k = c[$urandom_range(0, c.size() - 1)];
        b.id = pend_id[k]; b.resp = 0; b_valid = 1;
        pend_id.delete(k); pend_wait.delete(k);
      end
    end
    aw_ready = ($urandom_range(0, 2) != 0);
    w_ready  = ($urandom_range(0, 2) != 0);
    resp_ready = ($urandom_range(0, 4) != 0);
  end

  initial begin
    foreach (live[i]) live[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      mem_req_t q;
      int size;
      q = '0;
      q.wr = 1;
      q.mshr = 8'(n % 64);
      while (live[q.mshr]) @(posedge clk);
      size = $urandom_range(0, 6);
      q.size = 3'(size);
      q.addr = {16'($urandom()), $urandom()};
      q.addr[5:0] = 6'(($urandom_range(0, 63) >> size) << size);
      for (int i = 0; i < 16; i++) q.data[i*32 +: 32] = $urandom();
      q.src_chip = CHIP_W'($urandom_range(0, 3));
      q.src_x = XY_W'($urandom_range(0, 3));
      q.src_y = XY_W'($urandom_range(0, 2));
      by_tag[q.mshr] = q;
      live[q.mshr] = 1;
      @(negedge clk);
      req_valid = 1; req = q; cur = q;
      #1;
      while (!req_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      @(negedge clk);
      req_valid = 0;
    end
    while (got < 400) @(posedge clk);
    checks++;
    if (max_out != 8) begin failures++; $display("FAIL max outstanding %0d", max_out); end
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
