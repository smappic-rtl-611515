// tb_mc_read_engine: drives random loads (1..64 bytes, naturally aligned)
// into the read engine. A responder here answers each AR with a pattern line
// computed from the address, after a random delay and in random order. Each
// response is checked for its MSHR tag, requester and the selected bytes;
// each AR for 64-byte alignment and burst form. It also checks that no more
// than 8 reads are outstanding and that the limit is reached.
module tb_mc_read_engine;
  import smappic_pkg::*;
  import tb_noc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_valid = 0, req_ready, ar_valid, ar_ready = 1, r_valid = 0, r_ready, resp_valid, resp_ready = 1;
  mem_req_t req = '0;
  axi_ax_t ar;
  axi_r_t r = '0;
  mem_resp_t resp;
  logic [3:0] outstanding;

  mc_read_engine #(.NUM_IDS(8)) dut (.*);

  typedef struct { logic [5:0] id; logic [63:0] addr; int wait_c; } pend_t;
  pend_t pend[$];
  mem_req_t by_tag [256];
  bit live [256];
  int got = 0, max_out = 0;

  function automatic logic [511:0] pattern(input logic [63:0] a);
    logic [511:0] l;
    for (int i = 0; i < 16; i++) l[i*32 +: 32] = 32'(a) * 32'h9E3779B1 + 32'(i) * 32'h85EBCA77;
    return l;
  endfunction

  // AR acceptance and R responder; sampled at the falling edge
  bit taken;
  initial forever begin
    @(negedge clk);
    #2;
    if (int'(outstanding) > max_out) max_out = int'(outstanding);
    if (ar_valid && ar_ready) begin
      checks++;
      if (ar.addr[5:0] != 0 || ar.len != 0 || ar.size != 3'd6) begin
        failures++; $display("FAIL AR addr %h len %0d size %0d", ar.addr, ar.len, ar.size);
      end
      pend.push_back('{id: ar.id, addr: ar.addr, wait_c: $urandom_range(2, 20)});
    end
    taken = r_valid && r_ready;            // beat moves at the coming edge
    @(posedge clk);
    #1;
    if (taken) r_valid = 0;
    foreach (pend[i]) if (pend[i].wait_c > 0) pend[i].wait_c--;
    if (!r_valid) begin
      int c[$];
      c = pend.find_index with (item.wait_c == 0);
      if (c.size() > 0) begin
        int k = c[$urandom_range(0, c.size() - 1)];
        r.id = pend[k].id; r.data = pattern(pend[k].addr); r.last = 1; r.resp = 0;
        r_valid = 1;
        pend.delete(k);
      end
    end
    ar_ready = ($urandom_range(0, 4) != 0);
    resp_ready = ($urandom_range(0, 4) != 0);
  end

  // response checker
  initial forever begin
    @(negedge clk);
    #2;
    if (resp_valid && resp_ready) begin
      mem_req_t e;
      checks++;
      got++;
      e = by_tag[resp.mshr];
      if (!live[resp.mshr] || resp.wr || resp.dst_chip != e.src_chip || resp.dst_x != e.src_x
          || resp.dst_y != e.src_y || resp.size != e.size
          || resp.data !== select_bytes(pattern({e.addr[47:6], 6'b0}), int'(e.addr[5:0]), int'(e.size))) begin
        failures++; $display("FAIL resp tag %0d data %h", resp.mshr, resp.data[63:0]);
      end
      live[resp.mshr] = 0;
    end
  end

  initial begin
    foreach (live[i]) live[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      mem_req_t q;
      int size;
      q = '0;
      q.mshr = 8'(n % 64);
      while (live[q.mshr]) @(posedge clk);
      size = $urandom_range(0, 6);
      q.size = 3'(size);
      q.addr = {16'($urandom()), $urandom()};
      q.addr[5:0] = 6'(($urandom_range(0, 63) >> size) << size);
      q.src_chip = CHIP_W'($urandom_range(0, 3));
      q.src_x = XY_W'($urandom_range(0, 3));
      q.src_y = XY_W'($urandom_range(0, 2));
      by_tag[q.mshr] = q;
      live[q.mshr] = 1;
      @(negedge clk);
      req_valid = 1; req = q;
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
