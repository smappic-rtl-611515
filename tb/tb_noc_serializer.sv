// tb_noc_serializer: feeds random load and store responses while the NoC
// stalls at random and checks each packet: header fields (destination,
// message type, tag, length = data flits for a load, 0 for a store) and the
// data flits in order. Also checks that back-to-back single-flit packets
// leave one flit per cycle.
module tb_noc_serializer;
  import smappic_pkg::*;
  import tb_noc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic resp_valid = 0, resp_ready, flit_valid, flit_ready = 1;
  mem_resp_t resp = '0;
  flit_t flit;
  flit_t expq[$];
  bit stall = 1;
  longint cyc = 0, first_c = 0, last_c = 0;
  int nflits = 0;

  noc_serializer dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  initial forever begin
    @(negedge clk);
    #2;
    if (flit_valid && flit_ready) begin
      flit_t e;
      e = expq.pop_front();
      checks++;
      nflits++;
      last_c = cyc;
      if (flit !== e) begin failures++; $display("FAIL flit %h exp %h", flit, e); end
    end
  end

  initial forever begin
    @(posedge clk); #1 flit_ready = stall ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  task automatic send(input mem_resp_t r);
    int nd;
    nd = r.wr ? 0 : ((r.size <= 3) ? 1 : (1 << (r.size - 3)));
    expq.push_back(mk_hdr(r.dst_chip, r.dst_x, r.dst_y, nd, r.wr ? MSG_STORE_MEM_ACK : MSG_LOAD_MEM_ACK, r.mshr));
    for (int i = 0; i < nd; i++) expq.push_back(r.data[i*64 +: 64]);
    @(negedge clk);
    resp_valid = 1; resp = r;
    #1;
    while (!resp_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk);
    resp_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      mem_resp_t r;
      r = '0;
      r.wr = $urandom_range(0, 1);
      r.mshr = 8'($urandom());
      r.size = 3'($urandom_range(0, 6));
      r.dst_chip = CHIP_W'($urandom_range(0, 3));
      r.dst_x = XY_W'($urandom_range(0, 3));
      r.dst_y = XY_W'($urandom_range(0, 2));
      for (int i = 0; i < 16; i++) r.data[i*32 +: 32] = $urandom();
      send(r);
    end
    while (expq.size() > 0) @(posedge clk);
    // throughput: 8 store acks with no stalls, one flit per cycle
    stall = 0;
    repeat (3) @(posedge clk);
    nflits = 0;
    fork
      for (int n = 0; n < 8; n++) begin
        mem_resp_t r;
        r = '0; r.wr = 1; r.mshr = 8'(n);
        expq.push_back(mk_hdr(0, 0, 0, 0, MSG_STORE_MEM_ACK, n));
        @(negedge clk); resp_valid = 1; resp = r;
        if (n == 0) first_c = cyc;
        @(posedge clk);
      end
    join
    @(negedge clk); resp_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (nflits != 8 || last_c - first_c != 7) begin
      failures++; $display("FAIL 8 acks took %0d cycles (%0d flits)", last_c - first_c + 1, nflits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
