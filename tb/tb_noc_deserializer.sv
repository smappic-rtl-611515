// tb_noc_deserializer: sends random load and store packets (sizes 1..64
// bytes) with random gaps while the consumer stalls at random, and checks
// every assembled request (type, tag, address, size, source, data) against
// the values the packet was built from.
module tb_noc_deserializer;
  import smappic_pkg::*;
  import tb_noc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic flit_valid = 0, flit_ready, req_valid, req_ready = 1;
  flit_t flit = '0;
  mem_req_t req;
  mem_req_t expq[$];
  int got = 0;
  bit done = 0;

  noc_deserializer dut (.*);

  initial forever begin
    @(negedge clk);
    #2;
    if (req_valid && req_ready) begin
      mem_req_t e;
      e = expq.pop_front();
      checks++;
      got++;
      if (req !== e) begin
        failures++;
        $display("FAIL req wr=%0d tag=%0d addr=%h size=%0d src=%0d/%0d/%0d; exp wr=%0d tag=%0d addr=%h size=%0d",
                 req.wr, req.mshr, req.addr, req.size, req.src_chip, req.src_x, req.src_y, e.wr, e.mshr, e.addr, e.size);
      end
    end
  end

  initial begin
    while (!done) begin
      @(posedge clk); #1 req_ready = ($urandom_range(0, 2) != 0);
    end
    req_ready = 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      mem_req_t e;
      flits_t q;
      logic [511:0] d;
      int size;
      for (int i = 0; i < 16; i++) d[i*32 +: 32] = $urandom();
      size = $urandom_range(0, 6);
      e = '0;
      e.wr = $urandom_range(0, 1);
      e.mshr = 8'($urandom());
      e.addr = {16'($urandom()), $urandom()};
      e.size = 3'(size);
      e.src_chip = CHIP_W'($urandom_range(0, 3));
      e.src_x = XY_W'($urandom_range(0, 3));
      e.src_y = XY_W'($urandom_range(0, 2));
      if (e.wr) for (int i = 0; i < ((size <= 3) ? 1 : (1 << (size - 3))); i++) e.data[i*64 +: 64] = d[i*64 +: 64];
      expq.push_back(e);
      q = mk_mem_req(e.wr, e.mshr, e.addr, size, e.src_chip, e.src_x, e.src_y, d);
      foreach (q[i]) begin
        @(negedge clk);
        flit_valid = 1; flit = q[i];
        #1;
        while (!flit_ready) begin @(negedge clk); #1; end
        @(posedge clk);
        if ($urandom_range(0, 3) == 0) begin @(negedge clk); flit_valid = 0; end
      end
      @(negedge clk); flit_valid = 0;
    end
    while (got < 300) @(posedge clk);
    done = 1;
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
