// tb_intr_depacketizer: a random mix of ordinary packets (any type but
// INTERRUPT, length 0 to 8) and interrupt packets enters with random gaps,
// and the tile stalls at random. Checks that ordinary packets come out
// unchanged and in order, that no interrupt flit comes out, that after each
// interrupt packet the wires show its payload level, and that the packet
// counter matches.
module tb_intr_depacketizer;
  import smappic_pkg::*;
  import tb_noc_pkg::*;
  localparam int IW = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  flit_t in_flit = '0, out_flit;
  logic [IW-1:0] irq;
  logic [31:0] irq_packets;

  intr_depacketizer #(.IRQ_W(IW)) dut (.*);

  flit_t expq [$];
  int n_irq = 0, n_pass = 0;

  initial forever begin
    @(posedge clk);
    #1;
    out_ready = ($urandom_range(0, 3) != 0);
  end

  initial forever begin
    @(negedge clk);
    #2;
    if (out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0 || expq[0] !== out_flit) begin
        failures++; $display("FAIL out flit %h expected %h", out_flit, expq.size() ? expq[0] : '0);
      end else void'(expq.pop_front());
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    checks++;
    if (irq != '0) begin failures++; $display("FAIL wires not clear after reset"); end
    for (int p = 0; p < 400; p++) begin
      flits_t q;
      bit is_irq;
      logic [IW-1:0] lvl;
      is_irq = ($urandom_range(0, 2) == 0);
      lvl = IW'($urandom());
      q.delete();
      if (is_irq) begin
        q.push_back(mk_hdr(0, 1, 1, 1, MSG_INTERRUPT, 0));
        q.push_back({32'($urandom()), 16'd5, 12'($urandom()), lvl});
      end else begin
        int len, m;
        len = $urandom_range(0, 8);
        m = $urandom_range(1, 31);
        q.push_back(mk_hdr(0, 1, 1, len, 8'(m), p));
        for (int i = 0; i < len; i++) q.push_back({$urandom(), $urandom()});
        foreach (q[i]) expq.push_back(q[i]);
        n_pass++;
      end
      foreach (q[i]) begin
        @(negedge clk);
        in_valid = 0;
        repeat ($urandom_range(0, 1)) @(negedge clk);
        in_valid = 1; in_flit = q[i];
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(posedge clk);
      end
      @(negedge clk);
      in_valid = 0;
      if (is_irq) begin
        n_irq++;
        checks++;
        if (irq != lvl) begin failures++; $display("FAIL wires %b after packet with level %b", irq, lvl); end
      end
    end
    repeat (30) @(posedge clk);
    checks += 2;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d flits never came out", expq.size()); end
    if (irq_packets != 32'(n_irq)) begin failures++; $display("FAIL irq_packets %0d expected %0d", irq_packets, n_irq); end
    $display("INFO %0d interrupt packets, %0d ordinary packets", n_irq, n_pass);
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
