// tb_intr_packetizer: 48 cores (default size). Random cores change their
// interrupt wires at random while the NoC accepts flits at random. The
// checker decodes every packet: header (node, x, y, length 1, type
// INTERRUPT), core number in the payload, and that each packet carries a
// level different from the last one delivered to that core. After the wires
// settle, the last level delivered to each core must equal its wires. A
// final phase measures the delay from a single change to its packet with
// the NoC always ready (bounded by one scan of the cores).
module tb_intr_packetizer;
  import smappic_pkg::*;
  localparam int NC = 48, TPN = 12, XT = 4, IW = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [IW-1:0] irq_in [NC];
  logic flit_valid, flit_ready = 0;
  flit_t flit;
  logic [31:0] packets_sent;

  intr_packetizer dut (.*);

  logic [IW-1:0] delivered [NC];
  int pkts = 0;
  bit free_run = 0;
  longint cyc = 0, last_pkt_cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial forever begin
    @(posedge clk);
    #1;
    flit_ready = free_run || ($urandom_range(0, 2) != 0);
  end

  // packet checker
  initial begin
    bit in_pkt;
    noc_hdr_t h;
    in_pkt = 0;
    h = '0;
    for (int c = 0; c < NC; c++) delivered[c] = '0;
    forever begin
      @(negedge clk);
      #2;
      if (flit_valid && flit_ready) begin
        if (!in_pkt) begin
          h = noc_hdr_t'(flit);
          in_pkt = 1;
          checks++;
          if (h.len != 1 || h.msg != MSG_INTERRUPT || h.x >= XT || h.y >= TPN / XT || h.chipid >= NC / TPN) begin
            failures++; $display("FAIL header %h", flit);
          end
        end else begin
          int c;
          in_pkt = 0;
          c = int'(flit[31:16]);
          checks += 2;
          if (c >= NC || h.chipid != CHIP_W'(c / TPN) || h.x != XY_W'((c % TPN) % XT) || h.y != XY_W'((c % TPN) / XT)) begin
            failures++; $display("FAIL core %0d not at node %0d tile (%0d,%0d)", c, h.chipid, h.x, h.y);
          end else if (flit[IW-1:0] == delivered[c]) begin
            failures++; $display("FAIL core %0d sent unchanged level %b", c, flit[IW-1:0]);
          end else delivered[c] = flit[IW-1:0];
          pkts++;
          last_pkt_cyc = cyc;
        end
      end
    end
  end

  initial begin
    for (int c = 0; c < NC; c++) irq_in[c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: random changes
    repeat (3000) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        int c;
        c = $urandom_range(0, NC - 1);
        irq_in[c][$urandom_range(0, IW - 1)] ^= 1'b1;
      end
    end
    // settle and compare
    repeat (400) @(posedge clk);
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (delivered[c] != irq_in[c]) begin failures++; $display("FAIL core %0d wires %b last delivered %b", c, irq_in[c], delivered[c]); end
    end
    // phase 2: delay of a single change with the NoC always ready
    free_run = 1;
    repeat (5) @(posedge clk);
    for (int t = 0; t < 20; t++) begin
      int c, n_before;
      longint start;
      c = $urandom_range(0, NC - 1);
      n_before = pkts;
      @(negedge clk);
      irq_in[c] ^= IW'($urandom_range(1, (1 << IW) - 1));
      start = cyc;
      while (pkts == n_before && cyc - start < 200) @(posedge clk);
      checks++;
      if (pkts != n_before + 1 || last_pkt_cyc - start > NC + 3) begin
        failures++; $display("FAIL change of core %0d delivered after %0d cycles", c, last_pkt_cyc - start);
      end
      repeat (3) @(posedge clk);
    end
    checks++;
    if (packets_sent != 32'(pkts)) begin failures++; $display("FAIL packets_sent %0d, counted %0d", packets_sent, pkts); end
    $display("INFO %0d interrupt packets", pkts);
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
