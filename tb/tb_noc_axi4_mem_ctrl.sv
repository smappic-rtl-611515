// tb_noc_axi4_mem_ctrl: end-to-end test of the memory controller against a
// behavioural DRAM that answers out of order. Random stores and loads of
// 1..64 bytes at random offsets inside a small set of lines are sent as NoC
// packets, several in flight at once; every answer packet is checked for
// destination, message type, MSHR tag, length and data against a byte-level
// reference memory kept here. It also checks that SD-window addresses land
// in the top half of the node's DRAM, and that with an added latency of L
// cycles a lone load takes at least L cycles longer than without.
module tb_noc_axi4_mem_ctrl;
  import smappic_pkg::*;
  import tb_noc_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset before any clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] cfg_latency = 0, cfg_gap = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  flit_t in_flit = '0, out_flit;
  logic aw_valid, aw_ready, w_valid, w_ready, b_valid, b_ready, ar_valid, ar_ready, r_valid, r_ready;
  axi_ax_t aw, ar; axi_w_t w; axi_b_t b; axi_r_t r;
  int n_reads, n_writes;
  logic [63:0] last_aw, last_ar;
  logic [31:0] sd_accesses;

  noc_axi4_mem_ctrl dut (
    .clk, .rst_n, .cfg_latency, .cfg_gap,
    .noc_in_valid(in_valid), .noc_in_ready(in_ready), .noc_in_flit(in_flit),
    .noc_out_valid(out_valid), .noc_out_ready(out_ready), .noc_out_flit(out_flit),
    .m_aw_valid(aw_valid), .m_aw_ready(aw_ready), .m_aw(aw),
    .m_w_valid(w_valid), .m_w_ready(w_ready), .m_w(w),
    .m_b_valid(b_valid), .m_b_ready(b_ready), .m_b(b),
    .m_ar_valid(ar_valid), .m_ar_ready(ar_ready), .m_ar(ar),
    .m_r_valid(r_valid), .m_r_ready(r_ready), .m_r(r),
    .sd_accesses
  );

  axi_mem_model #(.LATENCY(12)) u_mem (
    .clk, .aw_valid, .aw_ready, .aw, .w_valid, .w_ready, .w, .b_valid, .b_ready, .b,
    .ar_valid, .ar_ready, .ar, .r_valid, .r_ready, .r,
    .n_reads, .n_writes, .last_aw_addr(last_aw), .last_ar_addr(last_ar)
  );

  // expected answers by MSHR tag
  typedef struct { bit wr; int size; logic [511:0] data; int chip, x, y; bit live; longint line; } exp_t;
  exp_t exp_by_tag [256];
  logic [7:0] refmem [longint];   // byte-level reference, by DRAM address
  int answers = 0;

  task automatic send(input flits_t q);
    // drive and sample at the falling edge; the flit moves at the rising edge
    foreach (q[i]) begin
      @(negedge clk);
      in_valid = 1; in_flit = q[i];
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  // answer collector
  initial begin
    forever begin
      @(negedge clk);
      if (out_valid && out_ready) begin
        noc_hdr_t h;
        int tag;
        h = noc_hdr_t'(out_flit);
        tag = int'(h.mshr);
        checks++;
        if (!exp_by_tag[tag].live) begin
          failures++; $display("FAIL unexpected answer tag %0d", tag);
        end else begin
          exp_t e;
          e = exp_by_tag[tag];
          if (h.msg != (e.wr ? MSG_STORE_MEM_ACK : MSG_LOAD_MEM_ACK) || h.chipid != CHIP_W'(e.chip)
              || h.x != XY_W'(e.x) || h.y != XY_W'(e.y)
              || h.len != (e.wr ? 0 : ((e.size <= 3) ? 1 : (1 << (e.size - 3))))) begin
            failures++; $display("FAIL header of tag %0d: %h", tag, out_flit);
          end
          for (int i = 0; i < int'(h.len); i++) begin
            @(negedge clk);
            while (!out_valid) @(negedge clk);
            checks++;
            if (out_flit !== e.data[i*64 +: 64]) begin
              failures++; $display("FAIL data tag %0d flit %0d: %h exp %h", tag, i, out_flit, e.data[i*64 +: 64]);
            end
          end
          exp_by_tag[tag].live = 0;
          answers++;
        end
      end
    end
  end

  task automatic do_op(input bit wr, input int tag, input logic [47:0] addr, input int size,
                       input logic [47:0] dram);
    logic [511:0] d, e;
    d = {$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom(),
         $urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
    e = '0;
    if (wr) for (int i = 0; i < (1 << size); i++) refmem[longint'(dram) + i] = d[i*8 +: 8];
    else    for (int i = 0; i < (1 << size); i++)
              e[i*8 +: 8] = refmem.exists(longint'(dram) + i) ? refmem[longint'(dram) + i] : 8'h00;
    exp_by_tag[tag] = '{wr: wr, size: size, data: e, chip: tag % 4, x: tag % 3, y: 1, live: 1,
                        line: longint'(dram) / 64};
    send(mk_mem_req(wr, tag, addr, size, tag % 4, tag % 3, 1, d));
  endtask

  initial begin
    int t0, t1, base_lat;
    foreach (exp_by_tag[i]) exp_by_tag[i].live = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // random traffic, tags recycled only after their answer
    for (int n = 0; n < 400; n++) begin
      int tag, size, off;
      bit wr;
      logic [47:0] line;
      tag  = n % 32;
      while (exp_by_tag[tag].live) @(posedge clk);
      size = $urandom_range(0, 6);
      off  = ($urandom_range(0, 63) >> size) << size;   // naturally aligned
      line = 48'h8000_0000 + 48'($urandom_range(0, 7)) * 64;
      wr   = ($urandom_range(0, 2) != 0) || n < 8;
      // AXI4 does not order a read against a write to the same line, and
      // neither does the controller: keep one operation per line in flight
      forever begin
        bit clash;
        clash = 0;
        foreach (exp_by_tag[i]) if (exp_by_tag[i].live && exp_by_tag[i].line == longint'(line - 48'h8000_0000) / 64) clash = 1;
        if (!clash) break;
        @(posedge clk);
      end
      do_op(wr, tag, line + 48'(off), size, line - 48'h8000_0000 + 48'(off));
    end
    while (answers < 400) @(posedge clk);

    // virtual SD card: a store into the SD window goes to the top half
    do_op(1, 40, 48'hF0_0000_0200, 6, 48'h2_0000_0200);
    while (exp_by_tag[40].live) @(posedge clk);
    checks++;
    if (last_aw !== 64'h2_0000_0200) begin failures++; $display("FAIL SD write at %h", last_aw); end
    do_op(0, 41, 48'hF0_0000_0208, 3, 48'h2_0000_0208);
    while (exp_by_tag[41].live) @(posedge clk);
    checks++;
    if (last_ar !== 64'h2_0000_0200 || sd_accesses != 2) begin
      failures++; $display("FAIL SD read at %h, %0d SD accesses", last_ar, sd_accesses);
    end

    // traffic shaper: a lone load, without and with 80 cycles added
    t0 = $time / 10;
    do_op(0, 42, 48'h8000_0000, 3, 48'h0);
    while (exp_by_tag[42].live) @(posedge clk);
    base_lat = $time / 10 - t0;
    cfg_latency <= 16'd80;
    @(posedge clk);
    t0 = $time / 10;
    do_op(0, 43, 48'h8000_0000, 3, 48'h0);
    while (exp_by_tag[43].live) @(posedge clk);
    t1 = $time / 10 - t0;
    checks++;
    if (t1 < base_lat + 79 || t1 > base_lat + 82) begin
      failures++; $display("FAIL shaped latency %0d vs %0d", t1, base_lat);
    end
    $display("load latency %0d cycles, with 80 added %0d; %0d reads %0d writes", base_lat, t1, n_reads, n_writes);
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
