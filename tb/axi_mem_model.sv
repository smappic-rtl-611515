// axi_mem_model: behavioural model of a DRAM behind an AXI4 slave port, for
// testbenches only (not synthesizable). Single-beat 64-byte transfers.
// Memory is a sparse associative array of 64-byte lines, reading zero where
// never written. Each accepted read or write is answered no earlier than
// LATENCY cycles later; when several answers are due, a random one is
// returned first, so responses come back out of order. AW and W are taken
// together. Counts reads and writes and remembers the last write address.
module axi_mem_model
  import smappic_pkg::*;
#(
  parameter int unsigned LATENCY = 10
) (
  input  logic    clk,
  input  logic    aw_valid, output logic aw_ready, input axi_ax_t aw,
  input  logic    w_valid,  output logic w_ready,  input axi_w_t  w,
  output logic    b_valid,  input  logic b_ready,  output axi_b_t b,
  input  logic    ar_valid, output logic ar_ready, input axi_ax_t ar,
  output logic    r_valid,  input  logic r_ready,  output axi_r_t r,
  output int      n_reads,
  output int      n_writes,
  output logic [AXI_ADDR_W-1:0] last_aw_addr,
  output logic [AXI_ADDR_W-1:0] last_ar_addr
);
  logic [AXI_DATA_W-1:0] mem [logic [AXI_ADDR_W-1:0]];
  typedef struct { logic [AXI_ID_W-1:0] id; longint due; logic [AXI_ADDR_W-1:0] addr; } pend_t;
  pend_t  rq[$], bq[$];
  longint cyc;
  int     ri, bi;

  assign aw_ready = w_valid;
  assign w_ready  = aw_valid;
  assign ar_ready = 1'b1;

  function automatic logic [AXI_DATA_W-1:0] rd(input logic [AXI_ADDR_W-1:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  initial begin
    b_valid = 0; r_valid = 0; b = '0; r = '0; n_reads = 0; n_writes = 0;
    last_aw_addr = '0; last_ar_addr = '0; cyc = 0; ri = 0; bi = 0;
  end

  always @(posedge clk) begin
    bit busy;
    int c[$];
    cyc = cyc + 1;
    if (aw_valid && aw_ready) begin
      logic [AXI_DATA_W-1:0] line;
      line = rd(aw.addr);
      for (int i = 0; i < AXI_STRB_W; i++) if (w.strb[i]) line[i*8 +: 8] = w.data[i*8 +: 8];
      mem[aw.addr] = line;
      bq.push_back('{id: aw.id, due: cyc + LATENCY, addr: aw.addr});
      n_writes     <= n_writes + 1;
      last_aw_addr <= aw.addr;
    end
    if (ar_valid && ar_ready) begin
      rq.push_back('{id: ar.id, due: cyc + LATENCY, addr: ar.addr});
      n_reads      <= n_reads + 1;
      last_ar_addr <= ar.addr;
    end
    // write responses
    busy = b_valid;
    if (b_valid && b_ready) begin bq.delete(bi); busy = 0; end
    if (!busy) begin
      c = bq.find_index with (item.due <= cyc);
      if (c.size() > 0) begin
        bi = c[$urandom_range(0, c.size() - 1)];
        b_valid <= 1; b.id <= bq[bi].id; b.resp <= 2'b00;
      end else b_valid <= 0;
    end
    // read responses
    busy = r_valid;
    if (r_valid && r_ready) begin rq.delete(ri); busy = 0; end
    if (!busy) begin
      c = rq.find_index with (item.due <= cyc);
      if (c.size() > 0) begin
        ri = c[$urandom_range(0, c.size() - 1)];
        r_valid <= 1; r.id <= rq[ri].id; r.data <= rd(rq[ri].addr); r.resp <= 2'b00; r.last <= 1'b1;
      end else r_valid <= 0;
    end
  end
endmodule
