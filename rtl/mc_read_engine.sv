// mc_read_engine: read side of the NoC-AXI4 memory controller.
//
// Each read request gets a free AXI4 ID. The engine records, under that ID,
// the request's MSHR tag, where it came from (node/x/y), its size and its
// offset inside the 64-byte line (the ID-MSHR mapping), and issues one
// single-beat 64-byte AXI4 read at the line-aligned address. When the R beat
// returns, the ID indexes the table to restore the request; a request
// smaller than 64 bytes gets only its own bytes, moved down to bit 0. The ID
// is then freed, so responses may return in any order.
//
// The ID-MSHR mapping, alignment and byte selection follow the SMAPPIC paper; the
// number of IDs (outstanding reads), the lowest-free-ID choice and the
// single-beat burst are this design's choices.
//
// Timing: AR is issued in the cycle the request is accepted (needs a free ID
// and ar_ready); an R beat becomes a response combinationally and r_ready
// follows resp_ready.
module mc_read_engine
  import smappic_pkg::*;
#(
  parameter int unsigned NUM_IDS = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req_valid,
  output logic      req_ready,
  input  mem_req_t  req,
  output logic      ar_valid,
  input  logic      ar_ready,
  output axi_ax_t   ar,
  input  logic      r_valid,
  output logic      r_ready,
  input  axi_r_t    r,
  output logic      resp_valid,
  input  logic      resp_ready,
  output mem_resp_t resp,
  output logic [$clog2(NUM_IDS+1)-1:0] outstanding
);
  localparam int unsigned IW = (NUM_IDS > 1) ? $clog2(NUM_IDS) : 1;

  typedef struct packed {
    logic [7:0]        mshr;
    logic [CHIP_W-1:0] chip;
    logic [XY_W-1:0]   x;
    logic [XY_W-1:0]   y;
    logic [2:0]        size;
    logic [5:0]        offset;
  } entry_t;

  entry_t             table_q [NUM_IDS];
  logic [NUM_IDS-1:0] busy;
  logic               have_free;
  logic [IW-1:0]      free_id;
  entry_t             e;
  logic [IW-1:0]      rid;
  logic [AXI_DATA_W-1:0] shifted, mask;

  always_comb begin
    have_free = 1'b0;
    free_id   = '0;
    for (int i = NUM_IDS - 1; i >= 0; i--) begin
      if (!busy[i]) begin
        have_free = 1'b1;
        free_id   = IW'(i);
      end
    end
  end

  assign ar_valid  = req_valid && have_free;
  assign req_ready = ar_ready && have_free;
  always_comb begin
    ar       = '0;
    ar.id    = AXI_ID_W'(free_id);
    ar.addr  = AXI_ADDR_W'({req.addr[47:6], 6'b0});
    ar.len   = 8'd0;
    ar.size  = 3'd6;      // 64 bytes per beat
    ar.burst = 2'b01;     // INCR
  end

  assign rid     = r.id[IW-1:0];
  assign e       = table_q[rid];
  assign shifted = r.data >> {e.offset, 3'b000};
  assign mask    = (e.size >= 3'd6) ? '1 : ~({AXI_DATA_W{1'b1}} << ({4'd0, 5'd8} << e.size));

  assign resp_valid = r_valid;
  assign r_ready    = resp_ready;
  always_comb begin
    resp          = '0;
    resp.wr       = 1'b0;
    resp.mshr     = e.mshr;
    resp.dst_chip = e.chip;
    resp.dst_x    = e.x;
    resp.dst_y    = e.y;
    resp.size     = e.size;
    resp.data     = shifted & mask;
  end

  always_ff @(posedge clk) begin
    if (req_valid && req_ready)
      table_q[free_id] <= '{mshr: req.mshr, chip: req.src_chip, x: req.src_x,
                            y: req.src_y, size: req.size, offset: req.addr[5:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0;
    end else begin
      if (r_valid && r_ready && r.last) busy[rid] <= 1'b0;
      if (req_valid && req_ready)       busy[free_id] <= 1'b1;
    end
  end

  always_comb begin
    outstanding = '0;
    for (int i = 0; i < NUM_IDS; i++) outstanding += busy[i];
  end

  // A response must belong to an outstanding read.
  a_r_known: assert property (@(posedge clk) disable iff (!rst_n)
    r_valid |-> busy[rid]);
endmodule
