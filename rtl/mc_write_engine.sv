// mc_write_engine: write side of the NoC-AXI4 memory controller.
//
// Each write request gets a free AXI4 ID under which the engine records the
// request's MSHR tag, origin (node/x/y) and size (the ID-MSHR mapping). It
// then issues one single-beat 64-byte AXI4 write at the line-aligned address:
// the data is moved up to its offset inside the line and the byte strobes
// cover exactly the request's bytes. When the B response returns, its ID
// restores the request and a store acknowledgement goes to the serializer.
//
// The mapping and 64-byte alignment follow the SMAPPIC paper; the number of IDs,
// the single-beat burst and strobe-based partial writes are this design's
// choices.
//
// Timing: AW and W are offered together when a request is present and an ID
// is free; the request is taken once both have been accepted (in the same
// or in different cycles). B becomes a response combinationally.
module mc_write_engine
  import smappic_pkg::*;
#(
  parameter int unsigned NUM_IDS = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req_valid,
  output logic      req_ready,
  input  mem_req_t  req,
  output logic      aw_valid,
  input  logic      aw_ready,
  output axi_ax_t   aw,
  output logic      w_valid,
  input  logic      w_ready,
  output axi_w_t    w,
  input  logic      b_valid,
  output logic      b_ready,
  input  axi_b_t    b,
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
  } entry_t;

  entry_t             table_q [NUM_IDS];
  logic [NUM_IDS-1:0] busy;
  logic               have_free;
  logic [IW-1:0]      free_id;
  logic               aw_done, w_done;   // channel already accepted
  logic               aw_fire, w_fire, take;
  logic [IW-1:0]      id_q, cur_id;        // ID held once one channel went out
  logic               started, id_ok;
  entry_t             e;
  logic [IW-1:0]      bid;
  logic [AXI_STRB_W-1:0] bytes;

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

  assign started   = aw_done || w_done;
  assign cur_id    = started ? id_q : free_id;
  assign id_ok     = started || have_free;
  assign aw_valid  = req_valid && id_ok && !aw_done;
  assign w_valid   = req_valid && id_ok && !w_done;
  assign aw_fire   = aw_valid && aw_ready;
  assign w_fire    = w_valid && w_ready;
  assign take      = req_valid && id_ok && (aw_done || aw_fire) && (w_done || w_fire);
  assign req_ready = take;

  assign bytes = (req.size >= 3'd6) ? '1 : ~({AXI_STRB_W{1'b1}} << (7'd1 << req.size));

  always_comb begin
    aw       = '0;
    aw.id    = AXI_ID_W'(cur_id);
    aw.addr  = AXI_ADDR_W'({req.addr[47:6], 6'b0});
    aw.len   = 8'd0;
    aw.size  = 3'd6;
    aw.burst = 2'b01;
    w.data   = req.data << {req.addr[5:0], 3'b000};
    w.strb   = bytes << req.addr[5:0];
    w.last   = 1'b1;
  end

  assign bid        = b.id[IW-1:0];
  assign e          = table_q[bid];
  assign resp_valid = b_valid;
  assign b_ready    = resp_ready;
  always_comb begin
    resp          = '0;
    resp.wr       = 1'b1;
    resp.mshr     = e.mshr;
    resp.dst_chip = e.chip;
    resp.dst_x    = e.x;
    resp.dst_y    = e.y;
    resp.size     = e.size;
  end

  always_ff @(posedge clk) begin
    if (take)
      table_q[cur_id] <= '{mshr: req.mshr, chip: req.src_chip, x: req.src_x,
                            y: req.src_y, size: req.size};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= '0;
      aw_done <= 1'b0;
      w_done  <= 1'b0;
      id_q    <= '0;
    end else begin
      if (!started) id_q <= free_id;
      if (b_valid && b_ready) busy[bid] <= 1'b0;
      if (take) begin
        busy[cur_id]  <= 1'b1;
        aw_done       <= 1'b0;
        w_done        <= 1'b0;
      end else begin
        if (aw_fire) aw_done <= 1'b1;
        if (w_fire)  w_done  <= 1'b1;
      end
    end
  end

  always_comb begin
    outstanding = '0;
    for (int i = 0; i < NUM_IDS; i++) outstanding += busy[i];
  end

  a_b_known: assert property (@(posedge clk) disable iff (!rst_n)
    b_valid |-> busy[bid]);
endmodule
