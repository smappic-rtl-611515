// mc_management: management module of the NoC-AXI4 memory controller.
//
// Requests from the deserializer are first buffered in a FIFO of REQ_DEPTH
// entries, so the NoC side keeps flowing while the AXI4 side is busy
// (non-blocking operation). The request at the head is steered by type: loads
// to the read engine, stores to the write engine. Responses coming back from
// the two engines are merged, alternating between them when both are
// waiting, and handed to the serializer.
//
// The buffering and steering follow the SMAPPIC paper; the buffer depth and the
// alternating response arbitration are this design's choices. A head
// request whose engine is busy blocks those behind it (in-order issue).
module mc_management
  import smappic_pkg::*;
#(
  parameter int unsigned REQ_DEPTH = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  mem_req_t  in_req,
  output logic      rd_valid,
  input  logic      rd_ready,
  output mem_req_t  rd_req,
  output logic      wr_valid,
  input  logic      wr_ready,
  output mem_req_t  wr_req,
  input  logic      rd_resp_valid,
  output logic      rd_resp_ready,
  input  mem_resp_t rd_resp,
  input  logic      wr_resp_valid,
  output logic      wr_resp_ready,
  input  mem_resp_t wr_resp,
  output logic      out_valid,
  input  logic      out_ready,
  output mem_resp_t out_resp,
  output logic [$clog2(REQ_DEPTH+1)-1:0] buffered
);
  logic     head_valid, head_ready;
  mem_req_t head;
  logic     pick_wr, last_wr;

  sync_fifo #(.WIDTH($bits(mem_req_t)), .DEPTH(REQ_DEPTH)) u_buf (
    .clk, .rst_n,
    .wr_valid(in_valid), .wr_ready(in_ready), .wr_data(in_req),
    .rd_valid(head_valid), .rd_ready(head_ready), .rd_data(head),
    .count(buffered)
  );

  assign rd_req     = head;
  assign wr_req     = head;
  assign rd_valid   = head_valid && !head.wr;
  assign wr_valid   = head_valid &&  head.wr;
  assign head_ready = head.wr ? wr_ready : rd_ready;

  // Response merge: prefer the engine not served last when both wait.
  always_comb begin
    if (rd_resp_valid && wr_resp_valid) pick_wr = !last_wr;
    else                                pick_wr = wr_resp_valid;
  end
  assign out_valid     = rd_resp_valid || wr_resp_valid;
  assign out_resp      = pick_wr ? wr_resp : rd_resp;
  assign rd_resp_ready = out_ready && !pick_wr;
  assign wr_resp_ready = out_ready &&  pick_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_wr <= 1'b0;
    else if (out_valid && out_ready) last_wr <= pick_wr;
  end
endmodule
