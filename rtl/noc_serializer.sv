// noc_serializer: back end of the NoC-AXI4 memory controller. It turns one
// mem_resp_t into a NoC packet for the requesting tile: a header flit
// addressed to the requester's node/x/y with the original MSHR tag and
// message type LOAD_MEM_ACK or STORE_MEM_ACK, followed for a load by
// data_flits(size) flits of read data (selected bytes from bit 0 of the
// first flit). A store acknowledgement is a header alone.
//
// Handshake: ready/valid on both sides; the response is accepted when the
// header flit leaves and is held internally while its data flits follow.
module noc_serializer
  import smappic_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      resp_valid,
  output logic      resp_ready,
  input  mem_resp_t resp,
  output logic      flit_valid,
  input  logic      flit_ready,
  output flit_t     flit
);
  logic                  busy;      // sending data flits
  logic [7:0]            remaining;
  logic [2:0]            idx;
  logic [AXI_DATA_W-1:0] data_q;
  noc_hdr_t              hdr;

  always_comb begin
    hdr        = '0;
    hdr.chipid = resp.dst_chip;
    hdr.x      = resp.dst_x;
    hdr.y      = resp.dst_y;
    hdr.len    = resp.wr ? 8'd0 : data_flits(resp.size);
    hdr.msg    = resp.wr ? MSG_STORE_MEM_ACK : MSG_LOAD_MEM_ACK;
    hdr.mshr   = resp.mshr;
  end

  assign flit_valid = busy || resp_valid;
  assign flit       = busy ? data_q[idx*FLIT_W +: FLIT_W] : flit_t'(hdr);
  assign resp_ready = !busy && flit_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      remaining <= '0;
      idx       <= '0;
      data_q    <= '0;
    end else if (busy) begin
      if (flit_ready) begin
        idx       <= idx + 1'b1;
        remaining <= remaining - 1'b1;
        if (remaining == 8'd1) busy <= 1'b0;
      end
    end else if (resp_valid && flit_ready && !resp.wr) begin
      busy      <= 1'b1;
      remaining <= data_flits(resp.size);
      idx       <= '0;
      data_q    <= resp.data;
    end
  end
endmodule
