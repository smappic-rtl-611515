// noc_deserializer: front end of the NoC-AXI4 memory controller. It takes the
// 64-bit flits of one memory request packet and assembles them into a single
// mem_req_t word for the management module.
//
// Packet layout (this design's choice, OpenPiton style): header flit
// (msg = LOAD_MEM or STORE_MEM, mshr tag, len); payload flit 1 holds the
// address in [47:0] and the size code log2(bytes) in [50:48]; payload flit 2
// holds the requester's node/x/y in the same bit positions as a header; a
// store then carries its data flits, byte 0 in the low bits of the first one.
// Flits beyond the payload length announced in the header are not expected;
// any extra payload flits of a store beyond 8 are dropped.
//
// Handshake: ready/valid flit input, ready/valid request output. One request
// is held at a time; flit input stalls while it waits to be taken.
module noc_deserializer
  import smappic_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     flit_valid,
  output logic     flit_ready,
  input  flit_t    flit,
  output logic     req_valid,
  input  logic     req_ready,
  output mem_req_t req
);
  typedef enum logic [1:0] {S_HDR, S_ADDR, S_SRC, S_DATA} state_e;
  state_e     state;
  logic [7:0] remaining;   // payload flits still to come
  logic [3:0] data_idx;
  noc_hdr_t   hdr;

  assign hdr        = noc_hdr_t'(flit);
  assign flit_ready = !req_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_HDR;
      remaining <= '0;
      data_idx  <= '0;
      req_valid <= 1'b0;
      req       <= '0;
    end else begin
      if (req_valid && req_ready) req_valid <= 1'b0;
      if (flit_valid && flit_ready) begin
        unique case (state)
          S_HDR: begin
            req.wr    <= (hdr.msg == MSG_STORE_MEM);
            req.mshr  <= hdr.mshr;
            req.data  <= '0;
            remaining <= hdr.len;
            data_idx  <= '0;
            if (hdr.len != 0) state <= S_ADDR;
          end
          S_ADDR: begin
            req.addr  <= flit[47:0];
            req.size  <= flit[50:48];
            remaining <= remaining - 1'b1;
            if (remaining == 8'd1) begin
              state     <= S_HDR;
              req_valid <= 1'b1;
            end else state <= S_SRC;
          end
          S_SRC: begin
            req.src_chip <= flit[63:50];
            req.src_x    <= flit[49:42];
            req.src_y    <= flit[41:34];
            remaining    <= remaining - 1'b1;
            if (remaining == 8'd1) begin
              state     <= S_HDR;
              req_valid <= 1'b1;
            end else state <= S_DATA;
          end
          S_DATA: begin
            if (data_idx < 4'(LINE_FLITS)) req.data[data_idx[2:0]*FLIT_W +: FLIT_W] <= flit;
            data_idx  <= data_idx + 1'b1;
            remaining <= remaining - 1'b1;
            if (remaining == 8'd1) begin
              state     <= S_HDR;
              req_valid <= 1'b1;
            end
          end
        endcase
      end
    end
  end
endmodule
