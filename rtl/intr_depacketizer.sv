// intr_depacketizer: drives a core's interrupt wires from NoC packets.
//
// It sits on the NoC stream entering a tile and follows packet boundaries
// (header plus the length it announces). Packets of type INTERRUPT are taken
// off the stream: their payload's low IRQ_W bits become the new levels of
// the core's interrupt wires, so a packet can assert or de-assert them.
// Every other packet passes through unchanged to the tile.
//
// Sniffing the traffic and setting the wires from packet contents follow the
// SMAPPIC paper; the packet format is this design's (see intr_packetizer). The
// wires are registered: they change the cycle after the payload flit is
// taken, and are de-asserted by reset.
module intr_depacketizer
  import smappic_pkg::*;
#(
  parameter int unsigned IRQ_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  flit_t            in_flit,
  output logic             out_valid,
  input  logic             out_ready,
  output flit_t            out_flit,
  output logic [IRQ_W-1:0] irq,
  output logic [31:0]      irq_packets
);
  typedef enum logic [1:0] {S_HDR, S_PASS, S_IRQ} state_e;
  state_e     state;
  logic [7:0] remaining;
  noc_hdr_t   hdr;
  logic       is_irq_hdr, drop;

  assign hdr        = noc_hdr_t'(in_flit);
  assign is_irq_hdr = (state == S_HDR) && (hdr.msg == MSG_INTERRUPT);
  assign drop       = is_irq_hdr || (state == S_IRQ);
  assign out_valid  = in_valid && !drop;
  assign out_flit   = in_flit;
  assign in_ready   = drop ? 1'b1 : out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_HDR;
      remaining   <= '0;
      irq         <= '0;
      irq_packets <= '0;
    end else if (in_valid && in_ready) begin
      unique case (state)
        S_HDR: begin
          remaining <= hdr.len;
          if (hdr.len != 0) state <= is_irq_hdr ? S_IRQ : S_PASS;
        end
        S_PASS: begin
          remaining <= remaining - 1'b1;
          if (remaining == 8'd1) state <= S_HDR;
        end
        S_IRQ: begin
          remaining <= remaining - 1'b1;
          if (remaining == 8'd1) begin
            state       <= S_HDR;
            irq         <= in_flit[IRQ_W-1:0];
            irq_packets <= irq_packets + 1'b1;
          end
        end
        default: state <= S_HDR;
      endcase
    end
  end
endmodule
