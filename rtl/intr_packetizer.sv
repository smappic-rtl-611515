// intr_packetizer: carries RISC-V interrupt wires over the NoC.
//
// It watches the interrupt controller's output wires, IRQ_W per core
// (by default machine and supervisor external, software and timer). A
// pointer visits one core per cycle; when that core's wires differ from what
// was last sent to it, the packetizer sends a two-flit NoC packet: a header
// addressed to the core's node and tile (message type INTERRUPT, length 1)
// and a payload flit holding the core's current wire levels in its low IRQ_W
// bits (and the core number in bits [31:16]). The levels sent are
// remembered, so every change, assertion or de-assertion, is delivered, and a core that changes again while its packet
// waits gets a new one on the next visit.
//
// Scanning for changes and sending a packet follow the SMAPPIC paper; the packet
// format, the round-robin scan and the core-to-tile numbering (core c is
// tile c mod TILES_PER_NODE of node c / TILES_PER_NODE, tiles row-major on a
// mesh X_TILES wide) are this design's choices. After reset all wires are
// taken as de-asserted.
//
// Interface: irq_in is sampled when the pointer reaches a core; flits leave
// on a ready/valid stream, header then payload.
module intr_packetizer
  import smappic_pkg::*;
#(
  parameter int unsigned NUM_CORES      = 48,
  parameter int unsigned TILES_PER_NODE = 12,
  parameter int unsigned X_TILES        = 4,
  parameter int unsigned IRQ_W          = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [IRQ_W-1:0]       irq_in [NUM_CORES],
  output logic                   flit_valid,
  input  logic                   flit_ready,
  output flit_t                  flit,
  output logic [31:0]            packets_sent
);
  localparam int unsigned CW = (NUM_CORES > 1) ? $clog2(NUM_CORES) : 1;

  logic [IRQ_W-1:0] sent [NUM_CORES];
  logic [CW-1:0]    ptr, core_q;
  logic [IRQ_W-1:0] level_q;
  typedef enum logic [1:0] {S_SCAN, S_HDR, S_PAY} state_e;
  state_e           state;
  noc_hdr_t         hdr;

  always_comb begin
    int unsigned tile;
    tile       = int'(core_q) % TILES_PER_NODE;
    hdr        = '0;
    hdr.chipid = CHIP_W'(int'(core_q) / TILES_PER_NODE);
    hdr.x      = XY_W'(tile % X_TILES);
    hdr.y      = XY_W'(tile / X_TILES);
    hdr.len    = 8'd1;
    hdr.msg    = MSG_INTERRUPT;
  end

  assign flit_valid = (state != S_SCAN);
  assign flit       = (state == S_HDR) ? flit_t'(hdr)
                    : {{(FLIT_W-32){1'b0}}, 16'(core_q), {(16-IRQ_W){1'b0}}, level_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NUM_CORES; c++) sent[c] <= '0;
      ptr          <= '0;
      core_q       <= '0;
      level_q      <= '0;
      state        <= S_SCAN;
      packets_sent <= '0;
    end else begin
      unique case (state)
        S_SCAN: begin
          if (irq_in[ptr] != sent[ptr]) begin
            core_q    <= ptr;
            level_q   <= irq_in[ptr];
            sent[ptr] <= irq_in[ptr];
            state     <= S_HDR;
          end
          ptr <= (ptr == CW'(NUM_CORES - 1)) ? '0 : ptr + 1'b1;
        end
        S_HDR: if (flit_ready) state <= S_PAY;
        S_PAY: if (flit_ready) begin
          state        <= S_SCAN;
          packets_sent <= packets_sent + 1'b1;
        end
        default: state <= S_SCAN;
      endcase
    end
  end
endmodule
