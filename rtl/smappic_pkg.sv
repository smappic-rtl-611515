// smappic_pkg: types and constants shared by the SMAPPIC custom logic.
//
// The NoC is the BYOC/OpenPiton 64-bit flit network. A packet starts with a
// header flit (destination node/x/y, payload length in flits, message type,
// MSHR tag) followed by `len` payload flits. Memory requests carry the address
// and size in the first payload flit and the requester's node/x/y in the
// second; writes follow with data flits. The field positions and message-type
// codes follow the usual OpenPiton layout; the SMAPPIC paper does not give
// them, so they are this design's choice.
//
// The AXI4 channels are plain packed structs, 512-bit data (the 64-byte
// transfer unit the memory controller aligns to), 64-bit address, 6-bit ID.
package smappic_pkg;

  localparam int unsigned FLIT_W      = 64;
  localparam int unsigned CHIP_W      = 14;
  localparam int unsigned XY_W        = 8;
  localparam int unsigned NUM_NOCS    = 3;   // BYOC has three physical NoCs
  localparam int unsigned LINE_BYTES  = 64;  // AXI4 transfer / alignment unit
  localparam int unsigned LINE_FLITS  = LINE_BYTES / 8;

  localparam int unsigned AXI_ID_W    = 6;
  localparam int unsigned AXI_ADDR_W  = 64;
  localparam int unsigned AXI_DATA_W  = 512;
  localparam int unsigned AXI_STRB_W  = AXI_DATA_W / 8;

  typedef logic [FLIT_W-1:0] flit_t;

  // Header flit, 64 bits, MSB first.
  typedef struct packed {
    logic [CHIP_W-1:0] chipid;  // destination node
    logic [XY_W-1:0]   x;       // destination tile column
    logic [XY_W-1:0]   y;       // destination tile row
    logic [3:0]        fbits;   // final-destination bits (0: tile, 2: off-chip)
    logic [7:0]        len;     // payload flits after the header
    logic [7:0]        msg;     // message type
    logic [7:0]        mshr;    // requester's MSHR tag
    logic [5:0]        opt;
  } noc_hdr_t;

  typedef enum logic [7:0] {
    MSG_LOAD_MEM      = 8'd19,
    MSG_STORE_MEM     = 8'd20,
    MSG_LOAD_MEM_ACK  = 8'd24,
    MSG_STORE_MEM_ACK = 8'd25,
    MSG_INTERRUPT     = 8'd32
  } msg_e;

  // Request as seen after deserialisation.
  typedef struct packed {
    logic              wr;
    logic [7:0]        mshr;
    logic [CHIP_W-1:0] src_chip;
    logic [XY_W-1:0]   src_x;
    logic [XY_W-1:0]   src_y;
    logic [47:0]       addr;
    logic [2:0]        size;    // log2 of the byte count, 0..6
    logic [AXI_DATA_W-1:0] data; // write data, byte 0 in bits [7:0]
  } mem_req_t;

  // Response handed to the serializer.
  typedef struct packed {
    logic              wr;
    logic [7:0]        mshr;
    logic [CHIP_W-1:0] dst_chip;
    logic [XY_W-1:0]   dst_x;
    logic [XY_W-1:0]   dst_y;
    logic [2:0]        size;
    logic [AXI_DATA_W-1:0] data; // read data, selected bytes from bit 0
  } mem_resp_t;

  typedef struct packed {
    logic [AXI_ID_W-1:0]   id;
    logic [AXI_ADDR_W-1:0] addr;
    logic [7:0]            len;
    logic [2:0]            size;
    logic [1:0]            burst;
  } axi_ax_t;   // AW and AR

  typedef struct packed {
    logic [AXI_DATA_W-1:0] data;
    logic [AXI_STRB_W-1:0] strb;
    logic                  last;
  } axi_w_t;

  typedef struct packed {
    logic [AXI_ID_W-1:0] id;
    logic [1:0]          resp;
  } axi_b_t;

  typedef struct packed {
    logic [AXI_ID_W-1:0]   id;
    logic [AXI_DATA_W-1:0] data;
    logic [1:0]            resp;
    logic                  last;
  } axi_r_t;

  // Inter-node bridge: fields of the AXI4 address of an encapsulated write
  // (and of a credit-return read). The low 6 bits stay zero (64-byte aligned).
  localparam int unsigned NODE_W      = 8;
  localparam int unsigned BR_DST_LSB  = 40;  // destination node ID
  localparam int unsigned BR_SRC_LSB  = 32;  // source node ID
  localparam int unsigned BR_VLD_LSB  = 12;  // one valid bit per NoC
  localparam int unsigned CREDIT_W    = 8;   // per-NoC credit field in R data

  // Number of payload data flits carried for a given size code.
  function automatic logic [7:0] data_flits(input logic [2:0] size);
    return (size <= 3'd3) ? 8'd1 : 8'(1 << (size - 3'd3));
  endfunction

endpackage
