// home_map: homing function of the private cache (BPC) in a multi-node
// SMAPPIC system. For a physical address it names the node and the LLC slice
// (tile x, y) that are the cache line's home, without any software set-up.
//
// Main memory is split between the nodes: node k owns the NODE_MEM_BITS-sized
// region starting at MEM_BASE + k * 2**NODE_MEM_BITS, which is the bottom
// half of that node's DRAM. Inside a node, consecutive 64-byte lines go to
// consecutive tiles (line index modulo TILES_PER_NODE), tiles numbered
// row-major on a mesh X_TILES wide. Addresses outside main memory (I/O) are
// homed in node 0 and flagged.
//
// The SMAPPIC paper only states that lines are distributed over all nodes with no
// software support; the region-per-node split (which gives the NUMA layout
// the operating system is told about) and the line interleave inside a node
// are this design's choices. Purely combinational.
module home_map
  import smappic_pkg::*;
#(
  parameter int unsigned    NUM_NODES      = 4,
  parameter int unsigned    TILES_PER_NODE = 12,
  parameter int unsigned    X_TILES        = 4,
  parameter logic [47:0]    MEM_BASE       = 48'h00_8000_0000,
  parameter int unsigned    NODE_MEM_BITS  = 33
) (
  input  logic [47:0]       addr,
  output logic              is_mem,
  output logic [CHIP_W-1:0] home_node,
  output logic [XY_W-1:0]   home_x,
  output logic [XY_W-1:0]   home_y
);
  localparam int unsigned LINE_IDX_W = NODE_MEM_BITS - 6;
  localparam int unsigned TW = (TILES_PER_NODE > 1) ? $clog2(TILES_PER_NODE) : 1;

  logic [47:0]           off;
  logic [47:0]           node_idx;
  logic [LINE_IDX_W-1:0] line;
  logic [TW-1:0]         tile;

  assign off      = addr - MEM_BASE;
  assign node_idx = off >> NODE_MEM_BITS;
  assign is_mem   = (addr >= MEM_BASE) && (node_idx < 48'(NUM_NODES));
  assign line     = off[NODE_MEM_BITS-1:6];
  assign tile     = TW'(line % LINE_IDX_W'(TILES_PER_NODE));

  assign home_node = is_mem ? CHIP_W'(node_idx) : '0;
  assign home_x    = XY_W'(tile % TW'(X_TILES));
  assign home_y    = XY_W'(tile / TW'(X_TILES));
endmodule
