// vsd_addr_map: address translation for the memory controller, including
// SMAPPIC's virtual SD card. The node's DRAM (2**DRAM_BITS bytes) is split in
// two halves: the bottom half is the node's share of main memory, the top
// half holds the SD card image. A request into this node's main-memory
// region (MEM_BASE + node * 2**(DRAM_BITS-1), see home_map) maps to
// offset within the bottom half; a request into the SD card window starting
// at SD_BASE maps to the same offset within the top half. The SD card thus
// behaves functionally like a device but costs only memory accesses.
//
// The half/half split follows the SMAPPIC paper. The window bases, the DRAM size
// (one 16 GB DDR4 interface per node) and per-node main-memory regions are
// this design's choices. Purely combinational; anything outside both windows
// is flagged as a miss and mapped like main memory.
module vsd_addr_map #(
  parameter logic [47:0] MEM_BASE  = 48'h00_8000_0000,
  parameter logic [47:0] SD_BASE   = 48'hF0_0000_0000,
  parameter int unsigned DRAM_BITS = 34
) (
  input  logic [47:0]          addr,
  output logic [47:0]          dram_addr,
  output logic                 hit_sd,
  output logic                 miss
);
  localparam int unsigned HB = DRAM_BITS - 1;   // bits of one half

  logic [47:0] mem_off, sd_off;
  assign mem_off = addr - MEM_BASE;
  assign sd_off  = addr - SD_BASE;
  assign hit_sd  = (addr >= SD_BASE) && (sd_off < (48'd1 << HB));
  assign miss    = !hit_sd && (addr < MEM_BASE);

  always_comb begin
    dram_addr = '0;
    if (hit_sd) dram_addr = 48'({1'b1, sd_off[HB-1:0]});
    else        dram_addr = 48'(mem_off[HB-1:0]);
  end
endmodule
