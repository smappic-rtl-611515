// noc_axi4_mem_ctrl: SMAPPIC's NoC-AXI4 memory controller, one per node.
//
// It turns BYOC NoC memory requests into AXI4 transactions on one of the
// FPGA's DRAM interfaces and sends the answers back over the NoC:
//   NoC -> noc_deserializer -> vsd_addr_map -> traffic_shaper
//       -> mc_management (request buffer, read/write steering)
//       -> mc_read_engine (AR/R) | mc_write_engine (AW/W/B)
//       -> mc_management (response merge) -> noc_serializer -> NoC
// The engines give every request an AXI4 ID, keep the ID-MSHR mapping to
// restore the request when the answer returns, align address and data to 64
// bytes and select the requested bytes of a read. The address map folds the
// node's main-memory region into the bottom half of its DRAM and the virtual
// SD card window into the top half. The shaper adds a configurable latency
// and bandwidth limit so the FPGA's DRAM can model a different memory.
//
// The block structure follows the memory-controller structure of the SMAPPIC paper; the
// placement of the shaper on the request path and all sizes are this
// design's choices.
module noc_axi4_mem_ctrl
  import smappic_pkg::*;
#(
  parameter int unsigned NUM_IDS      = 8,
  parameter int unsigned REQ_DEPTH    = 4,
  parameter int unsigned SHAPER_DEPTH = 16,
  parameter logic [47:0] MEM_BASE     = 48'h00_8000_0000,
  parameter logic [47:0] SD_BASE      = 48'hF0_0000_0000,
  parameter int unsigned DRAM_BITS    = 34
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] cfg_latency,
  input  logic [15:0] cfg_gap,
  input  logic        noc_in_valid,
  output logic        noc_in_ready,
  input  flit_t       noc_in_flit,
  output logic        noc_out_valid,
  input  logic        noc_out_ready,
  output flit_t       noc_out_flit,
  output logic    m_aw_valid, input  logic m_aw_ready, output axi_ax_t m_aw,
  output logic    m_w_valid,  input  logic m_w_ready,  output axi_w_t  m_w,
  input  logic    m_b_valid,  output logic m_b_ready,  input  axi_b_t  m_b,
  output logic    m_ar_valid, input  logic m_ar_ready, output axi_ax_t m_ar,
  input  logic    m_r_valid,  output logic m_r_ready,  input  axi_r_t  m_r,
  output logic [31:0] sd_accesses
);
  logic     d_valid, d_ready;
  mem_req_t d_req, m_req;
  logic     sd_hit, sd_miss;
  logic [47:0] dram_addr;

  noc_deserializer u_deser (
    .clk, .rst_n,
    .flit_valid(noc_in_valid), .flit_ready(noc_in_ready), .flit(noc_in_flit),
    .req_valid(d_valid), .req_ready(d_ready), .req(d_req)
  );

  vsd_addr_map #(.MEM_BASE(MEM_BASE), .SD_BASE(SD_BASE), .DRAM_BITS(DRAM_BITS)) u_map (
    .addr(d_req.addr), .dram_addr(dram_addr), .hit_sd(sd_hit), .miss(sd_miss)
  );
  always_comb begin
    m_req          = d_req;
    m_req.addr     = dram_addr;
  end

  logic     s_valid, s_ready;
  mem_req_t s_req;
  traffic_shaper #(.WIDTH($bits(mem_req_t)), .DEPTH(SHAPER_DEPTH)) u_shaper (
    .clk, .rst_n, .cfg_latency, .cfg_gap,
    .in_valid(d_valid), .in_ready(d_ready), .in_data(m_req),
    .out_valid(s_valid), .out_ready(s_ready), .out_data(s_req)
  );

  logic      rq_valid, rq_ready, wq_valid, wq_ready;
  mem_req_t  rq, wq;
  logic      rr_valid, rr_ready, wr_valid, wr_ready, o_valid, o_ready;
  mem_resp_t rr, wr, o_resp;

  mc_management #(.REQ_DEPTH(REQ_DEPTH)) u_mgmt (
    .clk, .rst_n,
    .in_valid(s_valid), .in_ready(s_ready), .in_req(s_req),
    .rd_valid(rq_valid), .rd_ready(rq_ready), .rd_req(rq),
    .wr_valid(wq_valid), .wr_ready(wq_ready), .wr_req(wq),
    .rd_resp_valid(rr_valid), .rd_resp_ready(rr_ready), .rd_resp(rr),
    .wr_resp_valid(wr_valid), .wr_resp_ready(wr_ready), .wr_resp(wr),
    .out_valid(o_valid), .out_ready(o_ready), .out_resp(o_resp),
    .buffered()
  );

  mc_read_engine #(.NUM_IDS(NUM_IDS)) u_rd (
    .clk, .rst_n,
    .req_valid(rq_valid), .req_ready(rq_ready), .req(rq),
    .ar_valid(m_ar_valid), .ar_ready(m_ar_ready), .ar(m_ar),
    .r_valid(m_r_valid), .r_ready(m_r_ready), .r(m_r),
    .resp_valid(rr_valid), .resp_ready(rr_ready), .resp(rr),
    .outstanding()
  );

  mc_write_engine #(.NUM_IDS(NUM_IDS)) u_wr (
    .clk, .rst_n,
    .req_valid(wq_valid), .req_ready(wq_ready), .req(wq),
    .aw_valid(m_aw_valid), .aw_ready(m_aw_ready), .aw(m_aw),
    .w_valid(m_w_valid), .w_ready(m_w_ready), .w(m_w),
    .b_valid(m_b_valid), .b_ready(m_b_ready), .b(m_b),
    .resp_valid(wr_valid), .resp_ready(wr_ready), .resp(wr),
    .outstanding()
  );

  noc_serializer u_ser (
    .clk, .rst_n,
    .resp_valid(o_valid), .resp_ready(o_ready), .resp(o_resp),
    .flit_valid(noc_out_valid), .flit_ready(noc_out_ready), .flit(noc_out_flit)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sd_accesses <= '0;
    else if (d_valid && d_ready && sd_hit) sd_accesses <= sd_accesses + 1'b1;
  end
endmodule
