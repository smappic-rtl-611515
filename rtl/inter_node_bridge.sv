// inter_node_bridge: the SMAPPIC inter-node bridge, sitting above tile 0 of a
// node. Inter-node NoC packets leave the node through tile 0's north port
// and enter bridge_send, which packs them into AXI4 writes on the FPGA's
// outbound AXI4 bus (towards the PCIe transducer, or an AXI4 crossbar for
// nodes on the same FPGA). Writes arriving on the inbound AXI4 bus are
// unpacked by bridge_recv and handed back into tile 0's north port. Credit
// returns travel as AXI4 reads in the other direction: the send half reads
// the remote receive half. See bridge_send and bridge_recv for the details.
module inter_node_bridge
  import smappic_pkg::*;
#(
  parameter int unsigned NUM_NODES     = 4,
  parameter int unsigned CREDITS       = 8,
  parameter int unsigned CREDIT_PERIOD = 64,
  parameter int unsigned SHAPER_DEPTH  = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NODE_W-1:0]   my_node,
  input  logic [15:0]         cfg_latency,
  input  logic [15:0]         cfg_gap,
  // node side: out of the node (to send) and into the node (from receive)
  input  logic [NUM_NOCS-1:0] tx_valid,
  output logic [NUM_NOCS-1:0] tx_ready,
  input  flit_t               tx_flit [NUM_NOCS],
  output logic [NUM_NOCS-1:0] rx_valid,
  input  logic [NUM_NOCS-1:0] rx_ready,
  output flit_t               rx_flit [NUM_NOCS],
  // outbound AXI4 (master)
  output logic    om_aw_valid, input logic om_aw_ready, output axi_ax_t om_aw,
  output logic    om_w_valid,  input logic om_w_ready,  output axi_w_t  om_w,
  input  logic    om_b_valid,  output logic om_b_ready, input  axi_b_t  om_b,
  output logic    om_ar_valid, input logic om_ar_ready, output axi_ax_t om_ar,
  input  logic    om_r_valid,  output logic om_r_ready, input  axi_r_t  om_r,
  // inbound AXI4 (slave)
  input  logic    is_aw_valid, output logic is_aw_ready, input  axi_ax_t is_aw,
  input  logic    is_w_valid,  output logic is_w_ready,  input  axi_w_t  is_w,
  output logic    is_b_valid,  input  logic is_b_ready,  output axi_b_t  is_b,
  input  logic    is_ar_valid, output logic is_ar_ready, input  axi_ax_t is_ar,
  output logic    is_r_valid,  input  logic is_r_ready,  output axi_r_t  is_r,
  output logic [31:0] writes_sent,
  output logic [31:0] credit_reads,
  output logic [31:0] credit_stalls,
  output logic [31:0] flits_received
);
  bridge_send #(.NUM_NODES(NUM_NODES), .CREDITS(CREDITS),
                .CREDIT_PERIOD(CREDIT_PERIOD), .SHAPER_DEPTH(SHAPER_DEPTH)) u_send (
    .clk, .rst_n, .my_node, .cfg_latency, .cfg_gap,
    .noc_valid(tx_valid), .noc_ready(tx_ready), .noc_flit(tx_flit),
    .aw_valid(om_aw_valid), .aw_ready(om_aw_ready), .aw(om_aw),
    .w_valid(om_w_valid),   .w_ready(om_w_ready),   .w(om_w),
    .b_valid(om_b_valid),   .b_ready(om_b_ready),   .b(om_b),
    .ar_valid(om_ar_valid), .ar_ready(om_ar_ready), .ar(om_ar),
    .r_valid(om_r_valid),   .r_ready(om_r_ready),   .r(om_r),
    .writes_sent, .credit_reads, .credit_stalls
  );

  bridge_recv #(.NUM_NODES(NUM_NODES), .CREDITS(CREDITS)) u_recv (
    .clk, .rst_n,
    .aw_valid(is_aw_valid), .aw_ready(is_aw_ready), .aw(is_aw),
    .w_valid(is_w_valid),   .w_ready(is_w_ready),   .w(is_w),
    .b_valid(is_b_valid),   .b_ready(is_b_ready),   .b(is_b),
    .ar_valid(is_ar_valid), .ar_ready(is_ar_ready), .ar(is_ar),
    .r_valid(is_r_valid),   .r_ready(is_r_ready),   .r(is_r),
    .noc_valid(rx_valid), .noc_ready(rx_ready), .noc_flit(rx_flit),
    .flits_received
  );
endmodule
