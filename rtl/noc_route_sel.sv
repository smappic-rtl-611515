// noc_route_sel: output-port choice of a node's NoC router, with SMAPPIC's
// inter-node rule. A packet for another node is steered to tile 0 (x = 0,
// y = 0), first westwards then northwards, and leaves tile 0 through its
// north port into the inter-node bridge. A packet for this node is routed
// dimension-ordered, X first then Y, to its tile and delivered locally; at
// tile 0 this also covers packets coming in from the bridge. A packet for
// this node's chipset (fbits = FBITS_CHIPSET) goes to tile 0 and leaves west,
// where the chipset sits.
//
// Routing inter-node packets to tile 0 and then north follows the SMAPPIC paper;
// dimension order, the compass convention (x grows east, y grows south) and
// the chipset rule are this design's choices. Purely combinational.
module noc_route_sel
  import smappic_pkg::*;
(
  input  logic [CHIP_W-1:0] my_chip,
  input  logic [XY_W-1:0]   my_x,
  input  logic [XY_W-1:0]   my_y,
  input  noc_hdr_t          hdr,
  output logic [2:0]        port       // 0 local, 1 north, 2 east, 3 south, 4 west
);
  localparam logic [2:0] P_LOCAL = 3'd0, P_N = 3'd1, P_E = 3'd2, P_S = 3'd3, P_W = 3'd4;
  localparam logic [3:0] FBITS_CHIPSET = 4'b0010;

  always_comb begin
    if (hdr.chipid != my_chip || hdr.fbits == FBITS_CHIPSET) begin
      // towards tile 0, then out of it
      if (my_x != '0)      port = P_W;
      else if (my_y != '0) port = P_N;
      else                 port = (hdr.chipid != my_chip) ? P_N : P_W;
    end else if (hdr.x > my_x) port = P_E;
    else if (hdr.x < my_x)     port = P_W;
    else if (hdr.y > my_y)     port = P_S;
    else if (hdr.y < my_y)     port = P_N;
    else                       port = P_LOCAL;
  end
endmodule
