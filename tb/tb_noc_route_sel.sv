// tb_noc_route_sel: walks packets hop by hop across a 4x3 node mesh using
// the router's port choice and checks where they end: a packet for this node
// must reach its tile and be delivered locally; one for another node must
// reach tile (0,0) and leave north; one for the chipset must reach tile
// (0,0) and leave west. Hop counts are checked against the Manhattan
// distance, which dimension-ordered routing attains.
module tb_noc_route_sel;
  import smappic_pkg::*;
  logic [CHIP_W-1:0] my_chip;
  logic [XY_W-1:0]   my_x, my_y;
  noc_hdr_t          hdr;
  logic [2:0]        port;
  int checks = 0, failures = 0;

  noc_route_sel dut (.my_chip, .my_x, .my_y, .hdr, .port);

  // returns final port, position and hop count
  task automatic walk(input int sx, input int sy, output logic [2:0] fport,
                      output int fx, output int fy, output int hops);
    int px = sx, py = sy;
    hops = 0;
    forever begin
      my_x = XY_W'(px); my_y = XY_W'(py);
      #1;
      if (port == 3'd2 && px < 3) px++;
      else if (port == 3'd4 && px > 0) px--;
      else if (port == 3'd3 && py < 2) py++;
      else if (port == 3'd1 && py > 0) py--;
      else break;
      hops++;
      if (hops > 20) break;
    end
    fport = port; fx = px; fy = py;
  endtask

  initial begin
    logic [2:0] fp;
    int fx, fy, hops;
    my_chip = 14'd1;
    for (int i = 0; i < 300; i++) begin
      int sx = $urandom_range(0, 3), sy = $urandom_range(0, 2);
      int dx = $urandom_range(0, 3), dy = $urandom_range(0, 2);
      int kind = $urandom_range(0, 2);
      hdr = '0;
      hdr.x = XY_W'(dx); hdr.y = XY_W'(dy);
      hdr.chipid = (kind == 1) ? 14'd3 : 14'd1;
      hdr.fbits  = (kind == 2) ? 4'b0010 : 4'b0000;
      walk(sx, sy, fp, fx, fy, hops);
      checks++;
      case (kind)
        0: if (fp != 3'd0 || fx != dx || fy != dy || hops != ((sx > dx ? sx - dx : dx - sx) + (sy > dy ? sy - dy : dy - sy))) begin
             failures++; $display("FAIL local %0d,%0d -> %0d,%0d: port %0d at %0d,%0d hops %0d", sx, sy, dx, dy, fp, fx, fy, hops);
           end
        1: if (fp != 3'd1 || fx != 0 || fy != 0 || hops != sx + sy) begin
             failures++; $display("FAIL remote from %0d,%0d: port %0d at %0d,%0d", sx, sy, fp, fx, fy);
           end
        default: if (fp != 3'd4 || fx != 0 || fy != 0 || hops != sx + sy) begin
             failures++; $display("FAIL chipset from %0d,%0d: port %0d at %0d,%0d", sx, sy, fp, fx, fy);
           end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
