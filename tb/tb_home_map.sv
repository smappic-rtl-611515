// tb_home_map: checks the homing function at its default size (4 nodes of
// 12 tiles, 8 GB of main memory per node from 0x8000_0000). Random and
// corner addresses are compared with a reference computed here: node =
// (addr - base) / 2**33, tile = line index mod 12, x = tile mod 4,
// y = tile / 4; addresses below the base or past the last node are I/O.
module tb_home_map;
  import smappic_pkg::*;
  logic [47:0]       addr;
  logic              is_mem;
  logic [CHIP_W-1:0] node;
  logic [XY_W-1:0]   x, y;
  int checks = 0, failures = 0;

  home_map dut (.addr, .is_mem, .home_node(node), .home_x(x), .home_y(y));

  task automatic check_addr(input logic [47:0] a);
    longint unsigned off, line;
    int tile, en;
    bit mem;
    addr = a;
    #1;
    mem  = (a >= 48'h8000_0000) && (((a - 48'h8000_0000) >> 33) < 4);
    off  = a - 48'h8000_0000;
    line = (off % (64'd1 << 33)) / 64;
    tile = int'(line % 12);
    en   = mem ? int'(off >> 33) : 0;
    checks++;
    if (is_mem !== mem || node !== CHIP_W'(en) || x !== XY_W'(tile % 4) || y !== XY_W'(tile / 4)) begin
      failures++;
      $display("FAIL addr=%h mem=%0d node=%0d x=%0d y=%0d (exp %0d %0d %0d %0d)",
               a, is_mem, node, x, y, mem, en, tile % 4, tile / 4);
    end
  endtask

  initial begin
    check_addr(48'h0000_8000_0000);
    check_addr(48'h0000_8000_0040);
    check_addr(48'h0000_8000_02C0);   // line 11 -> tile 11
    check_addr(48'h0000_8000_0300);   // line 12 -> tile 0
    check_addr(48'h0002_8000_0000);   // node 1 start
    check_addr(48'h0008_7FFF_FFC0);   // last line of node 3
    check_addr(48'h0008_8000_0000);   // past node 3 -> I/O
    check_addr(48'h0000_1000_0000);   // I/O
    for (int i = 0; i < 200; i++)
      check_addr(48'h8000_0000 + {$urandom_range(0, 7), $urandom(), 1'b0} % (48'h2_0000_0000 * 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
