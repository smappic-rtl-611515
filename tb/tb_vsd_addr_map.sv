// tb_vsd_addr_map: checks the DRAM map of one node (16 GB): main-memory
// addresses land at their offset in the bottom 8 GB, SD-window addresses at
// their offset plus 8 GB, and addresses below main memory are flagged.
module tb_vsd_addr_map;
  logic [47:0] addr, dram;
  logic        hit_sd, miss;
  int checks = 0, failures = 0;

  vsd_addr_map dut (.addr, .dram_addr(dram), .hit_sd, .miss);

  task automatic chk(input logic [47:0] a, input logic [47:0] exp, input bit sd, input bit ms);
    addr = a; #1;
    checks++;
    if (dram !== exp || hit_sd !== sd || miss !== ms) begin
      failures++;
      $display("FAIL addr=%h dram=%h sd=%0d miss=%0d exp %h %0d %0d", a, dram, hit_sd, miss, exp, sd, ms);
    end
  endtask

  initial begin
    chk(48'h00_8000_0000, 48'h0, 0, 0);
    chk(48'h00_8000_1234, 48'h1234, 0, 0);
    chk(48'h02_7FFF_FFC0, 48'h1_FFFF_FFC0, 0, 0);
    chk(48'h02_8000_0040, 48'h40, 0, 0);          // node 1's region folds to its own DRAM
    chk(48'hF0_0000_0000, 48'h2_0000_0000, 1, 0);
    chk(48'hF0_0000_0200, 48'h2_0000_0200, 1, 0);
    chk(48'hF1_FFFF_FFFF, 48'h3_FFFF_FFFF, 1, 0);
    chk(48'h00_1000_0000, 48'(48'h00_1000_0000 - 48'h00_8000_0000) & 48'h1_FFFF_FFFF, 0, 1);
    for (int i = 0; i < 100; i++) begin
      logic [47:0] o;
      o = {$urandom_range(0, 1), $urandom()};
      chk(48'hF0_0000_0000 + o, 48'h2_0000_0000 + o, 1, 0);
      chk(48'h00_8000_0000 + o, o, 0, 0);
    end
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
