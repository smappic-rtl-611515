// tb_noc_pkg: testbench helpers for building and decoding NoC packets in the
// format documented in smappic_pkg (header, address/size flit, source flit,
// data flits), and a reference for the bytes a sized load returns.
package tb_noc_pkg;
  import smappic_pkg::*;

  typedef flit_t flits_t[$];

  function automatic flit_t mk_hdr(input int chip, input int x, input int y,
                                   input int len, input logic [7:0] msg, input int mshr);
    noc_hdr_t h;
    h = '0;
    h.chipid = CHIP_W'(chip); h.x = XY_W'(x); h.y = XY_W'(y);
    h.len = 8'(len); h.msg = msg; h.mshr = 8'(mshr);
    return flit_t'(h);
  endfunction

  function automatic flit_t mk_src(input int chip, input int x, input int y);
    flit_t f;
    f = '0;
    f[63:50] = CHIP_W'(chip); f[49:42] = XY_W'(x); f[41:34] = XY_W'(y);
    return f;
  endfunction

  // Memory request packet to the memory controller at (mc_chip, 0, 0).
  function automatic flits_t mk_mem_req(input bit wr, input int mshr, input logic [47:0] addr,
                                        input int size, input int src_chip, input int sx, input int sy,
                                        input logic [511:0] data, input int mc_chip = 0);
    flits_t q;
    int nd;
    nd = wr ? ((size <= 3) ? 1 : (1 << (size - 3))) : 0;
    q.push_back(mk_hdr(mc_chip, 0, 0, 2 + nd, wr ? MSG_STORE_MEM : MSG_LOAD_MEM, mshr));
    q.push_back({13'd0, 3'(size), addr});
    q.push_back(mk_src(src_chip, sx, sy));
    for (int i = 0; i < nd; i++) q.push_back(data[i*64 +: 64]);
    return q;
  endfunction

  // Bytes [off, off+2^size) of a line, moved to bit 0.
  function automatic logic [511:0] select_bytes(input logic [511:0] line, input int off, input int size);
    logic [511:0] r;
    r = '0;
    for (int i = 0; i < (1 << size); i++) r[i*8 +: 8] = line[(off + i)*8 +: 8];
    return r;
  endfunction
endpackage
