// tangram_tb_pkg: helpers shared by the testbenches: instruction and flit
// constructors, random lines, and a software model of the engine arithmetic
// (the dot products the PE array computes and the STORE squashing).
package tangram_tb_pkg;
  import tangram_pkg::*;

  function automatic instr_t mk(op_e op, int a = 0, int b = 0, int n = 0,
                                int dx = 0, int dy = 0, longint maddr = 0,
                                int imm = 0, logic [3:0] flags = 4'b0);
    instr_t i;
    i = '0;
    i.op = op; i.a = LINE_AW'(a); i.b = LINE_AW'(b); i.n = 8'(n);
    i.dx = CX_W'(dx); i.dy = CY_W'(dy); i.maddr = ADDR_W'(maddr);
    i.imm = 8'(imm); i.flags = flags;
    return i;
  endfunction

  function automatic flit_t mk_flit(ftype_e t, int dx, int dy, longint addr, line_t data,
                                    int sx = 0, int sy = 0, longint raddr = 0);
    flit_t f;
    f = '0;
    f.ftype = t; f.dst_x = CX_W'(dx); f.dst_y = CY_W'(dy);
    f.src_x = CX_W'(sx); f.src_y = CY_W'(sy);
    f.addr = ADDR_W'(addr); f.raddr = ADDR_W'(raddr); f.data = data;
    return f;
  endfunction

  // random line of small signed values (keeps sums readable)
  function automatic line_t rnd_line(int lim = 200);
    line_t l;
    for (int c = 0; c < LANES; c++) l[c*DATA_W +: DATA_W] = 16'($signed($urandom_range(0, 2*lim)) - lim);
    return l;
  endfunction

  function automatic data_t elem(line_t l, int c);
    return data_t'(l[c*DATA_W +: DATA_W]);
  endfunction

  // STORE: arithmetic shift, optional ReLU, saturate to 16 bits
  function automatic data_t squash(longint v, int sh, bit relu);
    longint t;
    t = v >>> sh;
    if (relu && t < 0) return '0;
    if (t > 32767) return 16'sh7fff;
    if (t < -32768) return 16'sh8000;
    return data_t'(t);
  endfunction
endpackage
