// tb_top_core: end-to-end scenario for the tiled accelerator, instantiated by
// the top-level testbench with the mesh size as parameters (it reports to it
// instead of ending the simulation itself). With FULL set it instantiates the
// top with no parameter overrides, i.e. at the default 16 x 16 size.
//
// Memory channels are modelled here: each answers read requests from one
// shared memory image after a random delay, stores write-backs, and applies
// random back-pressure. Programs, start commands and data enter through them.
// The scenario is a two-layer fully connected segment (Eq. 1 without bias):
//   Layer 1 runs on the P = MX engines of row 0 with output parallelisation
//   and buffer sharing: engine x owns ofmaps 8x..8x+7, the N_i = P*S*8 ifmaps
//   are split into P subsets of S lines, each engine fetches subset x
//   (skewed fetch), and the subsets rotate around the row (x sends to x-1)
//   until every engine has seen all of them. Each engine stores its 8
//   outputs (ReLU) and forwards the line to the layer-2 engine.
//   Layer 2 runs on engine (column 0, row 1). Its ifmaps arrive in 4 groups
//   (MEMTRACK regions 4..7, P/4 lines each, the fine-grained forwarding of
//   alternate loop ordering with blocking factor 4); it MACs each group as
//   soon as it is complete, then writes its 8 outputs to memory channel 3.
// The layer-2 result, which depends on every layer-1 output, is compared with
// a model computed here. Counted mechanisms, each of which must occur:
// skewed fetches (P), forwarded rotation steps (P*(P-1)), MEMTRACK waits,
// lines parked in reserve lines (a next-layer weight line that the memory
// model sends right behind each engine's weights, into their still unread
// region), back-pressure at the memory ports, one
// write-back; and no flit may be misrouted.
module tb_top_core
  import tangram_pkg::*;
  import tangram_tb_pkg::*;
#(
  parameter int MX   = 4,
  parameter int MY   = 2,
  parameter bit FULL = 0
) (
  output int checks,
  output int failures,
  output bit fin
);
  localparam int P    = MX;
  localparam int S    = (P * 2 * 8 <= 128) ? 2 : 1;  // weight lines must fit one region
  localparam int GRP  = P / 4;                       // forwarded lines per group
  localparam int ROW0 = MY / 4, ROW1 = (3 * MY) / 4;
  localparam int SH1  = 6, SH2 = 6;
  localparam int IF_BASE = 5000, W1_BASE = 20000, W2_BASE = 40000, OUT_ADDR = 60000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  mem_out_valid [4], mem_out_ready [4], mem_in_valid [4], mem_in_ready [4];
  flit_t mem_out_flit [4], mem_in_flit [4];
  logic [MX*MY-1:0] done, busy, ev_trk_wait, ev_rot_send, ev_skew_fetch, ev_park;
  logic misroute;

  if (FULL) begin : g_full
    tangram_top u_top (.*);
  end else begin : g_red
    tangram_top #(.MESH_X(MX), .MESH_Y(MY)) u_top (.*);
  end

  line_t mem [longint];
  flit_t inq [4][$];
  flit_t dq  [4][$];
  int    due [4][$];
  int cycle = 0;
  int n_skew = 0, n_rot = 0, n_wait = 0, n_bp = 0, n_wb = 0, n_park = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // memory channel models
  always @(negedge clk) begin
    for (int c = 0; c < 4; c++) begin
      mem_in_valid[c] <= (inq[c].size() != 0);
      mem_in_flit[c]  <= (inq[c].size() != 0) ? inq[c][0] : '0;
      mem_out_ready[c] <= ($urandom_range(0, 4) != 0);
    end
  end
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      for (int c = 0; c < 4; c++) begin
        if (mem_in_valid[c] && mem_in_ready[c]) void'(inq[c].pop_front());
        if (mem_in_valid[c] && !mem_in_ready[c]) n_bp++;
        if (mem_out_valid[c] && !mem_out_ready[c]) n_bp++;
        if (mem_out_valid[c] && mem_out_ready[c]) begin
          if (mem_out_flit[c].ftype == F_RD_REQ) begin
            dq[c].push_back(mk_flit(F_WR_LINE, int'(mem_out_flit[c].src_x), int'(mem_out_flit[c].src_y),
                                    longint'(mem_out_flit[c].raddr), mem[longint'(mem_out_flit[c].addr)]));
            due[c].push_back(cycle + $urandom_range(4, 16));
            // right behind a layer-1 engine's last weight line, prefetch a line
            // of the next layer's weights into the same (now full) region: it
            // must wait in a reserve line until the weights have been loaded
            if (mem_out_flit[c].src_y == 0 && mem_out_flit[c].raddr == ADDR_W'(256 + P*S*8 - 1)) begin
              dq[c].push_back(mk_flit(F_WR_LINE, int'(mem_out_flit[c].src_x), 0, 256, '1));
              due[c].push_back(due[c][$]);
            end
          end else if (mem_out_flit[c].ftype == F_WR_LINE) begin
            mem[longint'(mem_out_flit[c].addr)] = mem_out_flit[c].data;
            n_wb++;
          end
        end
        while (dq[c].size() != 0 && due[c][0] <= cycle) begin
          inq[c].push_back(dq[c].pop_front());
          void'(due[c].pop_front());
        end
      end
      n_skew += $countones(ev_skew_fetch);
      n_rot  += $countones(ev_rot_send);
      n_wait += $countones(ev_trk_wait);
      n_park += $countones(ev_park);
    end
  end

  // channel a given engine row uses: the west one of the nearer channel row
  function automatic int ch_of_row(int y);
    return (y <= ROW0 || (ROW1 - y) > (y - ROW0)) ? 0 : 1;
  endfunction

  function automatic int ch_row(int ch);
    return (ch == 0 || ch == 2) ? ROW0 : ROW1;
  endfunction

  task automatic send_prog(int ch, int ex, int ey, instr_t p [$]);
    foreach (p[k]) inq[ch].push_back(mk_flit(F_WR_INSTR, ex, ey, k, LINE_W'(p[k])));
  endtask

  line_t ifl [P][S];
  line_t l1_out [P];
  longint a1 [P*8];
  longint a2 [8];

  initial begin
    checks = 0; failures = 0; fin = 0;
    for (int c = 0; c < 4; c++) begin mem_in_valid[c] = 0; mem_in_flit[c] = '0; mem_out_ready[c] = 1; end
    repeat (3) @(negedge clk); rst_n = 1;

    // ---- data
    for (int j = 0; j < P; j++) for (int k = 0; k < S; k++) begin
      ifl[j][k] = rnd_line(100);
      mem[IF_BASE + j*S + k] = ifl[j][k];
    end
    // layer-1 weights of engine x: RF word w (= subset*S + line), row r
    for (int x = 0; x < P; x++) for (int w = 0; w < P*S; w++) for (int r = 0; r < 8; r++)
      mem[W1_BASE + x*P*S*8 + w*8 + r] = rnd_line(100);
    for (int w = 0; w < P; w++) for (int r = 0; r < 8; r++)
      mem[W2_BASE + w*8 + r] = rnd_line(100);

    // ---- model
    for (int x = 0; x < P; x++) begin
      for (int r = 0; r < 8; r++) begin
        longint s;
        s = 0;
        for (int j = 0; j < P; j++) for (int k = 0; k < S; k++) for (int c = 0; c < LANES; c++)
          s += longint'(elem(mem[W1_BASE + x*P*S*8 + (j*S + k)*8 + r], c)) * longint'(elem(ifl[j][k], c));
        l1_out[x][r*DATA_W +: DATA_W] = squash(s, SH1, 1);
      end
    end
    for (int r = 0; r < 8; r++) begin
      a2[r] = 0;
      for (int w = 0; w < P; w++) for (int c = 0; c < LANES; c++)
        a2[r] += longint'(elem(mem[W2_BASE + w*8 + r], c)) * longint'(elem(l1_out[w], c));
    end

    // ---- programs
    for (int x = 0; x < P; x++) begin
      instr_t p [$];
      int ch, nb, grp;
      ch  = ch_of_row(0);
      nb  = (x + P - 1) % P;
      grp = x / GRP;
      p = '{mk(OP_CFGTRK, .a(1), .n(S), .imm(1)),
            mk(OP_CFGTRK, .a(3), .n(S), .imm(1)),
            mk(OP_CFGTRK, .a(2), .n(P*S*8), .imm(1)),
            mk(OP_CFGBSD, .a(128), .b(384), .n(S), .imm(P), .dx(x), .dy(0),
               .maddr('h0101 + (((x + 1) % P + 1) << 16))),
            mk(OP_FETCH, .n(S), .dx(0), .dy(ch_row(ch)), .maddr(IF_BASE), .flags(4'b0100)),
            mk(OP_FETCH, .a(256), .n(P*S*8), .dx(0), .dy(ch_row(ch)), .maddr(W1_BASE + x*P*S*8)),
            mk(OP_LDW, .a(256), .n(P*S), .b(0))};
      for (int t = 0; t < P; t++) p.push_back(mk(OP_ROT, .dx(nb + 1), .dy(0)));
      p.push_back(mk(OP_STORE, .a(512), .imm(SH1), .flags(4'b0010)));
      p.push_back(mk(OP_SEND, .a(512), .n(1), .dx(1), .dy(1), .maddr((4 + grp)*128 + (x % GRP))));
      p.push_back(mk(OP_END));
      send_prog(ch, x + 1, 0, p);
    end
    begin
      instr_t p [$];
      int ch;
      ch = ch_of_row(1);
      p = '{mk(OP_CFGTRK, .a(4), .n(GRP), .imm(1)),
            mk(OP_CFGTRK, .a(5), .n(GRP), .imm(1)),
            mk(OP_CFGTRK, .a(6), .n(GRP), .imm(1)),
            mk(OP_CFGTRK, .a(7), .n(GRP), .imm(1)),
            mk(OP_CFGTRK, .a(2), .n(P*8), .imm(1)),
            mk(OP_FETCH, .a(256), .n(P*8), .dx(0), .dy(ch_row(ch)), .maddr(W2_BASE)),
            mk(OP_LDW, .a(256), .n(P), .b(0))};
      for (int g = 0; g < 4; g++)
        p.push_back(mk(OP_MAC, .a((4 + g)*128), .n(GRP), .b(g*GRP), .flags(g == 0 ? 4'b0001 : 4'b0000)));
      p.push_back(mk(OP_STORE, .a(1024), .imm(SH2)));
      p.push_back(mk(OP_SEND, .a(1024), .n(1), .dx(MX + 1), .dy(ROW1), .maddr(OUT_ADDR)));
      p.push_back(mk(OP_END));
      send_prog(ch, 1, 1, p);
    end
    // start layer 2 first, then the row of layer-1 engines
    inq[ch_of_row(1)].push_back(mk_flit(F_START, 1, 1, 0, '0));
    for (int x = 0; x < P; x++) inq[ch_of_row(0)].push_back(mk_flit(F_START, x + 1, 0, 0, '0));

    // ---- wait for layer 2 to finish
    while (!mem.exists(OUT_ADDR)) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int r = 0; r < 8; r++)
      chk(elem(mem[OUT_ADDR], r) == squash(a2[r], SH2, 0),
          $sformatf("layer-2 output %0d: %0d, expected %0d", r, elem(mem[OUT_ADDR], r), squash(a2[r], SH2, 0)));
    for (int x = 0; x < P; x++) chk(done[x], $sformatf("engine %0d done", x));
    chk(done[MX], "layer-2 engine done");
    chk(!misroute, "no flit left the mesh where nothing is attached");
    chk(n_skew == P, $sformatf("skewed fetches %0d", n_skew));
    chk(n_rot == P * (P - 1), $sformatf("rotation steps forwarded %0d", n_rot));
    chk(n_wait > 0, "MEMTRACK waits occurred");
    chk(n_bp > 0, "memory-port back-pressure occurred");
    chk(n_wb == 1, "one write-back");
    chk(n_park > 0, "lines ahead of their turn were parked in reserve lines");
    $display("mechanisms: skewed fetches %0d, rotation steps %0d, MEMTRACK wait cycles %0d, parked lines %0d, back-pressure cycles %0d, write-backs %0d, cycles %0d",
             n_skew, n_rot, n_wait, n_park, n_bp, n_wb, cycle);
    fin = 1;
  end
endmodule
