// tb_tangram_buf_ctrl: self-checking test of the buffer controller with a real
// SRAM, MEMTRACK and PE array around it; the testbench writes the program
// straight into the instruction memory and plays the NoC. It runs a full BSD
// group as engine x = 1 of p = 3 with r = 2 rounds and S = 2 lines per subset:
//   - the skewed fetch must ask for memory lines maddr + i0*S.. with
//     i0 = 1, into the current slot
//   - every rotation step but the last must forward the subset it holds to
//     the other slot of the neighbour, line by line, tagged with the fill
//     generation floor((t+1)/2) of that slot
//   - the testbench then supplies the next subset, (x + s + 1) mod p, into
//     the other slot; the controller must wait (MEMTRACK) until it is there
//   - after each round of p steps the stored accumulators must equal the dot
//     product of all subsets with RF word sub*S + line
//   - no rotation line may leave before the downstream engine (played here)
//     has granted a credit for it; the testbench grants one at the start and
//     one after each forwarded step, after a random delay, and the
//     controller must return one credit upstream at OP_CFGBSD and after each
//     forwarding step, and end with no credit left
// It also checks that exactly R*P*S lines went through the PE array.
module tb_tangram_buf_ctrl;
  import tangram_pkg::*;
  import tangram_tb_pkg::*;
  localparam int ROWS = 8, RFD = 32, P = 3, X = 1, S = 2, R = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic imem_we, start, busy, done;
  logic [IMEM_AW-1:0] imem_waddr;
  instr_t imem_wdata;
  logic sram_re, st_we; logic [LINE_AW-1:0] sram_raddr, st_addr; line_t sram_rdata, st_data;
  logic trk_cfg_en, trk_rd_done; logic [TRK_AW-1:0] trk_cfg_region, trk_rd_region;
  logic [CNT_W-1:0] trk_cfg_need_upd, trk_cfg_need_rd;
  logic [NUM_TRK-1:0] trk_writable, trk_readable;
  logic [CNT_W-1:0] trk_gen [NUM_TRK];
  logic ld_en, mac_en, acc_clear; logic [2:0] ld_row; logic [4:0] ld_addr, rf_raddr;
  line_t ld_data, act;
  logic signed [ACC_W-1:0] acc [ROWS];
  logic inj_valid, inj_ready; flit_t inj_flit;
  logic credit_in;
  int credits_given, credits_back, rot_lines;
  logic ev_trk_wait, ev_rot_send, ev_skew_fetch;
  logic tb_we; logic [LINE_AW-1:0] tb_waddr; line_t tb_wdata;
  logic we; logic [LINE_AW-1:0] waddr; line_t wdata;

  assign we    = st_we | tb_we;
  assign waddr = st_we ? st_addr : tb_waddr;
  assign wdata = st_we ? st_data : tb_wdata;

  tangram_buf_ctrl #(.ROWS(ROWS), .RF_DEPTH(RFD)) dut (
    .clk, .rst_n, .my_x(CX_W'(2)), .my_y(CY_W'(1)),
    .imem_we, .imem_waddr, .imem_wdata, .start, .credit_in, .busy, .done,
    .sram_re, .sram_raddr, .sram_rdata, .st_we, .st_addr, .st_data,
    .trk_cfg_en, .trk_cfg_region, .trk_cfg_need_upd, .trk_cfg_need_rd,
    .trk_rd_done, .trk_rd_region, .trk_writable, .trk_readable,
    .ld_en, .ld_row, .ld_addr, .ld_data, .mac_en, .acc_clear, .rf_raddr, .act, .acc,
    .inj_valid, .inj_flit, .inj_ready, .ev_trk_wait, .ev_rot_send, .ev_skew_fetch
  );
  tangram_sram u_sram (.clk, .we, .waddr, .wdata, .re(sram_re), .raddr(sram_raddr), .rdata(sram_rdata));
  tangram_memtrack u_trk (
    .clk, .rst_n, .cfg_en(trk_cfg_en), .cfg_region(trk_cfg_region),
    .cfg_need_upd(trk_cfg_need_upd), .cfg_need_rd(trk_cfg_need_rd),
    .wr_en(we), .wr_region(waddr[LINE_AW-1 -: TRK_AW]),
    .rd_done(trk_rd_done), .rd_region(trk_rd_region),
    .writable(trk_writable), .readable(trk_readable), .gen(trk_gen));
  tangram_pe_array #(.ROWS(ROWS), .COLS(LANES), .RF_DEPTH(RFD)) u_arr (
    .clk, .rst_n, .ld_en, .ld_row, .ld_addr, .ld_data, .mac_en, .acc_clear, .rf_raddr, .act, .acc);

  int checks = 0, failures = 0;
  line_t sub_data [P][S];
  line_t wline [48];
  line_t rx [$];
  int rx_addr [$];
  logic [ADDR_W-1:0] rx_tag [$];
  int fetch_addr [$], fetch_raddr [$];
  int steps_seen = 0, trk_waits = 0, stream_gaps = 0, mac_cycles = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // NoC side: accept flits with random back-pressure and log them
  always @(posedge clk) begin
    if (rst_n && inj_valid && inj_ready) begin
      if (inj_flit.ftype == F_RD_REQ) begin
        fetch_addr.push_back(int'(inj_flit.addr));
        fetch_raddr.push_back(int'(inj_flit.raddr));
      end else if (inj_flit.ftype == F_CREDIT) begin
        chk(inj_flit.dst_x == 3 && inj_flit.dst_y == 1, "credit goes to the upstream engine");
        credits_back++;
      end else begin
        chk(inj_flit.dst_x == 1 && inj_flit.dst_y == 1, "rotation goes to the neighbour");
        rot_lines++;
        chk(rot_lines <= S * credits_given, "no rotation line without a credit");
        rx.push_back(inj_flit.data);
        rx_addr.push_back(int'(inj_flit.addr));
        rx_tag.push_back(inj_flit.raddr);
      end
    end
    if (rst_n && ev_trk_wait) trk_waits++;
    if (rst_n && mac_en) mac_cycles++;
    inj_ready <= ($urandom_range(0, 2) != 0);
  end

  int grants_pending;
  task automatic grant();
    repeat ($urandom_range(1, 12)) @(negedge clk);
    grants_pending++;
  endtask

  // one credit pulse per cycle towards the controller
  always @(negedge clk) begin
    credit_in = 0;
    if (grants_pending > 0) begin
      credit_in = 1; grants_pending--; credits_given++;
    end
  end

  task automatic tb_write(int a, line_t d);
    @(negedge clk);
    while (st_we || !trk_writable[a >> (LINE_AW - TRK_AW)]) @(negedge clk);
    tb_we = 1; tb_waddr = LINE_AW'(a); tb_wdata = d;
    @(negedge clk);
    tb_we = 0;
  endtask

  function automatic longint model(int r);
    longint s = 0;
    for (int j = 0; j < P; j++)
      for (int k = 0; k < S; k++)
        for (int c = 0; c < LANES; c++)
          s += longint'(elem(wline[(j*S + k)*ROWS + r], c)) * longint'(elem(sub_data[j][k], c));
    return s;
  endfunction

  initial begin
    instr_t prog [$];
    imem_we = 0; start = 0; tb_we = 0; tb_waddr = 0; tb_wdata = '0; imem_waddr = 0; imem_wdata = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int j = 0; j < P; j++) for (int k = 0; k < S; k++) sub_data[j][k] = rnd_line();
    for (int k = 0; k < 48; k++) begin wline[k] = rnd_line(); tb_write(256 + k, wline[k]); end
    prog = '{mk(OP_CFGTRK, .a(1), .n(S), .imm(1)),
             mk(OP_CFGTRK, .a(3), .n(S), .imm(1)),
             mk(OP_CFGBSD, .a(128), .b(384), .n(S), .imm(P), .dx(X), .dy(1), .maddr('h30100 + R)),
             mk(OP_FETCH, .n(S), .dx(0), .dy(0), .maddr(5000), .flags(4'b0100)),
             mk(OP_LDW, .a(256), .n(P*S), .b(0)),
             mk(OP_ROT, .dx(1), .dy(1)), mk(OP_ROT, .dx(1), .dy(1)), mk(OP_ROT, .dx(1), .dy(1)),
             mk(OP_STORE, .a(600)),
             mk(OP_ROT, .dx(1), .dy(1)), mk(OP_ROT, .dx(1), .dy(1)), mk(OP_ROT, .dx(1), .dy(1)),
             mk(OP_STORE, .a(601)),
             mk(OP_END)};
    foreach (prog[k]) begin
      @(negedge clk); imem_we = 1; imem_waddr = IMEM_AW'(k); imem_wdata = prog[k];
    end
    @(negedge clk); imem_we = 0; start = 1;
    @(negedge clk); start = 0;
    // serve the skewed fetch: subset x into the current slot
    while (fetch_addr.size() < S) @(negedge clk);
    for (int k = 0; k < S; k++) begin
      chk(fetch_addr[k] == 5000 + X*S + k, $sformatf("skewed fetch address %0d", fetch_addr[k]));
      chk(fetch_raddr[k] == 128 + k, "skewed fetch lands in slot a");
    end
    repeat ($urandom_range(5, 20)) @(negedge clk);
    for (int k = 0; k < S; k++) tb_write(128 + k, sub_data[X][k]);
    // the downstream engine grants its first credit
    grant();
    // rotation steps
    for (int t = 0; t < R*P; t++) begin
      int cur;
      cur = (X + t) % P;
      if (t != R*P - 1) begin
        while (rx.size() < S) @(negedge clk);
        for (int k = 0; k < S; k++) begin
          chk(rx[k] == sub_data[cur][k], $sformatf("step %0d forwards subset %0d line %0d", t, cur, k));
          chk(rx_addr[k] == ((t % 2 == 0) ? 384 : 128) + k, $sformatf("step %0d target line %0d", t, rx_addr[k]));
          chk(rx_tag[k][ADDR_W-1] && int'(rx_tag[k][CNT_W-1:0]) == (t + 1) / 2, $sformatf("step %0d generation tag", t));
        end
        rx.delete(); rx_addr.delete(); rx_tag.delete();
        // the downstream engine frees a slot later
        fork grant(); join_none
        // neighbour's subset arrives a little later
        repeat ($urandom_range(2, 10)) @(negedge clk);
        for (int k = 0; k < S; k++)
          tb_write(((t % 2 == 0) ? 384 : 128) + k, sub_data[(cur + 1) % P][k]);
      end
    end
    while (!done) @(negedge clk);
    chk(rx.size() == 0, "last step of the group does not forward");
    for (int r = 0; r < ROWS; r++) begin
      chk(elem(u_sram.mem[600], r) == squash(model(r), 0, 0),
          $sformatf("round 0 row %0d: %0d vs %0d", r, elem(u_sram.mem[600], r), squash(model(r), 0, 0)));
      chk(elem(u_sram.mem[601], r) == squash(model(r), 0, 0), $sformatf("round 1 row %0d", r));
    end
    repeat (20) @(negedge clk);
    chk(trk_waits > 0, "controller waited for rotated data");
    chk(credits_back == R*P, $sformatf("credits returned upstream %0d", credits_back));
    chk(dut.cred == 0, $sformatf("credit count at the end %0d", dut.cred));
    chk(mac_cycles == R*P*S, $sformatf("MAC cycles %0d", mac_cycles));
    $display("MEMTRACK waits %0d", trk_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
