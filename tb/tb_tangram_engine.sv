// tb_tangram_engine: self-checking test of one engine tile through its NoC
// port. The testbench plays the rest of the chip: a memory channel at (0,0)
// that answers read requests after a random delay and stores write-backs, and
// a neighbour engine at (3,1) for buffer-sharing rotation. It loads programs
// with F_WR_INSTR flits and starts them with F_START.
//   Program 1: fetch 4 ifmap lines and 32 weight lines, load weights, MAC,
//   store with shift and ReLU, write back. The MAC must wait on MEMTRACK for
//   the fetched data; a stray write into the ifmap lines, sent once all data
//   have arrived, must be parked in a reserve line until the MAC has read
//   them, and land afterwards.
//   Program 2: one BSD group with p = 2, r = 1, S = 2 as engine x = 0: a
//   skewed fetch of subset 0, a rotation step that MACs it and forwards it to
//   the neighbour once the neighbour has granted a credit (F_CREDIT), and a
//   second step on subset 1 received from the neighbour; the engine must
//   return two credits (one at the BSD setup, one after the forwarding step).
// Results are compared with sums computed here from the same random data.
module tb_tangram_engine;
  import tangram_pkg::*;
  import tangram_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int EX = 2, EY = 1;
  logic ej_valid, ej_ready, inj_valid, inj_ready, busy, done;
  logic ev_trk_wait, ev_rot_send, ev_skew_fetch, ev_park;
  flit_t ej_flit, inj_flit;

  tangram_engine dut (
    .clk, .rst_n, .my_x(CX_W'(EX)), .my_y(CY_W'(EY)),
    .ej_valid, .ej_flit, .ej_ready, .inj_valid, .inj_flit, .inj_ready,
    .busy, .done, .ev_trk_wait, .ev_rot_send, .ev_skew_fetch, .ev_park
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  line_t mem [longint];
  flit_t ejq [$];
  flit_t dq [$];
  int    dq_due [$];
  line_t nb_rx [int];        // lines the neighbour received, by address
  int trk_waits = 0, ej_blocked = 0, rot_sends = 0, skew_fetches = 0, credits_back = 0;
  int delivered = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("state=%0d pc=%0d op=%0d ejq=%0d delivered=%0d", dut.u_ctrl.state, dut.u_ctrl.pc, dut.u_ctrl.ir.op, ejq.size(), delivered);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // NoC side model
  // the head of the queue is presented from the falling edge on
  always @(negedge clk) begin
    ej_valid <= (ejq.size() != 0);
    ej_flit  <= (ejq.size() != 0) ? ejq[0] : '0;
  end
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (ev_trk_wait) trk_waits++;
      if (ev_rot_send) rot_sends++;
      if (ev_skew_fetch) skew_fetches++;
      if (ev_park) ej_blocked++;
      if (ej_valid && ej_ready) begin
        if (ejq[0].ftype == F_WR_LINE) delivered++;
        void'(ejq.pop_front());
      end
      if (inj_valid && inj_ready) begin
        if (inj_flit.ftype == F_RD_REQ && inj_flit.dst_x == 0) begin
          dq.push_back(mk_flit(F_WR_LINE, int'(inj_flit.src_x), int'(inj_flit.src_y),
                               longint'(inj_flit.raddr), mem[longint'(inj_flit.addr)]));
          dq_due.push_back(cycle + $urandom_range(3, 12));
        end else if (inj_flit.ftype == F_WR_LINE && inj_flit.dst_x == 0) begin
          mem[longint'(inj_flit.addr)] = inj_flit.data;
        end else if (inj_flit.ftype == F_WR_LINE && inj_flit.dst_x == 3 && inj_flit.dst_y == 1) begin
          nb_rx[int'(inj_flit.addr)] = inj_flit.data;
        end else if (inj_flit.ftype == F_CREDIT && inj_flit.dst_x == 3 && inj_flit.dst_y == 1) begin
          credits_back++;
        end else begin
          chk(0, "unexpected flit from engine");
        end
      end
      while (dq.size() != 0 && dq_due[0] <= cycle) begin
        ejq.push_back(dq.pop_front());
        void'(dq_due.pop_front());
      end
    end
    inj_ready <= ($urandom_range(0, 3) != 0);
  end

  task automatic load_prog(instr_t p [$]);
    foreach (p[k]) ejq.push_back(mk_flit(F_WR_INSTR, EX, EY, k, LINE_W'(p[k])));
  endtask

  task automatic run_and_wait();
    ejq.push_back(mk_flit(F_START, EX, EY, 0, '0));
    @(posedge clk);
    while (!(done && ejq.size() == 0)) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  initial begin
    instr_t p1 [$], p2 [$];
    longint acc [8];
    repeat (3) @(negedge clk); rst_n = 1;

    // ---------------- program 1: plain fetch / LDW / MAC / STORE / SEND
    for (int k = 0; k < 4; k++) mem[100 + k] = rnd_line();
    for (int k = 0; k < 32; k++) mem[200 + k] = rnd_line();
    p1 = '{mk(OP_CFGTRK, .a(1), .n(4), .imm(1)),
           mk(OP_CFGTRK, .a(2), .n(32), .imm(1)),
           mk(OP_FETCH, .a(128), .n(4), .dx(0), .dy(0), .maddr(100)),
           mk(OP_FETCH, .a(256), .n(32), .dx(0), .dy(0), .maddr(200)),
           mk(OP_LDW, .a(256), .n(4), .b(0)),
           mk(OP_MAC, .a(128), .n(4), .b(0), .flags(4'b0001)),
           mk(OP_STORE, .a(512), .imm(8), .flags(4'b0010)),
           mk(OP_SEND, .a(512), .n(1), .dx(0), .dy(0), .maddr(300)),
           mk(OP_END)};
    load_prog(p1);
    ejq.push_back(mk_flit(F_START, EX, EY, 0, '0));
    // stray write into ifmap line 0 once every fetched line has arrived
    while (delivered < 36) @(posedge clk);
    ejq.push_back(mk_flit(F_WR_LINE, EX, EY, 128, '1));
    while (!(done && ejq.size() == 0)) @(posedge clk);
    repeat (2) @(posedge clk);
    for (int r = 0; r < 8; r++) begin
      acc[r] = 0;
      for (int k = 0; k < 4; k++)
        for (int c = 0; c < LANES; c++)
          acc[r] += longint'(elem(mem[200 + k*8 + r], c)) * longint'(elem(mem[100 + k], c));
    end
    chk(mem.exists(300), "program 1 wrote back its result");
    for (int r = 0; r < 8; r++)
      chk(elem(mem[300], r) == squash(acc[r], 8, 1),
          $sformatf("p1 row %0d got %0d exp %0d", r, elem(mem[300], r), squash(acc[r], 8, 1)));
    chk(trk_waits > 0, "MAC waited on MEMTRACK");
    chk(ej_blocked == 1, "stray write was parked until its region emptied");
    chk(dut.u_sram.mem[128] == '1, "parked stray write landed after the MAC");

    // ---------------- program 2: one BSD group, p = 2, engine x = 0
    for (int k = 0; k < 4; k++) mem[1000 + k] = rnd_line();
    for (int k = 0; k < 32; k++) mem[2000 + k] = rnd_line();
    p2 = '{mk(OP_CFGTRK, .a(1), .n(2), .imm(1)),
           mk(OP_CFGTRK, .a(3), .n(2), .imm(1)),
           mk(OP_CFGTRK, .a(2), .n(32), .imm(1)),
           mk(OP_CFGBSD, .a(128), .b(384), .n(2), .imm(2), .dx(0), .dy(1), .maddr('h30101)),
           mk(OP_FETCH, .n(2), .dx(0), .dy(0), .maddr(1000), .flags(4'b0100)),
           mk(OP_FETCH, .a(256), .n(32), .dx(0), .dy(0), .maddr(2000)),
           mk(OP_LDW, .a(256), .n(4), .b(0)),
           mk(OP_ROT, .dx(3), .dy(1)),
           mk(OP_ROT, .dx(3), .dy(1)),
           mk(OP_STORE, .a(512), .imm(4)),
           mk(OP_SEND, .a(512), .n(1), .dx(0), .dy(0), .maddr(3000)),
           mk(OP_END)};
    load_prog(p2);
    ejq.push_back(mk_flit(F_START, EX, EY, 0, '0));
    // the neighbour grants a credit for its free slot; no line may come first
    repeat (60) @(posedge clk);
    chk(nb_rx.num() == 0, "no rotation before the neighbour's credit");
    ejq.push_back(mk_flit(F_CREDIT, EX, EY, 0, '0));
    // the neighbour forwards its subset (1) once it has received ours
    while (nb_rx.num() < 2) @(posedge clk);
    ejq.push_back(mk_flit(F_WR_LINE, EX, EY, 384, mem[1002]));
    ejq.push_back(mk_flit(F_WR_LINE, EX, EY, 385, mem[1003]));
    while (!(done && ejq.size() == 0)) @(posedge clk);
    repeat (2) @(posedge clk);
    chk(nb_rx.exists(384) && nb_rx[384] == mem[1000], "subset 0 line 0 rotated to neighbour slot");
    chk(nb_rx.exists(385) && nb_rx[385] == mem[1001], "subset 0 line 1 rotated to neighbour slot");
    for (int r = 0; r < 8; r++) begin
      acc[r] = 0;
      for (int k = 0; k < 4; k++)      // RF word k = subset k/2, line k%2
        for (int c = 0; c < LANES; c++)
          acc[r] += longint'(elem(mem[2000 + k*8 + r], c)) * longint'(elem(mem[1000 + k], c));
    end
    chk(mem.exists(3000), "program 2 wrote back its result");
    for (int r = 0; r < 8; r++)
      chk(elem(mem[3000], r) == squash(acc[r], 4, 0),
          $sformatf("p2 row %0d got %0d exp %0d", r, elem(mem[3000], r), squash(acc[r], 4, 0)));
    chk(rot_sends == 1, $sformatf("one forwarded rotation step (saw %0d)", rot_sends));
    chk(skew_fetches == 1, "one skewed fetch");
    chk(credits_back == 2, $sformatf("credits returned to the neighbour %0d", credits_back));
    $display("MEMTRACK waits %0d, parked writes %0d, rotations %0d, skewed fetches %0d",
             trk_waits, ej_blocked, rot_sends, skew_fetches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
