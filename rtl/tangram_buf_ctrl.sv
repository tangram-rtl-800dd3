// tangram_buf_ctrl: the engine buffer controller.
//
// Execution is statically scheduled: the controller runs the instruction
// stream a compiler produced for this engine (loaded into a small instruction
// memory through the NoC) one instruction at a time, and raises done at
// OP_END. It moves data between the local SRAM buffer, the PE array, off-chip
// memory and the buffers of other engines:
//   OP_CFGTRK  programs a MEMTRACK region (updates needed, read passes needed)
//   OP_CFGBSD  loads the BSD sequencer: ping-pong slots a/b, S = n lines per
//              subset, p = imm engines, x = dx, r = maddr[7:0] rounds,
//              ngroups = maddr[15:8], upstream engine (the one that
//              rotates its subsets into this engine) at (maddr[20:16], dy);
//              then grants the upstream engine its first credit
//   OP_FETCH   sends n read requests to memory channel (dx,dy) for lines
//              maddr.. into local lines a..; with FL_SKEW the memory address
//              is offset by i0*S and the target is the current BSD slot, so
//              each engine starts on a different subset (computation skew)
//   OP_LDW     loads weights: lines a.. (ROWS lines per RF word) into RF[b..]
//   OP_MAC     streams n ifmap lines from a through the PE array with RF[b..]
//              (FL_CLEAR clears the accumulators first)
//   OP_STORE   writes the accumulators, shifted right by imm, saturated to
//              16 bits and optionally ReLU'd (FL_RELU), to local line a
//   OP_SEND    pushes n lines from a to line maddr.. of the buffer or memory
//              channel at (dx,dy) (forwarding, rotation, write-back)
//   OP_ROT     one BSD step: MACs the S lines of the current slot against
//              RF[sub*S..] and, unless it is the last step of a group,
//              rotates them to the other slot of engine (dx,dy). Step T's
//              lines are tagged with generation floor((T+1)/2), the number
//              of times the receiving slot has been emptied before it may
//              take them (slots alternate, so each is emptied every second
//              step). A sending step first needs a credit from the
//              downstream engine: each engine sends an F_CREDIT flit to its
//              upstream engine at OP_CFGBSD and after every step that frees
//              a slot (every step but the last of a group), so a sender is
//              never more than one slot ahead of its receiver and rotation
//              lines never wait in the NoC for buffer space
// Every instruction that reads the buffer first waits until the MEMTRACK
// region of its first line is readable and reports one read pass when done;
// OP_STORE waits until its region is writable. Lines are streamed at one per
// cycle: the SRAM read is issued one cycle ahead of its use, and a stall on
// the NoC injection port holds the stream (the SRAM keeps its read data).
// The instruction set, its encoding, and region-level tracking are this
// design's own; what the controller must do (off-chip and remote-buffer
// transfers, rotation and skew after the BSD loop nest, MEMTRACK
// synchronisation, starting the PE array once data are present) follows the
// dataflow it serves. Remote buffers are written by pushing lines; remote
// reads are not provided.
module tangram_buf_ctrl
  import tangram_pkg::*;
#(
  parameter int ROWS     = 8,
  parameter int RF_DEPTH = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [CX_W-1:0]             my_x,
  input  logic [CY_W-1:0]             my_y,
  // program load and control
  input  logic                        imem_we,
  input  logic [IMEM_AW-1:0]          imem_waddr,
  input  instr_t                      imem_wdata,
  input  logic                        start,
  input  logic                        credit_in,
  output logic                        busy,
  output logic                        done,
  // SRAM read port
  output logic                        sram_re,
  output logic [LINE_AW-1:0]          sram_raddr,
  input  line_t                       sram_rdata,
  // SRAM write by STORE (has priority over the NoC)
  output logic                        st_we,
  output logic [LINE_AW-1:0]          st_addr,
  output line_t                       st_data,
  // MEMTRACK
  output logic                        trk_cfg_en,
  output logic [TRK_AW-1:0]           trk_cfg_region,
  output logic [CNT_W-1:0]            trk_cfg_need_upd,
  output logic [CNT_W-1:0]            trk_cfg_need_rd,
  output logic                        trk_rd_done,
  output logic [TRK_AW-1:0]           trk_rd_region,
  input  logic [NUM_TRK-1:0]          trk_writable,
  input  logic [NUM_TRK-1:0]          trk_readable,
  // PE array
  output logic                        ld_en,
  output logic [$clog2(ROWS)-1:0]     ld_row,
  output logic [$clog2(RF_DEPTH)-1:0] ld_addr,
  output line_t                       ld_data,
  output logic                        mac_en,
  output logic                        acc_clear,
  output logic [$clog2(RF_DEPTH)-1:0] rf_raddr,
  output line_t                       act,
  input  logic signed [ACC_W-1:0]     acc [ROWS],
  // NoC injection
  output logic                        inj_valid,
  output flit_t                       inj_flit,
  input  logic                        inj_ready,
  // event pulses, for observation
  output logic                        ev_trk_wait,
  output logic                        ev_rot_send,
  output logic                        ev_skew_fetch
);
  localparam int RFA = $clog2(RF_DEPTH);
  localparam int RGS = LINE_AW - TRK_AW;   // log2 of lines per MEMTRACK region

  typedef enum logic [2:0] {S_IDLE, S_DECODE, S_WAIT, S_STREAM, S_FETCH, S_CREDIT} state_e;

  state_e             state;
  instr_t             imem [IMEM_DEPTH];
  logic [IMEM_AW-1:0] pc;
  instr_t             ir;

  // BSD configuration and ping-pong slot selection
  logic [LINE_AW-1:0] bsd_slot_a, bsd_slot_b;
  logic [7:0]         bsd_s;
  logic               bsd_cur;      // 0: current subset in slot a
  logic [15:0]        bsd_t;        // BSD steps done since OP_CFGBSD
  logic [7:0]         bsd_ng;       // groups in the nest
  logic [CX_W-1:0]    up_x;         // upstream engine (sends us its subsets)
  logic [CY_W-1:0]    up_y;
  logic signed [8:0]  cred;         // free slots granted by the downstream engine
  logic               cred_take, cred_drop;
  logic               agu_load, agu_step;
  logic [15:0]        agu_i0;
  logic [7:0]         agu_sub, agu_s, agu_o, agu_g;
  logic               agu_fetch, agu_first, agu_last, agu_send, agu_done;

  tangram_bsd_agu #(.W(8)) u_agu (
    .clk, .rst_n,
    .cfg_load    (agu_load),
    .cfg_p       (ir.imm),
    .cfg_r       (ir.maddr[7:0]),
    .cfg_ngroups (ir.maddr[15:8]),
    .cfg_x       (8'(ir.dx)),
    .step        (agu_step),
    .i0          (agu_i0),
    .sub         (agu_sub),
    .s_idx       (agu_s),
    .o_idx       (agu_o),
    .g_idx       (agu_g),
    .fetch       (agu_fetch),
    .first       (agu_first),
    .last        (agu_last),
    .send        (agu_send),
    .done        (agu_done)
  );

  logic [LINE_AW-1:0] cur_base, oth_base;
  assign cur_base = bsd_cur ? bsd_slot_b : bsd_slot_a;
  assign oth_base = bsd_cur ? bsd_slot_a : bsd_slot_b;

  // stream state
  logic [LINE_AW-1:0] base;      // first local line of the stream
  logic [11:0]        len;       // lines in the stream
  logic [11:0]        iss;       // next line to issue
  logic               sv;        // a line is in the use stage
  logic [11:0]        sidx;      // index of the line in the use stage
  logic               rot_send;  // this ROT step forwards its subset

  logic stream_noc, fire, issue, last_fire;
  always_comb begin
    stream_noc = (ir.op == OP_SEND) || (ir.op == OP_ROT && rot_send);
    fire       = sv && (!stream_noc || inj_ready);
    issue      = (state == S_STREAM) && (iss < len) && (!sv || fire);
    last_fire  = (state == S_STREAM) && (iss == len) && (!sv || fire);
  end

  // region checked before an instruction runs
  logic [LINE_AW-1:0] chk_line;
  logic               chk_ok;
  always_comb begin
    chk_line = (ir.op == OP_ROT) ? cur_base : ir.a;
    chk_ok   = (ir.op == OP_STORE) ? trk_writable[chk_line[LINE_AW-1:RGS]]
                                   : trk_readable[chk_line[LINE_AW-1:RGS]];
  end

  // saturate / ReLU one accumulator into a 16-bit element
  function automatic data_t squash(logic signed [ACC_W-1:0] v, logic [7:0] sh, logic relu);
    logic signed [ACC_W-1:0] t;
    t = v >>> sh;
    if (relu && t < 0)                    return '0;
    if (t > ACC_W'(32767))                return 16'sh7fff;
    if (t < -ACC_W'(32768))               return 16'sh8000;
    return t[DATA_W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (imem_we) imem[imem_waddr] <= imem_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; pc <= '0; ir <= '0; done <= 1'b0;
      bsd_slot_a <= '0; bsd_slot_b <= '0; bsd_s <= 8'd1; bsd_cur <= 1'b0; bsd_t <= '0;
      bsd_ng <= 8'd1; up_x <= '0; up_y <= '0;
      base <= '0; len <= '0; iss <= '0; sv <= 1'b0; sidx <= '0; rot_send <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          pc <= '0; done <= 1'b0; state <= S_DECODE;
        end
        S_DECODE: begin
          ir    <= imem[pc];
          pc    <= pc + 1'b1;
          state <= S_WAIT;
        end
        S_WAIT: begin
          iss <= '0; sv <= 1'b0;
          unique case (ir.op)
            OP_END: begin done <= 1'b1; state <= S_IDLE; end
            OP_CFGTRK: state <= S_DECODE;
            OP_CFGBSD: begin
              bsd_slot_a <= ir.a; bsd_slot_b <= ir.b; bsd_s <= ir.n; bsd_cur <= 1'b0;
              bsd_t <= '0; bsd_ng <= ir.maddr[15:8];
              up_x <= ir.maddr[16 +: CX_W]; up_y <= ir.dy;
              state <= S_CREDIT;
            end
            OP_FETCH: begin len <= 12'(ir.n); state <= S_FETCH; end
            OP_STORE: if (chk_ok) state <= S_DECODE;
            OP_LDW: if (chk_ok) begin
              base <= ir.a; len <= 12'(ir.n) * 12'(ROWS); state <= S_STREAM;
            end
            OP_MAC, OP_SEND: if (chk_ok) begin
              base <= ir.a; len <= 12'(ir.n); state <= S_STREAM;
            end
            OP_ROT: if (chk_ok && (!agu_send || cred > 0)) begin
              base <= cur_base; len <= 12'(bsd_s); rot_send <= agu_send; state <= S_STREAM;
            end
            default: state <= S_DECODE;
          endcase
        end
        S_FETCH: if (inj_ready) begin
          iss <= iss + 1'b1;
          if (iss + 1'b1 == len) state <= S_DECODE;
        end
        S_STREAM: begin
          if (issue) begin
            iss <= iss + 1'b1; sv <= 1'b1; sidx <= iss;
          end else if (fire) begin
            sv <= 1'b0;
          end
          if (last_fire) begin
            state <= (ir.op == OP_ROT && rot_send) ? S_CREDIT : S_DECODE;
            if (ir.op == OP_ROT) begin
              bsd_cur <= ~bsd_cur;
              bsd_t   <= bsd_t + 1'b1;
            end
          end
        end
        S_CREDIT: if (inj_ready) state <= S_DECODE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Rotation credits. The downstream engine grants one at its OP_CFGBSD and
  // one after each step that frees a slot; a sending step takes one, and the
  // step that ends the nest drops the grant left over for the next group.
  always_comb begin
    cred_take = (state == S_WAIT) && (ir.op == OP_ROT) && chk_ok && agu_send && (cred > 0);
    cred_drop = last_fire && (ir.op == OP_ROT) && !rot_send && (agu_g == bsd_ng - 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cred <= '0;
    else        cred <= cred + 9'(credit_in) - 9'(cred_take) - 9'(cred_drop);
  end

  // combinational outputs
  always_comb begin
    busy = (state != S_IDLE);

    sram_re    = issue;
    sram_raddr = base + LINE_AW'(iss);

    st_we   = (state == S_WAIT) && (ir.op == OP_STORE) && chk_ok;
    st_addr = ir.a;
    st_data = '0;
    for (int r = 0; r < ROWS && r < LANES; r++)
      st_data[r*DATA_W +: DATA_W] = squash(acc[r], ir.imm, ir.flags[FL_RELU]);

    trk_cfg_en       = (state == S_WAIT) && (ir.op == OP_CFGTRK);
    trk_cfg_region   = ir.a[TRK_AW-1:0];
    trk_cfg_need_upd = ir.n;
    trk_cfg_need_rd  = ir.imm;
    trk_rd_done      = last_fire && (ir.op != OP_FETCH);
    trk_rd_region    = base[LINE_AW-1:RGS];

    ld_en    = fire && (ir.op == OP_LDW);
    ld_row   = $clog2(ROWS)'(sidx % ROWS);
    ld_addr  = RFA'(ir.b) + RFA'(sidx / ROWS);
    ld_data  = sram_rdata;

    mac_en    = fire && (ir.op == OP_MAC || ir.op == OP_ROT);
    acc_clear = mac_en && (sidx == '0) &&
                ((ir.op == OP_MAC && ir.flags[FL_CLEAR]) || (ir.op == OP_ROT && agu_first));
    rf_raddr  = (ir.op == OP_ROT) ? RFA'(RFA'(agu_sub) * RFA'(bsd_s) + RFA'(sidx))
                                  : RFA'(RFA'(ir.b) + RFA'(sidx));
    act       = sram_rdata;

    agu_load = (state == S_WAIT) && (ir.op == OP_CFGBSD);
    agu_step = last_fire && (ir.op == OP_ROT);

    inj_valid = 1'b0;
    inj_flit  = '0;
    inj_flit.src_x = my_x;
    inj_flit.src_y = my_y;
    inj_flit.dst_x = ir.dx;
    inj_flit.dst_y = ir.dy;
    if (state == S_CREDIT) begin
      inj_valid      = 1'b1;
      inj_flit.ftype = F_CREDIT;
      inj_flit.dst_x = up_x;
      inj_flit.dst_y = up_y;
    end else if (state == S_FETCH) begin
      inj_valid      = 1'b1;
      inj_flit.ftype = F_RD_REQ;
      inj_flit.addr  = ir.maddr + ADDR_W'(iss) +
                       (ir.flags[FL_SKEW] ? ADDR_W'(agu_i0) * ADDR_W'(bsd_s) : '0);
      inj_flit.raddr = ADDR_W'(LINE_AW'((ir.flags[FL_SKEW] ? cur_base : ir.a) + LINE_AW'(iss)));
    end else if (state == S_STREAM && sv && stream_noc) begin
      inj_valid      = 1'b1;
      inj_flit.ftype = F_WR_LINE;
      inj_flit.addr  = (ir.op == OP_ROT) ? ADDR_W'(oth_base + LINE_AW'(sidx))
                                         : ir.maddr + ADDR_W'(sidx);
      inj_flit.data  = sram_rdata;
      if (ir.op == OP_ROT) begin
        inj_flit.raddr = '0;
        inj_flit.raddr[ADDR_W-1] = 1'b1;
        inj_flit.raddr[CNT_W-1:0] = CNT_W'((17'(bsd_t) + 17'd1) >> 1);
      end
    end

    ev_trk_wait   = (state == S_WAIT) && !chk_ok &&
                    (ir.op inside {OP_STORE, OP_LDW, OP_MAC, OP_SEND, OP_ROT});
    ev_rot_send   = last_fire && (ir.op == OP_ROT) && rot_send;
    ev_skew_fetch = (state == S_FETCH) && inj_ready && ir.flags[FL_SKEW] && (iss == '0);
  end

  // A BSD step is only issued while the loop nest still has steps left.
  a_rot_in_nest: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_STREAM && ir.op == OP_ROT) |-> !agu_done);
endmodule
