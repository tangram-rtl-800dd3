// tangram_engine: one tile of the accelerator, an Eyeriss-like NN engine.
//
// The tile joins an 8 x 8 PE array, a 32 kB SRAM buffer shared by all its
// PEs, the buffer controller that runs the tile's static program, the
// MEMTRACK state of the buffer, and the tile's port onto the mesh NoC.
// Flits leaving the NoC (ej_*) are handled here:
//   F_WR_LINE  writes a line into the buffer. A line whose MEMTRACK region
//              is still full (not yet read enough) is parked in one of
//              RESERVE free lines kept beside the buffer, so that it does
//              not block the NoC behind it; a parked line is written as soon
//              as its region can take it. Only when every reserve line is
//              taken is ej_ready pulled low. The buffer write port serves, in
//              priority order, OP_STORE, a parked line, the arriving line.
//              A line may carry a generation tag (raddr[ADDR_W-1] set,
//              generation in raddr[CNT_W-1:0]): it is written only once its
//              region has been emptied that many times, so a neighbour that
//              runs ahead in the rotation cannot fill a slot out of turn.
//              Untagged lines (memory replies) only need a writable region.
//   F_WR_INSTR writes one instruction of the program
//   F_START    starts the program
//   F_CREDIT   grants the controller one rotation credit (see tangram_buf_ctrl)
//   F_RD_REQ   is not served by engines and is dropped
// Flits the controller produces leave on inj_*. my_x/my_y give the tile's
// NoC coordinates. done rises when the program reaches OP_END and stays high
// until the next start.
// The tile's composition and sizes follow the evaluated engine, and the
// reserve lines follow the rule of moving data in buffer lines and keeping a
// few free lines per buffer so that rotation cannot deadlock; their number
// (4), the flit protocol and the parking scheme are this design's choices.
// A schedule must not put more lines in flight towards an engine's busy
// regions than it has reserve lines.
module tangram_engine
  import tangram_pkg::*;
#(
  parameter int ROWS     = 8,
  parameter int RF_DEPTH = 32,
  parameter int RESERVE  = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [CX_W-1:0] my_x,
  input  logic [CY_W-1:0] my_y,
  input  logic            ej_valid,
  input  flit_t           ej_flit,
  output logic            ej_ready,
  output logic            inj_valid,
  output flit_t           inj_flit,
  input  logic            inj_ready,
  output logic            busy,
  output logic            done,
  // event pulses for observation: MEMTRACK wait cycle, BSD rotation step
  // forwarded, skewed fetch started, line parked in a reserve line
  output logic            ev_trk_wait,
  output logic            ev_rot_send,
  output logic            ev_skew_fetch,
  output logic            ev_park
);
  localparam int RFA = $clog2(RF_DEPTH);
  localparam int RGS = LINE_AW - TRK_AW;

  // SRAM
  logic               sram_we, sram_re;
  logic [LINE_AW-1:0] sram_waddr, sram_raddr;
  line_t              sram_wdata, sram_rdata;

  // controller <-> others
  logic               st_we;
  logic [LINE_AW-1:0] st_addr;
  line_t              st_data;
  logic               trk_cfg_en, trk_rd_done;
  logic [TRK_AW-1:0]  trk_cfg_region, trk_rd_region;
  logic [CNT_W-1:0]   trk_cfg_need_upd, trk_cfg_need_rd;
  logic [NUM_TRK-1:0] trk_writable, trk_readable;
  logic [CNT_W-1:0]   trk_gen [NUM_TRK];
  logic               ld_en, mac_en, acc_clear;
  logic [$clog2(ROWS)-1:0] ld_row;
  logic [RFA-1:0]     ld_addr, rf_raddr;
  line_t              ld_data, act;
  logic signed [ACC_W-1:0] acc [ROWS];

  // NoC ejection with reserve lines
  logic [LINE_AW-1:0] ej_line;
  logic               ej_is_wr, direct_ok, has_free, park_en, drain_en;
  instr_t             ej_instr;
  logic               pk_v    [RESERVE];
  logic [ADDR_W-1:0]  pk_tag  [RESERVE];
  logic [LINE_AW-1:0] pk_addr [RESERVE];
  line_t              pk_data [RESERVE];
  logic [$clog2(RESERVE)-1:0] free_sel, drain_sel;

  // can a line for `line` with tag `tag` be written now?
  function automatic logic can_write(logic [LINE_AW-1:0] line, logic [ADDR_W-1:0] tag);
    logic [TRK_AW-1:0] rg;
    rg = line[LINE_AW-1:RGS];
    return trk_writable[rg] && (!tag[ADDR_W-1] || tag[CNT_W-1:0] == trk_gen[rg]);
  endfunction

  always_comb begin
    ej_line  = ej_flit.addr[LINE_AW-1:0];
    ej_is_wr = ej_valid && (ej_flit.ftype == F_WR_LINE);
    ej_instr = instr_t'(ej_flit.data[INSTR_W-1:0]);

    drain_en  = 1'b0;
    drain_sel = '0;
    has_free  = 1'b0;
    free_sel  = '0;
    for (int k = RESERVE - 1; k >= 0; k--) begin
      if (pk_v[k] && can_write(pk_addr[k], pk_tag[k])) begin
        drain_en = !st_we; drain_sel = ($clog2(RESERVE))'(k);
      end
      if (!pk_v[k]) begin has_free = 1'b1; free_sel = ($clog2(RESERVE))'(k); end
    end
    direct_ok = can_write(ej_line, ej_flit.raddr) && !st_we && !drain_en;
    park_en   = ej_is_wr && !direct_ok && has_free;
    ej_ready  = (ej_flit.ftype == F_WR_LINE) ? (direct_ok || has_free) : 1'b1;
    ev_park   = park_en;

    sram_we    = st_we || drain_en || (ej_is_wr && direct_ok);
    sram_waddr = st_we ? st_addr : drain_en ? pk_addr[drain_sel] : ej_line;
    sram_wdata = st_we ? st_data : drain_en ? pk_data[drain_sel] : ej_flit.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < RESERVE; k++) pk_v[k] <= 1'b0;
    end else begin
      if (drain_en) pk_v[drain_sel] <= 1'b0;
      if (park_en)  pk_v[free_sel]  <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (park_en) begin
      pk_addr[free_sel] <= ej_line;
      pk_tag[free_sel]  <= ej_flit.raddr;
      pk_data[free_sel] <= ej_flit.data;
    end
  end

  tangram_sram #(.LINES(BUF_LINES), .WIDTH(LINE_W)) u_sram (
    .clk, .we(sram_we), .waddr(sram_waddr), .wdata(sram_wdata),
    .re(sram_re), .raddr(sram_raddr), .rdata(sram_rdata)
  );

  tangram_memtrack #(.REGIONS(NUM_TRK), .CW(CNT_W)) u_trk (
    .clk, .rst_n,
    .cfg_en(trk_cfg_en), .cfg_region(trk_cfg_region),
    .cfg_need_upd(trk_cfg_need_upd), .cfg_need_rd(trk_cfg_need_rd),
    .wr_en(sram_we), .wr_region(sram_waddr[LINE_AW-1:RGS]),
    .rd_done(trk_rd_done), .rd_region(trk_rd_region),
    .writable(trk_writable), .readable(trk_readable), .gen(trk_gen)
  );

  tangram_pe_array #(.ROWS(ROWS), .COLS(LANES), .RF_DEPTH(RF_DEPTH)) u_array (
    .clk, .rst_n,
    .ld_en, .ld_row, .ld_addr, .ld_data,
    .mac_en, .acc_clear, .rf_raddr, .act, .acc
  );

  tangram_buf_ctrl #(.ROWS(ROWS), .RF_DEPTH(RF_DEPTH)) u_ctrl (
    .clk, .rst_n, .my_x, .my_y,
    .imem_we    (ej_valid && ej_flit.ftype == F_WR_INSTR),
    .imem_waddr (ej_flit.addr[IMEM_AW-1:0]),
    .imem_wdata (ej_instr),
    .start      (ej_valid && ej_flit.ftype == F_START),
    .credit_in  (ej_valid && ej_flit.ftype == F_CREDIT),
    .busy, .done,
    .sram_re, .sram_raddr, .sram_rdata,
    .st_we, .st_addr, .st_data,
    .trk_cfg_en, .trk_cfg_region, .trk_cfg_need_upd, .trk_cfg_need_rd,
    .trk_rd_done, .trk_rd_region, .trk_writable, .trk_readable,
    .ld_en, .ld_row, .ld_addr, .ld_data,
    .mac_en, .acc_clear, .rf_raddr, .act, .acc,
    .inj_valid, .inj_flit, .inj_ready,
    .ev_trk_wait, .ev_rot_send, .ev_skew_fetch
  );
endmodule
