// tangram_top: the tiled accelerator, MESH_X x MESH_Y NN engines (16 x 16 by
// default, 16384 PEs and 8 MB of SRAM in all) on a 2D mesh NoC, with four
// off-chip memory channels attached at the west and east sides.
//
// Engine (i,j), column i and row j, has NoC coordinates x = i+1, y = j. The
// memory channels sit just outside the mesh: x = 0 on the west side and
// x = MESH_X+1 on the east side, in rows MESH_Y/4 and 3*MESH_Y/4:
//   channel 0: west, row MESH_Y/4      channel 2: east, row MESH_Y/4
//   channel 1: west, row 3*MESH_Y/4    channel 3: east, row 3*MESH_Y/4
// A flit addressed to (0, MESH_Y/4) therefore leaves on channel 0. Each
// channel has a port out of the chip (mem_out_*: read requests and
// write-backs the engines send) and a port into it (mem_in_*: read data,
// programs, start commands, preloaded data). The memory controllers and DRAM
// are outside this design. A flit routed off an edge where no channel is
// attached is discarded and sets the sticky misroute flag.
// Per-engine status (done, busy) and event pulses come out as vectors indexed
// by j*MESH_X + i. All engines share one clock and an asynchronous active-low
// reset.
// The tile count, tiles per side and four side-attached channels follow the
// evaluated system; the exact channel positions and NoC details are this
// design's choices. MESH_Y must be at least 2.
module tangram_top
  import tangram_pkg::*;
#(
  parameter int MESH_X = 16,
  parameter int MESH_Y = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // memory channels
  output logic                     mem_out_valid [4],
  output flit_t                    mem_out_flit  [4],
  input  logic                     mem_out_ready [4],
  input  logic                     mem_in_valid  [4],
  input  flit_t                    mem_in_flit   [4],
  output logic                     mem_in_ready  [4],
  // status
  output logic [MESH_X*MESH_Y-1:0] done,
  output logic [MESH_X*MESH_Y-1:0] busy,
  output logic [MESH_X*MESH_Y-1:0] ev_trk_wait,
  output logic [MESH_X*MESH_Y-1:0] ev_rot_send,
  output logic [MESH_X*MESH_Y-1:0] ev_skew_fetch,
  output logic [MESH_X*MESH_Y-1:0] ev_park,
  output logic                     misroute
);
  localparam int ROW0 = MESH_Y / 4;
  localparam int ROW1 = (3 * MESH_Y) / 4;

  logic  iv [MESH_Y][MESH_X][5];
  flit_t ifl[MESH_Y][MESH_X][5];
  logic  ir [MESH_Y][MESH_X][5];
  logic  ov [MESH_Y][MESH_X][5];
  flit_t ofl[MESH_Y][MESH_X][5];
  logic  orr[MESH_Y][MESH_X][5];

  logic [MESH_X*MESH_Y-1:0] drop;

  for (genvar j = 0; j < MESH_Y; j++) begin : g_y
    for (genvar i = 0; i < MESH_X; i++) begin : g_x
      localparam int ID = j * MESH_X + i;

      tangram_router #(.MESH_X(MESH_X)) u_router (
        .clk, .rst_n,
        .my_x(CX_W'(i + 1)), .my_y(CY_W'(j)),
        .in_valid(iv[j][i]), .in_flit(ifl[j][i]), .in_ready(ir[j][i]),
        .out_valid(ov[j][i]), .out_flit(ofl[j][i]), .out_ready(orr[j][i])
      );

      tangram_engine u_engine (
        .clk, .rst_n,
        .my_x(CX_W'(i + 1)), .my_y(CY_W'(j)),
        .ej_valid (ov[j][i][P_LOCAL]), .ej_flit(ofl[j][i][P_LOCAL]), .ej_ready(orr[j][i][P_LOCAL]),
        .inj_valid(iv[j][i][P_LOCAL]), .inj_flit(ifl[j][i][P_LOCAL]), .inj_ready(ir[j][i][P_LOCAL]),
        .busy(busy[ID]), .done(done[ID]),
        .ev_trk_wait(ev_trk_wait[ID]), .ev_rot_send(ev_rot_send[ID]), .ev_skew_fetch(ev_skew_fetch[ID]),
        .ev_park(ev_park[ID])
      );

      // east / west links
      if (i + 1 < MESH_X) begin : g_e
        assign iv [j][i][P_EAST] = ov [j][i+1][P_WEST];
        assign ifl[j][i][P_EAST] = ofl[j][i+1][P_WEST];
        assign orr[j][i+1][P_WEST] = ir[j][i][P_EAST];
      end
      if (i == 0) begin : g_wedge
        if (j == ROW0 || j == ROW1) begin : g_ch
          localparam int CH = (j == ROW0) ? 0 : 1;
          assign iv [j][i][P_WEST] = mem_in_valid[CH];
          assign ifl[j][i][P_WEST] = mem_in_flit[CH];
          assign mem_in_ready[CH]  = ir[j][i][P_WEST];
          assign mem_out_valid[CH] = ov[j][i][P_WEST];
          assign mem_out_flit[CH]  = ofl[j][i][P_WEST];
          assign orr[j][i][P_WEST] = mem_out_ready[CH];
        end else begin : g_tie
          assign iv [j][i][P_WEST] = 1'b0;
          assign ifl[j][i][P_WEST] = '0;
          assign orr[j][i][P_WEST] = 1'b1;
        end
      end
      if (i == MESH_X - 1) begin : g_eedge
        if (j == ROW0 || j == ROW1) begin : g_ch
          localparam int CH = (j == ROW0) ? 2 : 3;
          assign iv [j][i][P_EAST] = mem_in_valid[CH];
          assign ifl[j][i][P_EAST] = mem_in_flit[CH];
          assign mem_in_ready[CH]  = ir[j][i][P_EAST];
          assign mem_out_valid[CH] = ov[j][i][P_EAST];
          assign mem_out_flit[CH]  = ofl[j][i][P_EAST];
          assign orr[j][i][P_EAST] = mem_out_ready[CH];
        end else begin : g_tie
          assign iv [j][i][P_EAST] = 1'b0;
          assign ifl[j][i][P_EAST] = '0;
          assign orr[j][i][P_EAST] = 1'b1;
        end
      end
      if (i > 0) begin : g_w
        assign iv [j][i][P_WEST] = ov [j][i-1][P_EAST];
        assign ifl[j][i][P_WEST] = ofl[j][i-1][P_EAST];
        assign orr[j][i-1][P_EAST] = ir[j][i][P_WEST];
      end
      // north / south links
      if (j + 1 < MESH_Y) begin : g_s
        assign iv [j][i][P_SOUTH] = ov [j+1][i][P_NORTH];
        assign ifl[j][i][P_SOUTH] = ofl[j+1][i][P_NORTH];
        assign orr[j+1][i][P_NORTH] = ir[j][i][P_SOUTH];
      end else begin : g_sedge
        assign iv [j][i][P_SOUTH] = 1'b0;
        assign ifl[j][i][P_SOUTH] = '0;
        assign orr[j][i][P_SOUTH] = 1'b1;
      end
      if (j > 0) begin : g_n
        assign iv [j][i][P_NORTH] = ov [j-1][i][P_SOUTH];
        assign ifl[j][i][P_NORTH] = ofl[j-1][i][P_SOUTH];
        assign orr[j-1][i][P_SOUTH] = ir[j][i][P_NORTH];
      end else begin : g_nedge
        assign iv [j][i][P_NORTH] = 1'b0;
        assign ifl[j][i][P_NORTH] = '0;
        assign orr[j][i][P_NORTH] = 1'b1;
      end

      // flits leaving the mesh where nothing is attached
      assign drop[ID] =
        ((j == 0)          && ov[j][i][P_NORTH]) ||
        ((j == MESH_Y - 1) && ov[j][i][P_SOUTH]) ||
        ((i == 0)          && !(j == ROW0 || j == ROW1) && ov[j][i][P_WEST]) ||
        ((i == MESH_X - 1) && !(j == ROW0 || j == ROW1) && ov[j][i][P_EAST]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      misroute <= 1'b0;
    else if (|drop)  misroute <= 1'b1;
  end
endmodule
