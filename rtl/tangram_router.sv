// tangram_router: five-port router of the 2D mesh NoC that links the engines
// to each other and to the off-chip memory channels.
//
// Ports are numbered by port_e: local (the engine), north (y-1), east (x+1),
// south (y+1), west (x-1). Every input has a FIFO_DEPTH-entry buffer. The
// flit at the head of each buffer is routed dimension-order, x first, then y
// (deadlock free on a mesh). The memory channels sit outside the mesh
// (x = 0 and x = MESH_X+1), so x routing first heads for the nearest engine
// column, tx = clamp(dst_x, 1, MESH_X): east/west while my_x != tx, then
// south/north while my_y != dst_y, then out of the west/east edge if dst_x
// lies outside the mesh, else local. The one late y-to-x turn leads only
// into a memory channel, which always drains, so no cycle of waits forms.
// Each output grants one requesting input per cycle in round-robin order; the flit leaves when out_ready is high.
// A flit spends at least one cycle per router (it is buffered on entry).
// Packets are single flits. The text only says that a NoC connects the tiles
// and the memory channels; topology, routing, buffering and flit format are
// this design's choices.
module tangram_router
  import tangram_pkg::*;
#(
  parameter int FIFO_DEPTH = 2,
  parameter int MESH_X     = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [CX_W-1:0] my_x,
  input  logic [CY_W-1:0] my_y,
  input  logic            in_valid  [5],
  input  flit_t           in_flit   [5],
  output logic            in_ready  [5],
  output logic            out_valid [5],
  output flit_t           out_flit  [5],
  input  logic            out_ready [5]
);
  logic  hv [5];     // head valid
  flit_t hf [5];     // head flit
  logic  hpop [5];
  logic [2:0] route [5];

  for (genvar i = 0; i < 5; i++) begin : g_in
    tangram_fifo #(.T(flit_t), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_valid (in_valid[i]), .in_data(in_flit[i]), .in_ready(in_ready[i]),
      .out_valid(hv[i]), .out_data(hf[i]), .out_ready(hpop[i])
    );
  end

  logic [CX_W-1:0] tx [5];
  always_comb begin
    for (int i = 0; i < 5; i++) begin
      if      (hf[i].dst_x == '0)               tx[i] = CX_W'(1);
      else if (int'(hf[i].dst_x) > MESH_X)      tx[i] = CX_W'(MESH_X);
      else                                      tx[i] = hf[i].dst_x;
      if      (tx[i] > my_x)       route[i] = P_EAST;
      else if (tx[i] < my_x)       route[i] = P_WEST;
      else if (hf[i].dst_y > my_y) route[i] = P_SOUTH;
      else if (hf[i].dst_y < my_y) route[i] = P_NORTH;
      else if (hf[i].dst_x > my_x) route[i] = P_EAST;
      else if (hf[i].dst_x < my_x) route[i] = P_WEST;
      else                         route[i] = P_LOCAL;
    end
  end

  logic [2:0] rr  [5];     // round-robin pointer per output
  logic [2:0] gnt [5];     // granted input per output
  logic       gv  [5];

  always_comb begin
    for (int o = 0; o < 5; o++) begin
      gv[o]  = 1'b0;
      gnt[o] = '0;
      for (int k = 0; k < 5; k++) begin
        logic [2:0] i;
        i = 3'((int'(rr[o]) + k) % 5);
        if (!gv[o] && hv[i] && route[i] == 3'(o)) begin
          gv[o]  = 1'b1;
          gnt[o] = 3'(i);
        end
      end
      out_valid[o] = gv[o];
      out_flit[o]  = hf[gnt[o]];
    end
  end

  // pops are kept apart from the grant logic so that out_ready never feeds
  // back into out_valid / out_flit
  always_comb begin
    for (int i = 0; i < 5; i++) hpop[i] = 1'b0;
    for (int o = 0; o < 5; o++)
      if (gv[o] && out_ready[o]) hpop[gnt[o]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < 5; o++) rr[o] <= '0;
    end else begin
      for (int o = 0; o < 5; o++)
        if (gv[o] && out_ready[o]) rr[o] <= (gnt[o] == 3'd4) ? 3'd0 : gnt[o] + 3'd1;
    end
  end
endmodule
