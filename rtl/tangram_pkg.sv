// tangram_pkg: types and constants shared by the tiled accelerator.
//
// Data are 16-bit fixed point, as in the evaluated system. A buffer line holds
// LANES = 8 data elements (128 bits): one line is what the buffer delivers to
// the 8-column PE array in a cycle and the unit of NoC transfers and of
// MEMTRACK bookkeeping. Line width, coordinate widths, address widths, the
// instruction format and the flit format are choices of this design.
package tangram_pkg;

  localparam int DATA_W   = 16;             // 16-bit fixed point
  localparam int ACC_W    = 32;             // accumulator width (own choice)
  localparam int LANES    = 8;              // elements per buffer line = PE columns
  localparam int LINE_W   = DATA_W * LANES; // 128 bits
  localparam int BUF_LINES = 2048;          // 32 kB / 16 B
  localparam int LINE_AW  = $clog2(BUF_LINES);
  localparam int ADDR_W   = 28;             // line address in a flit (memory or buffer)
  localparam int CX_W     = 5;              // x coordinate: 0 = west memory column, 1..16 engines, 17 = east
  localparam int CY_W     = 4;              // y coordinate: rows 0..15
  localparam int IMEM_DEPTH = 64;           // instructions per engine program
  localparam int IMEM_AW  = $clog2(IMEM_DEPTH);
  localparam int NUM_TRK  = 16;             // MEMTRACK regions per buffer
  localparam int TRK_AW   = $clog2(NUM_TRK);
  localparam int CNT_W    = 8;              // MEMTRACK counter width

  typedef logic [LINE_W-1:0] line_t;
  typedef logic signed [DATA_W-1:0] data_t;

  // Flit kinds carried by the NoC. Every packet is one flit.
  typedef enum logic [2:0] {
    F_WR_LINE  = 3'd0,   // write data into line `addr` of the destination
    F_RD_REQ   = 3'd1,   // read line `addr`, answer with F_WR_LINE to (src, raddr)
    F_WR_INSTR = 3'd2,   // write data[INSTR_W-1:0] into instruction slot `addr`
    F_START    = 3'd3,   // start the destination engine's program at slot 0
    F_CREDIT   = 3'd4    // rotation credit: one slot of the sender is free
  } ftype_e;

  typedef struct packed {
    ftype_e            ftype;
    logic [CX_W-1:0]   dst_x;
    logic [CY_W-1:0]   dst_y;
    logic [CX_W-1:0]   src_x;
    logic [CY_W-1:0]   src_y;
    logic [ADDR_W-1:0] addr;
    logic [ADDR_W-1:0] raddr;
    line_t             data;
  } flit_t;

  localparam int FLIT_W = $bits(flit_t);

  // Router port numbering.
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0, P_NORTH = 3'd1, P_EAST = 3'd2, P_SOUTH = 3'd3, P_WEST = 3'd4
  } port_e;

  // Buffer-controller instructions (the static schedule a compiler emits).
  typedef enum logic [3:0] {
    OP_END    = 4'd0,  // stop, raise done
    OP_CFGTRK = 4'd1,  // MEMTRACK region a[TRK]: need_upd = n, need_rd = imm
    OP_CFGBSD = 4'd2,  // BSD: slots a/b, S = n, p = imm, x = dx, r / ngroups in maddr
    OP_FETCH  = 4'd3,  // n RD_REQ to memory (dx,dy) from maddr into local line a
    OP_LDW    = 4'd4,  // load n weight words per PE from lines a.. into RF[b..]
    OP_MAC    = 4'd5,  // MAC n ifmap lines from a with RF[b..]
    OP_STORE  = 4'd6,  // accumulators >>> imm (ReLU if flag) into local line a
    OP_SEND   = 4'd7,  // push n lines from a to (dx,dy) line maddr
    OP_ROT    = 4'd8   // one BSD step: MAC current slot, rotate it to (dx,dy)
  } op_e;

  // Instruction flags.
  localparam int FL_CLEAR = 0;  // MAC: clear accumulators first
  localparam int FL_RELU  = 1;  // STORE: apply ReLU
  localparam int FL_SKEW  = 2;  // FETCH: skewed, maddr += i0*S, target = current BSD slot

  typedef struct packed {
    op_e                op;
    logic [3:0]         flags;
    logic [LINE_AW-1:0] a;
    logic [LINE_AW-1:0] b;
    logic [7:0]         n;
    logic [CX_W-1:0]    dx;
    logic [CY_W-1:0]    dy;
    logic [ADDR_W-1:0]  maddr;
    logic [7:0]         imm;
  } instr_t;

  localparam int INSTR_W = $bits(instr_t);

endpackage
