// tangram_sram: the engine's shared SRAM buffer (32 kB = 2048 lines of 128 bits).
//
// One write port and one read port, both synchronous. A read issued with re at
// one edge shows its data on rdata after that edge and holds it until the next
// read, so a consumer that stalls can keep using rdata. A write and a read of
// the same line in one cycle return the old data. The capacity follows the
// evaluated engine; the line width and the two-port organisation are this
// design's choice (the controller needs to read for the PE array while lines
// arrive from the NoC).
module tangram_sram
  import tangram_pkg::*;
#(
  parameter int LINES = BUF_LINES,
  parameter int WIDTH = LINE_W
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(LINES)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(LINES)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [LINES];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
