// tangram_pe: one processing element of the engine's PE array.
//
// The PE holds a small register file of 16-bit weights (64 B = 32 words by
// default) and the multiplier of the multiply-accumulate ALU. It multiplies
// the broadcast ifmap value `act` by RF[rf_raddr]; the product (prod, sign
// extended to the accumulator width, combinational) is summed with the other
// PEs of its row and accumulated by the array.
// The RF is written through a separate port (rf_we/rf_waddr/rf_wdata), one
// word per cycle, visible on the next cycle.
// The 64 B register file and the 16-bit MAC follow the evaluated engine; how
// the PE is mapped (a weight-holding dot-product PE rather than the
// row-stationary mapping the engine borrows from earlier work) is this
// design's own simplification.
module tangram_pe
  import tangram_pkg::*;
#(
  parameter int RF_DEPTH = 32
) (
  input  logic                        clk,
  input  logic                        rf_we,
  input  logic [$clog2(RF_DEPTH)-1:0] rf_waddr,
  input  data_t                       rf_wdata,
  input  logic [$clog2(RF_DEPTH)-1:0] rf_raddr,
  input  data_t                       act,
  output logic signed [ACC_W-1:0]     prod
);
  data_t rf [RF_DEPTH];

  always_ff @(posedge clk) begin
    if (rf_we) rf[rf_waddr] <= rf_wdata;
  end

  logic signed [2*DATA_W-1:0] p;
  always_comb begin
    p    = act * rf[rf_raddr];
    prod = ACC_W'(p);
  end
endmodule
