// tangram_pe_array: the ROWS x COLS PE array of one engine (8 x 8 by default).
//
// Each buffer line (COLS elements) read by the buffer controller is broadcast
// on the array bus: element c goes to every PE of column c. PE (r,c) holds the
// weights W[r][.] for ifmap lane c; the adder across row r forms
// sum_c W[r][c] * x[c], which is added to the row accumulator acc[r] on the
// same clock edge (mac_en). acc_clear zeroes the accumulators instead of
// adding their old value. Weights are loaded one line per cycle: ld_en writes
// element c of ld_data into RF[ld_addr] of PE (ld_row, c).
// Timing: acc is updated at the edge that samples mac_en; a weight loaded at
// one edge can be used from the next cycle. The array computes
// O[o] += sum_i W[o][i] * I[i] (Eq. 1 of the dataflow, fully connected form);
// a convolution is issued as such MACs by the buffer controller's program.
// Array size follows the evaluated engine; the dot-product mapping is this
// design's own choice.
module tangram_pe_array
  import tangram_pkg::*;
#(
  parameter int ROWS     = 8,
  parameter int COLS     = LANES,
  parameter int RF_DEPTH = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // weight load port
  input  logic                        ld_en,
  input  logic [$clog2(ROWS)-1:0]     ld_row,
  input  logic [$clog2(RF_DEPTH)-1:0] ld_addr,
  input  logic [COLS*DATA_W-1:0]      ld_data,
  // compute port
  input  logic                        mac_en,
  input  logic                        acc_clear,
  input  logic [$clog2(RF_DEPTH)-1:0] rf_raddr,
  input  logic [COLS*DATA_W-1:0]      act,
  output logic signed [ACC_W-1:0]     acc [ROWS]
);
  logic signed [ACC_W-1:0] prod [ROWS][COLS];
  logic signed [ACC_W-1:0] rowsum [ROWS];

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      rowsum[r] = '0;
      for (int c = 0; c < COLS; c++) rowsum[r] = rowsum[r] + prod[r][c];
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      tangram_pe #(.RF_DEPTH(RF_DEPTH)) u_pe (
        .clk      (clk),
        .rf_we    (ld_en && (ld_row == r)),
        .rf_waddr (ld_addr),
        .rf_wdata (ld_data[c*DATA_W +: DATA_W]),
        .rf_raddr (rf_raddr),
        .act      (act[c*DATA_W +: DATA_W]),
        .prod     (prod[r][c])
      );
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      acc[r] <= '0;
      else if (mac_en) acc[r] <= (acc_clear ? '0 : acc[r]) + rowsum[r];
      else if (acc_clear) acc[r] <= '0;
    end
  end
endmodule
