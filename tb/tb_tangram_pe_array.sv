// tb_tangram_pe_array: self-checking test of the 8 x 8 PE array. Loads random
// weights into every PE register file through the line-wide load port, then
// streams random ifmap lines with random RF addresses and checks each row
// accumulator against acc[r] = sum over cycles of sum_c W[r][c][addr]*x[c],
// including clears. The accumulator must change on the same edge as mac_en.
module tb_tangram_pe_array;
  import tangram_pkg::*;
  localparam int ROWS = 8, COLS = 8, RFD = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic ld_en, mac_en, acc_clear;
  logic [2:0] ld_row; logic [4:0] ld_addr, rf_raddr;
  logic [COLS*DATA_W-1:0] ld_data, act;
  logic signed [ACC_W-1:0] acc [ROWS];
  int checks = 0, failures = 0;
  data_t w [ROWS][COLS][RFD];
  longint macc [ROWS];

  tangram_pe_array #(.ROWS(ROWS), .COLS(COLS), .RF_DEPTH(RFD)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_en = 0; mac_en = 0; acc_clear = 0; ld_row = 0; ld_addr = 0; rf_raddr = 0;
    ld_data = '0; act = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < ROWS; r++) macc[r] = 0;
    for (int a = 0; a < RFD; a++)
      for (int r = 0; r < ROWS; r++) begin
        @(negedge clk);
        ld_en = 1; ld_row = 3'(r); ld_addr = 5'(a);
        for (int c = 0; c < COLS; c++) begin
          w[r][c][a] = data_t'($urandom_range(0, 65535));
          ld_data[c*DATA_W +: DATA_W] = w[r][c][a];
        end
      end
    @(negedge clk); ld_en = 0;
    for (int n = 0; n < 300; n++) begin
      mac_en = ($urandom_range(0, 3) != 0);
      acc_clear = ($urandom_range(0, 15) == 0);
      rf_raddr = 5'($urandom_range(0, RFD-1));
      for (int c = 0; c < COLS; c++) act[c*DATA_W +: DATA_W] = 16'($urandom);
      for (int r = 0; r < ROWS; r++) begin
        longint s; s = 0;
        for (int c = 0; c < COLS; c++)
          s += longint'(data_t'(act[c*DATA_W +: DATA_W])) * longint'(w[r][c][rf_raddr]);
        if (acc_clear) macc[r] = 0;
        if (mac_en) macc[r] = macc[r] + s;
      end
      @(posedge clk); #1;
      for (int r = 0; r < ROWS; r++) begin
        checks++;
        if (acc[r] !== ACC_W'(macc[r])) begin
          failures++;
          if (failures < 5) $display("row %0d acc=%0d exp=%0d", r, acc[r], ACC_W'(macc[r]));
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
