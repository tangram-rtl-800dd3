// tb_tangram_pe: self-checking test of one PE. Fills the 32-word register
// file with random weights, then checks prod = act * RF[addr] for random
// activations and addresses against a model register file.
module tb_tangram_pe;
  import tangram_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rf_we; logic [4:0] rf_waddr, rf_raddr; data_t rf_wdata, act;
  logic signed [ACC_W-1:0] prod;
  int checks = 0, failures = 0;
  data_t model [32];

  tangram_pe #(.RF_DEPTH(32)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rf_we = 0; rf_waddr = 0; rf_raddr = 0; rf_wdata = 0; act = 0;
    for (int k = 0; k < 32; k++) begin
      @(negedge clk);
      rf_we = 1; rf_waddr = 5'(k); rf_wdata = data_t'($urandom); model[k] = rf_wdata;
      if (k == 3) begin rf_wdata = 16'sh8000; model[k] = rf_wdata; end
      if (k == 4) begin rf_wdata = 16'sh7fff; model[k] = rf_wdata; end
    end
    @(negedge clk); rf_we = 0;
    for (int n = 0; n < 400; n++) begin
      rf_raddr = 5'($urandom_range(0, 31));
      act = data_t'($urandom);
      if (n == 0) begin rf_raddr = 3; act = 16'sh8000; end
      if (n == 1) begin rf_raddr = 4; act = 16'sh8000; end
      #1;
      checks++;
      if (prod !== ACC_W'(32'(act) * 32'(model[rf_raddr]))) begin
        failures++;
        $display("mismatch act=%0d w=%0d prod=%0d", act, model[rf_raddr], prod);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
