// tb_tangram_sram: self-checking test of the engine buffer. Random writes and
// reads against a model memory; checks one-cycle read latency, that read data
// hold while re is low, and that a same-cycle write/read returns old data.
module tb_tangram_sram;
  import tangram_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we, re; logic [LINE_AW-1:0] waddr, raddr; line_t wdata, rdata;
  int checks = 0, failures = 0;
  line_t model [BUF_LINES];
  line_t expect_q;

  tangram_sram dut (.*);

  function automatic line_t rnd_line();
    line_t l;
    for (int k = 0; k < LINE_W/32; k++) l[k*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = '0;
    // initialise every line so that every read has a known value
    for (int a = 0; a < BUF_LINES; a++) begin
      @(negedge clk); we = 1; waddr = LINE_AW'(a); wdata = rnd_line(); model[a] = wdata;
    end
    @(negedge clk); we = 0; re = 1; raddr = 0; expect_q = model[0];
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); re = $urandom_range(0, 1);
      waddr = LINE_AW'($urandom_range(0, BUF_LINES-1));
      raddr = ($urandom_range(0, 3) == 0) ? waddr : LINE_AW'($urandom_range(0, BUF_LINES-1));
      wdata = rnd_line();
      if (re) expect_q = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 5) $display("read mismatch at %0d", raddr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
