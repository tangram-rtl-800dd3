// tb_tangram_top: end-to-end test of the accelerator on an 8 x 4 mesh (the
// scenario is described in tb_top_core): an eight-engine buffer-sharing layer
// feeding a second layer on another engine, with memory channel models.
module tb_tangram_top;
  int checks, failures;
  bit fin;
  tb_top_core #(.MX(8), .MY(4), .FULL(0)) core (.checks, .failures, .fin);

  initial begin
    fork
      begin
        wait (fin);
      end
      begin
        repeat (200000) @(posedge core.clk);
        failures++;
        $display("v0=%b r0=%b f0=%0d/%0d,%0d ; watchdog expired: done=%b busy=%b misroute=%b inq0=%0d inq1=%0d skew=%0d rot=%0d wait=%0d",
                 core.mem_in_valid[0], core.mem_in_ready[0], core.mem_in_flit[0].dst_x, core.mem_in_flit[0].dst_y, core.mem_in_flit[0].ftype, core.done, core.busy, core.misroute, core.inq[0].size(), core.inq[1].size(), core.n_skew, core.n_rot, core.n_wait);
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
