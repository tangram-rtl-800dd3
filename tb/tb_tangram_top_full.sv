// tb_tangram_top_full: the end-to-end scenario of tb_top_core on the
// accelerator at its default size, 16 x 16 engines, with no parameter
// overrides on tangram_top: a 16-engine buffer-sharing layer on row 0
// (N_i = 128 ifmaps in 16 subsets of one line, 128 ofmaps) feeding a second
// layer on an engine of row 1, in four forwarded groups of four lines.
// The watchdog ends the run with a failure if the scenario does not finish.
module tb_tangram_top_full;
  int checks, failures;
  bit fin;
  tb_top_core #(.MX(16), .MY(16), .FULL(1)) core (.checks, .failures, .fin);

  initial begin
    fork
      begin
        wait (fin);
      end
      begin
        repeat (200000) @(posedge core.clk);
        failures++;
        $display("watchdog expired");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
