// tb_tangram_bsd_agu: self-checking test of the BSD sequencer. For several
// (p, r, ngroups, x) settings it steps through the whole loop nest and checks
// at every step T that
//   i0 = floor(T/(r p)) * p + (x + T mod p) mod p,
// computed here directly with division, and that the fetch / first / last /
// send flags and done match the loop nest. It also checks that every engine of
// a group visits every subset exactly r times per group (each subset passes
// through all engines).
module tb_tangram_bsd_agu;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cfg_load, step;
  logic [7:0] cfg_p, cfg_r, cfg_ngroups, cfg_x;
  logic [15:0] i0;
  logic [7:0] sub, s_idx, o_idx, g_idx;
  logic fetch, first, last, send, done;
  int checks = 0, failures = 0;

  tangram_bsd_agu #(.W(8)) dut (.*);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cfgs [6][3] = '{'{3,1,1}, '{3,2,2}, '{4,3,2}, '{1,2,3}, '{5,1,3}, '{16,2,1}};
    cfg_load = 0; step = 0; cfg_p = 1; cfg_r = 1; cfg_ngroups = 1; cfg_x = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    foreach (cfgs[c]) begin
      int p, r, ng;
      p = cfgs[c][0]; r = cfgs[c][1]; ng = cfgs[c][2];
      for (int x = 0; x < p; x++) begin
        int seen [256];
        foreach (seen[k]) seen[k] = 0;
        @(negedge clk);
        cfg_load = 1; cfg_p = 8'(p); cfg_r = 8'(r); cfg_ngroups = 8'(ng); cfg_x = 8'(x);
        @(negedge clk); cfg_load = 0;
        for (int T = 0; T < ng * r * p; T++) begin
          int e_i0;
          e_i0 = (T / (r * p)) * p + (x + T % p) % p;
          chk(!done, "done too early");
          chk(int'(i0) == e_i0, $sformatf("p=%0d r=%0d x=%0d T=%0d i0=%0d exp=%0d", p, r, x, T, i0, e_i0));
          chk(fetch == ((T % (r * p)) == 0), "fetch flag");
          chk(first == ((T % p) == 0), "first flag");
          chk(last == ((T % p) == p - 1), "last flag");
          chk(send == ((T % (r * p)) != r * p - 1), "send flag");
          seen[e_i0]++;
          // random idle cycles between steps
          step = 1;
          @(negedge clk);
          step = 0;
          repeat ($urandom_range(0, 2)) @(negedge clk);
        end
        chk(done, "done at end");
        for (int k = 0; k < ng * p; k++) chk(seen[k] == r, "subset coverage");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
