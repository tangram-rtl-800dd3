// tb_tangram_memtrack: self-checking test of the MEMTRACK state. Runs random
// configure / write / read-pass traffic against a reference model of the
// rule "readable after need_upd updates, writable again after need_rd read
// passes" and compares writable/readable and the fill generation of every
// region each cycle. Writes
// and read passes are only issued where the model allows them, as the
// engine does.
module tb_tangram_memtrack;
  import tangram_pkg::*;
  localparam int R = NUM_TRK;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cfg_en, wr_en, rd_done;
  logic [TRK_AW-1:0] cfg_region, wr_region, rd_region;
  logic [CNT_W-1:0] cfg_need_upd, cfg_need_rd;
  logic [R-1:0] writable, readable;
  logic [CNT_W-1:0] gen [R];
  int checks = 0, failures = 0;
  int need_u [R], need_r [R], upd [R], rdc [R], gn [R];
  int filled = 0, emptied = 0;

  tangram_memtrack dut (.*);

  function automatic bit m_wr(int i); return need_u[i] == 0 || upd[i] < need_u[i]; endfunction
  function automatic bit m_rd(int i); return need_u[i] == 0 || upd[i] == need_u[i]; endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_en = 0; wr_en = 0; rd_done = 0; cfg_region = 0; wr_region = 0; rd_region = 0;
    cfg_need_upd = 0; cfg_need_rd = 0;
    for (int i = 0; i < R; i++) begin need_u[i] = 0; need_r[i] = 0; upd[i] = 0; rdc[i] = 0; gn[i] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      // compare
      for (int i = 0; i < R; i++) begin
        checks++;
        if (writable[i] !== m_wr(i) || readable[i] !== m_rd(i) || int'(gen[i]) != gn[i] % 256) begin
          failures++;
          if (failures < 5) $display("cycle %0d region %0d wr=%b/%b rd=%b/%b", n, i,
                                     writable[i], m_wr(i), readable[i], m_rd(i));
        end
      end
      cfg_en = ($urandom_range(0, 30) == 0) || n < 8;
      cfg_region = TRK_AW'($urandom_range(0, R-1));
      cfg_need_upd = CNT_W'($urandom_range(0, 6));
      cfg_need_rd = CNT_W'($urandom_range(1, 3));
      wr_region = TRK_AW'($urandom_range(0, R-1));
      rd_region = TRK_AW'($urandom_range(0, R-1));
      wr_en = ($urandom_range(0, 1) == 1) && m_wr(wr_region);
      rd_done = ($urandom_range(0, 2) == 0) && m_rd(rd_region);
      // model update (configuration wins, then read pass, then write)
      for (int i = 0; i < R; i++) begin
        if (cfg_en && cfg_region == i) begin
          need_u[i] = cfg_need_upd; need_r[i] = cfg_need_rd; upd[i] = 0; rdc[i] = 0; gn[i] = 0;
        end else if (need_u[i] != 0) begin
          if (rd_done && rd_region == i) begin
            if (rdc[i] + 1 >= need_r[i]) begin upd[i] = 0; rdc[i] = 0; gn[i]++; emptied++; end
            else rdc[i]++;
          end else if (wr_en && wr_region == i) begin
            upd[i]++;
            if (upd[i] == need_u[i]) filled++;
          end
        end
      end
    end
    checks++;
    if (filled == 0 || emptied == 0) begin
      failures++;
      $display("traffic never filled/emptied a region");
    end
    $display("regions filled %0d times, emptied %0d times", filled, emptied);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
