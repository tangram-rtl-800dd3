// tb_tangram_router: self-checking test of the router at the east edge of a
// 16-column mesh, (16,5), where flits for the east memory column (x = 17)
// must first travel in y. Random
// flits with random destinations enter all five inputs while the outputs
// apply random back-pressure. Every flit carries a unique tag; the test
// checks that each one leaves exactly once, on the port that x-then-y
// routing (towards column clamp(dst_x,1,16), then y, then the edge)
// selects, with its contents intact, and that flits from one input to one
// output keep their order.
module tb_tangram_router;
  import tangram_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid [5], in_ready [5], out_valid [5], out_ready [5];
  flit_t in_flit [5], out_flit [5];
  logic [CX_W-1:0] my_x = 16;
  logic [CY_W-1:0] my_y = 5;
  int checks = 0, failures = 0;
  int exp_port [int];
  int last_seq [5][5];
  int sent = 0, recvd = 0, stalls = 0;
  logic in_ready_q [5];

  tangram_router #(.MESH_X(16)) dut (.*);

  function automatic int xy_port(flit_t f);
    int tx;
    tx = (f.dst_x == 0) ? 1 : (f.dst_x > 16) ? 16 : int'(f.dst_x);
    if (tx > my_x) return P_EAST;
    if (tx < my_x) return P_WEST;
    if (f.dst_y > my_y) return P_SOUTH;
    if (f.dst_y < my_y) return P_NORTH;
    if (f.dst_x > my_x) return P_EAST;
    return P_LOCAL;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drivers
  int seq [5];
  initial begin
    for (int i = 0; i < 5; i++) begin in_valid[i] = 0; in_flit[i] = '0; seq[i] = 0; out_ready[i] = 0; end
    for (int i = 0; i < 5; i++) for (int o = 0; o < 5; o++) last_seq[i][o] = -1;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int i = 0; i < 5; i++) begin
        out_ready[i] = ($urandom_range(0, 3) != 0);
        if (!in_valid[i] || in_ready_q[i]) begin
          if (n < 2900 && $urandom_range(0, 2) != 0) begin
            in_valid[i] = 1;
            in_flit[i] = '0;
            in_flit[i].ftype = ftype_e'($urandom_range(0, 3));
            in_flit[i].dst_x = CX_W'($urandom_range(14, 17));
            in_flit[i].dst_y = CY_W'($urandom_range(3, 7));
            in_flit[i].addr  = ADDR_W'($urandom);
            in_flit[i].data  = {32'(i), 32'(seq[i]), 32'($urandom), 32'hC0FFEE00 + 32'(i)};
            seq[i]++;
          end else begin
            in_valid[i] = 0;
          end
        end
      end
    end
    for (int i = 0; i < 5; i++) in_valid[i] = 0;
    for (int i = 0; i < 5; i++) out_ready[i] = 1;
    repeat (50) @(negedge clk);
    checks++;
    if (exp_port.num() != 0 || sent == 0) begin
      failures++;
      $display("%0d flits never delivered (sent %0d)", exp_port.num(), sent);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("back-pressure never seen"); end
    $display("sent %0d received %0d input stalls %0d", sent, recvd, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // handshake sampling
  always @(posedge clk) begin
    for (int i = 0; i < 5; i++) begin
      in_ready_q[i] <= in_ready[i];
      if (rst_n && in_valid[i] && !in_ready[i]) stalls++;
      if (rst_n && in_valid[i] && in_ready[i]) begin
        exp_port[int'(in_flit[i].data[127:96]) * 100000 + int'(in_flit[i].data[95:64])] = xy_port(in_flit[i]);
        sent++;
      end
      if (rst_n && out_valid[i] && out_ready[i]) begin
        int key, src, sq;
        src = int'(out_flit[i].data[127:96]);
        sq  = int'(out_flit[i].data[95:64]);
        key = src * 100000 + sq;
        checks++;
        recvd++;
        if (!exp_port.exists(key)) begin
          failures++; $display("unexpected or duplicate flit %0d/%0d", src, sq);
        end else begin
          if (exp_port[key] != i || out_flit[i].data[31:0] != 32'hC0FFEE00 + 32'(src)) begin
            failures++; $display("flit %0d/%0d on port %0d, expected %0d", src, sq, i, exp_port[key]);
          end
          exp_port.delete(key);
        end
        checks++;
        if (src < 5 && sq <= last_seq[src][i]) begin
          failures++; $display("order violated %0d -> %0d", src, i);
        end
        if (src < 5) last_seq[src][i] = sq;
      end
    end
  end
endmodule
