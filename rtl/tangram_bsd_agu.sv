// tangram_bsd_agu: computation-skew and data-rotation sequencer for the
// buffer sharing dataflow.
//
// p engines share N data split into subsets; each engine buffers one subset
// at a time. The engine with index x walks the loop nest
//   for g  in 0 .. ngroups-1      (new subsets fetched from memory)
//     for o in 0 .. r-1            (rotation rounds, one per ofmap subset)
//       for s in 0 .. p-1          (rotation steps)
//         i0 = g*p + (x + s) mod p
// which is step T = (g*r + o)*p + s of
//   i0 = floor(T/(r p)) * p + (x + T mod p) mod p.
// The outputs describe the current step: i0, its local part sub = (x+s) mod p,
// fetch (first step of a group: the subset must come from memory), first/last
// step of a round (clear / store accumulators), send (the subset must be
// rotated on to the neighbour, true on every step but the very last of a
// group) and done (the whole nest has been walked). step advances to the next
// step on the clock edge; cfg_load restarts the nest with new p, r, ngroups
// and x. The loop nest and index formula follow the dataflow; using counters
// rather than division is this design's implementation.
module tangram_bsd_agu #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_load,
  input  logic [W-1:0] cfg_p,        // engines sharing the data (>= 1)
  input  logic [W-1:0] cfg_r,        // rotation rounds (>= 1)
  input  logic [W-1:0] cfg_ngroups,  // ceil(t/p) (>= 1)
  input  logic [W-1:0] cfg_x,        // this engine's index, < p
  input  logic         step,
  output logic [2*W-1:0] i0,
  output logic [W-1:0] sub,
  output logic [W-1:0] s_idx,
  output logic [W-1:0] o_idx,
  output logic [W-1:0] g_idx,
  output logic         fetch,
  output logic         first,
  output logic         last,
  output logic         send,
  output logic         done
);
  logic [W-1:0] p, r, ng;
  logic [W-1:0] s, o, g;
  logic [W-1:0] sub_q;   // (x + s) mod p, kept incrementally
  logic         fin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p <= W'(1); r <= W'(1); ng <= W'(1);
      s <= '0; o <= '0; g <= '0; sub_q <= '0; fin <= 1'b1;
    end else if (cfg_load) begin
      p <= cfg_p; r <= cfg_r; ng <= cfg_ngroups;
      s <= '0; o <= '0; g <= '0; sub_q <= cfg_x; fin <= 1'b0;
    end else if (step && !fin) begin
      sub_q <= (sub_q == p - 1'b1) ? '0 : sub_q + 1'b1;
      if (s == p - 1'b1) begin
        s <= '0;
        if (o == r - 1'b1) begin
          o <= '0;
          if (g == ng - 1'b1) fin <= 1'b1;
          else g <= g + 1'b1;
        end else begin
          o <= o + 1'b1;
        end
      end else begin
        s <= s + 1'b1;
      end
    end
  end

  always_comb begin
    sub   = sub_q;
    s_idx = s;
    o_idx = o;
    g_idx = g;
    i0    = (2*W)'(g) * (2*W)'(p) + (2*W)'(sub_q);
    first = (s == '0);
    last  = (s == p - 1'b1);
    fetch = (s == '0) && (o == '0) && !fin;
    send  = !((o == r - 1'b1) && (s == p - 1'b1));
    done  = fin;
  end
endmodule
