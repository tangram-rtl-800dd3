// tangram_memtrack: MEMTRACK synchronisation state for one engine buffer.
//
// The buffer is divided into NUM_TRK regions of equal size. A region that the
// program configures with need_upd > 0 is tracked: it becomes readable only
// after it has received need_upd line updates, and once readable it accepts
// no more writes until need_rd read passes have been reported; the last read
// pass empties it (both counters return to zero) so it can be refilled. An
// unconfigured region (need_upd = 0) is always readable and writable. This is
// the rule "enough updates before it can be read, enough reads before it can
// be overwritten"; counting per region rather than per line, and counting
// read passes reported by the controller, are this design's choices.
// Interface: cfg_* programs a region and clears its counters; wr_en counts one
// line written into wr_region; rd_done counts one read pass over rd_region.
// writable/readable are combinational views of the current state; updates
// take effect on the next clock edge. gen counts how often a tracked region
// has been emptied since it was configured (its fill generation, modulo
// 2^CW); writers that run ahead tag their lines with the generation they
// belong to, and the engine holds such a line back until gen matches.
module tangram_memtrack
  import tangram_pkg::*;
#(
  parameter int REGIONS = NUM_TRK,
  parameter int CW      = CNT_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       cfg_en,
  input  logic [$clog2(REGIONS)-1:0] cfg_region,
  input  logic [CW-1:0]              cfg_need_upd,
  input  logic [CW-1:0]              cfg_need_rd,
  input  logic                       wr_en,
  input  logic [$clog2(REGIONS)-1:0] wr_region,
  input  logic                       rd_done,
  input  logic [$clog2(REGIONS)-1:0] rd_region,
  output logic [REGIONS-1:0]         writable,
  output logic [REGIONS-1:0]         readable,
  output logic [CW-1:0]              gen [REGIONS]
);
  typedef struct packed {
    logic [CW-1:0] need_upd;
    logic [CW-1:0] need_rd;
    logic [CW-1:0] upd;
    logic [CW-1:0] rd;
    logic [CW-1:0] gen;
  } trk_t;

  trk_t st [REGIONS];

  always_comb begin
    for (int i = 0; i < REGIONS; i++) begin
      writable[i] = (st[i].need_upd == '0) || (st[i].upd < st[i].need_upd);
      readable[i] = (st[i].need_upd == '0) || (st[i].upd == st[i].need_upd);
      gen[i]      = st[i].gen;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < REGIONS; i++) st[i] <= '0;
    end else begin
      for (int i = 0; i < REGIONS; i++) begin
        if (cfg_en && int'(cfg_region) == i) begin
          st[i] <= '{need_upd: cfg_need_upd, need_rd: cfg_need_rd, upd: '0, rd: '0, gen: '0};
        end else if (st[i].need_upd != '0) begin
          if (rd_done && int'(rd_region) == i && readable[i]) begin
            if (st[i].rd + 1'b1 >= st[i].need_rd) begin
              st[i].upd <= '0;
              st[i].rd  <= '0;
              st[i].gen <= st[i].gen + 1'b1;
            end else begin
              st[i].rd <= st[i].rd + 1'b1;
            end
          end else if (wr_en && int'(wr_region) == i && writable[i]) begin
            st[i].upd <= st[i].upd + 1'b1;
          end
        end
      end
    end
  end

  // A write may only land in a region that can take it.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> writable[wr_region]);
  // Reads are only reported for data that was complete.
  a_read_ready: assert property (@(posedge clk) disable iff (!rst_n)
    rd_done |-> readable[rd_region]);
endmodule
