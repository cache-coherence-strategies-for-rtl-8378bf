// l1_icache: private L1 instruction cache of one processing unit, with
// read-broadcast.
//
// 16 kB, 2-way set associative, 64-byte lines, read only. A fetch of one
// 16-byte block (four 32-bit instructions, the fetch width) that hits is
// answered in the next cycle (1-cycle hit latency). A miss raises
// miss_valid/miss_laddr until the line comes back on the shared instruction
// fill broadcast (fill_*), then the fetch is answered in the cycle after the
// fill. Every fill is seen by every instruction cache: with read-broadcast
// (RB=1) a cache that does not hold the line installs it too, so that the
// following threads, which usually run nearby code, find it. A line is
// installed in an empty way if there is one, otherwise in the LRU way.
//
// Following the document: geometry, 1-cycle hit, read-broadcast on the
// instruction caches.
// Own choices: the 16-byte fetch block, the miss/fill handshake, LRU
// replacement, no flush of a pending fetch (the PU ignores a stale answer).
module l1_icache
  import smt_pkg::*;
#(
  parameter logic [PU_W-1:0] PU_ID = '0,
  parameter int SIZE_BYTES = 16384,
  parameter bit RB         = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fetch_valid,
  output logic              fetch_ready,
  input  logic [ADDR_W-1:0] fetch_addr,
  output logic              resp_valid,
  output logic [127:0]      resp_data,
  output logic              miss_valid,
  output laddr_t            miss_laddr,
  input  logic              fill_valid,
  input  logic [PU_W-1:0]   fill_src,
  input  laddr_t            fill_laddr,
  input  line_t             fill_line,
  output logic              ev_snarf
);

  localparam int SETS  = SIZE_BYTES / (LINE_BYTES * 2);
  localparam int SET_W = $clog2(SETS);
  localparam int TAG_W = LADDR_W - SET_W;

  logic [TAG_W-1:0] tag   [SETS][2];
  logic             vld   [SETS][2];
  logic             lru   [SETS];
  line_t            dmem  [SETS*2];

  logic             pend;
  logic [ADDR_W-1:0] p_addr;

  logic [ADDR_W-1:0] a;
  assign a = pend ? p_addr : fetch_addr;

  logic [SET_W-1:0] set;
  logic [TAG_W-1:0] tg;
  logic [1:0]       blk;
  assign set = a[OFS_W +: SET_W];
  assign tg  = a[ADDR_W-1 -: TAG_W];
  assign blk = a[OFS_W-1:4];

  logic h0, h1;
  assign h0 = vld[set][0] && tag[set][0] == tg;
  assign h1 = vld[set][1] && tag[set][1] == tg;

  // fill side
  logic [SET_W-1:0] f_set;
  logic [TAG_W-1:0] f_tag;
  logic             f_have, f_way, f_mine;
  assign f_set  = fill_laddr[SET_W-1:0];
  assign f_tag  = fill_laddr[LADDR_W-1:SET_W];
  assign f_have = (vld[f_set][0] && tag[f_set][0] == f_tag) ||
                  (vld[f_set][1] && tag[f_set][1] == f_tag);
  assign f_way  = !vld[f_set][0] ? 1'b0 : !vld[f_set][1] ? 1'b1 : lru[f_set];
  assign f_mine = pend && fill_src == PU_ID && fill_laddr == p_addr[ADDR_W-1:OFS_W];

  assign fetch_ready = !pend;
  assign miss_valid  = pend;
  assign miss_laddr  = p_addr[ADDR_W-1:OFS_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend       <= 1'b0;
      p_addr     <= '0;
      resp_valid <= 1'b0;
      resp_data  <= '0;
      ev_snarf   <= 1'b0;
      for (int s = 0; s < SETS; s++) begin
        vld[s][0] <= 1'b0;
        vld[s][1] <= 1'b0;
        lru[s]    <= 1'b0;
      end
    end else begin
      resp_valid <= 1'b0;
      ev_snarf   <= 1'b0;
      if (fill_valid && !f_have && (f_mine || RB)) begin
        tag[f_set][f_way]         <= f_tag;
        vld[f_set][f_way]         <= 1'b1;
        dmem[{f_set, f_way}]      <= fill_line;
        lru[f_set]                <= !f_way;
        ev_snarf                  <= !f_mine;
      end
      if (pend) begin
        if (f_mine) begin
          pend       <= 1'b0;
          resp_valid <= 1'b1;
          resp_data  <= fill_line[blk*128 +: 128];
        end
      end else if (fetch_valid) begin
        if (h0 || h1) begin
          resp_valid <= 1'b1;
          resp_data  <= dmem[{set, h1}][blk*128 +: 128];
          if (!(fill_valid && f_set == set)) lru[set] <= !h1;
        end else begin
          pend   <= 1'b1;
          p_addr <= fetch_addr;
        end
      end
    end
  end

endmodule
