// l2_cache: the shared unified second-level cache, modelled as an ideal
// cache that always hits.
//
// An always-hit cache behaves as a memory that holds the whole address
// space; here it is a line-wide array of L2_LINES lines indexed by the low
// bits of the line address (higher bits alias). Reads are combinational; the
// access latency is not in this block but in the bus, whose Ovh, Arb, Ctrl
// and Data stages add up to the 16-cycle L2 latency. A write updates the
// words selected by wmask at the clock edge.
//
// Interface: raddr/rdata for the line of the transaction on the data bus,
// raddr2/rdata2 for instruction-cache fills;
// we/waddr/wmask/wdata for write-backs. Contents start at zero.
//
// Following the document: ideal, always hit, shared by all PUs, reached
// through the data-cache bus. Own choices: the finite size (256 kB by
// default), zero initial contents and word write masks.
module l2_cache
  import smt_pkg::*;
#(
  parameter int L2_LINES = 4096
) (
  input  logic   clk,
  input  laddr_t raddr,
  output line_t  rdata,
  input  laddr_t raddr2,   // instruction-fill read port
  output line_t  rdata2,
  input  logic   we,
  input  laddr_t waddr,
  input  wmask_t wmask,
  input  line_t  wdata
);

  localparam int IW = $clog2(L2_LINES);

  line_t mem [L2_LINES];

  initial
    for (int i = 0; i < L2_LINES; i++) mem[i] = '0;

  assign rdata  = mem[raddr[IW-1:0]];
  assign rdata2 = mem[raddr2[IW-1:0]];

  always_ff @(posedge clk)
    if (we)
      for (int w = 0; w < WPL; w++)
        if (wmask[w]) mem[waddr[IW-1:0]][w*WORD_W +: WORD_W] <= wdata[w*WORD_W +: WORD_W];

endmodule
