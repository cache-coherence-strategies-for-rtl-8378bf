// addr_arbiter: address-bus arbitration for the speculative CMP bus.
//
// Among the caches requesting the address bus this cycle, the one whose
// thread is least speculative (lowest rank; rank 0 is the non-speculative
// thread) wins. Ranks of running threads are all different, so there is one
// winner; equal ranks fall back to the lower PU number.
//
// Interface: req[i] and rank[i] per PU, en gates the whole arbitration
// (the bus cannot accept a transaction). gnt is one-hot, gnt_idx its index,
// gnt_valid says whether anything was granted. Purely combinational: the
// bus spends its one-cycle Arb stage on this decision.
//
// Following the document: requests of a less speculative thread have
// priority over those of a more speculative thread.
// Own choice: the tie break by PU number.
module addr_arbiter
  import smt_pkg::*;
#(
  parameter int N = N_PU
) (
  input  logic                       en,
  input  logic [N-1:0]               req,
  input  logic [N-1:0][RANK_W-1:0]   rank,
  output logic [N-1:0]               gnt,
  output logic [$clog2(N)-1:0]       gnt_idx,
  output logic                       gnt_valid
);

  always_comb begin
    logic [RANK_W-1:0] best;
    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    best      = '1;
    for (int i = 0; i < N; i++) begin
      if (en && req[i] && (!gnt_valid || rank[i] < best)) begin
        gnt_valid = 1'b1;
        gnt_idx   = i[$clog2(N)-1:0];
        best      = rank[i];
      end
    end
    if (gnt_valid) gnt[gnt_idx] = 1'b1;
  end

endmodule
