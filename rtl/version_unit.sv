// version_unit: version identification for the transaction taking effect on
// the bus, the work the bus spends its Ctrl stage on.
//
// Several caches may hold different versions of one word: each speculative
// thread keeps its own stores. For a line read by thread q (BusRd/BusRdX) the
// right version of each word is the one of the nearest less speculative
// thread that holds it (a D mark does not matter: the more speculative
// writer, if it still exists, is nearer, and if it was squashed the
// holder's version is again the right one); failing that a committed copy (C, at most one);
// failing that the L2. The unit builds that line word by word and marks the
// words whose supplier holds them speculatively (U). For a store the stored
// word is replaced by the store data, marked speculative if the writer is.
//
// For a store to word w by thread q (BusRdX/BusUpd/BusUpg) it tells every
// other cache p whether q is more speculative (p then marks the word D), or
// whether the store is version matched for p: q less speculative than p and
// no thread between them holds its own version of w. Matched caches take the
// update (or invalidation) and check for a violation.
//
// With read-broadcast enabled it gives each more speculative cache the mask of
// words it may take from the line: words for which no thread from q up to
// (not including) p holds its own version, so the broadcast line is also
// p's version. The written word of a snooped BusRdX needs a version match.
//
// L2 writes: BusWb writes its masked words; a committed word (C) that another
// thread stores is written back from the cache that holds it.
//
// The requester is told the line is shared when another cache holds it or
// may snarf it, so that it never takes exclusive a line another cache gets.
//
// Interface: all combinational, valid while cpl.valid.
// Following the document: version matching, forwarding from the owner,
// read-broadcast on read misses (and write misses for upd-rwbr), and the
// write-back of committed data on a matched store.
// Own choices: the selection order of suppliers, the snarf masks limited to
// more speculative caches, and the committed-data write-back done directly
// into the L2 within the transaction.
module version_unit
  import smt_pkg::*;
#(
  parameter int        N    = N_PU,
  parameter protocol_e PROT = PROT_UPD_RWBR
) (
  input  bus_cpl_t                       cpl,
  input  logic       [N-1:0][RANK_W-1:0] rank,
  input  snoop_rsp_t [N-1:0]             rsp,
  input  line_t                          l2_line,
  output line_t                          fill_data,
  output wmask_t                         fill_spec,
  output logic                           shared,
  output snoop_ctl_t [N-1:0]             ctl,
  output logic                           l2_we,
  output wmask_t                         l2_mask,
  output line_t                          l2_wdata
);

  logic is_store;
  assign is_store = cpl.valid && (cpl.op == BUS_RDX || cpl.op == BUS_UPD || cpl.op == BUS_UPG);

  logic [RANK_W-1:0] rs;
  assign rs = rank[cpl.src];

  // -------- line supply for the requester --------
  // the line is shared if another cache holds it or may snarf it in this
  // same transaction (then the requester must not take it exclusive)
  logic shared_hit, shared_snarf;
  always_comb begin
    shared_hit   = 1'b0;
    shared_snarf = 1'b0;
    for (int p = 0; p < N; p++)
      if (p != int'(cpl.src)) begin
        if (rsp[p].hit) shared_hit = 1'b1;
        if (|ctl[p].snarf) shared_snarf = 1'b1;
      end
  end
  assign shared = shared_hit || shared_snarf;

  always_comb begin

    fill_data = l2_line;
    fill_spec = '0;
    for (int w = 0; w < WPL; w++) begin
      logic found;
      logic [RANK_W-1:0] best;
      found = 1'b0;
      best  = '0;
      // nearest less speculative holder
      for (int p = 0; p < N; p++)
        if (p != int'(cpl.src) && rsp[p].hit && rsp[p].valid[w] &&
            rank[p] < rs && (!found || rank[p] > best)) begin
          found = 1'b1;
          best  = rank[p];
          fill_data[w*WORD_W +: WORD_W] = rsp[p].data[w*WORD_W +: WORD_W];
          fill_spec[w] = rsp[p].umask[w];
        end
      // committed copy
      if (!found)
        for (int p = 0; p < N; p++)
          if (p != int'(cpl.src) && rsp[p].hit && rsp[p].cmask[w]) begin
            found = 1'b1;
            fill_data[w*WORD_W +: WORD_W] = rsp[p].data[w*WORD_W +: WORD_W];
            fill_spec[w] = 1'b0;
          end
    end
    if (is_store) begin
      fill_data[cpl.widx*WORD_W +: WORD_W] = cpl.wdata;
      fill_spec[cpl.widx] = rs != '0;
    end
  end

  // -------- per-cache control --------
  always_comb begin
    for (int p = 0; p < N; p++) begin
      logic between_own;
      logic blocked;
      ctl[p]      = '0;
      between_own = 1'b0;
      blocked     = 1'b0;
      if (cpl.valid && p != int'(cpl.src)) begin
        // store: version matching on the stored word
        for (int j = 0; j < N; j++)
          if (rank[j] > rs && rank[j] < rank[p] && rsp[j].own[cpl.widx]) between_own = 1'b1;
        if (is_store) begin
          ctl[p].by_more_spec = rs > rank[p];
          ctl[p].ver_match    = rs < rank[p] && !between_own;
        end
        // read-broadcast masks
        if (rank[p] > rs &&
            ((cpl.op == BUS_RD && prot_rd_bcast(PROT)) ||
             (cpl.op == BUS_RDX && prot_wr_bcast(PROT)))) begin
          for (int w = 0; w < WPL; w++) begin
            blocked = 1'b0;
            for (int j = 0; j < N; j++)
              if (j != p && rank[j] >= rs && rank[j] < rank[p] && rsp[j].own[w]) blocked = 1'b1;
            ctl[p].snarf[w] = !blocked;
          end
          if (cpl.op == BUS_RDX) ctl[p].snarf[cpl.widx] = !between_own;
        end
      end
    end
  end

  // -------- L2 writes --------
  always_comb begin
    l2_we    = 1'b0;
    l2_mask  = '0;
    l2_wdata = cpl.wb_data;
    if (cpl.valid && cpl.op == BUS_WB) begin
      l2_we   = 1'b1;
      l2_mask = cpl.wb_mask;
    end else if (is_store) begin
      for (int p = 0; p < N; p++)
        if (p != int'(cpl.src) && rsp[p].hit && rsp[p].cmask[cpl.widx]) begin
          l2_we    = 1'b1;
          l2_mask[cpl.widx] = 1'b1;
          l2_wdata[cpl.widx*WORD_W +: WORD_W] = rsp[p].data[cpl.widx*WORD_W +: WORD_W];
        end
    end
  end

endmodule
