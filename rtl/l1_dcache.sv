// l1_dcache: private L1 data cache of one processing unit, holding
// speculative state per word.
//
// 16 kB, 2-way set associative, 64-byte lines, write-back, write-allocate.
// Lines are filled and evicted whole, but every 32-bit word carries its own
// state: the MOESI domain and the speculation bits U, V, C, D (see
// coh_rules). Speculatively stored data stays in the cache. A load hit
// returns its data two cycles after the request; misses, stores to shared
// words and write-backs go over the split-transaction bus.
//
// Operation.
//  * Load/store: the request is taken in cycle 0, the tags are looked up in
//    cycle 1, a hit answers in cycle 2 (resp_valid, resp_rdata for loads).
//    A store to an S/O word sends BusUpd (update protocols) or BusUpg
//    (invalidation protocols) and completes when the bus transaction takes
//    effect. A miss sends BusRd or BusRdX; a read miss retries the lookup after
//    the fill and then hits, a write miss installs the stored word directly.
//    Only words that are invalid are filled, so words this thread wrote stay.
//  * Victims: an empty way first, otherwise the LRU way, otherwise the other
//    way; a line holding U or V words is never evicted (the request waits
//    and retries every cycle; the non-speculative thread has no such words).
//    Owned, non-speculative words of the victim are written back (BusWb).
//  * A speculative store to a committed (C) word first writes the line's
//    committed words back.
//  * Snooping: every transaction of another PU that takes effect is applied
//    to the matching line in the same cycle: stores update or invalidate
//    version-matched words, mark D when the writer is more speculative, and
//    raise `violation` when a matched word has V set. With read-broadcast the
//    cache takes the line's invalid words (words the version unit allows),
//    and allocates the line if absent: in an empty way, or else in the LRU
//    way if that holds only clean, non-speculative data.
//  * flush (thread squashed): U words become invalid, V cleared, any pending
//    request is dropped. nonspec (thread became non-speculative): U and V
//    cleared. commit (thread retired; only while idle): owned words that a
//    later thread overwrote (D) are written back and invalidated, then every
//    D word is invalidated and every owned word becomes committed (C);
//    commit_done pulses when finished.
//
// Following the document: geometry, 2-cycle hit, write-back write-allocate,
// per-word state with per-line fill and eviction, speculative data kept in
// the cache, the event rules (via coh_rules), read-broadcast that also
// allocates absent lines (modified read-broadcast).
// Own choices: one outstanding miss (the document's cache is non-blocking),
// the victim and snarf-allocation rules, LRU replacement, waiting instead of
// evicting speculative lines, the write-back before a speculative store
// hides committed data, and the commit walk.
module l1_dcache
  import smt_pkg::*;
#(
  parameter logic [PU_W-1:0] PU_ID = '0,
  parameter protocol_e PROT       = PROT_UPD_RWBR,
  parameter bit        EXCL       = 1'b1,
  parameter int        SIZE_BYTES = 16384   // two ways of SIZE_BYTES/2
) (
  input  logic        clk,
  input  logic        rst_n,
  // processing unit
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  word_t       req_wdata,
  output logic        resp_valid,
  output word_t       resp_rdata,
  // thread control
  input  logic        spec,         // this PU's thread is speculative
  input  logic        flush,        // PrFlush
  input  logic        nonspec,      // PrNonSpec
  input  logic        commit,       // PrCommit
  output logic        commit_done,
  output logic        violation,
  // bus
  output bus_req_t    bus_req,
  input  logic        bus_gnt,
  output logic        bus_squash,
  input  bus_cpl_t    cpl,
  output snoop_rsp_t  snp_rsp,
  input  snoop_ctl_t  snp_ctl,
  input  line_t       fill_data,
  input  wmask_t      fill_spec,
  input  logic        fill_shared,
  // activity
  output logic        ev_hit,
  output logic        ev_miss,
  output logic        ev_snarf,
  output logic        ev_evict_wb,
  output logic        ev_stall
);

  localparam int SETS  = SIZE_BYTES / (LINE_BYTES * 2);
  localparam int SET_W = $clog2(SETS);
  localparam int TAG_W = LADDR_W - SET_W;
  localparam int NLINE = SETS * 2;

  typedef logic [TAG_W-1:0] tag_t;
  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_WAIT, S_COMMIT} fsm_e;
  typedef enum logic [2:0] {
    PK_STORE, PK_MISS_RD, PK_MISS_WR, PK_WB_VICTIM, PK_WB_C, PK_WB_COMMIT
  } pend_e;

  // ---------------- storage ----------------
  tag_t    tag  [SETS][2];
  wstate_t ws   [SETS][2][WPL];
  logic    lru  [SETS];          // way to replace next
  line_t   dmem [NLINE];

  // ---------------- request registers ----------------
  fsm_e               fsm;
  pend_e              pend;
  logic               r_we;
  laddr_t             r_laddr;
  logic [WIDX_W-1:0]  r_widx;
  word_t              r_wdata;
  logic               r_way;
  logic               r_drop;
  logic [SET_W-1:0]   c_set;      // line under write-back during commit
  logic               c_way;

  logic [SET_W-1:0] r_set;
  tag_t             r_tag;
  assign r_set = r_laddr[SET_W-1:0];
  assign r_tag = r_laddr[LADDR_W-1:SET_W];

  function automatic logic [$clog2(NLINE)-1:0] li(logic [SET_W-1:0] s, logic w);
    return {s, w};
  endfunction

  function automatic wmask_t vmask(logic [SET_W-1:0] s, logic w);
    wmask_t m;
    for (int i = 0; i < WPL; i++) m[i] = st_valid(ws[s][w][i].st);
    return m;
  endfunction

  // ---------------- lookup of the pending request ----------------
  logic [1:0] pres;
  always_comb
    for (int w = 0; w < 2; w++) pres[w] = tag[r_set][w] == r_tag && |vmask(r_set, w[0]);
  logic hit_any, hit_way;
  assign hit_any = |pres;
  assign hit_way = pres[1];

  function automatic logic evictable(logic [SET_W-1:0] s, logic w);
    logic ok;
    ok = 1'b1;
    for (int i = 0; i < WPL; i++) if (ws[s][w][i].u || ws[s][w][i].v) ok = 1'b0;
    return ok;
  endfunction

  function automatic wmask_t wb_words(logic [SET_W-1:0] s, logic w);
    wmask_t m;
    for (int i = 0; i < WPL; i++) m[i] = st_owned(ws[s][w][i].st) && !ws[s][w][i].u;
    return m;
  endfunction

  function automatic wmask_t c_words(logic [SET_W-1:0] s, logic w);
    wmask_t m;
    for (int i = 0; i < WPL; i++) m[i] = ws[s][w][i].c;
    return m;
  endfunction

  logic vic_ok, vic_way;
  always_comb begin
    vic_ok  = 1'b1;
    vic_way = lru[r_set];
    if (!(|vmask(r_set, 1'b0)))      vic_way = 1'b0;
    else if (!(|vmask(r_set, 1'b1))) vic_way = 1'b1;
    else if (evictable(r_set, lru[r_set]))  vic_way = lru[r_set];
    else if (evictable(r_set, !lru[r_set])) vic_way = !lru[r_set];
    else vic_ok = 1'b0;
  end

  // ---------------- own completion ----------------
  logic own_cpl, oth_cpl;
  // write-backs are not squashed, so their completion counts even in a flush
  assign own_cpl = cpl.valid && cpl.src == PU_ID && fsm inside {S_WAIT, S_COMMIT} &&
                   !bus_req.valid &&
                   (!flush || pend inside {PK_WB_VICTIM, PK_WB_C, PK_WB_COMMIT});
  assign oth_cpl = cpl.valid && cpl.src != PU_ID && cpl.op != BUS_WB;

  // ---------------- access-word rules ----------------
  wstate_t acc_cur, acc_nxt;
  coh_ev_e acc_ev;
  logic    acc_breq, acc_wb, acc_viol, acc_take;
  bus_op_e acc_op;
  logic    acc_way;
  assign acc_way = (fsm == S_LOOKUP) ? hit_way : r_way;
  always_comb begin
    acc_cur = ws[r_set][acc_way][r_widx];
    acc_ev  = r_we ? EV_PRWR : EV_PRRD;
    if (fsm == S_WAIT && pend == PK_STORE && !st_valid(acc_cur.st)) acc_cur.st = ST_S;
  end
  coh_rules #(.PROT(PROT), .EXCL(EXCL)) u_acc (
    .cur(acc_cur), .ev(acc_ev), .spec_thread(spec), .shared(1'b1), .ver_match(1'b0),
    .by_more_spec(1'b0), .data_spec(1'b0), .nxt(acc_nxt), .bus_req(acc_breq),
    .bus_op(acc_op), .wb(acc_wb), .violation(acc_viol), .take_data(acc_take)
  );

  // ---------------- snoop side ----------------
  logic [SET_W-1:0] s_set;
  tag_t             s_tag;
  logic [1:0]       s_pres;
  assign s_set = cpl.laddr[SET_W-1:0];
  assign s_tag = cpl.laddr[LADDR_W-1:SET_W];
  always_comb
    for (int w = 0; w < 2; w++) s_pres[w] = tag[s_set][w] == s_tag && |vmask(s_set, w[0]);

  logic s_way;
  assign s_way = s_pres[1];

  always_comb begin
    snp_rsp = '0;
    snp_rsp.hit = |s_pres;
    for (int i = 0; i < WPL; i++) begin
      wstate_t x;
      x = ws[s_set][s_way][i];
      snp_rsp.valid[i] = snp_rsp.hit && st_valid(x.st);
      snp_rsp.dmask[i] = snp_rsp.hit && x.d;
      snp_rsp.own[i]   = snp_rsp.hit && x.u && st_owned(x.st);
      snp_rsp.umask[i] = snp_rsp.hit && x.u;
      snp_rsp.cmask[i] = snp_rsp.hit && x.c;
    end
    snp_rsp.data = dmem[li(s_set, s_way)];
  end

  // snarf allocation of an absent line
  logic busy_set;  // the pending access owns a way of this set
  assign busy_set = fsm == S_WAIT && r_set == s_set;
  function automatic logic clean_line(logic [SET_W-1:0] s, logic w);
    logic ok;
    ok = 1'b1;
    for (int i = 0; i < WPL; i++)
      if (st_owned(ws[s][w][i].st) || ws[s][w][i].u || ws[s][w][i].v || ws[s][w][i].c) ok = 1'b0;
    return ok;
  endfunction
  logic alloc_ok, alloc_way;
  always_comb begin
    alloc_ok  = 1'b0;
    alloc_way = 1'b0;
    for (int w = 1; w >= 0; w--)
      if (!(|vmask(s_set, w[0])) && !(busy_set && r_way == w[0])) begin
        alloc_ok  = 1'b1;
        alloc_way = w[0];
      end
    if (!alloc_ok && clean_line(s_set, lru[s_set]) && !(busy_set && r_way == lru[s_set])) begin
      alloc_ok  = 1'b1;
      alloc_way = lru[s_set];
    end
  end

  // ---------------- line rules (own fill and snoops) ----------------
  logic [SET_W-1:0] ln_set;
  logic             ln_way;
  logic             ln_alloc;   // snarf allocation of an absent line
  logic             ln_act;
  coh_ev_e [WPL-1:0] ln_ev;
  wstate_t [WPL-1:0] ln_cur, ln_nxt;
  logic    [WPL-1:0] ln_viol, ln_take, ln_wb, ln_breq;
  bus_op_e [WPL-1:0] ln_op;
  logic    ln_shared;

  always_comb begin
    ln_set    = s_set;
    ln_way    = s_way;
    ln_alloc  = 1'b0;
    ln_act    = 1'b0;
    ln_shared = 1'b1;
    ln_ev     = '{default: EV_NONE};
    if (own_cpl && (pend == PK_MISS_RD || pend == PK_MISS_WR)) begin
      ln_act    = 1'b1;
      ln_set    = r_set;
      ln_way    = hit_any ? hit_way : r_way;
      ln_shared = fill_shared;
      for (int i = 0; i < WPL; i++)
        if (pend == PK_MISS_WR && i == int'(r_widx)) ln_ev[i] = EV_FILL_WR;
        else                                         ln_ev[i] = EV_FILL_RD;
    end else if (oth_cpl) begin
      if (!(|s_pres)) begin
        if (|snp_ctl.snarf && alloc_ok) begin
          ln_act   = 1'b1;
          ln_alloc = 1'b1;
          ln_way   = alloc_way;
          for (int i = 0; i < WPL; i++) if (snp_ctl.snarf[i]) ln_ev[i] = EV_FILL_RD;
        end
      end else begin
        ln_act = 1'b1;
        for (int i = 0; i < WPL; i++) begin
          if (!st_valid(ws[s_set][s_way][i].st)) begin
            if (snp_ctl.snarf[i]) ln_ev[i] = EV_FILL_RD;
          end else if (cpl.op != BUS_RD && i == int'(cpl.widx)) begin
            ln_ev[i] = EV_SNP_WR;
          end else if (cpl.op == BUS_RD || cpl.op == BUS_RDX) begin
            ln_ev[i] = EV_SNP_RD;
          end
        end
      end
    end
    for (int i = 0; i < WPL; i++)
      ln_cur[i] = ln_alloc ? WS_INV : ws[ln_set][ln_way][i];
  end

  for (genvar g = 0; g < WPL; g++) begin : g_ln
    coh_rules #(.PROT(PROT), .EXCL(EXCL)) u_ln (
      .cur(ln_cur[g]), .ev(ln_ev[g]), .spec_thread(spec), .shared(ln_shared),
      .ver_match(snp_ctl.ver_match), .by_more_spec(snp_ctl.by_more_spec),
      .data_spec(fill_spec[g]),
      .nxt(ln_nxt[g]), .bus_req(ln_breq[g]), .bus_op(ln_op[g]), .wb(ln_wb[g]),
      .violation(ln_viol[g]), .take_data(ln_take[g])
    );
  end

  assign violation = oth_cpl && (|ln_viol) && !flush;

  // ---------------- commit walk ----------------
  function automatic wmask_t dirty_d(logic [SET_W-1:0] s, logic w);
    wmask_t m;
    for (int i = 0; i < WPL; i++) m[i] = ws[s][w][i].d && st_owned(ws[s][w][i].st);
    return m;
  endfunction

  logic [NLINE-1:0] cneed;
  always_comb
    for (int l = 0; l < NLINE; l++)
      cneed[l] = |dirty_d(l[SET_W:1], l[0]);
  logic                     cfound;
  logic [$clog2(NLINE)-1:0] cidx;
  always_comb begin
    cfound = 1'b0;
    cidx   = '0;
    for (int l = NLINE - 1; l >= 0; l--)
      if (cneed[l]) begin
        cfound = 1'b1;
        cidx   = l[$clog2(NLINE)-1:0];
      end
  end

  // a snoop that changes the set under lookup delays the lookup one cycle
  logic lookup_block;
  assign lookup_block = oth_cpl && s_set == r_set;

  assign req_ready  = fsm == S_IDLE && !flush && !commit;
  assign bus_squash = flush;

  // ---------------- sequential ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm         <= S_IDLE;
      pend        <= PK_STORE;
      r_we        <= 1'b0;
      r_laddr     <= '0;
      r_widx      <= '0;
      r_wdata     <= '0;
      r_way       <= 1'b0;
      r_drop      <= 1'b0;
      c_set       <= '0;
      c_way       <= 1'b0;
      bus_req     <= '0;
      resp_valid  <= 1'b0;
      resp_rdata  <= '0;
      commit_done <= 1'b0;
      ev_hit      <= 1'b0;
      ev_miss     <= 1'b0;
      ev_snarf    <= 1'b0;
      ev_evict_wb <= 1'b0;
      ev_stall    <= 1'b0;
      for (int s = 0; s < SETS; s++) begin
        lru[s] <= 1'b0;
        for (int w = 0; w < 2; w++) begin
          tag[s][w] <= '0;
          for (int i = 0; i < WPL; i++) ws[s][w][i] <= WS_INV;
        end
      end
    end else begin
      resp_valid  <= 1'b0;
      commit_done <= 1'b0;
      ev_hit      <= 1'b0;
      ev_miss     <= 1'b0;
      ev_snarf    <= 1'b0;
      ev_evict_wb <= 1'b0;
      ev_stall    <= 1'b0;
      if (bus_gnt) bus_req.valid <= 1'b0;

      // ---- line rules: own fill or snoop ----
      if (ln_act) begin
        if (ln_alloc || (own_cpl && !hit_any)) tag[ln_set][ln_way] <= own_cpl ? r_tag : s_tag;
        for (int i = 0; i < WPL; i++) begin
          ws[ln_set][ln_way][i] <= ln_nxt[i];
          if (ln_take[i])
            dmem[li(ln_set, ln_way)][i*WORD_W +: WORD_W] <=
              fill_data[i*WORD_W +: WORD_W];
        end
        if (oth_cpl && (ln_alloc || |(snp_ctl.snarf & ~vmask(s_set, s_way)))) ev_snarf <= 1'b1;
      end

      // ---- controller ----
      unique case (fsm)
        S_IDLE: begin
          if (commit) begin
            fsm <= S_COMMIT;
          end else if (req_valid && !flush) begin
            fsm     <= S_LOOKUP;
            r_we    <= req_we;
            r_laddr <= req_addr[ADDR_W-1:OFS_W];
            r_widx  <= req_addr[OFS_W-1:2];
            r_wdata <= req_wdata;
            r_drop  <= 1'b0;
          end
        end

        S_LOOKUP: begin
          if (flush) begin
            fsm <= S_IDLE;
          end else if (lookup_block) begin
            // a snooped transaction updates this set now: look up again
          end else if (hit_any) begin
            r_way <= hit_way;
            if (acc_wb) begin
              // committed words go back to L2 before a speculative store
              bus_req         <= '0;
              bus_req.valid   <= 1'b1;
              bus_req.op      <= BUS_WB;
              bus_req.laddr   <= r_laddr;
              bus_req.wb_mask <= c_words(r_set, hit_way);
              bus_req.wb_data <= dmem[li(r_set, hit_way)];
              pend            <= PK_WB_C;
              fsm             <= S_WAIT;
            end else if (acc_breq) begin
              bus_req       <= '0;
              bus_req.valid <= 1'b1;
              bus_req.op    <= acc_op;
              bus_req.laddr <= r_laddr;
              bus_req.widx  <= r_widx;
              bus_req.wdata <= r_wdata;
              pend          <= (acc_op == BUS_UPD || acc_op == BUS_UPG) ? PK_STORE
                             : (acc_op == BUS_RD) ? PK_MISS_RD : PK_MISS_WR;
              ev_miss       <= !(acc_op == BUS_UPD || acc_op == BUS_UPG);
              fsm           <= S_WAIT;
            end else begin
              // hit
              ws[r_set][hit_way][r_widx] <= acc_nxt;
              if (r_we) dmem[li(r_set, hit_way)][r_widx*WORD_W +: WORD_W] <= r_wdata;
              resp_rdata <= dmem[li(r_set, hit_way)][r_widx*WORD_W +: WORD_W];
              resp_valid <= 1'b1;
              ev_hit     <= 1'b1;
              lru[r_set] <= !hit_way;
              fsm        <= S_IDLE;
            end
          end else if (!vic_ok) begin
            ev_stall <= 1'b1;      // both ways hold speculative state: retry
          end else if (|wb_words(r_set, vic_way)) begin
            r_way           <= vic_way;
            bus_req         <= '0;
            bus_req.valid   <= 1'b1;
            bus_req.op      <= BUS_WB;
            bus_req.laddr   <= {tag[r_set][vic_way], r_set};
            bus_req.wb_mask <= wb_words(r_set, vic_way);
            bus_req.wb_data <= dmem[li(r_set, vic_way)];
            pend            <= PK_WB_VICTIM;
            ev_evict_wb     <= 1'b1;
            fsm             <= S_WAIT;
          end else begin
            r_way <= vic_way;
            for (int i = 0; i < WPL; i++) ws[r_set][vic_way][i] <= WS_INV;
            tag[r_set][vic_way] <= r_tag;
            bus_req       <= '0;
            bus_req.valid <= 1'b1;
            bus_req.op    <= r_we ? BUS_RDX : BUS_RD;
            bus_req.laddr <= r_laddr;
            bus_req.widx  <= r_widx;
            bus_req.wdata <= r_wdata;
            pend          <= r_we ? PK_MISS_WR : PK_MISS_RD;
            ev_miss       <= 1'b1;
            fsm           <= S_WAIT;
          end
        end

        S_WAIT: begin
          if (flush && pend inside {PK_STORE, PK_MISS_RD, PK_MISS_WR}) begin
            bus_req.valid <= 1'b0;
            fsm           <= S_IDLE;
          end else begin
            if (flush) r_drop <= 1'b1;
            if (own_cpl) begin
              unique case (pend)
                PK_STORE: begin
                  ws[r_set][r_way][r_widx] <= acc_nxt;
                  dmem[li(r_set, r_way)][r_widx*WORD_W +: WORD_W] <= r_wdata;
                  lru[r_set] <= !r_way;
                  resp_valid <= 1'b1;
                  fsm        <= S_IDLE;
                end
                PK_MISS_RD: begin
                  fsm <= S_LOOKUP;   // retry: now a hit
                end
                PK_MISS_WR: begin
                  lru[r_set] <= !(hit_any ? hit_way : r_way);
                  resp_valid <= 1'b1;
                  fsm        <= S_IDLE;
                end
                PK_WB_VICTIM: begin
                  for (int i = 0; i < WPL; i++) ws[r_set][r_way][i] <= WS_INV;
                  fsm <= (r_drop || flush) ? S_IDLE : S_LOOKUP;
                end
                PK_WB_C: begin
                  for (int i = 0; i < WPL; i++)
                    if (ws[r_set][r_way][i].c) begin
                      ws[r_set][r_way][i].c <= 1'b0;
                      if (ws[r_set][r_way][i].st == ST_O) ws[r_set][r_way][i].st <= ST_S;
                      if (ws[r_set][r_way][i].st == ST_M) ws[r_set][r_way][i].st <= ST_E;
                    end
                  fsm <= (r_drop || flush) ? S_IDLE : S_LOOKUP;
                end
                default: begin
                  // PK_WB_COMMIT is handled in S_COMMIT
                  fsm <= S_IDLE;
                end
              endcase
            end
          end
        end

        S_COMMIT: begin
          if (pend == PK_WB_COMMIT) begin
            if (own_cpl) begin
              for (int i = 0; i < WPL; i++)
                if (ws[c_set][c_way][i].d && st_owned(ws[c_set][c_way][i].st))
                  ws[c_set][c_way][i] <= WS_INV;
              pend <= PK_STORE;
            end
          end else if (cfound) begin
            c_set           <= cidx[$clog2(NLINE)-1:1];
            c_way           <= cidx[0];
            bus_req         <= '0;
            bus_req.valid   <= 1'b1;
            bus_req.op      <= BUS_WB;
            bus_req.laddr   <= {tag[cidx[$clog2(NLINE)-1:1]][cidx[0]], cidx[$clog2(NLINE)-1:1]};
            bus_req.wb_mask <= dirty_d(cidx[$clog2(NLINE)-1:1], cidx[0]);
            bus_req.wb_data <= dmem[cidx];
            pend            <= PK_WB_COMMIT;
          end else begin
            for (int s = 0; s < SETS; s++)
              for (int w = 0; w < 2; w++)
                for (int i = 0; i < WPL; i++) begin
                  if (ws[s][w][i].d) ws[s][w][i] <= WS_INV;
                  else if (st_owned(ws[s][w][i].st)) ws[s][w][i].c <= 1'b1;
                end
            commit_done <= 1'b1;
            fsm         <= S_IDLE;
          end
        end

        default: fsm <= S_IDLE;
      endcase

      // ---- thread-wide events ----
      if (flush)
        for (int s = 0; s < SETS; s++)
          for (int w = 0; w < 2; w++)
            for (int i = 0; i < WPL; i++) begin
              if (ws[s][w][i].u) ws[s][w][i] <= WS_INV;
              else if (ws[s][w][i].v) ws[s][w][i].v <= 1'b0;
            end
      if (nonspec)
        for (int s = 0; s < SETS; s++)
          for (int w = 0; w < 2; w++)
            for (int i = 0; i < WPL; i++) begin
              ws[s][w][i].u <= 1'b0;
              ws[s][w][i].v <= 1'b0;
            end
    end
  end

endmodule
