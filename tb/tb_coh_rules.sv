// tb_coh_rules: checks the per-word protocol rules against the transition
// tables, for the update and invalidation protocols with and without
// exclusivity management. Expected values are written out by hand.
module tb_coh_rules;
  import smt_pkg::*;

  int checks = 0, failures = 0;

  wstate_t cur;
  coh_ev_e ev;
  logic    spec_thread, shared, ver_match, by_more_spec, data_spec;

  wstate_t nxt [4];
  logic    breq [4], wb [4], viol [4], take [4];
  bus_op_e op [4];

  // 0: update, excl   1: invalidation, excl   2: update, no excl   3: invalidation, no excl
  coh_rules #(.PROT(PROT_UPD_RWBR), .EXCL(1'b1)) u0 (.cur, .ev, .spec_thread, .shared, .ver_match,
    .by_more_spec, .data_spec, .nxt(nxt[0]), .bus_req(breq[0]), .bus_op(op[0]), .wb(wb[0]),
    .violation(viol[0]), .take_data(take[0]));
  coh_rules #(.PROT(PROT_INV), .EXCL(1'b1)) u1 (.cur, .ev, .spec_thread, .shared, .ver_match,
    .by_more_spec, .data_spec, .nxt(nxt[1]), .bus_req(breq[1]), .bus_op(op[1]), .wb(wb[1]),
    .violation(viol[1]), .take_data(take[1]));
  coh_rules #(.PROT(PROT_UPD), .EXCL(1'b0)) u2 (.cur, .ev, .spec_thread, .shared, .ver_match,
    .by_more_spec, .data_spec, .nxt(nxt[2]), .bus_req(breq[2]), .bus_op(op[2]), .wb(wb[2]),
    .violation(viol[2]), .take_data(take[2]));
  coh_rules #(.PROT(PROT_INV_ROBR), .EXCL(1'b0)) u3 (.cur, .ev, .spec_thread, .shared, .ver_match,
    .by_more_spec, .data_spec, .nxt(nxt[3]), .bus_req(breq[3]), .bus_op(op[3]), .wb(wb[3]),
    .violation(viol[3]), .take_data(take[3]));

  function automatic wstate_t mk(moesi_e st, bit u = 0, bit v = 0, bit c = 0, bit d = 0);
    return '{st: st, u: u, v: v, c: c, d: d};
  endfunction

  task automatic apply(wstate_t s, coh_ev_e e, bit sp = 0, bit sh = 0, bit vm = 0, bit ms = 0, bit ds = 0);
    cur = s; ev = e; spec_thread = sp; shared = sh; ver_match = vm; by_more_spec = ms; data_spec = ds;
    #1;
  endtask

  task automatic chk_st(int i, moesi_e exp, string what);
    checks++;
    if (nxt[i].st !== exp) begin
      failures++;
      $display("FAIL %s variant %0d: state %s expected %s", what, i, nxt[i].st.name(), exp.name());
    end
  endtask

  task automatic chk(bit got, bit exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  task automatic chk_op(int i, bit req, bus_op_e exp, string what);
    checks++;
    if (breq[i] !== req || (req && op[i] !== exp)) begin
      failures++;
      $display("FAIL %s variant %0d: req %0b op %s", what, i, breq[i], op[i].name());
    end
  endtask

  initial begin
    // ---- I PrRd / PrWr: miss transactions ----
    apply(mk(ST_I), EV_PRRD);
    for (int i = 0; i < 4; i++) chk_op(i, 1, BUS_RD, "I PrRd");
    apply(mk(ST_I), EV_PRWR);
    for (int i = 0; i < 4; i++) chk_op(i, 1, BUS_RDX, "I PrWr");

    // ---- read fills: shared -> S, unshared -> E (excl) or S ----
    apply(mk(ST_I), EV_FILL_RD, 0, 1);
    for (int i = 0; i < 4; i++) chk_st(i, ST_S, "I PrRd shared");
    apply(mk(ST_I), EV_FILL_RD, 0, 0);
    chk_st(0, ST_E, "I PrRd unshared"); chk_st(1, ST_E, "I PrRd unshared");
    chk_st(2, ST_S, "I PrRd unshared"); chk_st(3, ST_S, "I PrRd unshared");

    // ---- write fills ----
    apply(mk(ST_I), EV_FILL_WR, 0, 1);
    chk_st(0, ST_O, "I PrWr shared"); chk_st(1, ST_M, "I PrWr shared");
    chk_st(2, ST_O, "I PrWr shared"); chk_st(3, ST_O, "I PrWr shared");
    apply(mk(ST_I), EV_FILL_WR, 0, 0);
    chk_st(0, ST_M, "I PrWr unshared"); chk_st(1, ST_M, "I PrWr unshared");
    chk_st(2, ST_O, "I PrWr unshared"); chk_st(3, ST_O, "I PrWr unshared");

    // ---- S PrWr ----
    apply(mk(ST_S), EV_PRWR);
    chk_op(0, 1, BUS_UPD, "S PrWr"); chk_op(1, 1, BUS_UPG, "S PrWr");
    chk_op(2, 1, BUS_UPD, "S PrWr"); chk_op(3, 1, BUS_UPG, "S PrWr");
    chk_st(0, ST_O, "S PrWr"); chk_st(1, ST_M, "S PrWr"); chk_st(2, ST_O, "S PrWr"); chk_st(3, ST_O, "S PrWr");

    // ---- O PrWr ----
    apply(mk(ST_O), EV_PRWR);
    chk_op(0, 1, BUS_UPD, "O PrWr"); chk_op(1, 1, BUS_UPG, "O PrWr");
    chk_st(0, ST_O, "O PrWr"); chk_st(1, ST_M, "O PrWr"); chk_st(3, ST_O, "O PrWr");

    // ---- E PrWr: silent -> M ----
    apply(mk(ST_E), EV_PRWR);
    chk_op(0, 0, BUS_RD, "E PrWr"); chk_op(1, 0, BUS_RD, "E PrWr");
    chk_st(0, ST_M, "E PrWr"); chk_st(1, ST_M, "E PrWr");

    // ---- snooped store, version matched: S updated / invalidated ----
    apply(mk(ST_S), EV_SNP_WR, 1, 1, 1, 0, 1);
    chk_st(0, ST_S, "S BusUpd"); chk(take[0], 1, "S BusUpd take");
    chk(nxt[0].u, 1, "u->U on update by speculative thread");
    chk_st(1, ST_I, "S BusUpg"); chk(take[1], 0, "S BusUpg no take");
    apply(mk(ST_E), EV_SNP_WR, 1, 1, 1, 0, 0);
    chk_st(0, ST_S, "E BusUpd"); chk_st(1, ST_I, "E BusRdX");

    // ---- snooped read: exclusivity lost, O/M forward and become O ----
    apply(mk(ST_M), EV_SNP_RD);
    chk_st(0, ST_O, "M BusRd"); chk_st(1, ST_O, "M BusRd");
    apply(mk(ST_O), EV_SNP_RD);
    chk_st(0, ST_O, "O BusRd");

    // ---- read-broadcast fill of an invalid word ----
    apply(mk(ST_I), EV_FILL_RD, 1, 1, 0, 0, 1);
    chk_st(0, ST_S, "{I} BusRd"); chk(nxt[0].u, 1, "forwarded by speculative thread -> U");

    // ---- V: first speculative access a load ----
    apply(mk(ST_S), EV_PRRD, 1);
    chk(nxt[0].v, 1, "v->V on speculative load");
    apply(mk(ST_S), EV_PRRD, 0);
    chk(nxt[0].v, 0, "no V for non-speculative load");
    apply(mk(ST_O, 1), EV_PRRD, 1);
    chk(nxt[0].v, 0, "no V after own speculative store");

    // ---- violation on a matched store to a V word ----
    apply(mk(ST_S, 0, 1), EV_SNP_WR, 1, 1, 1, 0, 0);
    for (int i = 0; i < 4; i++) chk(viol[i], 1, "V BusUpd/Upg matched -> flush");
    apply(mk(ST_S, 0, 1), EV_SNP_WR, 1, 1, 0, 0, 0);
    chk(viol[0], 0, "no violation without version match");

    // ---- D: store by more speculative thread ----
    apply(mk(ST_O), EV_SNP_WR, 0, 1, 0, 1, 1);
    chk(nxt[0].d, 1, "d->D"); chk(take[0], 0, "D keeps data"); chk_st(0, ST_O, "O keeps own version");

    // ---- C: committed word written back on a store ----
    apply(mk(ST_O, 0, 0, 1), EV_SNP_WR, 1, 1, 1, 0, 0);
    chk(wb[0], 1, "C BusUpd -> BusWb"); chk(nxt[0].c, 0, "C -> c");
    apply(mk(ST_O, 0, 0, 1), EV_PRWR, 1);
    chk(wb[0], 1, "committed word written back before speculative store");
    chk(breq[0], 0, "no update before write-back");

    // ---- speculative store sets U ----
    apply(mk(ST_S), EV_PRWR, 1);
    chk(nxt[0].u, 1, "u->U on speculative store");

    // ---- own version kept against a less speculative store ----
    apply(mk(ST_O, 1), EV_SNP_WR, 1, 1, 1, 0, 0);
    chk(take[0], 0, "own version not overwritten"); chk_st(1, ST_O, "own version not invalidated");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
