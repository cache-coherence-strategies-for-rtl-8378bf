// tb_version_unit: version selection for a line read, version matching for
// stores, read-broadcast masks and L2 write-backs, with hand-built snoop
// responses of four caches (head on PU 0, so rank = PU number).
module tb_version_unit;
  import smt_pkg::*;
  int checks = 0, failures = 0;

  bus_cpl_t              cpl;
  logic [3:0][1:0]       rank;
  snoop_rsp_t [3:0]      rsp;
  line_t                 l2, fill, l2w;
  wmask_t                fspec, l2m;
  logic                  shared, l2we;
  snoop_ctl_t [3:0]      ctl;

  version_unit #(.N(4), .PROT(PROT_UPD_RWBR)) dut (.cpl, .rank, .rsp, .l2_line(l2),
    .fill_data(fill), .fill_spec(fspec), .shared, .ctl, .l2_we(l2we), .l2_mask(l2m), .l2_wdata(l2w));

  function automatic word_t wd(line_t l, int w);
    return l[w*32 +: 32];
  endfunction

  task automatic put(int p, int w, word_t v, bit u = 0, bit own = 0, bit c = 0, bit d = 0);
    rsp[p].hit        = 1'b1;
    rsp[p].valid[w]   = 1'b1;
    rsp[p].umask[w]   = u;
    rsp[p].own[w]     = own;
    rsp[p].cmask[w]   = c;
    rsp[p].dmask[w]   = d;
    rsp[p].data[w*32 +: 32] = v;
  endtask

  task automatic ck(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    for (int p = 0; p < 4; p++) rank[p] = 2'(p);
    for (int w = 0; w < WPL; w++) l2[w*32 +: 32] = 32'h1000_0000 + w;

    // ---------- BusRd by PU 2 ----------
    rsp = '0; cpl = '0;
    cpl.valid = 1; cpl.op = BUS_RD; cpl.src = 2; cpl.laddr = 5;
    put(0, 0, 32'hA0);                     // older version
    put(1, 0, 32'hB0, 1, 1);               // nearest less speculative, own, speculative
    put(3, 1, 32'hD1, 1, 1);               // more speculative: not visible
    put(3, 2, 32'hC2, 0, 0, 1);            // committed copy on a younger PU
    put(0, 3, 32'hA3);
    put(1, 3, 32'hB3, 0, 0, 0, 1);         // D-marked but nearest: still the right version
    #1;
    ck(wd(fill, 0), 32'hB0, "nearest less speculative version");
    ck(fspec[0], 1, "speculative supplier marks U");
    ck(wd(fill, 1), 32'h1000_0001, "more speculative version ignored, L2 used");
    ck(wd(fill, 2), 32'hC2, "committed copy used");
    ck(wd(fill, 3), 32'hB3, "D-marked nearest copy used");
    ck(wd(fill, 4), 32'h1000_0004, "L2 for words nobody holds");
    ck(shared, 1, "line shared");
    ck(l2we, 0, "read writes no L2");
    // read-broadcast: only PU 3 (more speculative than 2); word 1 is PU 3's own,
    // nothing between 2 and 3 owns anything
    ck(ctl[3].snarf, 16'hFFFF, "PU 3 may take the whole line");
    ck(ctl[0].snarf, 16'h0000, "less speculative PU takes nothing");
    ck(ctl[1].snarf, 16'h0000, "less speculative PU takes nothing");
    // if PU 2 owned word 4, PU 3 must not take that word
    put(2, 4, 32'hEE, 1, 1);
    #1;
    ck(ctl[3].snarf[4], 0, "requester's own word not broadcast");

    // ---------- BusUpd by PU 1 to word 5 ----------
    rsp = '0; cpl = '0;
    cpl.valid = 1; cpl.op = BUS_UPD; cpl.src = 1; cpl.laddr = 5; cpl.widx = 5; cpl.wdata = 32'h55;
    put(0, 5, 32'h1);
    put(2, 5, 32'h2, 1, 1);   // PU 2 has its own version
    put(3, 5, 32'h3);
    #1;
    ck(ctl[0].by_more_spec, 1, "PU 0 sees a more speculative writer");
    ck(ctl[0].ver_match, 0, "PU 0 not matched");
    ck(ctl[2].ver_match, 1, "PU 2 matched (own version kept by its cache)");
    ck(ctl[3].ver_match, 0, "PU 3 shielded by PU 2's version");
    ck(wd(fill, 5), 32'h55, "store data on the bus");
    ck(fspec[5], 1, "speculative writer");
    rsp[2].own[5] = 0;
    #1;
    ck(ctl[3].ver_match, 1, "PU 3 matched when nobody between owns the word");

    // ---------- committed copy written back when another thread stores ----------
    rsp = '0;
    put(3, 5, 32'hCC, 0, 0, 1);
    #1;
    ck(l2we, 1, "committed word written back");
    ck(l2m, 16'h0020, "only that word");
    ck(wd(l2w, 5), 32'hCC, "committed value");

    // ---------- BusWb ----------
    rsp = '0; cpl = '0;
    cpl.valid = 1; cpl.op = BUS_WB; cpl.src = 0; cpl.wb_mask = 16'h0003;
    cpl.wb_data = '0; cpl.wb_data[31:0] = 32'h77;
    #1;
    ck(l2we, 1, "BusWb writes L2"); ck(l2m, 16'h0003, "BusWb mask"); ck(wd(l2w, 0), 32'h77, "BusWb data");

    // ---------- rank rotation: head on PU 2 ----------
    rank[0] = 2; rank[1] = 3; rank[2] = 0; rank[3] = 1;
    rsp = '0; cpl = '0;
    cpl.valid = 1; cpl.op = BUS_RD; cpl.src = 0;
    put(3, 0, 32'h30);
    put(1, 0, 32'h10);
    #1;
    ck(wd(fill, 0), 32'h30, "after rotation PU 3 (rank 1) is older than PU 0 (rank 2)");
    ck(ctl[1].snarf[0], 1, "PU 1 (rank 3) takes broadcast");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
