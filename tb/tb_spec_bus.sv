// tb_spec_bus: stage timing of each transaction type, out-of-order
// completion (a BusRd overtaken by a later BusWb and BusUpd), priority of the
// less speculative requester, squashing, and the oldest-ready-first data
// arbitration. Expected cycle counts come from the stage lengths:
//   BusRd/BusRdX  Arb + Ovh 6 + Arb + Ctrl 4 + Data 4 : effect 15 cycles after grant
//   BusWb         Arb + Arb + Ctrl 4 + Data 4         : 9
//   BusUpd        Arb + Arb + Ctrl 1 + Data 1         : 3
//   BusUpg        Arb + Addr + Fin                    : 2
module tb_spec_bus;
  import smt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  bus_req_t [3:0]      req;
  logic     [3:0]      gnt, squash;
  logic     [3:0][1:0] rank;
  bus_cpl_t            cpl;
  logic                ab, db;
  bus_op_e             aop, dop;

  spec_bus #(.N(4)) dut (.clk, .rst_n, .req, .gnt, .rank, .squash, .cpl,
                         .addr_busy(ab), .addr_op(aop), .data_busy(db), .data_op(dop));

  int gcyc [4];
  int ccyc [4];
  int corder [$];
  int ncpl = 0;

  always @(posedge clk) begin
    for (int p = 0; p < 4; p++) if (gnt[p]) begin gcyc[p] = cyc; req[p].valid <= 1'b0; end
    if (cpl.valid) begin
      ccyc[cpl.src] = cyc;
      corder.push_back(int'(cpl.src));
      ncpl++;
    end
  end

  task automatic issue(int p, bus_op_e op, int la);
    req[p]       <= '0;
    req[p].valid <= 1'b1;
    req[p].op    <= op;
    req[p].laddr <= laddr_t'(la);
  endtask

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic wait_cpl(int n);
    int start;
    start = ncpl;
    while (ncpl < start + n) @(posedge clk);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    req = '0; squash = '0;
    for (int p = 0; p < 4; p++) rank[p] = 2'(p);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // ---- latency of each type, alone ----
    begin
      bus_op_e ops [4] = '{BUS_RD, BUS_WB, BUS_UPD, BUS_UPG};
      int      lat [4] = '{15, 9, 3, 2};
      for (int k = 0; k < 4; k++) begin
        issue(1, ops[k], 100 + k);
        wait_cpl(1);
        expect_eq(ccyc[1] - gcyc[1], lat[k], $sformatf("latency of %s", ops[k].name()));
      end
    end

    // ---- out-of-order completion: BusRd, then BusWb, then BusUpd ----
    corder.delete();
    issue(0, BUS_RD, 7);
    @(posedge clk);
    issue(1, BUS_WB, 8);
    @(posedge clk);
    issue(2, BUS_UPD, 9);
    wait_cpl(3);
    expect_eq(corder.size(), 3, "three completions");
    if (corder.size() == 3) begin
      expect_eq(corder[0], 1, "BusWb completes first");
      expect_eq(corder[1], 2, "BusUpd second");
      expect_eq(corder[2], 0, "BusRd last");
    end

    // ---- priority: less speculative wins the address bus ----
    rank[0] = 2'd2; rank[1] = 2'd3; rank[2] = 2'd0; rank[3] = 2'd1;
    issue(0, BUS_UPD, 1); issue(1, BUS_UPD, 2); issue(2, BUS_UPD, 3); issue(3, BUS_UPD, 4);
    wait_cpl(4);
    expect_eq(gcyc[2] < gcyc[3] ? 1 : 0, 1, "rank 0 granted before rank 1");
    expect_eq(gcyc[3] < gcyc[0] ? 1 : 0, 1, "rank 1 granted before rank 2");
    expect_eq(gcyc[0] < gcyc[1] ? 1 : 0, 1, "rank 2 granted before rank 3");
    expect_eq(gcyc[1] - gcyc[2], 3, "one grant per cycle");

    // ---- data bus back to back: two BusWb, the second waits for Data ----
    issue(0, BUS_WB, 5); issue(1, BUS_WB, 6);
    wait_cpl(2);
    expect_eq(ccyc[1] - ccyc[0], 4, "second line follows after 4 Data cycles");

    // ---- squash: a flushed PU's BusRd never takes effect, a BusWb does ----
    begin
      int n0;
      n0 = ncpl;
      gcyc[3] = -1;
      issue(3, BUS_RD, 11);
      issue(2, BUS_WB, 12);
      while (gcyc[3] < 0) @(posedge clk);
      @(negedge clk);
      squash[3] = 1'b1; squash[2] = 1'b1;
      @(negedge clk);
      squash = '0;
      repeat (25) @(posedge clk);
      expect_eq(ncpl - n0, 1, "only the write-back completes");
    end

    // ---- effect counts and busy signals ----
    expect_eq(ncpl, 14, "total completions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int abusy = 0;
  always @(posedge clk) if (ab) abusy++;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
