// tb_thread_ctrl: ranks follow the head, in-order commit with the cache
// handshake, promotion of the next thread, round-robin assignment of new
// threads, flush of a violating thread and its successors with the restart
// one cycle later, and the head never being flushed.
module tb_thread_ctrl;
  import smt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0]      done = 0, freq = 0, viol = 0, cdone = 0;
  logic [3:0][1:0] rank;
  logic [3:0]      spec, flush, restart, nonspec, commit, start;
  logic [1:0]      head;

  thread_ctrl #(.N(4)) dut (.clk, .rst_n, .done, .flush_req(freq), .violation(viol),
    .commit_done(cdone), .rank, .spec, .head, .flush, .restart, .nonspec, .commit, .start);

  task automatic ck(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // cache model: answers commit two cycles later
  always @(posedge clk) cdone <= 0;
  always @(posedge clk) if (rst_n && |commit) begin
    automatic logic [3:0] c = commit;
    @(posedge clk);
    cdone <= c;
  end

  int nstart [4] = '{0, 0, 0, 0};
  int nflush [4] = '{0, 0, 0, 0};
  int last_flush_cyc = 0, last_restart_cyc = 0, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) for (int p = 0; p < 4; p++) begin
      if (start[p]) nstart[p]++;
      if (flush[p]) begin nflush[p]++; last_flush_cyc = cyc; end
      if (restart[p]) last_restart_cyc = cyc;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    ck(head, 0, "reset head");
    for (int p = 0; p < 4; p++) ck(rank[p], p, "reset rank");
    ck(spec, 4'b1110, "only the head is non-speculative");

    // a speculative thread done early waits for the head
    done = 4'b0010; @(negedge clk); done = 0;
    repeat (5) @(negedge clk);
    ck(head, 0, "no commit out of order");
    // head done: commit PU 0, then PU 1 (already done) follows
    done = 4'b0001; @(negedge clk); done = 0;
    repeat (12) @(negedge clk);
    ck(head, 2, "two commits in order");
    ck(nstart[0], 1, "PU 0 got a new thread");
    ck(nstart[1], 1, "PU 1 got a new thread");
    ck(rank[2], 0, "PU 2 is head"); ck(rank[0], 2, "PU 0 now rank 2"); ck(rank[1], 3, "PU 1 now rank 3");

    // violation on PU 0 (rank 2): PU 0 and PU 1 (rank 3) flushed, not 2 and 3
    viol = 4'b0001; @(negedge clk); viol = 0;
    repeat (3) @(negedge clk);
    ck(nflush[0], 1, "violating thread flushed");
    ck(nflush[1], 1, "successor flushed");
    ck(nflush[2] + nflush[3], 0, "older threads kept");
    ck(last_restart_cyc - last_flush_cyc, 1, "restart one cycle after flush");

    // misprediction report for the head is ignored
    freq = 4'b0100; @(negedge clk); freq = 0;
    repeat (3) @(negedge clk);
    ck(nflush[2], 0, "head never flushed");

    // flush of rank 1 (PU 3) flushes PUs 3, 0, 1
    freq = 4'b1000; @(negedge clk); freq = 0;
    repeat (3) @(negedge clk);
    ck(nflush[3], 1, "rank 1 flushed"); ck(nflush[0], 2, "rank 2 flushed"); ck(nflush[1], 2, "rank 3 flushed");

    // a flushed thread's done is forgotten: PU 3 done, flushed, then head commits alone
    done = 4'b1000; @(negedge clk); done = 0;
    freq = 4'b1000; @(negedge clk); freq = 0;
    done = 4'b0100; @(negedge clk); done = 0;
    repeat (12) @(negedge clk);
    ck(head, 3, "only the head committed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
