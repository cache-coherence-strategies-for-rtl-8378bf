// tb_reg_comm_ring: one-cycle hop latency, one register per link per cycle,
// propagation around the ring, the cut link into the head, and flush.
// Timing checked against the document's figures: one cycle per hop and one
// register per cycle per link; queue behaviour and flush are this design's.
module tb_reg_comm_ring;
  import smt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [3:0][1:0]  rank;
  logic [3:0]       flush = 0, sv = 0, sr, rv, prop = 0;
  logic [3:0][4:0]  sreg, rreg;
  logic [3:0][31:0] sval, rval;

  reg_comm_ring #(.N(4)) dut (.clk, .rst_n, .rank, .flush, .send_valid(sv), .send_ready(sr),
    .send_reg(sreg), .send_val(sval), .recv_valid(rv), .recv_reg(rreg), .recv_val(rval), .prop);

  int acc [4];
  always @(posedge clk)
    if (rst_n) for (int p = 0; p < 4; p++) if (sv[p] && sr[p]) acc[p]++;
  int rcv_cyc [4][$];
  int rcv_val [4][$];
  always @(posedge clk)
    if (rst_n) for (int p = 0; p < 4; p++) if (rv[p]) begin rcv_cyc[p].push_back(cyc); rcv_val[p].push_back(int'(rval[p])); end

  task automatic ck(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    int t0;
    for (int p = 0; p < 4; p++) rank[p] = 2'(p);
    repeat (2) @(posedge clk);
    rst_n = 1;
    // PU 0 sends one value; PUs 1 and 2 propagate it
    @(negedge clk);
    t0 = cyc;
    sv[0] = 1; sreg[0] = 3; sval[0] = 111;
    prop = 4'b1110;
    @(negedge clk); sv = 0;
    repeat (8) @(negedge clk);
    ck(rcv_cyc[1].size(), 1, "PU 1 received");
    if (rcv_cyc[1].size() == 1) ck(rcv_cyc[1][0] - t0, 1, "first hop");
    ck(rcv_cyc[2].size(), 1, "PU 2 received");
    if (rcv_cyc[2].size() == 1 && rcv_cyc[1].size() == 1) ck(rcv_cyc[2][0] - rcv_cyc[1][0], 1, "one cycle per hop");
    ck(rcv_cyc[3].size(), 1, "PU 3 received");
    ck(rcv_cyc[0].size(), 0, "link into the head is cut");
    if (rcv_val[3].size() == 1) ck(rcv_val[3][0], 111, "value");

    // bandwidth: PU 1 sends 4 values back to back, PU 2 sees one per cycle
    for (int p = 0; p < 4; p++) begin rcv_cyc[p].delete(); rcv_val[p].delete(); end
    prop = 0;
    for (int k = 0; k < 4; k++) begin
      sv[1] = 1; sreg[1] = 5'(k); sval[1] = 200 + k;
      @(negedge clk);
    end
    sv = 0;
    repeat (8) @(negedge clk);
    ck(rcv_cyc[2].size(), 4, "four values");
    for (int k = 1; k < rcv_cyc[2].size(); k++) ck(rcv_cyc[2][k] - rcv_cyc[2][k-1], 1, "one per cycle");
    for (int k = 0; k < rcv_val[2].size(); k++) ck(rcv_val[2][k], 200 + k, "order kept");

    // queue full: own send and a propagated value in the same cycles
    for (int p = 0; p < 4; p++) begin rcv_cyc[p].delete(); rcv_val[p].delete(); end
    prop = 4'b0100;
    acc = '{0, 0, 0, 0};
    for (int k = 0; k < 6; k++) begin
      sv[1] = 1; sv[2] = 1; sreg[1] = 1; sreg[2] = 2; sval[1] = 300 + k; sval[2] = 400 + k;
      @(negedge clk);
    end
    sv = 0;
    repeat (20) @(negedge clk);
    ck(rcv_cyc[3].size(), acc[2] + rcv_cyc[2].size(), "PU 3 got everything PU 2 forwarded or sent");
    ck(rcv_cyc[2].size(), acc[1], "PU 2 got everything PU 1 sent");

    // flush empties the queue: build a backlog in PU 1, then flush it
    for (int p = 0; p < 4; p++) begin rcv_cyc[p].delete(); rcv_val[p].delete(); end
    acc = '{0, 0, 0, 0};
    prop = 4'b0010;
    for (int k = 0; k < 3; k++) begin
      sv[0] = 1; sv[1] = 1; sval[0] = 500 + k; sval[1] = 600 + k;
      @(negedge clk);
    end
    sv = 0; prop = 0;
    flush[1] = 1; @(negedge clk); flush = 0;
    repeat (8) @(negedge clk);
    ck(rcv_cyc[2].size() < acc[1] + rcv_cyc[1].size() ? 1 : 0, 1, "flush drops queued values");
    // after the flush the ring works again
    rcv_cyc[2].delete();
    sv[1] = 1; sval[1] = 77; @(negedge clk); sv = 0;
    repeat (3) @(negedge clk);
    ck(rcv_cyc[2].size(), 1, "ring usable after flush");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
