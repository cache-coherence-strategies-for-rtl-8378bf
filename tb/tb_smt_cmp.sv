// tb_smt_cmp: end-to-end test of the whole memory system at its default
// (document) parameters, with four behavioural processing units.
//
// The workload is a loop cut into threads. Thread k:
//   fetches its code (instruction cache), loads a shared counter S, waits a
//   random time, stores S+1 (a loop-carried dependence through memory),
//   stores a private word P[k] (the P[k] map to one cache set, so lines are
//   evicted and written back), loads a word of a read-only table (misses that
//   other caches can snarf), sends a register value to the next PU, and ends.
// Threads start at one of three code addresses in a repeating pattern; the
// PU checks the predicted start address it is given and, when it is wrong,
// asks for its thread to be flushed (a thread misprediction).
//
// Checks: a committed thread k must have loaded S == k (sequential
// semantics, whatever speculation, violations and restarts happened); the
// thread after the last one, once it is the head, reads S == T; register values
// arrive from the previous PU. Every mechanism (hits, misses, each bus
// operation, snarfing in both caches, eviction write-backs, violations,
// misprediction flushes, commits, correct thread predictions, register
// transfers) must be seen at least once.
// Timing: the PU models drive inputs with nonblocking assignments at the
// clock edge. The workload is this testbench's own; the configuration
// (four PUs, 16-kB caches, upd-rwbr) is the document's main one.
module tb_smt_cmp;
  import smt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int T = 48;
  localparam logic [31:0] S_ADDR = 32'h0000_0400;
  localparam logic [31:0] P_BASE = 32'h0001_0000;
  localparam logic [31:0] R_BASE = 32'h0003_0000;

  logic   [3:0]         d_req_valid, d_req_ready, d_req_we, d_resp_valid;
  logic   [3:0][31:0]   d_req_addr;
  word_t  [3:0]         d_req_wdata, d_resp_rdata;
  logic   [3:0]         i_fetch_valid, i_fetch_ready, i_resp_valid;
  logic   [3:0][31:0]   i_fetch_addr;
  logic   [3:0][127:0]  i_resp_data;
  logic   [3:0]         done, flush_req, flush, restart, start, violation;
  logic   [3:0][31:0]   thread_addr;
  logic   [3:0][1:0]    rank;
  logic   [31:0]        start_addr;
  logic   [3:0]         rc_send_valid, rc_send_ready, rc_recv_valid, rc_prop;
  logic   [3:0][4:0]    rc_send_reg, rc_recv_reg;
  word_t  [3:0]         rc_send_val, rc_recv_val;
  logic                 bus_addr_busy, bus_data_busy;
  bus_op_e              bus_addr_op, bus_data_op;
  logic   [3:0]         dc_hit, dc_miss, dc_snarf, dc_evict_wb, dc_stall, ic_snarf, commit_evt;

  assign rc_prop = '0;
  smt_cmp dut (.*);

  function automatic logic [31:0] taddr(int k);
    return 32'h0000_8000 + 32'(k % 3) * 32'h100;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_hit, n_miss, n_dsnarf, n_isnarf, n_evwb, n_stall, n_viol, n_mispred, n_commit, n_pred_ok, n_ring;
  int n_op [5];
  bus_op_e last_aop;
  always @(posedge clk) if (rst_n) begin
    n_hit    += $countones(dc_hit);
    n_miss   += $countones(dc_miss);
    n_dsnarf += $countones(dc_snarf);
    n_isnarf += $countones(ic_snarf);
    n_evwb   += $countones(dc_evict_wb);
    n_stall  += $countones(dc_stall);
    n_viol   += $countones(violation);
    n_commit += $countones(commit_evt);
    for (int p = 0; p < 4; p++) if (rc_recv_valid[p]) begin
      n_ring++;
      checks++;
      if (rc_recv_val[p] % 4 != (p + 3) % 4) begin
        failures++; $display("FAIL PU%0d received a register from the wrong PU (%0d)", p, rc_recv_val[p]);
      end
    end
  end
  // bus operations: count address tenures by their Addr stage
  always @(posedge clk)
    if (rst_n && bus_addr_busy) n_op[int'(bus_addr_op)]++;

  // ---------------- processing units ----------------
  typedef enum {P_FETCH, P_FWAIT, P_GO, P_LDS, P_DELAY, P_STS, P_STP, P_LDR, P_RING, P_DONE, P_FLUSHED, P_IDLE} pst_e;
  pst_e  st [4];
  int    tn [4], sval [4], dly [4];
  logic  outst [4];
  logic  finished;
  // values driven into the design; copied with nonblocking assignments at
  // the end of each clock so the design samples them one edge later
  logic  [3:0]        dv, dwe, iv, dn, frq, sv;
  logic  [3:0][31:0]  da, ia, ta;
  word_t [3:0]        dwd, sval_o;
  logic  [3:0][4:0]   sreg;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < 4; p++) begin
        st[p] = P_FETCH; tn[p] = p; outst[p] = 0;
        ta[p] = taddr(p);
      end
      dv = 0; dwe = 0; da = '0; dwd = '0;
      iv = 0; ia = '0;
      dn = 0; frq = 0; sv = 0; sreg = '0; sval_o = '0; finished = 0;
    end else begin
      for (int p = 0; p < 4; p++) begin
        // handshakes of the previous cycle
        automatic logic dacc = dv[p] && d_req_ready[p];
        automatic logic iacc = iv[p] && i_fetch_ready[p];
        automatic logic sacc = sv[p] && rc_send_ready[p];
        dn[p] = 0; frq[p] = 0;
        if (dacc) begin dv[p] = 0; outst[p] = 1; end
        if (iacc) begin iv[p] = 0; outst[p] = 1; end
        if (sacc) sv[p] = 0;

        if (flush[p]) begin
          st[p] = P_FLUSHED; outst[p] = 0;
          dv[p] = 0; iv[p] = 0; sv[p] = 0;
        end else if (start[p]) begin
          // new thread; check the predicted start address
          tn[p] += 4;
          ta[p] = taddr(tn[p]);
          outst[p] = 0;
          st[p] = tn[p] > T ? P_IDLE : P_FETCH;
          if (start_addr == taddr(tn[p])) n_pred_ok++;
          else if (tn[p] <= T) begin n_mispred++; frq[p] = 1; end
        end else begin
          case (st[p])
            P_FLUSHED: if (restart[p]) st[p] = P_FETCH;
            P_FETCH: begin
              iv[p] = 1; ia[p] = thread_addr[p] + 32'(16 * (tn[p] % 4));
              st[p] = P_FWAIT;
            end
            P_FWAIT: if (outst[p] && i_resp_valid[p]) begin
              outst[p] = 0;
              st[p] = P_GO;
            end
            P_GO: if (tn[p] < T || rank[p] == 0) begin
              dv[p] = 1; dwe[p] = 0; da[p] = S_ADDR;
              st[p] = P_LDS;
            end
            P_LDS: if (outst[p] && d_resp_valid[p]) begin
              outst[p] = 0;
              sval[p] = int'(d_resp_rdata[p]);
              if (tn[p] == T) begin
                checks++;
                if (sval[p] != T) begin failures++; $display("FAIL final S=%0d expected %0d", sval[p], T); end
                finished = 1;
                st[p] = P_IDLE;
              end else begin
                dly[p] = $urandom_range(0, 24);
                st[p] = P_DELAY;
              end
            end
            P_DELAY: if (dly[p] == 0) begin
              dv[p] = 1; dwe[p] = 1; da[p] = S_ADDR; dwd[p] = word_t'(sval[p] + 1);
              st[p] = P_STS;
            end else dly[p]--;
            P_STS: if (outst[p] && d_resp_valid[p]) begin
              outst[p] = 0;
              dv[p] = 1; dwe[p] = 1;
              da[p] = P_BASE + 32'(tn[p] % 16) * 32'h2000; dwd[p] = word_t'(tn[p] * 7);
              st[p] = P_STP;
            end
            P_STP: if (outst[p] && d_resp_valid[p]) begin
              outst[p] = 0;
              dv[p] = 1; dwe[p] = 0;
              da[p] = R_BASE + 32'((tn[p] / 2) * 64 + (tn[p] % 16) * 4);
              st[p] = P_LDR;
            end
            P_LDR: if (outst[p] && d_resp_valid[p]) begin
              outst[p] = 0;
              checks++;
              if (d_resp_rdata[p] != 0) begin failures++; $display("FAIL read-only table value"); end
              sv[p] = 1; sreg[p] = 5'd1; sval_o[p] = word_t'(tn[p]);
              st[p] = P_RING;
            end
            P_RING: if (!sv[p]) begin
              dn[p] = 1;
              st[p] = P_DONE;
            end
            default: ;
          endcase
        end
        // commit of this PU's thread: its load of S must have been k
        if (commit_evt[p] && tn[p] < T) begin
          checks++;
          if (sval[p] != tn[p]) begin
            failures++; $display("FAIL thread %0d committed with S=%0d", tn[p], sval[p]);
          end
        end
      end
    end
    d_req_valid <= dv; d_req_we <= dwe; d_req_addr <= da; d_req_wdata <= dwd;
    i_fetch_valid <= iv; i_fetch_addr <= ia; done <= dn; flush_req <= frq;
    rc_send_valid <= sv; rc_send_reg <= sreg; rc_send_val <= sval_o; thread_addr <= ta;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (finished);
    repeat (5) @(posedge clk);
    $display("hits=%0d misses=%0d dsnarf=%0d isnarf=%0d evict_wb=%0d stall=%0d viol=%0d mispred=%0d commits=%0d pred_ok=%0d ring=%0d",
             n_hit, n_miss, n_dsnarf, n_isnarf, n_evwb, n_stall, n_viol, n_mispred, n_commit, n_pred_ok, n_ring);
    $display("bus ops: WB=%0d RD=%0d RDX=%0d UPD=%0d UPG=%0d", n_op[0], n_op[1], n_op[2], n_op[3], n_op[4]);
    checks++; if (n_commit != T) begin failures++; $display("FAIL commits %0d", n_commit); end
    checks++; if (n_hit == 0)     begin failures++; $display("FAIL no hit"); end
    checks++; if (n_miss == 0)    begin failures++; $display("FAIL no miss"); end
    checks++; if (n_dsnarf == 0)  begin failures++; $display("FAIL no data snarf"); end
    checks++; if (n_isnarf == 0)  begin failures++; $display("FAIL no instruction snarf"); end
    checks++; if (n_evwb == 0)    begin failures++; $display("FAIL no eviction write-back"); end
    checks++; if (n_viol == 0)    begin failures++; $display("FAIL no violation"); end
    checks++; if (n_mispred == 0) begin failures++; $display("FAIL no misprediction"); end
    checks++; if (n_pred_ok == 0) begin failures++; $display("FAIL no correct prediction"); end
    checks++; if (n_ring == 0)    begin failures++; $display("FAIL no register transfer"); end
    checks++; if (n_op[int'(BUS_RD)] == 0)  begin failures++; $display("FAIL no BusRd"); end
    checks++; if (n_op[int'(BUS_RDX)] == 0) begin failures++; $display("FAIL no BusRdX"); end
    checks++; if (n_op[int'(BUS_UPD)] == 0) begin failures++; $display("FAIL no BusUpd"); end
    checks++; if (n_op[int'(BUS_WB)] == 0)  begin failures++; $display("FAIL no BusWb"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: tn=%0d %0d %0d %0d st=%0d %0d %0d %0d", tn[0], tn[1], tn[2], tn[3], st[0], st[1], st[2], st[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
