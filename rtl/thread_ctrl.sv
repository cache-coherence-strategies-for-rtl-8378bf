// thread_ctrl: orders the speculative threads running on the processing
// units and sequences their commit and flush.
//
// Threads are handed to the PUs round-robin in program order, so the thread
// order is the PU order starting at the head: the PU running the oldest,
// non-speculative thread. rank[p] = (p - head) mod N is the thread's distance
// from the head (0: non-speculative); the caches and the bus use it to tell
// less from more speculative threads.
//
// Commit: when the head PU reports its thread done, commit[head] pulses; the
// head's cache does its commit work and answers commit_done; then the head
// moves to the next PU, which gets nonspec (PrNonSpec) one cycle later, and
// the old head gets start: it is handed the next, most speculative thread.
// A speculative thread that finishes early waits (done is remembered) until
// it becomes the head.
//
// Flush: a dependency violation reported by the cache of PU p, or a
// misprediction flush request for PU p, flushes p's thread and all more
// speculative ones: flush pulses one cycle later on each of them, and
// restart pulses one cycle after that (one cycle of penalty). The head is
// never flushed: requests for it are ignored.
//
// Following the document: round-robin assignment, the flush of the violating
// or mispredicted thread and all its successors, the one-cycle restart
// penalty, commit of the non-speculative thread and promotion of the next.
// Own choices: the handshake signals and their timing.
module thread_ctrl
  import smt_pkg::*;
#(
  parameter int N = N_PU
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N-1:0]             done,        // PU finished its thread
  input  logic [N-1:0]             flush_req,   // misprediction: flush this thread and successors
  input  logic [N-1:0]             violation,   // from the data caches
  input  logic [N-1:0]             commit_done,
  output logic [N-1:0][RANK_W-1:0] rank,
  output logic [N-1:0]             spec,
  output logic [$clog2(N)-1:0]     head,
  output logic [N-1:0]             flush,
  output logic [N-1:0]             restart,
  output logic [N-1:0]             nonspec,
  output logic [N-1:0]             commit,
  output logic [N-1:0]             start
);

  localparam int HW = $clog2(N);

  logic [N-1:0] done_l;
  logic         cwait;

  always_comb
    for (int p = 0; p < N; p++) begin
      rank[p] = RANK_W'(HW'(p) - head);
      spec[p] = rank[p] != '0;
    end

  // lowest-ranked PU asking for a flush, and everything after it
  logic [N-1:0] flush_set;
  always_comb begin
    logic              any;
    logic [RANK_W-1:0] lo;
    any = 1'b0;
    lo  = '1;
    for (int p = 0; p < N; p++)
      if ((violation[p] || flush_req[p]) && spec[p] && (!any || rank[p] < lo)) begin
        any = 1'b1;
        lo  = rank[p];
      end
    for (int p = 0; p < N; p++) flush_set[p] = any && rank[p] >= lo;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head    <= '0;
      done_l  <= '0;
      cwait   <= 1'b0;
      flush   <= '0;
      restart <= '0;
      nonspec <= '0;
      commit  <= '0;
      start   <= '0;
    end else begin
      flush   <= flush_set;
      restart <= flush;
      nonspec <= '0;
      commit  <= '0;
      start   <= '0;
      done_l  <= (done_l | done) & ~flush_set & ~flush;

      if (!cwait) begin
        if (done_l[head] && !commit[head]) begin
          commit[head] <= 1'b1;
          cwait        <= 1'b1;
        end
      end else if (commit_done[head]) begin
        cwait                    <= 1'b0;
        head                     <= (head == HW'(N - 1)) ? '0 : head + 1'b1;
        nonspec[(head == HW'(N - 1)) ? '0 : head + 1'b1] <= 1'b1;
        start[head]              <= 1'b1;
        done_l[head]             <= 1'b0;
      end
    end
  end

endmodule
