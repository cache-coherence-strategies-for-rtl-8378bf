// reg_comm_ring: register communication network between the processing
// units.
//
// Register values produced by a thread travel to the threads that follow it.
// The PUs form a ring in thread order (PU p sends to PU p+1). Each link
// carries one register value per cycle and takes one cycle: a value leaving
// PU p in cycle t is presented to PU p+1 in cycle t+1 (recv_*). A PU passes
// on a value it received and does not redefine by asserting prop in the
// cycle it sees it ("update and propagate"); its own new values enter with
// send_valid/send_ready. Both go through a small per-PU outgoing queue that
// takes up to two entries per cycle (a propagated value first) and drains
// one per cycle; a value entering an empty queue leaves in the same edge. The link out of the most speculative PU, into the head, is
// cut: an older thread never consumes a younger thread's registers.
//
// Following the document: the ring of adjacent PUs, one-cycle latency,
// one register per cycle of bandwidth, update and propagate.
// Own choices: the queue and its depth, the priority of propagated values,
// the register-number and value widths, and the compiler-directed choice of
// what to send being left to the PU (send and prop).
module reg_comm_ring
  import smt_pkg::*;
#(
  parameter int N     = N_PU,
  parameter int REG_W = 5,    // architectural register number
  parameter int VAL_W = 32,
  parameter int QD    = 4     // outgoing queue depth
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N-1:0][RANK_W-1:0]  rank,
  input  logic [N-1:0]              flush,
  input  logic [N-1:0]              send_valid,
  output logic [N-1:0]              send_ready,
  input  logic [N-1:0][REG_W-1:0]   send_reg,
  input  logic [N-1:0][VAL_W-1:0]   send_val,
  output logic [N-1:0]              recv_valid,
  output logic [N-1:0][REG_W-1:0]   recv_reg,
  output logic [N-1:0][VAL_W-1:0]   recv_val,
  input  logic [N-1:0]              prop
);

  localparam int CW = $clog2(QD + 1);
  localparam int IW = $clog2(QD);

  typedef struct packed {
    logic [REG_W-1:0] r;
    logic [VAL_W-1:0] v;
  } msg_t;

  msg_t [N-1:0][QD-1:0] q;
  logic [N-1:0][CW-1:0] cnt;
  logic [N-1:0]         link_v;
  msg_t [N-1:0]         link;     // link[p]: from PU p-1 into PU p

  always_comb
    for (int p = 0; p < N; p++) begin
      recv_valid[p] = link_v[p];
      recv_reg[p]   = link[p].r;
      recv_val[p]   = link[p].v;
      // room for a propagated value and the own one
      send_ready[p] = int'(cnt[p]) + (prop[p] && link_v[p] ? 1 : 0) < QD;
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q      <= '0;
      cnt    <= '0;
      link_v <= '0;
      link   <= '0;
    end else begin
      for (int p = 0; p < N; p++) begin
        automatic int nxt = (p + 1) % N;
        automatic int c   = int'(cnt[p]);
        automatic msg_t [QD-1:0] qq = q[p];
        // enqueue (a propagated value first, then the own one), then drain
        // the oldest entry onto the link, so an empty queue costs no cycle
        if (prop[p] && link_v[p] && c < QD) begin
          qq[IW'(c)] = link[p];
          c++;
        end
        if (send_valid[p] && send_ready[p] && c < QD) begin
          qq[IW'(c)] = '{r: send_reg[p], v: send_val[p]};
          c++;
        end
        link_v[nxt] <= 1'b0;
        if (c > 0) begin
          link_v[nxt] <= !(rank[p] == RANK_W'(N - 1)) && !flush[p];
          link[nxt]   <= qq[0];
          for (int i = 0; i < QD - 1; i++) qq[i] = qq[i+1];
          c--;
        end
        if (flush[p]) c = 0;
        q[p]   <= qq;
        cnt[p] <= CW'(c);
      end
    end
  end

endmodule
