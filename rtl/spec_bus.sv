// spec_bus: split-transaction shared bus with out-of-order completion that
// connects the private L1 data caches to each other and to the L2.
//
// A transaction has an address tenure and, except BusUpg, a data tenure.
// Address tenure: Arb, Addr, Fin, one cycle each, fully pipelined so one
// transaction can be granted per cycle. The grant goes to the least
// speculative requester (addr_arbiter) and puts the transaction in a waiting
// queue. From the next cycle its Ovh count runs (6 cycles for BusRd/BusRdX,
// 0 otherwise: the L2 array access, fully pipelined). Ready entries compete
// for the data tenure, oldest first: data Arb (1 cycle), Ctrl (version
// identification, 4 cycles, 1 for BusUpd), Data (4 cycles for a 64-byte line
// on a 16-byte bus, 1 for the single word of BusUpd), Fin (1 cycle). The data
// Arb stage is the cycle in which the winner is picked, and a pick happens
// only when Ctrl can take it; Ctrl and Data hold one transaction each, and a
// transaction waits in Ctrl while Data is busy. Fin follows Data and
// overlaps the next transaction's Data. A BusRd granted in cycle t therefore delivers its line at the
// end of cycle t+15, the 16-cycle L2 latency.
//
// A transaction takes effect in the last cycle of its Data stage (BusUpg: in
// its address Fin stage). In that cycle cpl carries it to the caches, the
// version unit and the L2, which all act at the next clock edge. Only one
// transaction takes effect per cycle: a BusUpg whose Fin coincides with a
// data completion waits one cycle in Fin and holds the address pipeline.
//
// squash[i] (the thread on PU i was flushed) drops PU i's queued transactions
// other than write-backs; one already in its data tenure runs to the end
// without effect.
//
// Following the document: the stage structure and lengths, pipelining,
// priority of less speculative requests, the waiting queue and the oldest
// ready first data arbitration.
// Own choices: queue depth 2*N (one outstanding transaction per cache, plus a
// squashed one still draining), the effect point at the end of Data, the
// whole line delivered at once (the data stage length models the 16-byte
// beats), the BusUpg/data completion conflict rule, and squashing.
module spec_bus
  import smt_pkg::*;
#(
  parameter int N  = N_PU,
  parameter int WQ = 2 * N_PU   // waiting-queue entries
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  bus_req_t [N-1:0]         req,
  output logic     [N-1:0]         gnt,        // request accepted this cycle
  input  logic     [N-1:0][RANK_W-1:0] rank,
  input  logic     [N-1:0]         squash,
  output bus_cpl_t                 cpl,        // transaction taking effect this cycle
  // activity, for utilisation counters
  output logic                     addr_busy,  // Addr stage occupied
  output bus_op_e                  addr_op,
  output logic                     data_busy,  // Data stage occupied
  output bus_op_e                  data_op
);

  localparam int QW = $clog2(WQ);

  typedef struct packed {
    logic    valid;
    logic    squashed;
    logic    in_data;    // picked for the data tenure
    logic [2:0] ovh;
    logic [7:0] age;
    bus_op_e op;
    logic [PU_W-1:0] src;
    laddr_t  laddr;
    logic [WIDX_W-1:0] widx;
    word_t   wdata;
    wmask_t  wb_mask;
    line_t   wb_data;
  } qent_t;

  qent_t [WQ-1:0] q;

  // address tenure
  logic          addr_v, fin_v;
  logic [QW-1:0] addr_q, fin_q;
  // data tenure
  logic          ctrl_v, data_v;
  logic [QW-1:0] ctrl_q, data_q;
  logic [2:0]    ctrl_cnt, data_cnt;

  // ---------------- free slot and grant ----------------
  logic          have_free;
  logic [QW-1:0] free_idx;
  always_comb begin
    have_free = 1'b0;
    free_idx  = '0;
    for (int i = WQ - 1; i >= 0; i--)
      if (!q[i].valid) begin
        have_free = 1'b1;
        free_idx  = i[QW-1:0];
      end
  end

  logic data_done, upg_fin, upg_stall;
  assign data_done = data_v && data_cnt == 3'd1;
  assign upg_fin   = fin_v && q[fin_q].op == BUS_UPG;
  assign upg_stall = upg_fin && data_done;

  logic [N-1:0] reqv;
  always_comb
    for (int i = 0; i < N; i++) reqv[i] = req[i].valid && !squash[i];

  logic [$clog2(N)-1:0] gidx;
  logic                 gvalid;
  addr_arbiter #(.N(N)) u_arb (
    .en       (have_free && !upg_stall),
    .req      (reqv),
    .rank     (rank),
    .gnt      (gnt),
    .gnt_idx  (gidx),
    .gnt_valid(gvalid)
  );

  // ---------------- data arbitration: oldest ready ----------------
  logic          pick_v;
  logic [QW-1:0] pick_q;
  always_comb begin
    logic [7:0] best;
    pick_v = 1'b0;
    pick_q = '0;
    best   = '0;
    for (int i = 0; i < WQ; i++)
      if (q[i].valid && !q[i].in_data && !q[i].squashed && q[i].op != BUS_UPG &&
          q[i].ovh == 3'd0 && (!pick_v || q[i].age > best)) begin
        pick_v = 1'b1;
        pick_q = i[QW-1:0];
        best   = q[i].age;
      end
  end

  // the data Arb stage is the cycle of the pick; the winner enters Ctrl next
  logic data_free, ctrl_done, ctrl_move, ctrl_free, darb_move;
  assign data_free = !data_v || data_done;
  assign ctrl_done = ctrl_v && ctrl_cnt == 3'd1;
  assign ctrl_move = ctrl_done && data_free;
  assign ctrl_free = !ctrl_v || ctrl_move;
  assign darb_move = pick_v && ctrl_free;

  // ---------------- effect ----------------
  always_comb begin
    cpl = '0;
    if (data_done) begin
      cpl.valid = !q[data_q].squashed;
      cpl.op    = q[data_q].op;
      cpl.src   = q[data_q].src;
      cpl.laddr = q[data_q].laddr;
      cpl.widx  = q[data_q].widx;
      cpl.wdata = q[data_q].wdata;
      cpl.wb_mask = q[data_q].wb_mask;
      cpl.wb_data = q[data_q].wb_data;
    end else if (upg_fin) begin
      cpl.valid = !q[fin_q].squashed;
      cpl.op    = q[fin_q].op;
      cpl.src   = q[fin_q].src;
      cpl.laddr = q[fin_q].laddr;
      cpl.widx  = q[fin_q].widx;
      cpl.wdata = q[fin_q].wdata;
    end
  end

  assign addr_busy = addr_v;
  assign addr_op   = q[addr_q].op;
  assign data_busy = data_v;
  assign data_op   = q[data_q].op;

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q      <= '0;
      addr_v <= 1'b0; fin_v <= 1'b0;
      addr_q <= '0;   fin_q <= '0;
      ctrl_v <= 1'b0; data_v <= 1'b0;
      ctrl_q <= '0;   data_q <= '0;
      ctrl_cnt <= '0; data_cnt <= '0;
    end else begin
      // queue bookkeeping: Ovh countdown, ageing, squashing
      for (int i = 0; i < WQ; i++) begin
        if (q[i].valid) begin
          if (q[i].ovh != 3'd0) q[i].ovh <= q[i].ovh - 3'd1;
          if (q[i].age != 8'hff) q[i].age <= q[i].age + 8'd1;
          if (squash[q[i].src] && q[i].op != BUS_WB) q[i].squashed <= 1'b1;
          // a squashed entry that no stage holds is dropped
          if (q[i].squashed && !q[i].in_data &&
              !(addr_v && addr_q == i[QW-1:0]) && !(fin_v && fin_q == i[QW-1:0]))
            q[i].valid <= 1'b0;
        end
      end

      // address tenure
      if (!upg_stall) begin
        fin_v  <= addr_v;
        fin_q  <= addr_q;
        addr_v <= gvalid;
        addr_q <= free_idx;
        if (upg_fin) q[fin_q].valid <= 1'b0;
      end
      if (gvalid) begin
        q[free_idx].valid    <= 1'b1;
        q[free_idx].squashed <= 1'b0;
        q[free_idx].in_data  <= 1'b0;
        q[free_idx].ovh      <= 3'(lat_ovh(req[gidx].op));
        q[free_idx].age      <= 8'd0;
        q[free_idx].op       <= req[gidx].op;
        q[free_idx].src      <= gidx[PU_W-1:0];
        q[free_idx].laddr    <= req[gidx].laddr;
        q[free_idx].widx     <= req[gidx].widx;
        q[free_idx].wdata    <= req[gidx].wdata;
        q[free_idx].wb_mask  <= req[gidx].wb_mask;
        q[free_idx].wb_data  <= req[gidx].wb_data;
      end

      // data tenure
      if (data_done) q[data_q].valid <= 1'b0;
      if (ctrl_move) begin
        data_v   <= 1'b1;
        data_q   <= ctrl_q;
        data_cnt <= 3'(lat_data(q[ctrl_q].op));
      end else if (data_done) begin
        data_v <= 1'b0;
      end else if (data_v) begin
        data_cnt <= data_cnt - 3'd1;
      end

      if (darb_move) begin
        ctrl_v   <= 1'b1;
        ctrl_q   <= pick_q;
        ctrl_cnt <= 3'(lat_ctrl(q[pick_q].op));
        q[pick_q].in_data <= 1'b1;
      end else if (ctrl_move) begin
        ctrl_v <= 1'b0;
      end else if (ctrl_v && ctrl_cnt != 3'd1) begin
        ctrl_cnt <= ctrl_cnt - 3'd1;
      end
    end
  end

  // the waiting queue never overflows: a grant needs a free entry
  property p_no_grant_when_full;
    @(posedge clk) disable iff (!rst_n) gvalid |-> have_free;
  endproperty
  assert property (p_no_grant_when_full);

  // only one transaction takes effect per cycle
  property p_one_effect;
    @(posedge clk) disable iff (!rst_n) !(data_done && upg_fin && !upg_stall);
  endproperty
  assert property (p_one_effect);

endmodule
