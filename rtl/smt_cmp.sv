// smt_cmp: memory system of a four-PU chip multiprocessor for speculative
// multithreading.
//
// A sequential program is cut into threads that run in program order on the
// PUs, round-robin. Each PU has private L1 instruction and data caches; the
// data caches are kept coherent over a shared split-transaction bus, and
// they also do the work of thread-level memory speculation: they keep each
// speculative thread's stores, keep the versions apart, and detect when a
// less speculative thread stores to a word a more speculative thread has
// already loaded (a dependency violation, which flushes that thread and its
// successors). The protocol is selectable (PROT): invalidation or update
// based, with or without read-broadcast ("snarfing") of lines that other
// caches fetch; EXCL selects whether exclusive states are managed.
//
// Blocks: thread_ctrl (thread order, commit, flush), l1_dcache x N,
// spec_bus (address/data tenures), version_unit (version identification in
// the bus Ctrl stage), l2_cache (ideal shared L2), l1_icache x N with
// ifill_unit (instruction fills with read-broadcast), thread_predictor
// (next-thread prediction) and reg_comm_ring (register values between
// neighbouring PUs). The processing units are outside: their data-cache,
// fetch, register and thread signals are ports, one element per PU.
//
// Thread handshake: a PU raises done[p] when its thread ends; commits happen
// in order; start[p] pulses when PU p is given a new thread, whose predicted
// start address is start_addr (valid with start). thread_addr[p] is the start
// address of the thread the PU runs, used to train the predictor at commit
// and, with flush_req[p] (a PU's misprediction report), to repair the
// predictor's path. flush[p]/restart[p] tell a PU its thread was squashed and
// when it may restart.
//
// Defaults follow the document: four PUs, 16-kB 2-way 64-byte-line caches,
// the bus latencies, update protocol with read-broadcast on read and write
// misses, exclusivity managed. The L2 size is this design's own choice.
module smt_cmp
  import smt_pkg::*;
#(
  parameter protocol_e PROT     = PROT_UPD_RWBR,
  parameter bit        EXCL     = 1'b1,
  parameter int        DC_BYTES = 16384,
  parameter int        IC_BYTES = 16384,
  parameter int        L2_LINES = 4096
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // data-cache ports
  input  logic   [N_PU-1:0]             d_req_valid,
  output logic   [N_PU-1:0]             d_req_ready,
  input  logic   [N_PU-1:0]             d_req_we,
  input  logic   [N_PU-1:0][ADDR_W-1:0] d_req_addr,
  input  word_t  [N_PU-1:0]             d_req_wdata,
  output logic   [N_PU-1:0]             d_resp_valid,
  output word_t  [N_PU-1:0]             d_resp_rdata,
  // instruction fetch
  input  logic   [N_PU-1:0]             i_fetch_valid,
  output logic   [N_PU-1:0]             i_fetch_ready,
  input  logic   [N_PU-1:0][ADDR_W-1:0] i_fetch_addr,
  output logic   [N_PU-1:0]             i_resp_valid,
  output logic   [N_PU-1:0][127:0]      i_resp_data,
  // threads
  input  logic   [N_PU-1:0]             done,
  input  logic   [N_PU-1:0]             flush_req,
  input  logic   [N_PU-1:0][ADDR_W-1:0] thread_addr,
  output logic   [N_PU-1:0][RANK_W-1:0] rank,
  output logic   [N_PU-1:0]             flush,
  output logic   [N_PU-1:0]             restart,
  output logic   [N_PU-1:0]             start,
  output logic   [ADDR_W-1:0]           start_addr,
  output logic   [N_PU-1:0]             violation,
  // register communication
  input  logic   [N_PU-1:0]             rc_send_valid,
  output logic   [N_PU-1:0]             rc_send_ready,
  input  logic   [N_PU-1:0][4:0]        rc_send_reg,
  input  word_t  [N_PU-1:0]             rc_send_val,
  output logic   [N_PU-1:0]             rc_recv_valid,
  output logic   [N_PU-1:0][4:0]        rc_recv_reg,
  output word_t  [N_PU-1:0]             rc_recv_val,
  input  logic   [N_PU-1:0]             rc_prop,
  // activity, for performance counters
  output logic                          bus_addr_busy,
  output bus_op_e                       bus_addr_op,
  output logic                          bus_data_busy,
  output bus_op_e                       bus_data_op,
  output logic   [N_PU-1:0]             dc_hit,
  output logic   [N_PU-1:0]             dc_miss,
  output logic   [N_PU-1:0]             dc_snarf,
  output logic   [N_PU-1:0]             dc_evict_wb,
  output logic   [N_PU-1:0]             dc_stall,
  output logic   [N_PU-1:0]             ic_snarf,
  output logic   [N_PU-1:0]             commit_evt
);

  // ---------------- thread control ----------------
  logic [N_PU-1:0] spec, nonspec, commit, commit_done;
  logic [PU_W-1:0] head;

  thread_ctrl #(.N(N_PU)) u_tc (
    .clk, .rst_n, .done, .flush_req, .violation, .commit_done,
    .rank, .spec, .head, .flush, .restart, .nonspec, .commit, .start
  );
  assign commit_evt = commit_done;

  // ---------------- thread predictor ----------------
  logic [ADDR_W-1:0] pred_addr;
  logic              pred_long;
  logic [ADDR_W-1:0] rec_addr;
  // a misprediction report carries the true start address of the thread
  always_comb begin
    rec_addr = '0;
    for (int p = 0; p < N_PU; p++) if (flush_req[p]) rec_addr = thread_addr[p];
  end
  thread_predictor u_tp (
    .clk, .rst_n,
    .pred_req  (|start),
    .pred_addr (pred_addr),
    .pred_long (pred_long),
    .upd_valid (commit_done[head]),
    .upd_next  (thread_addr[head]),
    .recover   (|flush_req),
    .recover_addr (rec_addr)
  );
  assign start_addr = pred_addr;

  // ---------------- data side ----------------
  bus_req_t   [N_PU-1:0] breq;
  logic       [N_PU-1:0] bgnt, bsquash;
  bus_cpl_t              cpl;
  snoop_rsp_t [N_PU-1:0] rsp;
  snoop_ctl_t [N_PU-1:0] ctl;
  line_t                 fill_data, l2_line, l2_wdata, l2_iline;
  wmask_t                fill_spec, l2_mask;
  logic                  fill_shared, l2_we;
  laddr_t                l2_iaddr;

  spec_bus #(.N(N_PU)) u_bus (
    .clk, .rst_n,
    .req       (breq),
    .gnt       (bgnt),
    .rank      (rank),
    .squash    (bsquash),
    .cpl       (cpl),
    .addr_busy (bus_addr_busy),
    .addr_op   (bus_addr_op),
    .data_busy (bus_data_busy),
    .data_op   (bus_data_op)
  );

  version_unit #(.N(N_PU), .PROT(PROT)) u_vu (
    .cpl, .rank, .rsp, .l2_line,
    .fill_data, .fill_spec, .shared(fill_shared), .ctl,
    .l2_we, .l2_mask, .l2_wdata
  );

  l2_cache #(.L2_LINES(L2_LINES)) u_l2 (
    .clk,
    .raddr  (cpl.laddr),
    .rdata  (l2_line),
    .raddr2 (l2_iaddr),
    .rdata2 (l2_iline),
    .we     (l2_we),
    .waddr  (cpl.laddr),
    .wmask  (l2_mask),
    .wdata  (l2_wdata)
  );

  for (genvar p = 0; p < N_PU; p++) begin : g_dc
    l1_dcache #(.PU_ID(PU_W'(p)), .PROT(PROT), .EXCL(EXCL), .SIZE_BYTES(DC_BYTES)) u_dc (
      .clk, .rst_n,
      .req_valid   (d_req_valid[p]),
      .req_ready   (d_req_ready[p]),
      .req_we      (d_req_we[p]),
      .req_addr    (d_req_addr[p]),
      .req_wdata   (d_req_wdata[p]),
      .resp_valid  (d_resp_valid[p]),
      .resp_rdata  (d_resp_rdata[p]),
      .spec        (spec[p]),
      .flush       (flush[p]),
      .nonspec     (nonspec[p]),
      .commit      (commit[p]),
      .commit_done (commit_done[p]),
      .violation   (violation[p]),
      .bus_req     (breq[p]),
      .bus_gnt     (bgnt[p]),
      .bus_squash  (bsquash[p]),
      .cpl         (cpl),
      .snp_rsp     (rsp[p]),
      .snp_ctl     (ctl[p]),
      .fill_data   (fill_data),
      .fill_spec   (fill_spec),
      .fill_shared (fill_shared),
      .ev_hit      (dc_hit[p]),
      .ev_miss     (dc_miss[p]),
      .ev_snarf    (dc_snarf[p]),
      .ev_evict_wb (dc_evict_wb[p]),
      .ev_stall    (dc_stall[p])
    );
  end

  // ---------------- instruction side ----------------
  logic   [N_PU-1:0] imiss;
  laddr_t [N_PU-1:0] imiss_laddr;
  logic              ifill_valid;
  logic [PU_W-1:0]   ifill_src;
  laddr_t            ifill_laddr;
  line_t             ifill_line;

  ifill_unit #(.N(N_PU)) u_if (
    .clk, .rst_n,
    .miss_valid (imiss),
    .miss_laddr (imiss_laddr),
    .l2_raddr   (l2_iaddr),
    .l2_rdata   (l2_iline),
    .fill_valid (ifill_valid),
    .fill_src   (ifill_src),
    .fill_laddr (ifill_laddr),
    .fill_line  (ifill_line)
  );

  for (genvar p = 0; p < N_PU; p++) begin : g_ic
    l1_icache #(.PU_ID(PU_W'(p)), .SIZE_BYTES(IC_BYTES)) u_ic (
      .clk, .rst_n,
      .fetch_valid (i_fetch_valid[p]),
      .fetch_ready (i_fetch_ready[p]),
      .fetch_addr  (i_fetch_addr[p]),
      .resp_valid  (i_resp_valid[p]),
      .resp_data   (i_resp_data[p]),
      .miss_valid  (imiss[p]),
      .miss_laddr  (imiss_laddr[p]),
      .fill_valid  (ifill_valid),
      .fill_src    (ifill_src),
      .fill_laddr  (ifill_laddr),
      .fill_line   (ifill_line),
      .ev_snarf    (ic_snarf[p])
    );
  end

  // ---------------- register communication ----------------
  reg_comm_ring #(.N(N_PU), .REG_W(5), .VAL_W(WORD_W)) u_rc (
    .clk, .rst_n, .rank, .flush,
    .send_valid (rc_send_valid),
    .send_ready (rc_send_ready),
    .send_reg   (rc_send_reg),
    .send_val   (rc_send_val),
    .recv_valid (rc_recv_valid),
    .recv_reg   (rc_recv_reg),
    .recv_val   (rc_recv_val),
    .prop       (rc_prop)
  );

endmodule
