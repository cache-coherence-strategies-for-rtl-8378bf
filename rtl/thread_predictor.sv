// thread_predictor: dual-length path-based thread predictor.
//
// A thread is named by its start address. The predictor guesses the start
// address of the thread that follows the current one in program order, one
// prediction per cycle. Two path-based component predictors look at the
// sequence (path) of the most recent thread start addresses: one with path
// length 1 (the last thread only) and one with path length 4. Each has a
// 2048-entry table of predicted next-thread addresses, indexed by a hash of
// its path. A 4096-entry table of 3-bit saturating counters, indexed by a
// hash of the last two threads, selects which component to believe
// (counter >= 4: the length-4 component).
//
// Two path registers are kept: a speculative one, advanced with every
// prediction so that consecutive predictions chain, and a committed one.
// Update is lazy: tables are written only when a thread commits and its
// true successor is known (upd_valid, upd_next), using the committed path.
// recover repairs the newest entry of the speculative path with the true
// start address of the mispredicted thread (recover_addr).
//
// Interface: pred_req with pred_addr valid in the same cycle (combinational
// table read); the path advances at the clock edge.
//
// Following the document: the two path lengths, the table sizes, 3-bit
// selection counters, one prediction per cycle, lazy update.
// Own choices: the hash functions, storing the full word address of the next
// thread, the selection rule and counter update, zero initial tables.
module thread_predictor
  import smt_pkg::*;
#(
  parameter int PT_ENTRIES  = 2048,  // each path-based table
  parameter int SEL_ENTRIES = 4096,  // selection table
  parameter int LONG_LEN    = 4      // path length of the long component (short is 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pred_req,
  output logic [ADDR_W-1:0] pred_addr,
  output logic              pred_long,    // prediction came from the long path
  input  logic              upd_valid,
  input  logic [ADDR_W-1:0] upd_next,     // actual successor of the oldest committed path
  input  logic              recover,
  input  logic [ADDR_W-1:0] recover_addr  // true start address of the mispredicted thread
);

  localparam int PW = $clog2(PT_ENTRIES);
  localparam int SW = $clog2(SEL_ENTRIES);
  localparam int AW = ADDR_W - 2;   // word address

  typedef logic [AW-1:0] waddr_t;

  waddr_t      spath [LONG_LEN];   // [0] most recent
  waddr_t      cpath [LONG_LEN];
  waddr_t      t_short [PT_ENTRIES];
  waddr_t      t_long  [PT_ENTRIES];
  logic [2:0]  t_sel   [SEL_ENTRIES];

  initial begin
    for (int i = 0; i < PT_ENTRIES; i++) begin
      t_short[i] = '0;
      t_long[i]  = '0;
    end
    for (int i = 0; i < SEL_ENTRIES; i++) t_sel[i] = 3'd3;
  end

  function automatic logic [PW-1:0] fold_p(waddr_t a);
    logic [PW-1:0] h;
    h = '0;
    for (int b = 0; b < AW; b += PW) h ^= PW'(a >> b);
    return h;
  endfunction

  function automatic logic [PW-1:0] h_short(waddr_t p [LONG_LEN]);
    return fold_p(p[0]);
  endfunction

  function automatic logic [PW-1:0] h_long(waddr_t p [LONG_LEN]);
    logic [PW-1:0] h;
    h = '0;
    for (int i = 0; i < LONG_LEN; i++) h ^= fold_p(p[i] << i) ^ PW'(i);
    return h;
  endfunction

  function automatic logic [SW-1:0] h_sel(waddr_t p [LONG_LEN]);
    logic [SW-1:0] h;
    h = '0;
    for (int b = 0; b < AW; b += SW) h ^= SW'(p[0] >> b) ^ SW'((p[1] << 3) >> b);
    return h;
  endfunction

  // prediction
  waddr_t p_s, p_l;
  assign p_s       = t_short[h_short(spath)];
  assign p_l       = t_long[h_long(spath)];
  assign pred_long = t_sel[h_sel(spath)][2];
  assign pred_addr = {pred_long ? p_l : p_s, 2'b00};

  // update values from the committed path
  logic [PW-1:0] u_is, u_il;
  logic [SW-1:0] u_isel;
  logic          u_sok, u_lok;
  waddr_t        u_next;
  assign u_is   = h_short(cpath);
  assign u_il   = h_long(cpath);
  assign u_isel = h_sel(cpath);
  assign u_next = upd_next[ADDR_W-1:2];
  assign u_sok  = t_short[u_is] == u_next;
  assign u_lok  = t_long[u_il] == u_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LONG_LEN; i++) begin
        spath[i] <= '0;
        cpath[i] <= '0;
      end
    end else begin
      if (upd_valid) begin
        cpath[0] <= u_next;
        for (int i = 1; i < LONG_LEN; i++) cpath[i] <= cpath[i-1];
      end
      if (recover) begin
        spath[0] <= recover_addr[ADDR_W-1:2];
      end else if (pred_req) begin
        spath[0] <= pred_addr[ADDR_W-1:2];
        for (int i = 1; i < LONG_LEN; i++) spath[i] <= spath[i-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && upd_valid) begin
      t_short[u_is] <= u_next;
      t_long[u_il]  <= u_next;
      if (u_lok && !u_sok && t_sel[u_isel] != 3'd7) t_sel[u_isel] <= t_sel[u_isel] + 3'd1;
      if (u_sok && !u_lok && t_sel[u_isel] != 3'd0) t_sel[u_isel] <= t_sel[u_isel] - 3'd1;
    end
  end

endmodule
