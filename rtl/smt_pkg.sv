// smt_pkg: types and constants shared by the speculative-multithreading CMP
// memory system.
//
// The machine has N_PU processing units, each with a private L1 data cache
// whose state is kept per 32-bit word. A word's state has five independent
// parts: the conventional MOESI part and four speculation bits
// (U speculative, V violation possible, C committed, D delayed invalidation).
// The bus carries five transaction types (BusWb, BusRd, BusRdX, BusUpd,
// BusUpg); their stage lengths come from the bus latency table of the
// design and are given here as functions of the transaction type.
//
// Following the document: four PUs, 64-byte lines, 16-byte data bus,
// the five protocols and the per-transaction stage lengths.
// Own choices: 32-bit addresses and words, the encodings of every enum.
package smt_pkg;

  localparam int N_PU       = 4;    // processing units
  localparam int RANK_W     = $clog2(N_PU);
  localparam int PU_W       = $clog2(N_PU);
  localparam int ADDR_W     = 32;   // byte address
  localparam int WORD_W     = 32;   // word size used for per-word state
  localparam int LINE_BYTES = 64;
  localparam int WPL        = LINE_BYTES / (WORD_W / 8);   // words per line (16)
  localparam int WIDX_W     = $clog2(WPL);
  localparam int OFS_W      = $clog2(LINE_BYTES);
  localparam int LADDR_W    = ADDR_W - OFS_W;               // line address width
  localparam int DBUS_BYTES = 16;   // data bus width
  localparam int LINE_W     = LINE_BYTES * 8;

  typedef logic [LINE_W-1:0]  line_t;
  typedef logic [WPL-1:0]     wmask_t;
  typedef logic [LADDR_W-1:0] laddr_t;
  typedef logic [WORD_W-1:0]  word_t;

  // MOESI domain of a word (Table "basic states of cache data")
  typedef enum logic [2:0] {
    ST_I = 3'd0,
    ST_S = 3'd1,  // clean shared
    ST_E = 3'd2,  // clean exclusive
    ST_O = 3'd3,  // modified shared (owned)
    ST_M = 3'd4   // modified exclusive
  } moesi_e;

  typedef struct packed {
    moesi_e st;
    logic   u;   // speculative: stored or forwarded by a speculative thread
    logic   v;   // violation possible: first speculative access was a load
    logic   c;   // committed modification, must be written back
    logic   d;   // delayed invalidation: a more speculative thread stored it
  } wstate_t;

  localparam wstate_t WS_INV = '{st: ST_I, u: 1'b0, v: 1'b0, c: 1'b0, d: 1'b0};

  typedef enum logic [2:0] {
    BUS_WB  = 3'd0,
    BUS_RD  = 3'd1,
    BUS_RDX = 3'd2,
    BUS_UPD = 3'd3,
    BUS_UPG = 3'd4
  } bus_op_e;

  typedef enum logic [2:0] {
    PROT_INV      = 3'd0,  // invalidation, no read-broadcast
    PROT_INV_ROBR = 3'd1,  // invalidation, read-broadcast on read misses
    PROT_UPD      = 3'd2,  // update, no read-broadcast
    PROT_UPD_ROBR = 3'd3,  // update, read-broadcast on read misses
    PROT_UPD_RWBR = 3'd4   // update, read-broadcast on read and write misses
  } protocol_e;

  function automatic logic prot_is_upd(protocol_e p);
    return p == PROT_UPD || p == PROT_UPD_ROBR || p == PROT_UPD_RWBR;
  endfunction

  function automatic logic prot_rd_bcast(protocol_e p);
    return p == PROT_INV_ROBR || p == PROT_UPD_ROBR || p == PROT_UPD_RWBR;
  endfunction

  function automatic logic prot_wr_bcast(protocol_e p);
    return p == PROT_UPD_RWBR;
  endfunction

  function automatic logic st_valid(moesi_e s);
    return s != ST_I;
  endfunction

  function automatic logic st_owned(moesi_e s);
    return s == ST_O || s == ST_M;
  endfunction

  // Stage lengths of the bus latency table.
  // Address tenure is Arb-Addr-Fin = 1-1-1 for every type.
  function automatic int unsigned lat_ovh(bus_op_e op);
    return (op == BUS_RD || op == BUS_RDX) ? 6 : 0;
  endfunction

  function automatic logic has_data_tenure(bus_op_e op);
    return op != BUS_UPG;
  endfunction

  function automatic int unsigned lat_ctrl(bus_op_e op);
    return (op == BUS_UPD) ? 1 : 4;
  endfunction

  // Data stage: one word for BusUpd, a whole line over the data bus otherwise
  function automatic int unsigned lat_data(bus_op_e op);
    return (op == BUS_UPD) ? 1 : LINE_BYTES / DBUS_BYTES;
  endfunction

  // Events a word can see, as the per-word rules use them
  typedef enum logic [2:0] {
    EV_NONE    = 3'd0,
    EV_PRRD    = 3'd1,  // processor load
    EV_PRWR    = 3'd2,  // processor store
    EV_FILL_RD = 3'd3,  // an invalid word takes line data (own miss or read-broadcast)
    EV_FILL_WR = 3'd4,  // the stored word of an own write miss
    EV_SNP_RD  = 3'd5,  // another PU's BusRd/BusRdX of the line, word not stored
    EV_SNP_WR  = 3'd6   // another PU's BusRdX/BusUpd/BusUpg storing this word
  } coh_ev_e;

  // A bus request as a cache presents it
  typedef struct packed {
    logic    valid;
    bus_op_e op;
    laddr_t  laddr;
    logic [WIDX_W-1:0] widx;    // stored word (RdX, Upd, Upg)
    word_t   wdata;             // stored value (RdX, Upd)
    wmask_t  wb_mask;           // words written back (Wb)
    line_t   wb_data;           // line written back (Wb)
  } bus_req_t;

  // A transaction as the bus announces it when it takes effect
  typedef struct packed {
    logic    valid;
    bus_op_e op;
    logic [PU_W-1:0] src;
    laddr_t  laddr;
    logic [WIDX_W-1:0] widx;
    word_t   wdata;
    wmask_t  wb_mask;
    line_t   wb_data;
  } bus_cpl_t;

  // Snoop response of one cache for the line of the completing transaction
  typedef struct packed {
    logic   hit;       // tag present with at least one valid word
    wmask_t valid;     // valid words
    wmask_t dmask;     // delayed-invalidated words
    wmask_t own;       // words holding this thread's own speculative version
    wmask_t umask;     // speculative words
    wmask_t cmask;     // committed words
    line_t  data;
  } snoop_rsp_t;

  // Per-cache outcome of version identification
  typedef struct packed {
    logic   ver_match;    // writer is less speculative and no thread between owns the word
    logic   by_more_spec; // writer is more speculative than this cache's thread
    wmask_t snarf;        // words this cache may take by read-broadcast
  } snoop_ctl_t;

endpackage
