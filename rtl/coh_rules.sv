// coh_rules: the per-word transition rules of the speculative coherence
// protocol, as pure combinational logic.
//
// A word's state is a point in a seven-dimension space: the MOESI domain plus
// four speculation bits (U speculative, V violation possible, C committed,
// D delayed invalidation). Given the current state and one event, this block
// returns the next state and the action the cache controller must take:
// start a bus transaction (and which), write a committed value back,
// overwrite the word with bus data, or report a memory-dependency violation.
//
// Interface: all inputs describe the event seen this cycle; outputs are valid
// in the same cycle. For EV_PRWR on a shared word the returned next state is
// the state to install once the bus transaction has taken effect.
//
// Following the document: the MOESI rules for update/invalidation protocols
// with and without exclusivity management; U set by speculative stores and
// by data forwarded or updated from a speculative thread; V set by the first
// speculative access when it is a load; violation on a version-matched store
// by a less speculative thread; D set by a store from a more speculative
// thread; committed data written back before it is replaced.
// Own choices: E and M lose exclusivity on any snooped access to the line,
// whatever the version; a committed word that a speculative store would
// overwrite is written back first; a committed word whose location another
// thread stores is written back at that moment; an owned word that receives
// an update becomes S (update) or I (invalidation), which the tables leave open.
module coh_rules
  import smt_pkg::*;
#(
  parameter protocol_e PROT = PROT_UPD_RWBR,
  parameter bit        EXCL = 1'b1   // manage exclusivity (E and M domains)
) (
  input  wstate_t cur,
  input  coh_ev_e ev,
  input  logic    spec_thread,   // this cache's thread is speculative
  input  logic    shared,        // another cache holds the line (fills)
  input  logic    ver_match,     // store by a less speculative thread, version matched
  input  logic    by_more_spec,  // store by a more speculative thread
  input  logic    data_spec,     // incoming data was produced by a speculative thread
  output wstate_t nxt,
  output logic    bus_req,       // processor event needs a bus transaction
  output bus_op_e bus_op,
  output logic    wb,            // the word's committed value must be written back
  output logic    violation,     // memory-dependency violation detected
  output logic    take_data      // overwrite the word with the bus data
);

  localparam bit UPD = prot_is_upd(PROT);

  logic own;   // this thread holds its own speculative version
  assign own = cur.u && st_owned(cur.st);

  always_comb begin
    nxt       = cur;
    bus_req   = 1'b0;
    bus_op    = BUS_RD;
    wb        = 1'b0;
    violation = 1'b0;
    take_data = 1'b0;

    unique case (ev)
      EV_PRRD: begin
        if (!st_valid(cur.st)) begin
          bus_req = 1'b1;
          bus_op  = BUS_RD;
        end else if (spec_thread && !own) begin
          nxt.v = 1'b1;
        end
      end

      EV_PRWR: begin
        if (!st_valid(cur.st)) begin
          bus_req = 1'b1;
          bus_op  = BUS_RDX;
        end else if (cur.c && spec_thread) begin
          // committed value is written back before a speculative store hides it
          wb    = 1'b1;
          nxt.c = 1'b0;
          if (cur.st == ST_O) nxt.st = ST_S;
          if (cur.st == ST_M) nxt.st = ST_E;
        end else begin
          nxt.u = cur.u | spec_thread;
          unique case (cur.st)
            ST_S, ST_O: begin
              bus_req = 1'b1;
              bus_op  = UPD ? BUS_UPD : BUS_UPG;
              nxt.st  = (UPD || !EXCL) ? ST_O : ST_M;
            end
            ST_E:    nxt.st = ST_M;
            default: nxt.st = ST_M;
          endcase
        end
      end

      EV_FILL_RD: begin
        if (!st_valid(cur.st)) begin
          nxt       = WS_INV;
          nxt.st    = (EXCL && !shared) ? ST_E : ST_S;
          nxt.u     = data_spec && spec_thread;
          take_data = 1'b1;
        end
      end

      EV_FILL_WR: begin
        nxt       = WS_INV;
        if (UPD) nxt.st = (EXCL && !shared) ? ST_M : ST_O;
        else     nxt.st = EXCL ? ST_M : ST_O;
        nxt.u     = spec_thread;
        take_data = 1'b1;
      end

      EV_SNP_RD: begin
        if (cur.st == ST_E) nxt.st = ST_S;
        if (cur.st == ST_M) nxt.st = ST_O;
      end

      EV_SNP_WR: begin
        if (st_valid(cur.st)) begin
          if (cur.st == ST_E) nxt.st = ST_S;
          if (cur.st == ST_M) nxt.st = ST_O;
          if (cur.c) begin
            wb    = 1'b1;
            nxt.c = 1'b0;
            if (!cur.u) nxt.st = ST_S;
          end
          if (by_more_spec) begin
            nxt.d = 1'b1;
          end else if (ver_match) begin
            violation = cur.v;
            if (!own) begin
              if (UPD) begin
                nxt.st    = ST_S;
                nxt.u     = data_spec;
                take_data = 1'b1;
              end else begin
                nxt = WS_INV;
              end
            end
          end
        end
      end

      default: ;
    endcase
  end

endmodule
