// ifill_unit: serves instruction-cache misses from the L2 and broadcasts
// each returned line to all instruction caches.
//
// Pending misses are taken one at a time, round-robin over the PUs. A taken
// miss waits LAT cycles (the L2 latency), then the L2 line is read and
// broadcast for one cycle on fill_* with the requester's number; every
// instruction cache sees it (read-broadcast). A requester deasserts its miss
// when its own fill appears.
//
// Following the document: the 16-cycle L2 latency and the broadcast of
// instruction fills. Own choice: misses are served one at a time on a path
// separate from the data-cache bus (the document leaves instruction-side
// contention unmodelled).
module ifill_unit
  import smt_pkg::*;
#(
  parameter int N   = N_PU,
  parameter int LAT = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic   [N-1:0]      miss_valid,
  input  laddr_t [N-1:0]      miss_laddr,
  output laddr_t              l2_raddr,
  input  line_t               l2_rdata,
  output logic                fill_valid,
  output logic [PU_W-1:0]     fill_src,
  output laddr_t              fill_laddr,
  output line_t               fill_line
);

  localparam int CW = $clog2(LAT + 1);

  logic          busy;
  logic [CW-1:0] cnt;
  logic [PU_W-1:0] cur, rr;
  laddr_t        addr;

  assign l2_raddr = addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      cnt        <= '0;
      cur        <= '0;
      rr         <= '0;
      addr       <= '0;
      fill_valid <= 1'b0;
      fill_src   <= '0;
      fill_laddr <= '0;
      fill_line  <= '0;
    end else begin
      fill_valid <= 1'b0;
      if (!busy) begin
        for (int k = N - 1; k >= 0; k--) begin
          automatic logic [PU_W-1:0] p = rr + PU_W'(k);
          if (miss_valid[p] && !(fill_valid && fill_src == p)) begin
            busy <= 1'b1;
            cur  <= p;
            addr <= miss_laddr[p];
            cnt  <= CW'(LAT - 1);
          end
        end
      end else if (cnt != '0) begin
        cnt <= cnt - 1'b1;
      end else begin
        busy       <= 1'b0;
        rr         <= cur + 1'b1;
        fill_valid <= 1'b1;
        fill_src   <= cur;
        fill_laddr <= addr;
        fill_line  <= l2_rdata;
      end
    end
  end

endmodule
