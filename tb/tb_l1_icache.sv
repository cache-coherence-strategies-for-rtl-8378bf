// tb_l1_icache: two instruction caches sharing an ifill_unit and a memory
// model whose line contents are a function of the address. Checks the
// 1-cycle hit, the miss path through the fill broadcast, read-broadcast
// (the other cache snarfs the line and then hits), and random fetch streams
// against the memory model, including conflict replacement.
// Timing: a hit answers one cycle after acceptance (the document's 1-cycle
// hit); the memory model and the fill unit's 16-cycle latency are own choices.
module tb_l1_icache;
  import smt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int IC = 1024;   // small cache: 8 sets, to force replacement

  logic   [1:0]            fv, fr, rv, mv, snarf;
  logic   [1:0][31:0]      fa;
  logic   [1:0][127:0]     rd;
  laddr_t [1:0]            ml;
  laddr_t                  l2a, fl;
  line_t                   l2d, fline;
  logic                    fillv;
  logic [PU_W-1:0]         fsrc;

  function automatic word_t mem_word(laddr_t l, int w);
    return word_t'(l) * 32'h9E3779B1 + 32'(w) * 32'h01000193 + 32'h55;
  endfunction
  function automatic line_t mem_line(laddr_t l);
    line_t r;
    for (int w = 0; w < WPL; w++) r[w*WORD_W +: WORD_W] = mem_word(l, w);
    return r;
  endfunction
  assign l2d = mem_line(l2a);

  ifill_unit #(.N(2)) u_if (.clk, .rst_n, .miss_valid(mv), .miss_laddr(ml), .l2_raddr(l2a), .l2_rdata(l2d),
    .fill_valid(fillv), .fill_src(fsrc), .fill_laddr(fl), .fill_line(fline));
  for (genvar p = 0; p < 2; p++) begin : g
    l1_icache #(.PU_ID(PU_W'(p)), .SIZE_BYTES(IC)) u (.clk, .rst_n, .fetch_valid(fv[p]), .fetch_ready(fr[p]),
      .fetch_addr(fa[p]), .resp_valid(rv[p]), .resp_data(rd[p]), .miss_valid(mv[p]), .miss_laddr(ml[p]),
      .fill_valid(fillv), .fill_src(fsrc), .fill_laddr(fl), .fill_line(fline), .ev_snarf(snarf[p]));
  end

  int nsnarf [2];
  always @(posedge clk) for (int p = 0; p < 2; p++) if (snarf[p]) nsnarf[p]++;

  function automatic logic [127:0] expect_blk(logic [31:0] a);
    line_t l;
    l = mem_line(a[ADDR_W-1:OFS_W]);
    return l[a[OFS_W-1:4]*128 +: 128];
  endfunction

  // one fetch; returns its latency in cycles from acceptance to response
  task automatic fetch(int p, logic [31:0] a, output int lat);
    @(negedge clk);
    fv[p] = 1; fa[p] = a;
    while (!fr[p]) @(negedge clk);
    @(posedge clk); #1;
    fv[p] = 0;
    lat = 0;
    while (!rv[p]) begin @(posedge clk); #1; lat++; end
    lat++;
    checks++;
    if (rd[p] !== expect_blk(a)) begin
      failures++; $display("FAIL PU%0d data at %h", p, a);
    end
  endtask

  initial begin
    int lat;
    fv = 0; fa = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    fetch(0, 32'h0000_1040, lat);
    checks++;
    if (lat < 16) begin failures++; $display("FAIL miss latency %0d", lat); end
    fetch(0, 32'h0000_1050, lat);
    checks++;
    if (lat != 1) begin failures++; $display("FAIL hit latency %0d", lat); end
    // read-broadcast: PU 1 got the line without asking
    checks++;
    if (nsnarf[1] != 1) begin failures++; $display("FAIL no snarf in PU 1"); end
    fetch(1, 32'h0000_1070, lat);
    checks++;
    if (lat != 1) begin failures++; $display("FAIL snarfed line did not hit (%0d)", lat); end
    // random streams over a region larger than the cache
    for (int k = 0; k < 300; k++) begin
      int p;
      p = $urandom_range(0, 1);
      fetch(p, {18'h0, 10'($urandom_range(0, 1023)), 4'h0} & 32'h0000_3ff0 | 32'h0000_8000, lat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
