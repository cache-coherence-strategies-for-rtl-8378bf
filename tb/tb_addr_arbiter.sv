// tb_addr_arbiter: random requests and thread ranks; the grant must go to
// the requester with the lowest rank, or to nobody when disabled.
module tb_addr_arbiter;
  import smt_pkg::*;
  int checks = 0, failures = 0;
  logic                en;
  logic [3:0]          req, gnt;
  logic [3:0][1:0]     rank;
  logic [1:0]          idx;
  logic                gv;

  addr_arbiter #(.N(4)) dut (.en, .req, .rank, .gnt, .gnt_idx(idx), .gnt_valid(gv));

  initial begin
    for (int t = 0; t < 500; t++) begin
      int h, exp_i;
      h = $urandom_range(0, 3);
      for (int p = 0; p < 4; p++) rank[p] = 2'(p - h);
      req = 4'($urandom);
      en  = ($urandom_range(0, 7) != 0);
      #1;
      exp_i = -1;
      for (int r = 0; r < 4 && exp_i < 0; r++)
        for (int p = 0; p < 4; p++) if (req[p] && rank[p] == 2'(r)) exp_i = p;
      checks++;
      if (!en || exp_i < 0) begin
        if (gv || gnt != 0) begin failures++; $display("FAIL grant without request/enable"); end
      end else if (!gv || int'(idx) != exp_i || gnt != 4'(1 << exp_i)) begin
        failures++;
        $display("FAIL req=%b head=%0d got %0d expected %0d", req, h, idx, exp_i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
