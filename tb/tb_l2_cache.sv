// tb_l2_cache: masked line writes and reads on both ports against a
// reference model kept in the testbench.
module tb_l2_cache;
  import smt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  laddr_t ra, ra2, wa;
  line_t  rd, rd2, wd;
  wmask_t wm;
  logic   we = 0;
  line_t  ref_mem [64];

  l2_cache #(.L2_LINES(64)) dut (.clk, .raddr(ra), .rdata(rd), .raddr2(ra2), .rdata2(rd2),
                                 .we, .waddr(wa), .wmask(wm), .wdata(wd));

  initial begin
    for (int i = 0; i < 64; i++) ref_mem[i] = '0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      wa = laddr_t'($urandom_range(0, 63));
      wm = wmask_t'($urandom);
      for (int w = 0; w < WPL; w++) wd[w*32 +: 32] = $urandom;
      if (we)
        for (int w = 0; w < WPL; w++) if (wm[w]) ref_mem[wa[5:0]][w*32 +: 32] = wd[w*32 +: 32];
      @(posedge clk);
      #1;
      we = 0;
      ra  = laddr_t'($urandom_range(0, 63));
      ra2 = laddr_t'($urandom_range(0, 63)) + laddr_t'(64);  // aliases onto the same lines
      #1;
      checks++;
      if (rd !== ref_mem[ra[5:0]]) begin failures++; $display("FAIL port 1 line %0d", ra); end
      checks++;
      if (rd2 !== ref_mem[ra2[5:0]]) begin failures++; $display("FAIL port 2 line %0d", ra2); end
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
