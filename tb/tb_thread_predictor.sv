// tb_thread_predictor: runs thread sequences through the predictor as the
// processor does (predict, repair the path with the true address, train at
// commit) and checks the predictions of the last lap. A pattern where the thread after A
// depends on the thread before A (X A B Y A C ...) can only be predicted by
// the length-4 path component, so the selection counters must move to it.
// Timing: one prediction per call, checked combinationally before the path
// advances. Taken from the document: path lengths 1 and 4, table sizes;
// the sequences and lap counts are this testbench's own.
module tb_thread_predictor;
  import smt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              pred_req = 0, upd_valid = 0, recover = 0;
  initial recover_addr = '0;
  logic [31:0]       pred_addr, upd_next, recover_addr;
  logic              pred_long;

  thread_predictor dut (.clk, .rst_n, .pred_req, .pred_addr, .pred_long, .upd_valid, .upd_next, .recover, .recover_addr);

  // runs the sequence `laps` times the way the processor does: predict each
  // next thread, repair the path on a misprediction, train at commit.
  // Returns the correct predictions and long-path uses of the last lap.
  task automatic run(logic [31:0] seq [], int laps, output int correct, output int longs);
    for (int l = 0; l < laps; l++) begin
      correct = 0; longs = 0;
      foreach (seq[i]) begin
        @(negedge clk);
        if (pred_addr == seq[i]) correct++;
        if (pred_long) longs++;
        pred_req = 1;
        @(negedge clk);
        pred_req = 0;
        recover = 1; recover_addr = seq[i];   // harmless when already right
        upd_valid = 1; upd_next = seq[i];
        @(negedge clk);
        recover = 0; upd_valid = 0;
      end
    end
  endtask

  initial begin
    int c, lg;
    logic [31:0] s1 [] = '{32'h1000, 32'h2040, 32'h30c0, 32'h4100};
    logic [31:0] s2 [] = '{32'h9000, 32'hA000, 32'hB000, 32'h9800, 32'hA000, 32'hC000};
    repeat (2) @(posedge clk);
    rst_n = 1;
    // before training nothing is predicted right
    @(negedge clk); #1;
    checks++;
    if (pred_addr == s1[0]) begin failures++; $display("FAIL untrained prediction correct"); end

    run(s1, 4, c, lg);
    checks++;
    if (c != 4) begin failures++; $display("FAIL simple loop: %0d of 4", c); end

    run(s2, 16, c, lg);
    checks++;
    if (c != 6) begin failures++; $display("FAIL path-dependent pattern: %0d of 6", c); end
    checks++;
    if (lg == 0) begin failures++; $display("FAIL long path never selected"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
