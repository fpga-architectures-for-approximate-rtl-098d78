// tb_icp_controller: self-checking test of the ICP pass scheduler.
//
// A mock tracking pipeline answers each track_start with pass_done after a
// random delay, and a mock host acknowledges results_ready, declaring
// convergence on a chosen iteration. Four frames cover: full iteration limits
// on all three levels, early convergence, skipped levels via level_en, and a
// level disabled by a zero iteration limit. The (level, iter) sequence, the
// pass count and the done pulse are compared with the expected schedule.
module tb_icp_controller;
  logic clk = 0, rst_n = 0, start = 0, pass_done = 0, host_ack = 0, host_converged = 0;
  logic [2:0] level_en = '0;
  logic [2:0][3:0] max_iter = '0;
  logic track_start, results_ready, busy, done;
  logic [1:0] level;
  logic [3:0] iter;
  logic [7:0] passes;
  int checks = 0, failures = 0;

  icp_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // conv_at: iteration index on which the host reports convergence (-1 never)
  task automatic frame(logic [2:0] en, int mi2, int mi1, int mi0, int conv_at);
    int exp_l [$], exp_i [$];
    int mi [3] = '{mi0, mi1, mi2};
    int np = 0;
    bit fin = 0;
    for (int l = 2; l >= 0; l--)
      if (en[l])
        for (int i = 0; i < mi[l]; i++) begin
          exp_l.push_back(l); exp_i.push_back(i);
          if (i == conv_at) break;
        end
    @(negedge clk);
    level_en = en; max_iter = {4'(mi2), 4'(mi1), 4'(mi0)}; start = 1;
    @(negedge clk); start = 0;
    while (!fin) begin
      if (done) fin = 1;
      else if (track_start) begin
        checks++;
        if (np >= exp_l.size() || level != 2'(exp_l[np]) || iter != 4'(exp_i[np])) begin
          failures++; $display("FAIL pass %0d: level %0d iter %0d", np, level, iter);
        end
        repeat ($urandom_range(1, 6)) @(negedge clk);
        pass_done = 1; @(negedge clk); pass_done = 0;
        while (!results_ready) @(negedge clk);
        repeat ($urandom_range(0, 4)) @(negedge clk);
        host_ack = 1; host_converged = (int'(iter) == conv_at);
        @(negedge clk); host_ack = 0; host_converged = 0;
        np++;
      end
      else @(negedge clk);
    end
    checks++;
    if (np != exp_l.size() || int'(passes) != np) begin
      failures++; $display("FAIL passes %0d/%0d exp %0d", np, passes, exp_l.size());
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    frame(3'b111, 4, 5, 10, -1);   // iteration limits 4, 5, 10
    frame(3'b111, 4, 5, 10, 1);    // converges on the second pass of every level
    frame(3'b001, 4, 5, 3, -1);    // coarse levels skipped, 3 passes at level 0
    frame(3'b111, 2, 0, 2, -1);    // level 1 disabled by a zero limit
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
