// tb_reduction_unit: self-checking test of the ICP reduction.
//
// Feeds three passes of random rows (inliers with random error and Jacobian,
// and rows of each outlier kind) with idle gaps, and compares all 32 sums
// with sums accumulated in the testbench. Checks that done pulses exactly two
// cycles after the last row and that clear restarts the sums.
module tb_reduction_unit;
  import kf_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, row_valid = 0, row_last = 0;
  track_row_t row = '0;
  sum_t [NSUM-1:0] sums;
  logic done;
  int checks = 0, failures = 0, cycle = 0;
  longint ref_s [NSUM];

  reduction_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add_ref(track_row_t r);
    int k = 7;
    case (r.res)
      TR_OK: begin
        ref_s[0] += longint'(r.err) * longint'(r.err);
        for (int i = 0; i < 6; i++) ref_s[1 + i] += longint'(r.j[i]) * longint'(r.err);
        for (int i = 0; i < 6; i++)
          for (int j = i; j < 6; j++) begin ref_s[k] += longint'(r.j[i]) * longint'(r.j[j]); k++; end
        ref_s[28] += 1;
      end
      TR_NO_INPUT:                ref_s[29] += 1;
      TR_OUT_OF_IMAGE, TR_NO_REF: ref_s[30] += 1;
      default:                    ref_s[31] += 1;
    endcase
  endtask

  task automatic pass(int n);
    int last_cyc = 0, done_cyc = -1;
    foreach (ref_s[i]) ref_s[i] = 0;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    fork
      begin
        for (int i = 0; i < n; i++) begin
          track_row_t r;
          int k = $urandom_range(0, 9);
          r = '0;
          r.res = (k < 6) ? TR_OK : (k == 6) ? TR_NO_INPUT : (k == 7) ? TR_OUT_OF_IMAGE
                : (k == 8) ? TR_NO_REF : TR_TOO_FAR;
          if (r.res == TR_OK) begin
            r.err = pos_t'(int'($urandom_range(0, 3200)) - 1600);
            for (int j = 0; j < 3; j++) r.j[j] = jac_t'(int'($urandom_range(0, 32768)) - 16384);
            for (int j = 3; j < 6; j++) r.j[j] = jac_t'(int'($urandom_range(0, 200000)) - 100000);
          end
          if ($urandom_range(0, 3) == 0) @(negedge clk);
          row_valid = 1; row = r; row_last = (i == n - 1);
          add_ref(r);
          if (i == n - 1) last_cyc = cycle;
          @(negedge clk);
          row_valid = 0; row_last = 0;
        end
      end
      begin
        @(posedge clk);
        while (!done) begin @(posedge clk); #1; end
        done_cyc = cycle;
      end
    join
    checks++;
    if (done_cyc - last_cyc != 2) begin failures++; $display("FAIL done latency %0d", done_cyc - last_cyc); end
    for (int i = 0; i < NSUM; i++) begin
      checks++;
      if (sums[i] != ref_s[i]) begin failures++; $display("FAIL sum[%0d] got %0d exp %0d", i, sums[i], ref_s[i]); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    pass(300);
    pass(57);
    pass(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
