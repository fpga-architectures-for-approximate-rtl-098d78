// reduction_unit: sums the ICP rows of one tracking pass into the normal
// equations of the pose update.
//
// For every inlier row (res = TR_OK) with error e and Jacobian J it adds
//   sum[0]       += e*e
//   sum[1+i]     += J[i]*e                      i = 0..5
//   sum[7+k]     += J[i]*J[j]                   0 <= i <= j <= 5, k in row-major order
//   sum[28]      += 1                           inliers
// and for the other rows it counts the reason:
//   sum[29] no input depth, sum[30] outside the reference or no reference
//   surface, sum[31] correspondence too far.
// The host solves the 6x6 system J^T J x = J^T e from these sums.
//
// Timing: one row per cycle. Products are registered in the first stage and
// accumulated in the second; done pulses two cycles after the row flagged
// last, and sums then hold the totals until the next clear. clear (pulse)
// zeroes the accumulators before a pass.
//
// Following the reference algorithm: the reduction of the tracking rows to
// the ICP system and the error sum. Own choices: 64-bit fixed-point
// accumulators and the outlier counters.
module reduction_unit
  import kf_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              row_valid,
  input  track_row_t        row,
  input  logic              row_last,
  output sum_t [NSUM-1:0]   sums,
  output logic              done
);
  // Position of J[i]*J[j] (i <= j) in the sum vector.
  function automatic int jtj_idx(int i, int j);
    return 7 + i * 6 - (i * (i - 1)) / 2 + (j - i);
  endfunction

  sum_t [NSUM-1:0] prod;
  logic            p_v, p_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod <= '0; p_v <= 1'b0; p_last <= 1'b0;
    end else begin
      p_v    <= row_valid && !clear;
      p_last <= row_valid && row_last && !clear;
      prod   <= '0;
      if (row.res == TR_OK) begin
        prod[0] <= sum_t'(row.err) * sum_t'(row.err);
        for (int i = 0; i < 6; i++) prod[1+i] <= sum_t'(row.j[i]) * sum_t'(row.err);
        for (int i = 0; i < 6; i++)
          for (int j = i; j < 6; j++)
            prod[jtj_idx(i, j)] <= sum_t'(row.j[i]) * sum_t'(row.j[j]);
        prod[28] <= 64'sd1;
      end
      else if (row.res == TR_NO_INPUT)                               prod[29] <= 64'sd1;
      else if (row.res == TR_OUT_OF_IMAGE || row.res == TR_NO_REF)   prod[30] <= 64'sd1;
      else                                                           prod[31] <= 64'sd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sums <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        sums <= '0;
      end else if (p_v) begin
        for (int i = 0; i < NSUM; i++) sums[i] <= sums[i] + prod[i];
        done <= p_last;
      end
    end
  end

endmodule
