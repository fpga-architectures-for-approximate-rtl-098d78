// pyramid_downsample: halves a depth frame in both dimensions for the next
// level of the tracking pyramid.
//
// A W x H depth stream arrives in raster order (one pixel per cycle at most).
// Each 2x2 block becomes one output pixel: the mean of the block's valid
// (non-zero) samples, or 0 when none is valid. Even rows store the sum and
// count of each horizontal pair in a W/2-entry line buffer; on odd rows the
// second pair is added and the (W/2) x (H/2) result is emitted, in raster
// order, one cycle after the pixel that completes the block. out_last marks
// the final output pixel. Applying the block twice builds the three-level
// pyramid (320x240, 160x120, 80x60).
//
// Following the reference algorithm: recursive 2:1 sub-sampling of the
// filtered depth. Own choice: the plain mean of the valid samples, with no
// rejection of samples far from the block's first sample.
module pyramid_downsample
  import kf_pkg::*;
#(
  parameter int W = 320,
  parameter int H = 240
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   frame_start,
  input  logic   in_valid,
  input  depth_t in_depth,
  output logic   out_valid,
  output depth_t out_depth,
  output logic   out_last
);
  localparam int WO = W / 2;

  typedef struct packed {
    logic [17:0] sum;
    logic [2:0]  cnt;
  } acc_t;

  acc_t lb [WO];
  acc_t pair;                      // first pixel of the current pair
  logic [$clog2(W)-1:0] x;
  logic [$clog2(H)-1:0] y;

  acc_t cur, tot;
  always_comb begin
    cur.sum = pair.sum + 18'(in_depth);
    cur.cnt = pair.cnt + 3'(in_depth != 0);
    tot.sum = cur.sum + lb[x[$clog2(W)-1:1]].sum;
    tot.cnt = cur.cnt + lb[x[$clog2(W)-1:1]].cnt;
  end

  always_ff @(posedge clk) begin
    if (in_valid && !frame_start && x[0] && !y[0])
      lb[x[$clog2(W)-1:1]] <= cur;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; pair <= '0;
      out_valid <= 1'b0; out_depth <= '0; out_last <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (frame_start) begin
        x <= '0; y <= '0;
      end else if (in_valid) begin
        if (!x[0]) begin
          pair.sum <= 18'(in_depth);
          pair.cnt <= 3'(in_depth != 0);
        end
        if (x[0] && y[0]) begin
          out_valid <= 1'b1;
          out_last  <= (32'(x) == W - 1) && (32'(y) == H - 1);
          case (tot.cnt)
            3'd0:    out_depth <= '0;
            3'd1:    out_depth <= depth_t'(tot.sum);
            3'd2:    out_depth <= depth_t'(tot.sum >> 1);
            3'd3:    out_depth <= depth_t'(tot.sum / 18'd3);
            default: out_depth <= depth_t'(tot.sum >> 2);
          endcase
        end
        if (32'(x) == W - 1) begin
          x <= '0;
          y <= y + 1'b1;
        end else begin
          x <= x + 1'b1;
        end
      end
    end
  end

endmodule
