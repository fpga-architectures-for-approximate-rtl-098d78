// tb_bilateral_filter: self-checking test of the bilateral filter.
//
// Streams a padded 12x8 synthetic depth frame (slanted wall, a box edge,
// invalid holes, noise) through the filter three times: full 5x5 bilateral,
// 3x3 window, and 3x3 without range filter. Every output pixel is compared
// with a frame-level model of the weighted mean, and its arrival cycle is
// checked against the three-cycle latency at one pixel per cycle.
module tb_bilateral_filter;
  import kf_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 12, H = 8, WP = W + 4, HP = H + 4;

  logic clk = 0, rst_n = 0, frame_start = 0, coeff3 = 0, no_range = 0, in_valid = 0;
  depth_t in_depth = '0;
  logic out_valid, out_last;
  depth_t out_depth;
  int checks = 0, failures = 0, cycle = 0;

  bilateral_filter #(.W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pad [HP][WP];
  int in_cycle [HP][WP];
  int exp_out [H][W];

  function automatic int gq(int i);
    return int'($exp(-real'(i * i) / 32.0) * 256.0 + 0.5);
  endfunction
  function automatic int rq(int ad);
    real dm;
    if (ad >= 512) return 0;
    dm = real'((ad / 8) * 8 + 4);
    return int'($exp(-(dm * dm) / 20000.0) * 256.0 + 0.5);
  endfunction

  task automatic model(bit c3, bit nr);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        longint num = 0, den = 0;
        int ctr = pad[y+2][x+2];
        int rad = c3 ? 1 : 2;
        for (int dy = -rad; dy <= rad; dy++)
          for (int dx = -rad; dx <= rad; dx++) begin
            int p = pad[y+2+dy][x+2+dx];
            int ad = (p > ctr) ? p - ctr : ctr - p;
            int sw = (gq(dy < 0 ? -dy : dy) * gq(dx < 0 ? -dx : dx)) / 256;
            int f = (sw * (nr ? 256 : rq(ad))) / 256;
            if (p != 0) begin num += longint'(f) * p; den += f; end
          end
        exp_out[y][x] = (ctr == 0 || den == 0) ? 0 : int'((num + den / 2) / den);
      end
  endtask

  task automatic run_frame(bit c3, bit nr);
    int ox = 0, oy = 0, nout = 0;
    for (int y = 0; y < HP; y++)
      for (int x = 0; x < WP; x++) begin
        if (x < 2 || y < 2 || x >= W + 2 || y >= H + 2) pad[y][x] = 0;
        else begin
          pad[y][x] = scene_depth(x - 2, y - 2, W, H);
          if (pad[y][x] != 0) pad[y][x] += int'($urandom_range(0, 60)) - 30;
        end
      end
    model(c3, nr);
    @(negedge clk);
    frame_start = 1; coeff3 = c3; no_range = nr;
    @(negedge clk);
    frame_start = 0;
    fork
      begin
        for (int y = 0; y < HP; y++)
          for (int x = 0; x < WP; x++) begin
            in_valid = 1; in_depth = depth_t'(pad[y][x]);
            in_cycle[y][x] = cycle;
            @(negedge clk);
          end
        in_valid = 0;
      end
      begin
        while (nout < W * H) begin
          @(posedge clk); #1;
          if (out_valid) begin
            checks++;
            if (int'(out_depth) != exp_out[oy][ox]) begin
              failures++;
              $display("FAIL mode c3=%0d nr=%0d px (%0d,%0d): got %0d exp %0d", c3, nr, ox, oy, out_depth, exp_out[oy][ox]);
            end
            checks++;
            if (cycle - in_cycle[oy+4][ox+4] != 3) begin
              failures++;
              $display("FAIL latency px (%0d,%0d): %0d cycles", ox, oy, cycle - in_cycle[oy+4][ox+4]);
            end
            checks++;
            if (out_last != (ox == W - 1 && oy == H - 1)) begin
              failures++; $display("FAIL out_last at (%0d,%0d)", ox, oy);
            end
            nout++;
            if (ox == W - 1) begin ox = 0; oy++; end else ox++;
          end
        end
      end
    join
    repeat (5) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(0, 0);
    run_frame(1, 0);
    run_frame(1, 1);
    run_frame(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
