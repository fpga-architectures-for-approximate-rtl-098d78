// tb_pyramid_downsample: self-checking test of the 2:1 depth sub-sampler.
//
// Streams two 16x8 frames (scene depth with holes, then a frame with whole
// invalid blocks and blocks of one to four valid samples) with idle gaps,
// compares each output with the mean of the valid samples of its 2x2 block,
// checks the one-cycle latency and the out_last flag.
module tb_pyramid_downsample;
  import kf_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 16, H = 8;
  logic clk = 0, rst_n = 0, frame_start = 0, in_valid = 0;
  depth_t in_depth = '0;
  logic out_valid, out_last;
  depth_t out_depth;
  int checks = 0, failures = 0, cycle = 0;

  pyramid_downsample #(.W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int img [H][W];
  int in_cyc [H][W];

  task automatic run_frame(int kind);
    int ox = 0, oy = 0, n = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y][x] = (kind == 0) ? scene_depth(x, y, W, H)
                  : (($urandom_range(0, 3) == 0) ? 0 : int'($urandom_range(500, 4000)));
    if (kind == 1) begin
      img[0][0] = 0; img[0][1] = 0; img[1][0] = 0; img[1][1] = 0;
      img[0][2] = 1000; img[0][3] = 0; img[1][2] = 0; img[1][3] = 0;
      img[2][4] = 1000; img[2][5] = 1001; img[3][4] = 1003; img[3][5] = 0;
    end
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    fork
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          if ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1; in_depth = depth_t'(img[y][x]); in_cyc[y][x] = cycle;
          @(negedge clk);
          in_valid = 0;
        end
      while (n < (W / 2) * (H / 2)) begin
        @(posedge clk); #1;
        if (out_valid) begin
          int s = 0, c = 0, e;
          for (int dy = 0; dy < 2; dy++)
            for (int dx = 0; dx < 2; dx++)
              if (img[2*oy+dy][2*ox+dx] != 0) begin s += img[2*oy+dy][2*ox+dx]; c++; end
          e = (c == 0) ? 0 : s / c;
          checks++;
          if (int'(out_depth) != e) begin
            failures++; $display("FAIL (%0d,%0d) got %0d exp %0d", ox, oy, out_depth, e);
          end
          checks++;
          if (cycle - in_cyc[2*oy+1][2*ox+1] != 1) begin
            failures++; $display("FAIL latency (%0d,%0d)", ox, oy);
          end
          checks++;
          if (out_last != (ox == W/2 - 1 && oy == H/2 - 1)) begin
            failures++; $display("FAIL last (%0d,%0d)", ox, oy);
          end
          n++;
          if (ox == W / 2 - 1) begin ox = 0; oy++; end else ox++;
        end
      end
    join
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(0);
    run_frame(1);
    run_frame(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
