// tb_track_unit: self-checking test of the ICP tracking compute unit.
//
// Builds reference vertex/normal maps of a synthetic scene (slanted wall, a
// box, holes, patches without reference surface) seen from a reference pose,
// and an input depth pyramid of the same scene. The unit is run with a
// slightly moved pose estimate on levels 0, 1 and 2, with and without loop
// perforation. Every output row is compared with the frame-level model in
// tb_ref_pkg; rows must leave back-to-back (one pixel per cycle) with the
// first row seven cycles after start. Each outcome kind (inlier, no input,
// outside the reference, no reference surface, too far) must occur.
module tb_track_unit;
  import kf_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 32, H = 24, AW = $clog2(W * H), F = 30, TH = 1600;
  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] level = '0;
  logic [3:0] lp_stride = 4'd1;
  pose_t pose = '0, ref_inv = '0;
  cam_t cam;
  logic [AW-1:0] dep_rd_addr, ref_rd_addr;
  depth_t dep_rd_data;
  logic ref_rd_en, row_valid, row_last, busy;
  ref_px_t ref_rd_data;
  track_row_t row;
  int checks = 0, failures = 0, cycle = 0;
  int outcome [8];

  track_unit #(.W(W), .H(H), .DIST_TH_Q4(TH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  depth_t  dmem [W * H];
  ref_px_t refm [];
  always_ff @(posedge clk) begin
    dep_rd_data <= dmem[dep_rd_addr];
    ref_rd_data <= refm[ref_rd_addr];
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pose_t Tref;

  task automatic build_ref();
    refm = new[W * H];
    Tref = mk_pose(0.0, 2400.0, 2400.0, 0.0);
    for (int v = 0; v < H; v++)
      for (int u = 0; u < W; u++) begin
        int d = scene_depth(u, v, W, H);
        ref_px_t r;
        r = '0;
        r.valid = (d != 0) && !(u >= 26 && v >= 18);
        r.v = r_xform(Tref, r_vertex(d, u, v, cam));
        if (u < W / 3) r.n = {16'sd0, 16'sd0, -16'sd16384};
        else r.n = {-16'sd11585, 16'sd0, -16'sd11585};
        refm[v * W + u] = r;
      end
  endtask

  task automatic run(int lvl, int stride, pose_t T);
    int wl = W >> lvl, hl = H >> lvl;
    track_row_t exp_q [$];
    int first = -1, n = 0, t0;
    for (int y = 0; y < hl; y++)
      for (int x = 0; x < wl; x++) begin
        dmem[y * wl + x] = depth_t'(scene_depth(x << lvl, y << lvl, W, H));
        if (x % stride == 0)
          exp_q.push_back(r_track_row(scene_depth(x << lvl, y << lvl, W, H), x, y, lvl,
                                      T, ref_inv, cam, W, H, refm, TH));
      end
    @(negedge clk);
    level = 2'(lvl); lp_stride = 4'(stride); pose = T; start = 1; t0 = cycle;
    @(negedge clk); start = 0; level = 2'(3 - lvl); pose = '0;   // latched inputs
    while (n < exp_q.size()) begin
      @(posedge clk); #1;
      if (row_valid) begin
        if (first < 0) first = cycle;
        checks++;
        if (row !== exp_q[n]) begin
          failures++;
          $display("FAIL lvl %0d row %0d: got res %0d err %0d j3 %0d exp res %0d err %0d j3 %0d",
                   lvl, n, row.res, row.err, row.j[3], exp_q[n].res, exp_q[n].err, exp_q[n].j[3]);
        end
        outcome[int'(row.res)]++;
        checks++;
        if (cycle != first + n) begin failures++; $display("FAIL row %0d not back-to-back", n); end
        checks++;
        if (row_last != (n == exp_q.size() - 1)) begin failures++; $display("FAIL row_last %0d", n); end
        n++;
      end
    end
    checks++;
    if (first - t0 != 7) begin failures++; $display("FAIL first-row latency %0d", first - t0); end
    @(posedge clk); #1;
    checks++;
    if (row_valid || busy) begin failures++; $display("FAIL extra rows / busy"); end
  endtask

  initial begin
    cam = mk_cam(W, H, F);
    build_ref();
    ref_inv = inv_pose(Tref);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 1, mk_pose(0.02, 2410.0, 2395.0, 8.0));
    run(1, 1, mk_pose(-0.01, 2390.0, 2404.0, -5.0));
    run(0, 3, mk_pose(0.0, 2400.0, 2400.0, 0.0));
    run(2, 2, mk_pose(0.05, 2450.0, 2400.0, 30.0));
    for (int k = 1; k <= 5; k++) begin
      checks++;
      if (outcome[k] == 0) begin failures++; $display("FAIL outcome %0d never seen", k); end
    end
    $display("outcomes ok=%0d noin=%0d out=%0d noref=%0d far=%0d",
             outcome[1], outcome[2], outcome[3], outcome[4], outcome[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
