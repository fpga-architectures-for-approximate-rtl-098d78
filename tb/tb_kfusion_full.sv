// tb_kfusion_full: one complete frame through the accelerator at its default
// size: 320x240 depth, three-level pyramid, tracking with iteration limits
// 4/5/10, and four integration units fusing the frame into the full 256^3
// voxel grid (4.8 m cube, 64 MB external memory model).
//
// The host model streams the padded frame, checks the filtered level-0 frame
// and both pyramid levels, renders reference maps, checks every tracking
// pass's 32 reduction sums against the frame-level model, and after
// integration compares all 16.7 million voxels with the model and checks the
// pass length (65,536 voxel columns of 256 voxels per unit, one voxel per
// cycle).
module tb_kfusion_full;
  import kf_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 320, H = 240, VOL = 256, NI = 4, F = 240;
  localparam int WP = W + 4, HP = H + 4, NV = VOL * VOL * VOL;
  localparam int DAW = $clog2(W * H), VAW = 24, VOXQ = 300;

  logic clk = 0, rst_n = 0;
  logic frame_start = 0, in_valid = 0, bf_coeff3 = 0, bf_no_range = 0;
  depth_t in_depth = '0;
  logic frame_ready;
  cam_t cam;
  logic trk_start = 0, host_ack = 0, host_converged = 0;
  logic [2:0] trk_level_en = '0;
  logic [2:0][3:0] trk_max_iter = '0;
  logic [3:0] trk_lp_stride = 4'd1;
  pose_t trk_pose = '0, trk_ref_inv = '0, int_inv_pose = '0;
  logic trk_results_ready, trk_busy, trk_done;
  logic [1:0] trk_level;
  logic [3:0] trk_iter;
  sum_t [NSUM-1:0] trk_sums;
  logic [7:0] trk_passes;
  logic ref_rd_en;
  logic [DAW-1:0] ref_rd_addr;
  ref_px_t ref_rd_data;
  logic int_start = 0, int_done;
  perf_mode_e int_perf_mode = PERF_NONE;
  logic [2:0] int_perf_step = 3'd1;
  logic [NI-1:0] vol_rd_en, vol_wr_en;
  logic [NI-1:0][VAW-1:0] vol_rd_addr, vol_wr_addr;
  voxel_t [NI-1:0] vol_rd_data, vol_wr_data;
  int checks = 0, failures = 0, cycle = 0;

  kfusion_accel dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  ref_px_t refm [];
  voxel_t  vol [NV];
  // A unit never reads and writes the same voxel in one cycle, so the memory
  // model may update in place.
  always @(posedge clk) begin
    ref_rd_data <= refm[ref_rd_addr];
    for (int i = 0; i < NI; i++) begin
      vol_rd_data[i] <= vol[vol_rd_addr[i]];
      if (rst_n && vol_wr_en[i]) vol[vol_wr_addr[i]] = vol_wr_data[i];
    end
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pad [], f0 [], f1 [], f2 [];
  pose_t Tref, Tcur;
  int nfail_print = 0;

  function automatic int fail(string msg);
    if (nfail_print < 20) $display("FAIL %s", msg);
    nfail_print++;
    return 1;
  endfunction

  task automatic send_frame();
    pad = new[WP * HP]; f0 = new[W * H]; f1 = new[(W / 2) * (H / 2)]; f2 = new[(W / 4) * (H / 4)];
    for (int y = 0; y < HP; y++)
      for (int x = 0; x < WP; x++) begin
        int d = 0;
        if (x >= 2 && y >= 2 && x < W + 2 && y < H + 2) begin
          d = scene_depth(x - 2, y - 2, W, H);
          if (d != 0) d += int'($urandom_range(0, 40)) - 20;
        end
        pad[y * WP + x] = d;
      end
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) f0[y * W + x] = bf_pixel(pad, W, x, y, 0, 0);
    for (int y = 0; y < H / 2; y++) for (int x = 0; x < W / 2; x++) f1[y * (W / 2) + x] = ds_pixel(f0, W, x, y);
    for (int y = 0; y < H / 4; y++) for (int x = 0; x < W / 4; x++) f2[y * (W / 4) + x] = ds_pixel(f1, W / 2, x, y);
    @(negedge clk); frame_start = 1;
    @(negedge clk); frame_start = 0;
    for (int i = 0; i < WP * HP; i++) begin
      in_valid = 1; in_depth = depth_t'(pad[i]); @(negedge clk);
    end
    in_valid = 0;
    while (!frame_ready) @(negedge clk);
    for (int i = 0; i < W * H; i++) begin
      checks++; if (int'(dut.u_lvl0.mem[i]) != f0[i]) failures += fail($sformatf("level0 px %0d", i));
    end
    for (int i = 0; i < (W / 2) * (H / 2); i++) begin
      checks++; if (int'(dut.u_lvl1.mem[i]) != f1[i]) failures += fail($sformatf("level1 px %0d", i));
    end
    for (int i = 0; i < (W / 4) * (H / 4); i++) begin
      checks++; if (int'(dut.u_lvl2.mem[i]) != f2[i]) failures += fail($sformatf("level2 px %0d", i));
    end
  endtask

  task automatic render_ref();
    refm = new[W * H];
    for (int v = 0; v < H; v++)
      for (int u = 0; u < W; u++) begin
        ref_px_t r;
        r = '0;
        r.valid = (f0[v * W + u] != 0);
        r.v = r_xform(Tref, r_vertex(f0[v * W + u], u, v, cam));
        r.n = (u < W / 3) ? {16'sd0, 16'sd0, -16'sd16384} : {-16'sd11585, 16'sd0, -16'sd11585};
        refm[v * W + u] = r;
      end
  endtask

  task automatic expected_sums(int lvl, pose_t T, output longint s [NSUM]);
    int wl = W >> lvl, hl = H >> lvl;
    foreach (s[i]) s[i] = 0;
    for (int y = 0; y < hl; y++)
      for (int x = 0; x < wl; x++) begin
        track_row_t r;
        int d = (lvl == 0) ? f0[y * wl + x] : (lvl == 1) ? f1[y * wl + x] : f2[y * wl + x];
        int k = 7;
        r = r_track_row(d, x, y, lvl, T, trk_ref_inv, cam, W, H, refm, 1600);
        case (r.res)
          TR_OK: begin
            s[0] += longint'(r.err) * r.err;
            for (int i = 0; i < 6; i++) s[1 + i] += longint'(r.j[i]) * r.err;
            for (int i = 0; i < 6; i++)
              for (int j = i; j < 6; j++) begin s[k] += longint'(r.j[i]) * r.j[j]; k++; end
            s[28]++;
          end
          TR_NO_INPUT: s[29]++;
          TR_OUT_OF_IMAGE, TR_NO_REF: s[30]++;
          default: s[31]++;
        endcase
      end
  endtask

  task automatic track();
    longint s [NSUM];
    int np = 0;
    trk_level_en = 3'b111; trk_max_iter = {4'd4, 4'd5, 4'd10};
    trk_lp_stride = 4'd1; trk_pose = Tcur; trk_ref_inv = inv_pose(Tref);
    @(negedge clk); trk_start = 1; @(negedge clk); trk_start = 0;
    while (!trk_done) begin
      if (trk_results_ready) begin
        bit c;
        expected_sums(int'(trk_level), Tcur, s);
        for (int i = 0; i < NSUM; i++) begin
          checks++;
          if (trk_sums[i] != s[i]) failures += fail($sformatf("level %0d iter %0d sum[%0d]", trk_level, trk_iter, i));
        end
        c = (trk_level == 0) ? (trk_iter == 4'd2) : 1'b0;
        Tcur.t[0] = Tcur.t[0] - 16;
        trk_pose = Tcur;
        np++;
        host_ack = 1; host_converged = c; @(negedge clk); host_ack = 0; host_converged = 0;
      end
      @(negedge clk);
    end
    $display("tracking: %0d passes, %0d inliers in the last", np, s[28]);
    checks++;
    if (np != 4 + 5 + 3 || int'(trk_passes) != np) failures += fail("pass count");
  endtask

  task automatic integrate();
    int t0, nvis, nupd = 0;
    pose_t Ti;
    voxel_t expv [];
    expv = new[NV];
    Ti = inv_pose(Tcur);
    for (int a = 0; a < NV; a++) begin
      bit u;
      expv[a] = r_voxel(vol[a], a % VOL, (a / VOL) % VOL, a / (VOL * VOL), VOXQ, Ti, cam, W, H,
                        f0, 1600, 100, u);
      nupd += int'(u);
    end
    nvis = (VOL / NI) * VOL * VOL;
    int_inv_pose = Ti; int_perf_mode = PERF_NONE; int_perf_step = 3'd1;
    @(negedge clk); int_start = 1; t0 = cycle; @(negedge clk); int_start = 0;
    while (!int_done) begin @(posedge clk); #1; end
    checks++;
    if (cycle - t0 != nvis + 5) failures += fail($sformatf("integration took %0d cycles", cycle - t0));
    @(posedge clk); #1;
    for (int i = 0; i < NV; i++) begin
      checks++;
      if (vol[i] != expv[i]) failures += fail($sformatf("voxel %0d", i));
    end
    $display("integration: %0d voxels updated in %0d cycles", nupd, cycle - t0);
    checks++;
    if (nupd < 100000) failures += fail("too few voxels updated");
  endtask

  initial begin
    cam = mk_cam(W, H, F);
    for (int i = 0; i < NV; i++) begin vol[i].tsdf = 16'sd32767; vol[i].w = '0; end
    Tref = mk_pose(0.0, 2400.0, 2400.0, 0.0);
    Tcur = mk_pose(0.01, 2405.0, 2398.0, 5.0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    send_frame();
    render_ref();
    track();
    integrate();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
