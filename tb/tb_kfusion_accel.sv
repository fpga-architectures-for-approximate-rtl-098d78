// tb_kfusion_accel: end-to-end test of the accelerator at reduced size.
//
// 32x24 depth frames, a 16^3 grid of 200 mm voxels and four integration
// units. A host model streams four padded frames, renders reference maps of
// the scene, answers every tracking pass (checking all 32 reduction sums
// against the frame-level model, then nudging the pose as a solver would) and
// starts integration with the tracked pose, after which the whole grid is
// compared with the model. The frames exercise, and the test counts: the
// full, 3x3 and no-range filter modes, skipped pyramid levels, early ICP
// convergence, iteration limits, pixel perforation, every correspondence
// outcome, and voxel skip/copy/averaging perforation. A mechanism that never happens
// counts as a failure.
module tb_kfusion_accel;
  import kf_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 32, H = 24, VOL = 16, VOXQ = 3200, NI = 4, F = 30;
  localparam int WP = W + 4, HP = H + 4, NV = VOL * VOL * VOL;
  localparam int DAW = $clog2(W * H), VAW = 12;

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

  kfusion_accel #(.W(W), .H(H), .VOL(VOL), .VOX_Q4(VOXQ), .N_INT(NI)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // external memories: reference maps and voxel grid
  ref_px_t refm [];
  voxel_t  vol [NV];
  always_ff @(posedge clk) begin
    ref_rd_data <= refm[ref_rd_addr];
    for (int i = 0; i < NI; i++) begin
      vol_rd_data[i] <= vol[vol_rd_addr[i]];
      if (rst_n && vol_wr_en[i]) vol[vol_wr_addr[i]] <= vol_wr_data[i];
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int m_bf [4];
  int m_lvl_skip = 0, m_early = 0, m_limit = 0, m_perf_pass = 0;
  int m_out [32];
  int m_int [4];

  int pad [], f0 [], f1 [], f2 [];
  pose_t Tref, Tcur;

  function automatic int fail(string msg);
    $display("FAIL %s", msg);
    return 1;
  endfunction

  task automatic send_frame(bit c3, bit nr, int noise);
    pad = new[WP * HP]; f0 = new[W * H]; f1 = new[(W / 2) * (H / 2)]; f2 = new[(W / 4) * (H / 4)];
    for (int y = 0; y < HP; y++)
      for (int x = 0; x < WP; x++) begin
        int d = 0;
        if (x >= 2 && y >= 2 && x < W + 2 && y < H + 2) begin
          d = scene_depth(x - 2, y - 2, W, H);
          if (d != 0) d += int'($urandom_range(0, 2 * noise)) - noise;
        end
        pad[y * WP + x] = d;
      end
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) f0[y * W + x] = bf_pixel(pad, W, x, y, c3, nr);
    for (int y = 0; y < H / 2; y++) for (int x = 0; x < W / 2; x++) f1[y * (W / 2) + x] = ds_pixel(f0, W, x, y);
    for (int y = 0; y < H / 4; y++) for (int x = 0; x < W / 4; x++) f2[y * (W / 4) + x] = ds_pixel(f1, W / 2, x, y);
    @(negedge clk); frame_start = 1; bf_coeff3 = c3; bf_no_range = nr;
    @(negedge clk); frame_start = 0;
    for (int i = 0; i < WP * HP; i++) begin
      in_valid = 1; in_depth = depth_t'(pad[i]); @(negedge clk);
    end
    in_valid = 0;
    while (!frame_ready) @(negedge clk);
    m_bf[{c3, nr}]++;
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

  // Reference maps rendered from the frame seen at pose Tref.
  task automatic render_ref();
    refm = new[W * H];
    for (int v = 0; v < H; v++)
      for (int u = 0; u < W; u++) begin
        ref_px_t r;
        r = '0;
        r.valid = (f0[v * W + u] != 0) && !(u >= 26 && v >= 18);
        r.v = r_xform(Tref, r_vertex(f0[v * W + u], u, v, cam));
        r.n = (u < W / 3) ? {16'sd0, 16'sd0, -16'sd16384} : {-16'sd11585, 16'sd0, -16'sd11585};
        refm[v * W + u] = r;
      end
  endtask

  task automatic expected_sums(int lvl, int stride, pose_t T, output longint s [NSUM]);
    int wl = W >> lvl, hl = H >> lvl;
    foreach (s[i]) s[i] = 0;
    for (int y = 0; y < hl; y++)
      for (int x = 0; x < wl; x += stride) begin
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
        m_out[int'(r.res)]++;
      end
  endtask

  // conv: per level, the iteration on which the host reports convergence (-1 never)
  task automatic track(logic [2:0] en, int mi2, int mi1, int mi0, int stride, int conv [3]);
    int mi [3] = '{mi0, mi1, mi2};
    longint s [NSUM];
    int np = 0;
    trk_level_en = en; trk_max_iter = {4'(mi2), 4'(mi1), 4'(mi0)};
    trk_lp_stride = 4'(stride); trk_pose = Tcur; trk_ref_inv = inv_pose(Tref);
    @(negedge clk); trk_start = 1; @(negedge clk); trk_start = 0;
    if (en != 3'b111) m_lvl_skip++;
    if (stride > 1) m_perf_pass++;
    while (!trk_done) begin
      if (trk_results_ready) begin
        bit c;
        expected_sums(int'(trk_level), stride, Tcur, s);
        for (int i = 0; i < NSUM; i++) begin
          checks++;
          if (trk_sums[i] != s[i]) failures += fail($sformatf("level %0d iter %0d sum[%0d] %0d exp %0d",
                                                    trk_level, trk_iter, i, trk_sums[i], s[i]));
        end
        c = (int'(trk_iter) == conv[trk_level]);
        if (c) m_early++;
        else if (int'(trk_iter) + 1 == mi[trk_level]) m_limit++;
        Tcur.t[0] = Tcur.t[0] - 16;     // stand-in for the host's pose update
        trk_pose = Tcur;
        np++;
        host_ack = 1; host_converged = c; @(negedge clk); host_ack = 0; host_converged = 0;
      end
      @(negedge clk);
    end
    checks++;
    if (int'(trk_passes) != np) failures += fail("pass count");
  endtask

  task automatic integrate(perf_mode_e m, int step);
    voxel_t expv [NV];
    int t0, nvis;
    pose_t Ti;
    Ti = inv_pose(Tcur);
    for (int i = 0; i < NV; i++) expv[i] = vol[i];
    for (int x = 0; x < VOL; x++)
      for (int y = 0; y < VOL; y++) begin
        voxel_t lead; bit lupd;
        lupd = 0;
        for (int z = 0; z < VOL; z++) begin
          int a = x + y * VOL + z * VOL * VOL;
          bit u;
          if (m == PERF_NONE || z % step == 0) begin
            expv[a] = r_voxel(vol[a], x, y, z, VOXQ, Ti, cam, W, H, f0, 1600, 100, u);
            lead = expv[a]; lupd = u;
          end else if (m == PERF_COPY && lupd) expv[a] = lead;
        end
        if (m == PERF_AVG)
          for (int z0 = 0; z0 < VOL; z0 += step) begin
            int a0 = x + y * VOL + z0 * VOL * VOL, z1 = z0 + step;
            bit u0, u1 = 0;
            voxel_t v0 = expv[a0], v1, fv;
            void'(r_voxel(vol[a0], x, y, z0, VOXQ, Ti, cam, W, H, f0, 1600, 100, u0));
            if (z1 < VOL) begin
              v1 = expv[x + y * VOL + z1 * VOL * VOL];
              void'(r_voxel(vol[x + y * VOL + z1 * VOL * VOL], x, y, z1, VOXQ, Ti, cam, W, H, f0, 1600, 100, u1));
            end
            if (u0 && u1) begin
              fv.tsdf = 16'((int'(v0.tsdf) + int'(v1.tsdf)) >>> 1);
              fv.w    = 16'((int'(v0.w) + int'(v1.w)) >>> 1);
            end else fv = u1 ? v1 : v0;
            if (u0 || u1)
              for (int z = z0 + 1; z < z1 && z < VOL; z++) expv[x + y * VOL + z * VOL * VOL] = fv;
          end
      end
    nvis = (VOL / NI) * VOL * ((m == PERF_SKIP) ? (VOL + step - 1) / step : VOL);
    int_inv_pose = Ti; int_perf_mode = m; int_perf_step = 3'(step);
    @(negedge clk); int_start = 1; t0 = cycle; @(negedge clk); int_start = 0;
    while (!int_done) begin @(posedge clk); #1; end
    checks++;
    if (cycle - t0 != nvis + ((m == PERF_AVG) ? 13 : 5))
      failures += fail($sformatf("integration took %0d cycles, exp %0d", cycle - t0, nvis + ((m == PERF_AVG) ? 13 : 5)));
    @(posedge clk); #1;
    for (int i = 0; i < NV; i++) begin
      checks++;
      if (vol[i] != expv[i]) failures += fail($sformatf("voxel %0d %0d/%0d exp %0d/%0d", i, vol[i].tsdf, vol[i].w, expv[i].tsdf, expv[i].w));
    end
    m_int[int'(m)]++;
  endtask

  initial begin
    cam = mk_cam(W, H, F);
    for (int i = 0; i < NV; i++) begin vol[i].tsdf = 16'sd32767; vol[i].w = '0; end
    Tref = mk_pose(0.0, 1600.0, 1600.0, -200.0);
    Tcur = mk_pose(0.01, 1605.0, 1598.0, -195.0);
    repeat (3) @(posedge clk);
    rst_n = 1;

    send_frame(0, 0, 20);
    render_ref();
    track(3'b111, 2, 3, 4, 1, '{-1, 1, -1});
    integrate(PERF_NONE, 1);

    send_frame(1, 0, 20);
    track(3'b001, 2, 3, 3, 2, '{-1, -1, -1});
    integrate(PERF_SKIP, 2);

    send_frame(1, 1, 20);
    Tcur = mk_pose(0.03, 1660.0, 1590.0, -150.0);
    track(3'b110, 1, 2, 4, 1, '{-1, 0, -1});
    integrate(PERF_COPY, 3);

    send_frame(0, 1, 20);
    track(3'b001, 1, 1, 1, 1, '{-1, -1, -1});
    integrate(PERF_AVG, 3);

    $display("mechanisms: bf full=%0d 3x3=%0d 3x3+norange=%0d | level skip=%0d early conv=%0d iter limit=%0d perforated=%0d",
             m_bf[0], m_bf[2], m_bf[3], m_lvl_skip, m_early, m_limit, m_perf_pass);
    $display("outcomes ok=%0d noinput=%0d outside=%0d noref=%0d toofar=%0d | int none=%0d skip=%0d copy=%0d avg=%0d",
             m_out[1], m_out[2], m_out[3], m_out[4], m_out[5], m_int[0], m_int[1], m_int[2], m_int[3]);
    checks++; if (m_bf[0] == 0 || m_bf[2] == 0 || m_bf[3] == 0) failures += fail("filter mode not exercised");
    checks++; if (m_lvl_skip == 0) failures += fail("no level skipped");
    checks++; if (m_early == 0) failures += fail("no early convergence");
    checks++; if (m_limit == 0) failures += fail("no iteration limit");
    checks++; if (m_perf_pass == 0) failures += fail("no perforated pass");
    for (int k = 1; k <= 5; k++) begin
      checks++; if (m_out[k] == 0) failures += fail($sformatf("outcome %0d never seen", k));
    end
    for (int k = 0; k < 4; k++) begin
      checks++; if (m_int[k] == 0) failures += fail($sformatf("integration mode %0d never run", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
