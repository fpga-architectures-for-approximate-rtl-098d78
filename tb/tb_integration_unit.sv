// tb_integration_unit: self-checking test of a TSDF integration compute unit.
//
// A 16^3 grid of 200 mm voxels (truncation 400 mm) is held in a testbench
// memory with one cycle of read latency and random initial contents. Compute
// unit 1 of 2 (the upper x half) fuses a synthetic depth frame seen from a
// slightly rotated camera, once with every voxel computed, once with skip
// perforation (step 3), once with copy perforation (step 2) and twice with
// averaging perforation (steps 3 and 7; step 7 leaves a tail above the top
// computed voxel of each column). After each pass the whole grid is compared
// with the frame-level model: voxels of the other slab and skipped voxels must
// be untouched, copied voxels must equal the value computed below them,
// averaged voxels the mean of the computed voxels below and above. The pass
// length must be one voxel per cycle over the visited voxels plus a four-cycle
// pipeline, and eight more cycles of write delay in averaging mode.
module tb_integration_unit;
  import kf_pkg::*;
  import tb_ref_pkg::*;

  localparam int VOL = 16, W = 32, H = 24, F = 30, VOXQ = 3200, MU = 6400, MAXW = 100;
  localparam int NV = VOL * VOL * VOL, VAW = 12, DAW = $clog2(W * H);
  logic clk = 0, rst_n = 0, start = 0;
  pose_t inv_p = '0;
  cam_t cam;
  perf_mode_e perf_mode = PERF_NONE;
  logic [2:0] perf_step = 3'd1;
  logic [DAW-1:0] dep_rd_addr;
  depth_t dep_rd_data;
  logic vol_rd_en, vol_wr_en, busy, done;
  logic [VAW-1:0] vol_rd_addr, vol_wr_addr;
  voxel_t vol_rd_data, vol_wr_data;
  int checks = 0, failures = 0, cycle = 0, bad_addr = 0;

  integration_unit #(.VOL(VOL), .W(W), .H(H), .VOX_Q4(VOXQ), .MU_Q4(MU), .MAXW(MAXW),
                     .N_CU(2), .CU_ID(1))
    dut (.clk, .rst_n, .start, .inv_pose(inv_p), .cam, .perf_mode, .perf_step,
         .dep_rd_addr, .dep_rd_data, .vol_rd_en, .vol_rd_addr, .vol_rd_data,
         .vol_wr_en, .vol_wr_addr, .vol_wr_data, .busy, .done);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  depth_t dmem [];
  int     dimg [];
  voxel_t vol [NV];
  voxel_t expv [NV];
  always_ff @(posedge clk) begin
    dep_rd_data <= dmem[dep_rd_addr];
    vol_rd_data <= vol[vol_rd_addr];
    if (vol_wr_en) begin
      vol[vol_wr_addr] <= vol_wr_data;
      if (rst_n && int'(vol_wr_addr % VOL) < VOL / 2) bad_addr++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(perf_mode_e m, int step);
    int t0, nvis, nupd = 0, ncopy = 0;
    for (int i = 0; i < NV; i++) begin
      vol[i].tsdf = 16'(int'($urandom_range(0, 65534)) - 32767);
      vol[i].w    = ($urandom_range(0, 7) == 0) ? 16'(MAXW) : 16'($urandom_range(0, 20));
      expv[i] = vol[i];
    end
    for (int x = VOL / 2; x < VOL; x++)
      for (int y = 0; y < VOL; y++) begin
        voxel_t lead; bit lupd;
        lupd = 0;
        for (int z = 0; z < VOL; z++) begin
          int a = x + y * VOL + z * VOL * VOL;
          bit comp = (m == PERF_NONE) || (z % step == 0);
          bit u;
          if (comp) begin
            expv[a] = r_voxel(vol[a], x, y, z, VOXQ, inv_p, cam, W, H, dimg, MU, MAXW, u);
            lead = expv[a]; lupd = u; nupd += int'(u);
          end else if (m == PERF_COPY && lupd) begin
            expv[a] = lead; ncopy++;
          end
        end
        // averaging: fill each gap from the computed voxels below and above
        if (m == PERF_AVG)
          for (int z0 = 0; z0 < VOL; z0 += step) begin
            int  a0 = x + y * VOL + z0 * VOL * VOL;
            int  z1 = z0 + step;
            bit  u0, u1;
            voxel_t v0 = expv[a0], v1, f;
            void'(r_voxel(vol[a0], x, y, z0, VOXQ, inv_p, cam, W, H, dimg, MU, MAXW, u0));
            u1 = 0;
            if (z1 < VOL) begin
              int a1 = x + y * VOL + z1 * VOL * VOL;
              v1 = expv[a1];
              void'(r_voxel(vol[a1], x, y, z1, VOXQ, inv_p, cam, W, H, dimg, MU, MAXW, u1));
            end
            if (u0 && u1) begin
              f.tsdf = 16'((int'(v0.tsdf) + int'(v1.tsdf)) >>> 1);
              f.w    = 16'((int'(v0.w) + int'(v1.w)) >>> 1);
            end else f = u1 ? v1 : v0;
            if (u0 || u1)
              for (int z = z0 + 1; z < z1 && z < VOL; z++) begin
                expv[x + y * VOL + z * VOL * VOL] = f; ncopy++;
              end
          end
      end
    nvis = (VOL / 2) * VOL * ((m == PERF_SKIP) ? (VOL + step - 1) / step : VOL);
    @(negedge clk);
    perf_mode = m; perf_step = 3'(step); start = 1; t0 = cycle;
    @(negedge clk); start = 0; perf_mode = PERF_NONE; inv_p = '0;
    while (!done) begin @(posedge clk); #1; end
    checks++;
    if (cycle - t0 != nvis + ((m == PERF_AVG) ? 12 : 4)) begin failures++; $display("FAIL pass length %0d exp %0d", cycle - t0, nvis + ((m == PERF_AVG) ? 12 : 4)); end
    @(posedge clk); #1;
    for (int i = 0; i < NV; i++) begin
      checks++;
      if (vol[i] != expv[i]) begin
        failures++;
        if (failures < 10) $display("FAIL voxel %0d: got %0d/%0d exp %0d/%0d", i, vol[i].tsdf, vol[i].w, expv[i].tsdf, expv[i].w);
      end
    end
    checks++;
    if (nupd < 200 / step || (m >= PERF_COPY && ncopy == 0)) begin failures++; $display("FAIL scene too sparse %0d %0d", nupd, ncopy); end
    $display("mode %0d: %0d updated, %0d copied, %0d cycles", m, nupd, ncopy, cycle - t0);
  endtask

  pose_t Tc;
  initial begin
    cam  = mk_cam(W, H, F);
    dmem = new[W * H];
    dimg = new[W * H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        dimg[y * W + x] = scene_depth(x, y, W, H);
        dmem[y * W + x] = depth_t'(dimg[y * W + x]);
      end
    Tc = mk_pose(0.05, 1600.0, 1600.0, -200.0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    inv_p = inv_pose(Tc); run(PERF_NONE, 1);
    inv_p = inv_pose(Tc); run(PERF_SKIP, 3);
    inv_p = inv_pose(Tc); run(PERF_COPY, 2);
    inv_p = inv_pose(Tc); run(PERF_AVG, 3);
    inv_p = inv_pose(Tc); run(PERF_AVG, 7);
    checks++;
    if (bad_addr != 0) begin failures++; $display("FAIL %0d writes outside the slab", bad_addr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
