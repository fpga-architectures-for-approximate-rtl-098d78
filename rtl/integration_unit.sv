// integration_unit: TSDF integration compute unit for one slab of the voxel
// grid.
//
// The voxel grid (VOL^3 voxels of {tsdf, weight}, x fastest in memory) is
// split along x into N_CU slabs, one per compute unit; unit CU_ID walks its
// slab with z as the innermost loop. For each voxel it transforms the voxel
// centre into the camera frame (world -> camera pose), projects it into the
// depth image and, when the depth there is valid and the voxel lies no more
// than MU behind the measured surface, merges the truncated signed distance
// tsdf = min(1, (depth - z_cam)/MU) into the voxel as a running weighted
// average: tsdf' = (tsdf*w + new)/(w + 1), w' = min(w + 1, MAXW).
//
// Loop perforation along z (perf_mode, perf_step):
//   PERF_NONE  every voxel is computed;
//   PERF_SKIP  only every perf_step-th z is visited, the others keep their
//              previous-frame value; the pass is perf_step times shorter;
//   PERF_COPY  only every perf_step-th z is computed, and the voxels in
//              between receive a copy of the value just computed below them;
//   PERF_AVG   only every perf_step-th z is computed, and the voxels in
//              between receive the mean of the two computed voxels around
//              them (a copy where only one of them was updated, and a copy
//              of the last one above the top computed voxel of a column).
// The signed distance is the difference of depths along the optical axis; the
// per-pixel ray-length scaling factor is replaced by 1 (a "cheaper function"
// approximation).
//
// Timing: one voxel per cycle (II = 1). Depth and voxel reads have one cycle
// of latency; a voxel is written three cycles after it is issued, so a read
// never meets a pending write to the same voxel. start (pulse) latches the
// pose, camera and perforation settings; done pulses in the cycle that
// presents the last write. In PERF_AVG writes leave through an 8-slot delay
// line, so each write and done come 8 cycles later than in the other modes.
//
// Following the reference algorithm: 256^3 grid over 4.8 m, TSDF update,
// skip, copy and averaging perforation along z, multiple compute units. Own choices:
// fixed-point formats, MU = 100 mm, MAXW = 100, the slab split along x, and
// in averaging mode the mean of the weights as the new weight.
module integration_unit
  import kf_pkg::*;
#(
  parameter int VOL    = 256,
  parameter int W      = 320,
  parameter int H      = 240,
  parameter int VOX_Q4 = 300,     // 4.8 m / 256 = 18.75 mm, in 1/16 mm
  parameter int MU_Q4  = 1600,    // truncation distance, 100 mm
  parameter int MAXW   = 100,
  parameter int N_CU   = 4,
  parameter int CU_ID  = 0,
  localparam int DAW   = $clog2(W * H),
  localparam int VB    = $clog2(VOL),
  localparam int VAW   = 3 * VB
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  pose_t          inv_pose,     // world -> camera
  input  cam_t           cam,
  input  perf_mode_e     perf_mode,
  input  logic [2:0]     perf_step,
  output logic [DAW-1:0] dep_rd_addr,
  input  depth_t         dep_rd_data,
  output logic           vol_rd_en,
  output logic [VAW-1:0] vol_rd_addr,
  input  voxel_t         vol_rd_data,
  output logic           vol_wr_en,
  output logic [VAW-1:0] vol_wr_addr,
  output voxel_t         vol_wr_data,
  output logic           busy,
  output logic           done
);
  localparam int XS = VOL / N_CU;
  localparam int X0 = CU_ID * XS;

  pose_t      T;
  cam_t       K;
  perf_mode_e mode;
  logic [2:0] step;
  logic       run;
  logic [VB-1:0] x, y;
  logic [VB:0]   z;
  logic [2:0]    zph;       // position of z inside its perforation group

  // ---------------- voxel generator ----------------
  logic [VB:0] z_next;
  logic        g_last, g_comp;
  always_comb begin
    z_next = (mode == PERF_SKIP) ? z + (VB+1)'(step) : z + 1'b1;
    g_last = (32'(x) == X0 + XS - 1) && (32'(y) == VOL - 1) && (32'(z_next) >= VOL);
    g_comp = (mode == PERF_NONE) || (mode == PERF_SKIP) || (zph == 0);
  end

  logic          s1_v, s1_last, s1_comp;
  vec3_t         s1_pos;
  logic [VAW-1:0] s1_addr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; x <= '0; y <= '0; z <= '0; zph <= '0;
      T <= '0; K <= '0; mode <= PERF_NONE; step <= 3'd1;
      s1_v <= 1'b0; s1_last <= 1'b0; s1_comp <= 1'b0; s1_pos <= '0; s1_addr <= '0;
    end else begin
      s1_v    <= 1'b0;
      s1_last <= 1'b0;
      if (start) begin
        run  <= 1'b1;
        x    <= VB'(X0);
        y    <= '0;
        z    <= '0;
        zph  <= '0;
        T    <= inv_pose;
        K    <= cam;
        mode <= perf_mode;
        step <= (perf_mode == PERF_NONE || perf_step == 0) ? 3'd1 : perf_step;
      end else if (run) begin
        s1_v      <= 1'b1;
        s1_last   <= g_last;
        s1_comp   <= g_comp;
        s1_addr   <= {z[VB-1:0], y, x};
        s1_pos[0] <= pos_t'(32'(x) * VOX_Q4 + VOX_Q4 / 2);
        s1_pos[1] <= pos_t'(32'(y) * VOX_Q4 + VOX_Q4 / 2);
        s1_pos[2] <= pos_t'(32'(z) * VOX_Q4 + VOX_Q4 / 2);
        zph       <= (zph + 1'b1 >= step) ? 3'd0 : zph + 1'b1;
        if (g_last) begin
          run <= 1'b0;
        end else if (32'(z_next) >= VOL) begin
          z   <= '0;
          zph <= '0;
          if (32'(y) == VOL - 1) begin
            y <= '0;
            x <= x + 1'b1;
          end else begin
            y <= y + 1'b1;
          end
        end else begin
          z <= z_next;
        end
      end
    end
  end

  // ---------------- S1: world -> camera ----------------
  logic           s2_v, s2_last, s2_comp;
  vec3_t          s2_c;
  logic [VAW-1:0] s2_addr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_v <= 1'b0; s2_last <= 1'b0; s2_comp <= 1'b0; s2_c <= '0; s2_addr <= '0;
    end else begin
      s2_v    <= s1_v;
      s2_last <= s1_last;
      s2_comp <= s1_comp;
      s2_addr <= s1_addr;
      s2_c    <= xform(T, s1_pos);
    end
  end

  // ---------------- S2: projection, depth and voxel fetch ----------------
  int   pu, pv;
  logic pin;
  always_comb begin
    project(s2_c, K, W, H, pu, pv, pin);
    dep_rd_addr = pin ? DAW'(pv * W + pu) : '0;
    vol_rd_en   = s2_v && s2_comp && pin;
    vol_rd_addr = s2_addr;
  end

  logic           s3_v, s3_last, s3_comp, s3_in;
  pos_t           s3_cz;
  logic [VAW-1:0] s3_addr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_v <= 1'b0; s3_last <= 1'b0; s3_comp <= 1'b0; s3_in <= 1'b0;
      s3_cz <= '0; s3_addr <= '0;
    end else begin
      s3_v    <= s2_v;
      s3_last <= s2_last;
      s3_comp <= s2_comp;
      s3_in   <= pin;
      s3_cz   <= s2_c[2];
      s3_addr <= s2_addr;
    end
  end

  // ---------------- S3: TSDF update and write-back ----------------
  voxel_t nv;
  logic   upd;
  always_comb begin
    longint sdf, tsdf, acc, nt;
    sdf  = (longint'(dep_rd_data) <<< POS_FRAC) - longint'(s3_cz);
    upd  = s3_comp && s3_in && (dep_rd_data != 0) && (sdf > -longint'(MU_Q4));
    tsdf = (sdf >= longint'(MU_Q4)) ? 64'sd32767 : (sdf * 32767) / longint'(MU_Q4);
    acc  = longint'(vol_rd_data.tsdf) * longint'(vol_rd_data.w) + tsdf;
    nt   = acc / (longint'(vol_rd_data.w) + 1);
    if (nt > 32767)  nt = 32767;
    if (nt < -32767) nt = -32767;
    nv.tsdf = 16'(nt);
    nv.w    = (32'(vol_rd_data.w) >= MAXW) ? 16'(MAXW) : vol_rd_data.w + 1'b1;
  end

  // Averaging mode: every S3 slot passes through a DL-deep delay line before
  // it is written, so that the skipped voxels between two computed ones can
  // wait for the upper one. A slot marked "wait" is resolved when the next
  // computed voxel of its column reaches S3 (average of the two, or a copy of
  // whichever was updated) or, at the top of the column, with a copy of the
  // last computed voxel. Waiting slots are at most 6 cycles old, so DL = 8
  // always resolves them before they leave the line.
  localparam int DL = 8;
  typedef struct packed {
    logic           v;      // slot holds a voxel
    logic           wt;     // waiting for the next computed voxel
    logic           we;     // write when the slot leaves the line
    logic           last;   // last voxel of the pass
    logic [VAW-1:0] addr;
    voxel_t         data;
  } slot_t;

  voxel_t last_v;
  logic   last_upd;
  slot_t  dl [DL];
  logic   s3_ztop;
  voxel_t avg_v;
  assign s3_ztop = (32'(s3_addr[VAW-1 -: VB]) == VOL - 1);
  always_comb begin
    avg_v.tsdf = 16'((17'(signed'(last_v.tsdf)) + 17'(signed'(nv.tsdf))) >>> 1);
    avg_v.w    = 16'((17'(last_v.w) + 17'(nv.w)) >> 1);
  end

  // resolution of one waiting slot in the current cycle
  function automatic slot_t resolve(slot_t e, logic lead, logic top);
    slot_t r;
    r = e;
    if (e.v && e.wt) begin
      if (lead) begin
        r.wt   = 1'b0;
        r.we   = last_upd || upd;
        r.data = (last_upd && upd) ? avg_v : (upd ? nv : last_v);
      end else if (top) begin
        r.wt   = 1'b0;
        r.we   = last_upd;
        r.data = last_v;
      end
    end
    return r;
  endfunction

  // new slot entering the line
  logic  lead, top;
  slot_t n0;
  always_comb begin
    lead    = s3_v && s3_comp;
    top     = s3_v && !s3_comp && s3_ztop;
    n0      = '0;
    n0.v    = s3_v;
    n0.last = s3_v && s3_last;
    n0.addr = s3_addr;
    if (s3_comp) begin
      n0.we   = upd;
      n0.data = nv;
    end else if (s3_ztop) begin
      n0.we   = last_upd;
      n0.data = last_v;
    end else begin
      n0.wt   = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vol_wr_en <= 1'b0; vol_wr_addr <= '0; vol_wr_data <= '0;
      last_v <= '0; last_upd <= 1'b0; done <= 1'b0;
      for (int k = 0; k < DL; k++) dl[k] <= '0;
    end else begin
      vol_wr_en <= 1'b0;
      if (s3_v && s3_comp) begin
        last_v   <= nv;
        last_upd <= upd;
      end
      if (mode == PERF_AVG) begin
        dl[0] <= n0;
        for (int k = 1; k < DL; k++) dl[k] <= resolve(dl[k-1], lead, top);
        done        <= dl[DL-1].v && dl[DL-1].last;
        vol_wr_en   <= dl[DL-1].v && dl[DL-1].we;
        vol_wr_addr <= dl[DL-1].addr;
        vol_wr_data <= dl[DL-1].data;
      end else begin
        for (int k = 0; k < DL; k++) dl[k] <= '0;
        done <= s3_v && s3_last;
        if (s3_v) begin
          vol_wr_addr <= s3_addr;
          if (s3_comp) begin
            vol_wr_en   <= upd;
            vol_wr_data <= nv;
          end else begin
            vol_wr_en   <= last_upd;
            vol_wr_data <= last_v;
          end
        end
      end
    end
  end

  logic dl_busy;
  always_comb begin
    dl_busy = 1'b0;
    for (int k = 0; k < DL; k++) dl_busy |= dl[k].v;
  end

  assign busy = run || s1_v || s2_v || s3_v || dl_busy || vol_wr_en;

endmodule
