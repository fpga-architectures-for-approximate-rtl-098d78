// track_unit: ICP tracking compute unit (one pass over one pyramid level).
//
// For every processed pixel of the level-l depth image it back-projects the
// depth to a camera-space vertex, moves it to world space with the current
// pose estimate, projects it into the reference view (the vertex/normal maps
// rendered from the reconstructed model) and pairs it with the reference point
// found there. For a valid pair it emits the point-to-plane error
// e = n.(v_ref - p) and the Jacobian row J = [n, p x n]; otherwise it emits the
// reason the pixel has no correspondence. Rows feed the reduction unit.
//
// The pixel loop is fully pipelined: one pixel per cycle (II = 1), six cycles
// from a pixel's depth address to its row. Loop perforation (lp_stride > 1)
// visits only every lp_stride-th pixel of each row, which shortens the pass
// proportionally. Level l uses the level-0 camera with pixel coordinates
// scaled by 2^l; the reference maps are always at level-0 resolution.
//
// Interface: start (pulse) latches level, lp_stride, both poses and the
// camera; dep_rd_* reads the level's depth buffer, ref_rd_* reads the
// reference maps, both with one cycle of read latency. row_last marks the last
// row of the pass; busy is high from start until that row has left.
//
// Following the reference algorithm: projective association, point-to-plane
// error and Jacobian, a distance threshold, pixel-skipping perforation.
// Own choices: fixed-point arithmetic (see kf_pkg), the distance threshold of
// 100 mm, no input-normal angle test, and perforation along x.
module track_unit
  import kf_pkg::*;
#(
  parameter int W          = 320,
  parameter int H          = 240,
  parameter int DIST_TH_Q4 = 1600,    // 100 mm in 1/16 mm
  localparam int AW        = $clog2(W * H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [1:0]    level,
  input  logic [3:0]    lp_stride,
  input  pose_t         pose,      // camera -> world, current estimate
  input  pose_t         ref_inv,   // world -> reference camera
  input  cam_t          cam,
  output logic [AW-1:0] dep_rd_addr,
  input  depth_t        dep_rd_data,
  output logic          ref_rd_en,
  output logic [AW-1:0] ref_rd_addr,
  input  ref_px_t       ref_rd_data,
  output logic          row_valid,
  output track_row_t    row,
  output logic          row_last,
  output logic          busy
);
  logic [1:0]  lvl;
  logic [3:0]  stride;
  pose_t       T, Tr;
  cam_t        K;
  logic        run;
  logic [$clog2(W)-1:0]   x;
  logic [$clog2(H)-1:0]   y;
  logic [$clog2(W+1)-1:0] wl;
  logic [$clog2(H+1)-1:0] hl;

  // ---------------- pixel generator ----------------
  logic g_last;
  always_comb begin
    g_last      = (32'(y) == 32'(hl) - 1) && (32'(x) + 32'(stride) >= 32'(wl));
    dep_rd_addr = AW'(32'(y) * 32'(wl) + 32'(x));
  end

  logic s1_v, s1_last;
  logic [$clog2(W)-1:0] s1_x;
  logic [$clog2(H)-1:0] s1_y;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; x <= '0; y <= '0; lvl <= '0; stride <= 4'd1;
      wl <= '0; hl <= '0; T <= '0; Tr <= '0; K <= '0;
      s1_v <= 1'b0; s1_last <= 1'b0; s1_x <= '0; s1_y <= '0;
    end else begin
      s1_v    <= 1'b0;
      s1_last <= 1'b0;
      if (start) begin
        run    <= 1'b1;
        x      <= '0;
        y      <= '0;
        lvl    <= level;
        stride <= (lp_stride == 0) ? 4'd1 : lp_stride;
        wl     <= ($clog2(W+1))'(W >> level);
        hl     <= ($clog2(H+1))'(H >> level);
        T      <= pose;
        Tr     <= ref_inv;
        K      <= cam;
      end else if (run) begin
        s1_v    <= 1'b1;
        s1_last <= g_last;
        s1_x    <= x;
        s1_y    <= y;
        if (g_last) begin
          run <= 1'b0;
        end else if (32'(x) + 32'(stride) >= 32'(wl)) begin
          x <= '0;
          y <= y + 1'b1;
        end else begin
          x <= x + ($clog2(W))'(stride);
        end
      end
    end
  end

  // ---------------- S1: back-projection ----------------
  logic s2_v, s2_last, s2_ok;
  vec3_t s2_vtx;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_v <= 1'b0; s2_last <= 1'b0; s2_ok <= 1'b0; s2_vtx <= '0;
    end else begin
      s2_v    <= s1_v;
      s2_last <= s1_last;
      s2_ok   <= (dep_rd_data != 0);
      s2_vtx  <= backproject(dep_rd_data, (int'(s1_x) << lvl) << 4,
                             (int'(s1_y) << lvl) << 4, K);
    end
  end

  // ---------------- S2: to world space ----------------
  logic s3_v, s3_last, s3_ok;
  vec3_t s3_p;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_v <= 1'b0; s3_last <= 1'b0; s3_ok <= 1'b0; s3_p <= '0;
    end else begin
      s3_v    <= s2_v;
      s3_last <= s2_last;
      s3_ok   <= s2_ok;
      s3_p    <= xform(T, s2_vtx);
    end
  end

  // ---------------- S3: to reference camera ----------------
  logic s4_v, s4_last, s4_ok;
  vec3_t s4_p, s4_c;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s4_v <= 1'b0; s4_last <= 1'b0; s4_ok <= 1'b0; s4_p <= '0; s4_c <= '0;
    end else begin
      s4_v    <= s3_v;
      s4_last <= s3_last;
      s4_ok   <= s3_ok;
      s4_p    <= s3_p;
      s4_c    <= xform(Tr, s3_p);
    end
  end

  // ---------------- S4: projection and reference fetch ----------------
  int   pu, pv;
  logic pin;
  always_comb begin
    project(s4_c, K, W, H, pu, pv, pin);
    ref_rd_en   = s4_v && s4_ok && pin;
    ref_rd_addr = pin ? AW'(pv * W + pu) : '0;
  end

  logic       s5_v, s5_last;
  track_res_e s5_res;
  vec3_t      s5_p;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s5_v <= 1'b0; s5_last <= 1'b0; s5_res <= TR_NO_INPUT; s5_p <= '0;
    end else begin
      s5_v    <= s4_v;
      s5_last <= s4_last;
      s5_p    <= s4_p;
      s5_res  <= !s4_ok ? TR_NO_INPUT : (!pin ? TR_OUT_OF_IMAGE : TR_OK);
    end
  end

  // ---------------- S5: residual and Jacobian ----------------
  track_row_t r_c;
  always_comb begin
    longint d [3];
    longint dist2, e;
    r_c     = '0;
    r_c.res = s5_res;
    dist2   = 0;
    e       = 0;
    for (int i = 0; i < 3; i++) begin
      d[i]   = longint'(ref_rd_data.v[i]) - longint'(s5_p[i]);
      dist2 += d[i] * d[i];
      e     += longint'(ref_rd_data.n[i]) * d[i];
    end
    if (s5_res == TR_OK) begin
      if (!ref_rd_data.valid)
        r_c.res = TR_NO_REF;
      else if (dist2 > longint'(DIST_TH_Q4) * longint'(DIST_TH_Q4))
        r_c.res = TR_TOO_FAR;
      else begin
        r_c.err  = pos_t'(e >>> Q);
        for (int i = 0; i < 3; i++) r_c.j[i] = jac_t'(ref_rd_data.n[i]);
        r_c.j[3] = jac_t'((longint'(s5_p[1]) * ref_rd_data.n[2] - longint'(s5_p[2]) * ref_rd_data.n[1]) >>> Q);
        r_c.j[4] = jac_t'((longint'(s5_p[2]) * ref_rd_data.n[0] - longint'(s5_p[0]) * ref_rd_data.n[2]) >>> Q);
        r_c.j[5] = jac_t'((longint'(s5_p[0]) * ref_rd_data.n[1] - longint'(s5_p[1]) * ref_rd_data.n[0]) >>> Q);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_valid <= 1'b0; row_last <= 1'b0; row <= '0;
    end else begin
      row_valid <= s5_v;
      row_last  <= s5_last;
      row       <= r_c;
    end
  end

  assign busy = run || s1_v || s2_v || s3_v || s4_v || s5_v || row_valid;

endmodule
