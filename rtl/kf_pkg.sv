// kf_pkg: types, constants and fixed-point helpers shared by the KinectFusion
// accelerator blocks.
//
// Number formats (all fixed point; the reference software uses float, and the
// fp16 variant is one of the design's approximations):
//   depth_t  unsigned 16 bit, millimetres, 0 marks an invalid depth sample
//   pos_t    signed 32 bit, 1/16 mm (POS_FRAC fractional bits); 3D positions
//   q14_t    signed 16 bit, Q2.14; rotation-matrix entries and unit normals
//   pixels   Q.4 (1/16 pixel) for principal point and focal length
// A pose is a 3x4 rigid transform {R (Q2.14), t (pos_t)}: p' = R p + t.
// The helper functions below are combinational and are used inside single
// pipeline stages of the compute units.
package kf_pkg;

  localparam int POS_FRAC = 4;
  localparam int Q        = 14;

  typedef logic        [15:0] depth_t;
  typedef logic signed [31:0] pos_t;
  typedef logic signed [15:0] q14_t;
  typedef pos_t [2:0]         vec3_t;
  typedef q14_t [2:0]         nrm3_t;

  typedef struct packed {
    q14_t [2:0][2:0] r;   // r[row][col]
    vec3_t           t;
  } pose_t;

  // Pinhole camera of the level-0 (full resolution) depth image.
  typedef struct packed {
    logic [15:0] fx_q4;       // focal length x, 1/16 pixel
    logic [15:0] fy_q4;       // focal length y, 1/16 pixel
    logic [15:0] cx_q4;       // principal point x, 1/16 pixel
    logic [15:0] cy_q4;       // principal point y, 1/16 pixel
    logic [23:0] inv_fx_q24;  // 1/fx, 24 fractional bits
    logic [23:0] inv_fy_q24;  // 1/fy, 24 fractional bits
  } cam_t;

  // One entry of the reference (raycast) vertex/normal maps.
  typedef struct packed {
    logic  valid;
    vec3_t v;    // world position, pos_t
    nrm3_t n;    // unit normal, Q2.14
  } ref_px_t;

  // Per-pixel outcome of the ICP correspondence search.
  typedef enum logic [2:0] {
    TR_OK           = 3'd1,
    TR_NO_INPUT     = 3'd2,   // input depth is 0
    TR_OUT_OF_IMAGE = 3'd3,   // projects outside the reference map or behind it
    TR_NO_REF       = 3'd4,   // reference map holds no surface there
    TR_TOO_FAR      = 3'd5    // correspondence farther than the distance threshold
  } track_res_e;

  typedef logic signed [31:0] jac_t;

  // One row of the ICP linear system: residual and Jacobian.
  typedef struct packed {
    track_res_e  res;
    pos_t        err;   // point-to-plane error n.(vref - p), pos_t units
    jac_t [5:0]  j;     // j[0..2] = n (Q2.14), j[3..5] = p x n (pos_t units)
  } track_row_t;

  // Number of sums produced by the reduction: 1 error^2, 6 J^T r,
  // 21 J^T J (upper triangle), 1 inlier count, 3 outlier counts.
  localparam int NSUM = 32;
  typedef logic signed [63:0] sum_t;

  // TSDF voxel: truncated distance (Q1.15, +1.0 = 32767) and weight.
  typedef struct packed {
    logic signed [15:0] tsdf;
    logic        [15:0] w;
  } voxel_t;

  // Loop-perforation modes of the integration unit.
  typedef enum logic [1:0] {
    PERF_NONE = 2'd0,   // every voxel computed
    PERF_SKIP = 2'd1,   // skipped voxels keep their previous-frame value
    PERF_COPY = 2'd2,   // skipped voxels receive the last computed neighbour value
    PERF_AVG  = 2'd3    // skipped voxels receive the mean of the computed neighbours
  } perf_mode_e;

  // p' = R p + t
  function automatic vec3_t xform(pose_t T, vec3_t p);
    vec3_t  o;
    longint acc;
    for (int i = 0; i < 3; i++) begin
      acc = 0;
      for (int k = 0; k < 3; k++)
        acc += longint'(T.r[i][k]) * longint'(p[k]);
      o[i] = pos_t'(acc >>> Q) + T.t[i];
    end
    return o;
  endfunction

  // Back-projection of depth d (mm) at level-0 pixel coordinate (xq4, yq4)
  // given in 1/16 pixel.
  function automatic vec3_t backproject(depth_t d, int xq4, int yq4, cam_t k);
    vec3_t  v;
    longint dx, dy;
    dx   = longint'(xq4) - longint'({1'b0, k.cx_q4});
    dy   = longint'(yq4) - longint'({1'b0, k.cy_q4});
    v[0] = pos_t'((longint'(d) * dx * longint'({1'b0, k.inv_fx_q24})) >>> 24);
    v[1] = pos_t'((longint'(d) * dy * longint'({1'b0, k.inv_fy_q24})) >>> 24);
    v[2] = pos_t'(longint'(d) <<< POS_FRAC);
    return v;
  endfunction

  // Projection of camera-frame point c to a level-0 pixel, rounded to nearest.
  // ok is 0 when the point lies behind the camera or outside w x h.
  function automatic void project(vec3_t c, cam_t k, int w, int h,
                                  output int u, output int v, output logic ok);
    longint uq4, vq4;
    ok = 1'b0; u = 0; v = 0;
    if (c[2] > 0) begin
      uq4 = (longint'(c[0]) * longint'({1'b0, k.fx_q4})) / longint'(c[2])
            + longint'({1'b0, k.cx_q4});
      vq4 = (longint'(c[1]) * longint'({1'b0, k.fy_q4})) / longint'(c[2])
            + longint'({1'b0, k.cy_q4});
      u   = int'((uq4 + 8) >>> 4);
      v   = int'((vq4 + 8) >>> 4);
      ok  = (uq4 >= -8) && (vq4 >= -8) && (u < w) && (v < h);
    end
  endfunction

endpackage
