// tb_ref_pkg: reference models used by the testbenches.
//
// Straight-line, frame-level versions of the fixed-point arithmetic the
// accelerator blocks perform (coordinate transforms, pinhole projection,
// ICP residual rows, TSDF voxel update), written independently of the
// pipelined RTL so that the testbenches can predict every output. Also holds
// scene helpers: camera and pose construction and a synthetic depth scene.
package tb_ref_pkg;
  import kf_pkg::*;

  // Small camera for reduced-size tests: W x H with fx = fy = f pixels.
  function automatic cam_t mk_cam(int w, int h, int f);
    cam_t k;
    k.fx_q4      = 16'(f * 16);
    k.fy_q4      = 16'(f * 16);
    k.cx_q4      = 16'(w * 8);
    k.cy_q4      = 16'(h * 8);
    k.inv_fx_q24 = 24'((64'd1 << 24) / 64'(f));
    k.inv_fy_q24 = 24'((64'd1 << 24) / 64'(f));
    return k;
  endfunction

  // Pose with a rotation of angle a (radians) about y and translation t (mm).
  function automatic pose_t mk_pose(real a, real tx, real ty, real tz);
    pose_t p;
    p = '0;
    p.r[0][0] = q14_t'(int'($cos(a) * 16384.0));
    p.r[0][2] = q14_t'(int'($sin(a) * 16384.0));
    p.r[1][1] = 16'sd16384;
    p.r[2][0] = q14_t'(-int'($sin(a) * 16384.0));
    p.r[2][2] = q14_t'(int'($cos(a) * 16384.0));
    p.t[0] = pos_t'(int'(tx * 16.0));
    p.t[1] = pos_t'(int'(ty * 16.0));
    p.t[2] = pos_t'(int'(tz * 16.0));
    return p;
  endfunction

  // Inverse of a rigid pose (transpose rotation, -R^T t).
  function automatic pose_t inv_pose(pose_t p);
    pose_t o;
    longint s;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) o.r[i][j] = p.r[j][i];
    for (int i = 0; i < 3; i++) begin
      s = 0;
      for (int j = 0; j < 3; j++) s = s + longint'(p.r[j][i]) * longint'(p.t[j]);
      o.t[i] = pos_t'(-(s >>> 14));
    end
    return o;
  endfunction

  function automatic vec3_t r_xform(pose_t T, vec3_t p);
    vec3_t o;
    longint a0, a1, a2;
    a0 = longint'(T.r[0][0]) * p[0] + longint'(T.r[0][1]) * p[1] + longint'(T.r[0][2]) * p[2];
    a1 = longint'(T.r[1][0]) * p[0] + longint'(T.r[1][1]) * p[1] + longint'(T.r[1][2]) * p[2];
    a2 = longint'(T.r[2][0]) * p[0] + longint'(T.r[2][1]) * p[1] + longint'(T.r[2][2]) * p[2];
    o[0] = pos_t'(a0 >>> 14) + T.t[0];
    o[1] = pos_t'(a1 >>> 14) + T.t[1];
    o[2] = pos_t'(a2 >>> 14) + T.t[2];
    return o;
  endfunction

  // Vertex of level-0 pixel (x, y) with depth d.
  function automatic vec3_t r_vertex(int d, int x, int y, cam_t k);
    vec3_t v;
    v[0] = pos_t'((longint'(d) * (longint'(x) * 16 - longint'(k.cx_q4)) * longint'(k.inv_fx_q24)) >>> 24);
    v[1] = pos_t'((longint'(d) * (longint'(y) * 16 - longint'(k.cy_q4)) * longint'(k.inv_fy_q24)) >>> 24);
    v[2] = pos_t'(d * 16);
    return v;
  endfunction

  // Rounded pixel of camera-space point c; ok = in front and inside w x h.
  function automatic bit r_project(vec3_t c, cam_t k, int w, int h, output int u, output int v);
    longint uq, vq;
    u = 0; v = 0;
    if (c[2] <= 0) return 0;
    uq = (longint'(c[0]) * longint'(k.fx_q4)) / longint'(c[2]) + longint'(k.cx_q4);
    vq = (longint'(c[1]) * longint'(k.fy_q4)) / longint'(c[2]) + longint'(k.cy_q4);
    if (uq < -8 || vq < -8) return 0;
    u = int'((uq + 8) / 16);
    v = int'((vq + 8) / 16);
    return (u < w) && (v < h);
  endfunction

  // Expected ICP row. d: input depth of level pixel (x, y) at level lvl;
  // the reference map is read through ref_at with address pv*w + pu.
  function automatic track_row_t r_track_row(int d, int x, int y, int lvl, pose_t T,
                                             pose_t Tr, cam_t k, int w, int h,
                                             const ref ref_px_t refm[], input int dist_th);
    track_row_t r;
    vec3_t v, p, c;
    int pu, pv;
    ref_px_t rp;
    longint dd [3];
    longint d2, e;
    r = '0;
    if (d == 0) begin r.res = TR_NO_INPUT; return r; end
    v = r_vertex(d, x * (1 << lvl), y * (1 << lvl), k);
    p = r_xform(T, v);
    c = r_xform(Tr, p);
    if (!r_project(c, k, w, h, pu, pv)) begin r.res = TR_OUT_OF_IMAGE; return r; end
    rp = refm[pv * w + pu];
    if (!rp.valid) begin r.res = TR_NO_REF; return r; end
    d2 = 0; e = 0;
    for (int i = 0; i < 3; i++) begin
      dd[i] = longint'(rp.v[i]) - p[i];
      d2 = d2 + dd[i] * dd[i];
      e  = e + dd[i] * rp.n[i];
    end
    if (d2 > longint'(dist_th) * dist_th) begin r.res = TR_TOO_FAR; return r; end
    r.res  = TR_OK;
    r.err  = pos_t'(e >>> 14);
    r.j[0] = rp.n[0];
    r.j[1] = rp.n[1];
    r.j[2] = rp.n[2];
    r.j[3] = jac_t'((longint'(p[1]) * rp.n[2] - longint'(p[2]) * rp.n[1]) >>> 14);
    r.j[4] = jac_t'((longint'(p[2]) * rp.n[0] - longint'(p[0]) * rp.n[2]) >>> 14);
    r.j[5] = jac_t'((longint'(p[0]) * rp.n[1] - longint'(p[1]) * rp.n[0]) >>> 14);
    return r;
  endfunction

  // Expected voxel after fusing one depth frame; upd = 0 leaves it unchanged.
  function automatic voxel_t r_voxel(voxel_t old, int vx, int vy, int vz, int vox_q4,
                                     pose_t Tinv, cam_t k, int w, int h,
                                     const ref int depth[], input int mu, input int maxw, output bit upd);
    vec3_t pw, c;
    int pu, pv, d;
    longint sdf, t, n;
    voxel_t o;
    upd = 0;
    pw[0] = vx * vox_q4 + vox_q4 / 2;
    pw[1] = vy * vox_q4 + vox_q4 / 2;
    pw[2] = vz * vox_q4 + vox_q4 / 2;
    c = r_xform(Tinv, pw);
    if (!r_project(c, k, w, h, pu, pv)) return old;
    d = depth[pv * w + pu];
    if (d == 0) return old;
    sdf = longint'(d) * 16 - c[2];
    if (sdf <= -mu) return old;
    t = (sdf >= mu) ? 32767 : sdf * 32767 / mu;
    n = (longint'(old.tsdf) * longint'(old.w) + t) / (longint'(old.w) + 1);
    if (n > 32767) n = 32767;
    if (n < -32767) n = -32767;
    o.tsdf = 16'(n);
    o.w    = (old.w >= maxw) ? 16'(maxw) : old.w + 16'd1;
    upd = 1;
    return o;
  endfunction

  // Bilateral filter weights: spatial Gaussian (sigma 4 px) and range
  // Gaussian (sigma 100 mm, 8 mm steps, zero from 512 mm), both Q8.
  function automatic int bf_g(int i);
    return int'($exp(-real'(i * i) / 32.0) * 256.0 + 0.5);
  endfunction
  function automatic int bf_r(int ad);
    real dm;
    if (ad >= 512) return 0;
    dm = real'((ad / 8) * 8 + 4);
    return int'($exp(-(dm * dm) / 20000.0) * 256.0 + 0.5);
  endfunction

  // Filtered depth of pixel (x, y); pad is the (w+4)-wide padded frame.
  function automatic int bf_pixel(const ref int pad[], input int w, input int x, input int y, input bit c3, input bit nr);
    longint num = 0, den = 0;
    int wp = w + 4;
    int ctr = pad[(y + 2) * wp + x + 2];
    int rad = c3 ? 1 : 2;
    for (int dy = -rad; dy <= rad; dy++)
      for (int dx = -rad; dx <= rad; dx++) begin
        int p  = pad[(y + 2 + dy) * wp + x + 2 + dx];
        int ad = (p > ctr) ? p - ctr : ctr - p;
        int sw = (bf_g(dy < 0 ? -dy : dy) * bf_g(dx < 0 ? -dx : dx)) / 256;
        int f  = (sw * (nr ? 256 : bf_r(ad))) / 256;
        if (p != 0) begin num += longint'(f) * p; den += f; end
      end
    return (ctr == 0 || den == 0) ? 0 : int'((num + den / 2) / den);
  endfunction

  // 2:1 sub-sampled pixel (x, y) of the w-wide image img: mean of valid samples.
  function automatic int ds_pixel(const ref int img[], input int w, input int x, input int y);
    int s = 0, c = 0;
    for (int dy = 0; dy < 2; dy++)
      for (int dx = 0; dx < 2; dx++)
        if (img[(2 * y + dy) * w + 2 * x + dx] != 0) begin
          s += img[(2 * y + dy) * w + 2 * x + dx]; c++;
        end
    return (c == 0) ? 0 : s / c;
  endfunction

  // Synthetic scene depth (mm) at pixel (x, y) of a w x h frame: a slanted
  // wall with a box in front of it and a few invalid holes.
  function automatic int scene_depth(int x, int y, int w, int h);
    int d;
    d = 2000 + (x * 400) / w + (y * 200) / h;
    if (x > w / 3 && x < w / 2 && y > h / 3 && y < (2 * h) / 3) d = 1400;
    if (((x * 7 + y * 13) % 29) == 0) d = 0;
    return d;
  endfunction

endpackage
