# KinectFusion dense-SLAM accelerator with approximate-computing knobs

KinectFusion builds a dense 3D map of a room from a stream of depth frames and
tracks the camera in that map. Each frame is filtered, aligned with a
rendering of the current map by iterative closest point (ICP), and then fused
into a 256³ voxel grid that holds a truncated signed distance function (TSDF).
This RTL is the programmable-logic half of an MPSoC design for that algorithm.
The processor half keeps the ray-casting renderer, the 6x6 pose solve and
frame acquisition.

The design adds run-time approximation switches to each kernel. Each switch
trades accuracy for speed:

| kernel      | switch                             | effect                                                       |
|-------------|------------------------------------|--------------------------------------------------------------|
| filter      | `bf_coeff3`                        | 3x3 instead of 5x5 window                                    |
| filter      | `bf_no_range`                      | spatial weights only, no range filter                        |
| tracking    | `trk_lp_stride`                    | loop perforation: process every n-th pixel of a row          |
| tracking    | `trk_level_en`, `trk_max_iter`     | skip pyramid levels, lower the ICP iteration limit           |
| integration | `int_perf_mode = PERF_SKIP`, step  | visit every n-th z only; the rest keep last frame's value    |
| integration | `int_perf_mode = PERF_COPY`, step  | compute every n-th z; copy that result into the next n-1     |
| integration | `int_perf_mode = PERF_AVG`, step   | compute every n-th z; fill the gaps with the mean of the two |

The top level, `kfusion_accel`, has the mix of the fastest approximate
configuration: one filter, one tracking unit and four integration units. With
every switch off it computes the precise algorithm, in fixed point.

## Frame flow

```
 host: padded depth ─► bilateral_filter ─► depth_buffer L0 (320x240, 5 read ports)
                              │
                              └► pyramid_downsample ─► depth_buffer L1 (160x120)
                                        └► pyramid_downsample ─► depth_buffer L2 (80x60)

 icp_controller ──start──► track_unit ──rows──► reduction_unit ──32 sums──► host solves,
       ▲                    │  ▲                                            returns pose
       └──host_ack──────────┘  └── reference vertex/normal maps (rendered by host)

 4 x integration_unit (x-slab each) ◄── depth_buffer L0, pose ──► voxel grid in DRAM
```

1. **Pre-processing.** The host streams the depth frame with two rows and
   columns of zeros added on each side. The filter then never tests borders
   and takes one pixel per cycle. The filtered 320x240 frame goes into the
   level-0 buffer. Two cascaded 2:1 sub-samplers fill levels 1 and 2 at the
   same time. `frame_ready` rises when level 2 is complete. It lags the last
   input pixel by a few cycles.
2. **Tracking.** The host pulses `trk_start`. The controller runs passes
   coarse to fine (level 2, then 1, then 0). After each pass the 32 sums wait
   on `trk_sums` with `trk_results_ready` high. The host solves
   `JᵀJ·x = Jᵀe`, writes the new estimate to `trk_pose`, and pulses
   `host_ack`. If it also raises `host_converged`, the current level ends
   early. `trk_done` pulses after the last level.
3. **Integration.** The host drives `int_inv_pose` (world→camera of the
   tracked pose) and pulses `int_start`. Each of the four units sweeps its
   64x256x256 slab. `int_done` pulses once all four have finished.
4. **Rendering.** The host ray-casts the grid into new reference vertex and
   normal maps. The tracking unit reads them through `ref_rd_*` on the next
   frame.

## Number formats

All arithmetic is integer, defined in `rtl/kf_pkg.sv`:

* depth: unsigned 16 bit, millimetres, 0 = no measurement;
* 3D positions: signed 32 bit in 1/16 mm (`pos_t`);
* rotation entries and unit normals: signed Q2.14 (`q14_t`);
* camera: focal length and principal point in 1/16 pixel, reciprocal focal
  lengths with 24 fractional bits;
* voxel: `{tsdf: signed Q1.15, weight: unsigned 16}`, 32 bits. 256³ voxels
  take 64 MB;
* a pose `{r[3][3], t[3]}` maps p to R·p + t.

The reference software uses 32-bit float, with half precision as an
approximation option. Neither is built here. The fixed-point formats above
replace both.

## Tracking in detail

Tracking is the most involved part, because it spans hardware and host.

**One pass** (`track_unit`) streams the pixels of one pyramid level in raster
order, one per cycle, with a six-cycle pipeline:

| stage | work                                                                                         |
|-------|----------------------------------------------------------------------------------------------|
| G     | pixel counter; depth-buffer address                                                          |
| S1    | back-project depth d at level pixel (x, y): level-0 coordinate (x·2ˡ, y·2ˡ), `v = d·K⁻¹·[x y 1]` |
| S2    | to world space: `p = T·v` (T = current pose estimate)                                        |
| S3    | to reference camera: `c = T_ref⁻¹·p`                                                         |
| S4    | project `c` with level-0 intrinsics (two dividers), round, read the reference map            |
| S5    | `diff = v_ref − p`; reject if no reference or `‖diff‖ > 100 mm`; `e = n·diff`, `J = [n, p×n]`  |

Each row carries an outcome: `TR_OK`, `TR_NO_INPUT` (depth 0),
`TR_OUT_OF_IMAGE` (outside the reference view or behind it), `TR_NO_REF` (no
surface in the reference map there) or `TR_TOO_FAR`. The reference maps are
always full resolution, whatever the level.

**Reduction** (`reduction_unit`) multiplies in one stage and accumulates in
the next, in 64-bit sums. For inliers it adds `e²` (sum 0), `J[i]·e` (sums
1-6), the 21 upper-triangle `J[i]·J[j]` (sums 7-27, row-major) and the inlier
count (28). Sums 29-31 count no-input, no-correspondence and too-far pixels.
`done` comes two cycles after the last row.

Units of the sums: J[0..2] are Q2.14 and J[3..5], e are 1/16 mm. The solver
must scale the blocks of JᵀJ accordingly.

**Scheduling** (`icp_controller`) holds, per level, an enable bit and an
iteration limit. The usual limits are 10/5/4 for levels 0/1/2. A level whose
enable is 0 or whose limit is 0 is skipped. After each pass the controller
waits for the host. There is no timeout: a host that never acknowledges
stalls tracking.

Pixel perforation (`trk_lp_stride = n`) processes x = 0, n, 2n, … of each
row, so a pass takes about 1/n of the cycles.

## Integration in detail

The grid lives in external memory with x fastest
(`addr = x + 256·y + 65536·z`). Each unit owns an x-slab and walks it with z
innermost, one voxel per cycle:

1. the voxel centre `((i + ½)·18.75 mm, …)` is moved to the camera frame;
2. it is projected into the depth frame. The depth there and the old voxel
   are fetched in the same cycle;
3. if the projection is inside the frame, the depth is valid and
   `sdf = depth − z_cam > −100 mm`, the unit computes
   `tsdf = min(1, sdf/100 mm)`, then `tsdf' = (tsdf_old·w + tsdf)/(w + 1)`
   and `w' = min(w + 1, 100)`, and writes the voxel back three cycles after
   the voxel was issued.

Two things depart from textbook KinectFusion. The signed distance is measured
along the optical axis: the per-pixel ray-length factor
`sqrt(1 + (x/z)² + (y/z)²)` is replaced by 1, as the "cheaper function"
approximation. All validity checks are kept.

Perforation applies to z:

* `PERF_SKIP` with step n visits z = 0, n, 2n, …. A pass is n times shorter,
  and skipped voxels keep their previous values.
* `PERF_COPY` visits every z but computes only the first of each group of n.
  If that voxel was updated, the next n−1 voxels receive a copy of its new
  value. Otherwise they are left alone.
* `PERF_AVG` also computes only z = 0, n, 2n, …. The n−1 voxels between two
  computed ones receive the mean of their new values (tsdf and weight). If
  only one of the two was updated they get a copy of it, and if neither was
  they are left alone. Above the top computed voxel of a column they get a
  copy of it. The upper neighbour is computed after the gap has been visited,
  so in this mode every write passes an 8-slot delay line. Gaps are at most
  six voxels long (step ≤ 7), so each gap slot is resolved before it leaves
  the line. The pass and `done` are 8 cycles longer; the rate stays one voxel
  per cycle.

## Interfaces and timing

* Clock `clk`, asynchronous active-low reset `rst_n`. Every control input is
  a one-cycle pulse. Configuration is sampled on the pulse that starts the
  frame or pass.
* `bilateral_filter`: output pixel (x, y) three cycles after padded pixel
  (x+4, y+4). `pyramid_downsample`: one cycle after the pixel that completes
  the 2x2 block.
* `depth_buffer`, reference-map and voxel ports: synchronous read, data one
  cycle after the address.
* `track_unit`: first row 7 cycles after `start`, then one row per cycle.
  `reduction_unit`: `done` 2 cycles after the last row.
* `integration_unit`: `done` 4 cycles after the last voxel is issued (12 in
  `PERF_AVG`). At the top level `int_done` comes one cycle later. A full pass is
  64·256·256 + 5 = 4,194,309 cycles.

Cycle budget per frame at default size: filter 79,056; tracking at most
10·76,807 + 5·19,207 + 4·4,807 ≈ 0.88 M; integration 4.19 M without
perforation, 0.85 M with skip step 5. These numbers include neither host
time nor memory stalls. The memory ports here never stall. Timing closure at
a particular clock has not been checked. The projection dividers sit in
single pipeline stages and would need pipelining for a fast FPGA clock.

## What is left out

* **Ray casting, pose solving, padding and acquisition** run on the host.
  Their data cross the ports listed above. There is no AXI or DMA logic: the
  memory ports are plain synchronous RAM ports with fixed one-cycle latency,
  so a real system needs adapters (and stall handling) in front of DDR.
* **Half-precision float** arithmetic is replaced by fixed point throughout.
* **Branch elimination** in integration is not applied.
* **The input-normal angle test** of classic KinectFusion ICP is not done,
  so no input normal map is computed.
* **Overlapping frames**: the filter of frame k+1 may run while frame k is
  integrated only if the host waits for `int_done`. There is no double
  buffering, because level 0 is shared.
* Chosen constants, not fixed by the reference: filter sigmas 4 px / 100 mm,
  an 8 mm range-weight table, 100 mm ICP distance threshold, 100 mm
  truncation, weight limit 100, and 2x2 mean sub-sampling.

## Files

`rtl/` holds one package (`kf_pkg`) and seven modules:

* `bilateral_filter`
* `pyramid_downsample`
* `depth_buffer`
* `track_unit`
* `reduction_unit`
* `icp_controller`
* `integration_unit`

It also holds the top, `kfusion_accel`.

`tb/` has one self-checking testbench per module, the shared reference
models (`tb_ref_pkg`: transforms, projection, ICP rows, voxel update, filter,
a synthetic scene), and two top-level benches:

* `tb_kfusion_accel`: 32x24 frames, a 16³ grid, four frames. It runs every
  approximation switch and checks every sum, pyramid pixel and voxel against
  the models. It also counts that each mechanism occurred.
* `tb_kfusion_full`: one frame at the default parameters (320x240, 256³,
  four units). It compares all 16.7 M voxels and every pass's sums. It runs in
  well under a minute and needs about 150 MB of memory.

Every testbench prints `TB_RESULT checks=N failures=M`.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_track_unit rtl/kf_pkg.sv tb/tb_ref_pkg.sv tb/tb_track_unit.sv
./obj_dir/Vtb_track_unit
```

Sizes are module parameters: `W`, `H`, `VOL`, `VOX_Q4` (voxel edge in
1/16 mm) and `N_INT` at the top. `VOL` must be a power of two divisible by
`N_INT`. `W` and `H` must be divisible by 4.
