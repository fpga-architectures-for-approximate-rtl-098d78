// kfusion_accel: programmable-logic part of a KinectFusion dense-SLAM system.
//
// Per frame the host streams the zero-padded depth frame in; the bilateral
// filter smooths it and the filtered frame, plus two 2:1 sub-sampled copies,
// is cached on chip (depth pyramid). Tracking then aligns the frame to the
// reference maps that the host renders from the model (raycast runs on the
// processor): the ICP controller runs tracking passes coarse to fine, each
// pass streams every (non-perforated) pixel of one level through the tracking
// unit into the reduction unit, and the host solves the resulting 6x6 system
// and returns the updated pose. Finally N_INT integration units, each owning
// one x-slab of the 256^3 TSDF grid in external memory, fuse the depth frame
// into the map with the tracked pose.
//
// The configuration is the fastest approximate one: one bilateral filter,
// one tracking unit and four integration units, all with their approximate
// modes available at run time (3x3 window, no range filter, pixel and voxel
// loop perforation, skipped pyramid levels and reduced iteration limits).
//
// External interfaces: the padded depth stream (in_*), the reference
// vertex/normal map read port (ref_rd_*, one cycle read latency), one voxel
// memory port per integration unit (vol_*, one cycle read latency), and the
// host control/handshake signals of tracking (trk_*, host_*) and integration
// (int_*). frame_ready rises once all three pyramid levels hold the frame.
//
// Lint notes: the sub-blocks' out_last, busy and level-0/1 write-count outputs
// are left open here, since frame_ready (level-2 count) and the done pulses
// already carry that information; rst_n also feeds the disable condition of
// the sub-blocks' handshake assertions, which a linter reports as a reset
// used both asynchronously and synchronously. Neither affects the circuit.
module kfusion_accel
  import kf_pkg::*;
#(
  parameter int W      = 320,
  parameter int H      = 240,
  parameter int VOL    = 256,
  parameter int VOX_Q4 = 300,   // 4.8 m / VOL, 1/16 mm
  parameter int N_INT  = 4,
  localparam int DAW   = $clog2(W * H),
  localparam int VAW   = 3 * $clog2(VOL)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // depth input and pre-processing
  input  logic                       frame_start,
  input  logic                       in_valid,
  input  depth_t                     in_depth,
  input  logic                       bf_coeff3,
  input  logic                       bf_no_range,
  output logic                       frame_ready,
  input  cam_t                       cam,
  // tracking
  input  logic                       trk_start,
  input  logic [2:0]                 trk_level_en,
  input  logic [2:0][3:0]            trk_max_iter,
  input  logic [3:0]                 trk_lp_stride,
  input  pose_t                      trk_pose,
  input  pose_t                      trk_ref_inv,
  output logic                       trk_results_ready,
  output logic [1:0]                 trk_level,
  output logic [3:0]                 trk_iter,
  output sum_t [NSUM-1:0]            trk_sums,
  input  logic                       host_ack,
  input  logic                       host_converged,
  output logic                       trk_busy,
  output logic                       trk_done,
  output logic [7:0]                 trk_passes,
  output logic                       ref_rd_en,
  output logic [DAW-1:0]             ref_rd_addr,
  input  ref_px_t                    ref_rd_data,
  // integration
  input  logic                       int_start,
  input  pose_t                      int_inv_pose,
  input  perf_mode_e                 int_perf_mode,
  input  logic [2:0]                 int_perf_step,
  output logic                       int_done,
  output logic [N_INT-1:0]           vol_rd_en,
  output logic [N_INT-1:0][VAW-1:0]  vol_rd_addr,
  input  voxel_t [N_INT-1:0]         vol_rd_data,
  output logic [N_INT-1:0]           vol_wr_en,
  output logic [N_INT-1:0][VAW-1:0]  vol_wr_addr,
  output voxel_t [N_INT-1:0]         vol_wr_data
);
  localparam int DAW1 = $clog2((W / 2) * (H / 2));
  localparam int DAW2 = $clog2((W / 4) * (H / 4));

  // ---------------- pre-processing: filter and pyramid ----------------
  logic   bf_v, bf_last, d1_v, d1_last, d2_v, d2_last;
  depth_t bf_d, d1_d, d2_d;

  bilateral_filter #(.W(W), .H(H)) u_bf (
    .clk, .rst_n, .frame_start, .coeff3(bf_coeff3), .no_range(bf_no_range),
    .in_valid, .in_depth,
    .out_valid(bf_v), .out_depth(bf_d), .out_last(bf_last));

  pyramid_downsample #(.W(W), .H(H)) u_ds1 (
    .clk, .rst_n, .frame_start, .in_valid(bf_v), .in_depth(bf_d),
    .out_valid(d1_v), .out_depth(d1_d), .out_last(d1_last));

  pyramid_downsample #(.W(W / 2), .H(H / 2)) u_ds2 (
    .clk, .rst_n, .frame_start, .in_valid(d1_v), .in_depth(d1_d),
    .out_valid(d2_v), .out_depth(d2_d), .out_last(d2_last));

  logic [N_INT:0][DAW-1:0] l0_addr;
  depth_t [N_INT:0]        l0_data;
  logic [DAW:0]            l0_cnt;
  logic [DAW1:0]           l1_cnt;
  logic [DAW2:0]           l2_cnt;
  logic [DAW-1:0]          trk_dep_addr;
  depth_t [0:0]            l1_data, l2_data;

  depth_buffer #(.W(W), .H(H), .NREAD(N_INT + 1)) u_lvl0 (
    .clk, .rst_n, .frame_start, .wr_valid(bf_v), .wr_data(bf_d),
    .wr_count(l0_cnt), .rd_addr(l0_addr), .rd_data(l0_data));

  depth_buffer #(.W(W / 2), .H(H / 2), .NREAD(1)) u_lvl1 (
    .clk, .rst_n, .frame_start, .wr_valid(d1_v), .wr_data(d1_d),
    .wr_count(l1_cnt), .rd_addr(DAW1'(trk_dep_addr)), .rd_data(l1_data));

  depth_buffer #(.W(W / 4), .H(H / 4), .NREAD(1)) u_lvl2 (
    .clk, .rst_n, .frame_start, .wr_valid(d2_v), .wr_data(d2_d),
    .wr_count(l2_cnt), .rd_addr(DAW2'(trk_dep_addr)), .rd_data(l2_data));

  assign frame_ready = (32'(l2_cnt) == (W / 4) * (H / 4));

  // ---------------- tracking ----------------
  logic       pass_start, row_v, row_last, tu_busy, red_done;
  track_row_t row;
  depth_t     trk_dep_data;

  icp_controller u_ctrl (
    .clk, .rst_n, .start(trk_start), .level_en(trk_level_en), .max_iter(trk_max_iter),
    .track_start(pass_start), .level(trk_level), .iter(trk_iter),
    .pass_done(red_done), .results_ready(trk_results_ready),
    .host_ack, .host_converged, .busy(trk_busy), .done(trk_done), .passes(trk_passes));

  assign l0_addr[0] = trk_dep_addr;
  always_comb begin
    case (trk_level)
      2'd1:    trk_dep_data = l1_data[0];
      2'd2:    trk_dep_data = l2_data[0];
      default: trk_dep_data = l0_data[0];
    endcase
  end

  track_unit #(.W(W), .H(H)) u_track (
    .clk, .rst_n, .start(pass_start), .level(trk_level), .lp_stride(trk_lp_stride),
    .pose(trk_pose), .ref_inv(trk_ref_inv), .cam,
    .dep_rd_addr(trk_dep_addr), .dep_rd_data(trk_dep_data),
    .ref_rd_en, .ref_rd_addr, .ref_rd_data,
    .row_valid(row_v), .row, .row_last, .busy(tu_busy));

  reduction_unit u_red (
    .clk, .rst_n, .clear(pass_start), .row_valid(row_v), .row, .row_last,
    .sums(trk_sums), .done(red_done));

  // ---------------- integration ----------------
  logic [N_INT-1:0] cu_done, cu_busy, cu_fin;

  for (genvar i = 0; i < N_INT; i++) begin : g_int
    integration_unit #(.VOL(VOL), .W(W), .H(H), .VOX_Q4(VOX_Q4), .N_CU(N_INT), .CU_ID(i)) u_int (
      .clk, .rst_n, .start(int_start), .inv_pose(int_inv_pose), .cam,
      .perf_mode(int_perf_mode), .perf_step(int_perf_step),
      .dep_rd_addr(l0_addr[i+1]), .dep_rd_data(l0_data[i+1]),
      .vol_rd_en(vol_rd_en[i]), .vol_rd_addr(vol_rd_addr[i]), .vol_rd_data(vol_rd_data[i]),
      .vol_wr_en(vol_wr_en[i]), .vol_wr_addr(vol_wr_addr[i]), .vol_wr_data(vol_wr_data[i]),
      .busy(cu_busy[i]), .done(cu_done[i]));
  end

  // int_done pulses once every compute unit has finished its slab.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cu_fin <= '0; int_done <= 1'b0;
    end else begin
      int_done <= 1'b0;
      if (int_start) cu_fin <= '0;
      else if (&(cu_fin | cu_done) && cu_fin != '1) begin
        cu_fin   <= '1;
        int_done <= 1'b1;
      end else cu_fin <= cu_fin | cu_done;
    end
  end

endmodule
