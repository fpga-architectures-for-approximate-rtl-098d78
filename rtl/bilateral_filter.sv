// bilateral_filter: edge-preserving 5x5 bilateral filter for depth frames.
//
// The host pads the W x H depth frame with two rows/columns of zeros on each
// side, so the filter never tests image borders and accepts one pixel per
// cycle (II = 1). Pixels of the padded (W+4) x (H+4) frame arrive in raster
// order on in_valid/in_depth; four line buffers and a 5x5 register window
// form the stencil. For every neighbour with a valid (non-zero) depth the
// weight is the product of a spatial Gaussian (position filter) and a range
// Gaussian of the depth difference to the centre (range filter); the output
// is the weighted mean, or 0 when the centre sample is invalid.
//
// Run-time approximations (per frame, sampled at frame_start):
//   coeff3   : use only the inner 3x3 window (3x3 coefficient array)
//   no_range : drop the range filter, so only spatial weights remain
//
// Timing: the filtered pixel (x, y) leaves on out_valid/out_depth three
// cycles after padded pixel (x+4, y+4) entered; the W x H output frame is
// produced in raster order. out_last marks its final pixel.
//
// Following the reference algorithm: 5x5 stencil, spatial plus range
// weighting, host padding, the 3x3 and no-range approximations. Own choices:
// Gaussian widths (spatial sigma 4 pixels, range sigma 100 mm), Q8 weights,
// a range lookup table in 8 mm steps up to 512 mm, and fixed-point instead of
// float/fp16 arithmetic.
module bilateral_filter
  import kf_pkg::*;
#(
  parameter int    W           = 320,
  parameter int    H           = 240,
  parameter real   SIGMA_S     = 4.0,    // spatial sigma, pixels
  parameter real   SIGMA_R_MM  = 100.0   // range sigma, millimetres
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   frame_start,   // pulse before the first padded pixel
  input  logic   coeff3,
  input  logic   no_range,
  input  logic   in_valid,
  input  depth_t in_depth,
  output logic   out_valid,
  output depth_t out_depth,
  output logic   out_last
);
  localparam int WP   = W + 4;
  localparam int HP   = H + 4;
  localparam int NLUT = 64;               // range LUT entries, 8 mm each

  typedef logic [8:0] w9_t;               // Q8 weight, 0..256
  typedef w9_t  lut_t [NLUT];
  typedef w9_t  g_t   [3];

  function automatic g_t mk_gauss();
    g_t g;
    for (int i = 0; i < 3; i++)
      g[i] = w9_t'(int'($exp(-real'(i * i) / (2.0 * SIGMA_S * SIGMA_S)) * 256.0 + 0.5));
    return g;
  endfunction

  function automatic lut_t mk_range();
    lut_t l;
    real  dmm;
    for (int i = 0; i < NLUT; i++) begin
      dmm  = real'(i * 8 + 4);
      l[i] = w9_t'(int'($exp(-(dmm * dmm) / (2.0 * SIGMA_R_MM * SIGMA_R_MM)) * 256.0 + 0.5));
    end
    return l;
  endfunction

  localparam g_t   GAUSS = mk_gauss();
  localparam lut_t RLUT  = mk_range();

  // ---------------- stencil: line buffers and window ----------------
  depth_t lb [4][WP];
  depth_t win [5][5];                      // win[row][col], row 4 = newest
  logic [$clog2(WP)-1:0] col;
  logic [$clog2(HP)-1:0] row;
  logic coeff3_q, no_range_q;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb[0][col] <= in_depth;
      for (int r = 1; r < 4; r++) lb[r][col] <= lb[r-1][col];
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 4; c++) win[r][c] <= win[r][c+1];
      win[4][4] <= in_depth;
      for (int r = 0; r < 4; r++) win[r][4] <= lb[3-r][col];
    end
  end

  logic s0_valid, s0_last;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0; row <= '0; s0_valid <= 1'b0; s0_last <= 1'b0;
      coeff3_q <= 1'b0; no_range_q <= 1'b0;
    end else begin
      s0_valid <= 1'b0;
      s0_last  <= 1'b0;
      if (frame_start) begin
        col <= '0; row <= '0;
        coeff3_q <= coeff3; no_range_q <= no_range;
      end else if (in_valid) begin
        s0_valid <= (row >= 4) && (col >= 4);
        s0_last  <= (32'(row) == HP - 1) && (32'(col) == WP - 1);
        if (32'(col) == WP - 1) begin
          col <= '0;
          row <= row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

  // ---------------- weights and weighted sums ----------------
  logic [36:0] num_c;
  logic [21:0] den_c;
  always_comb begin
    depth_t     ctr, p;
    logic [15:0] ad;
    logic [8:0]  rw, sw;
    logic [16:0] f;
    int          di, dj;
    ctr   = win[2][2];
    num_c = '0;
    den_c = '0;
    for (int r = 0; r < 5; r++) begin
      for (int c = 0; c < 5; c++) begin
        p  = win[r][c];
        di = (r > 2) ? r - 2 : 2 - r;
        dj = (c > 2) ? c - 2 : 2 - c;
        ad = (p > ctr) ? p - ctr : ctr - p;
        rw = no_range_q ? 9'd256 : ((ad >= 16'(NLUT * 8)) ? 9'd0 : RLUT[ad[8:3]]);
        sw = 9'((18'(GAUSS[di]) * 18'(GAUSS[dj])) >> 8);
        f  = 17'((18'(sw) * 18'(rw)) >> 8);
        if (p != 0 && !(coeff3_q && (di == 2 || dj == 2))) begin
          num_c += 37'(f) * 37'(p);
          den_c += 22'(f);
        end
      end
    end
  end

  logic        s1_valid, s1_last, s1_ctr_ok;
  logic [36:0] s1_num;
  logic [21:0] s1_den;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0; s1_last <= 1'b0; s1_ctr_ok <= 1'b0;
      s1_num <= '0; s1_den <= '0;
    end else begin
      s1_valid  <= s0_valid;
      s1_last   <= s0_last;
      s1_ctr_ok <= (win[2][2] != 0);
      s1_num    <= num_c;
      s1_den    <= den_c;
    end
  end

  // ---------------- normalisation ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_last <= 1'b0; out_depth <= '0;
    end else begin
      out_valid <= s1_valid;
      out_last  <= s1_last;
      if (s1_ctr_ok && s1_den != 0)
        out_depth <= depth_t'((s1_num + 37'(s1_den >> 1)) / 37'(s1_den));
      else
        out_depth <= '0;
    end
  end

endmodule
