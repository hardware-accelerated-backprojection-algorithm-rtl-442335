// Range unit: differential range from the antenna to one pixel.
//   x_dist = ant_x - x_mat, y_dist = ant_y - y_mat, z_dist = ant_z - z
//   R      = sqrt(x_dist^2 + y_dist^2 + z_dist^2)
//   dR     = R - r0
// This is the range computation of the inner loop, with r0 (range to the
// scene centre for this pulse) subtracted so that dR indexes the range axis
// r_vec directly. All distances are in metres with DIST_FRAC fraction bits;
// the 1-bit z_mat is read as a height of 0 m or 1 m (design choice).
// Fully pipelined, one pixel per cycle, latency bp_pkg::RANGE_LAT:
// 1 cycle distances, 1 cycle squares, 1 cycle sum, SQRT_LAT cycles square
// root, 1 cycle subtraction. r0 is expected stable or aligned with the pixel.
module range_unit
  import bp_pkg::*;
(
  input  logic                      clk,
  input  logic signed [ANT_W-1:0]   ant_x,
  input  logic signed [ANT_W-1:0]   ant_y,
  input  logic signed [ANT_W-1:0]   ant_z,
  input  logic [R0_W-1:0]           r0,
  input  logic signed [MAT_W-1:0]   pix_x,
  input  logic signed [MAT_W-1:0]   pix_y,
  input  logic                      pix_z,
  output logic signed [DR_W-1:0]    dr
);
  logic signed [DIST_W-1:0] dx, dy, dz;
  logic [2*DIST_W-1:0]      sx, sy, sz;
  logic [RAD_W-1:0]         rad;
  logic [SQRT_W-1:0]        root;
  logic [R0_W-1:0]          r0_d;
  logic signed [MAT_W-1:0]  pz;

  assign pz = pix_z ? (MAT_W'(1) <<< DIST_FRAC) : '0;

  always_ff @(posedge clk) begin
    dx  <= DIST_W'(ant_x) - DIST_W'(pix_x);
    dy  <= DIST_W'(ant_y) - DIST_W'(pix_y);
    dz  <= DIST_W'(ant_z) - DIST_W'(pz);
    sx  <= $unsigned((2*DIST_W)'(dx) * (2*DIST_W)'(dx));
    sy  <= $unsigned((2*DIST_W)'(dy) * (2*DIST_W)'(dy));
    sz  <= $unsigned((2*DIST_W)'(dz) * (2*DIST_W)'(dz));
    rad <= RAD_W'(sx) + RAD_W'(sy) + RAD_W'(sz);
  end

  isqrt_pipe #(.IN_W(RAD_W)) u_sqrt (.clk(clk), .rad(rad), .root(root));

  // r0 travels with the pixel through the distance/square/sum/sqrt stages.
  delay_line #(.W(R0_W), .N(3 + SQRT_LAT)) u_r0_dly (.clk(clk), .d(r0), .q(r0_d));

  always_ff @(posedge clk)
    dr <= DR_W'($signed({1'b0, root}) - $signed({1'b0, r0_d}));
endmodule
