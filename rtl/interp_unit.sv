// Linear interpolation of the range-compressed pulse at range dR.
//   t      = (dR - r_vec[k]) * interp_const      weight in [0,1), Q0.T_W
//   sample = rc[k] + t * (rc[k+1] - rc[k])       = (1-t)*rc[k] + t*rc[k+1]
// The weight is measured from the stored range of bin k, as the range axis
// r_vec is held in memory, and clamped to [0, 1-2^-T_W] against rounding.
// When ok is low (bin out of range, or lane idle) the sample is zero.
// All inputs belong to the same pixel and arrive in the same cycle.
// Latency bp_pkg::INTERP_LAT = 4 cycles, one pixel per cycle. Results are
// rounded towards minus infinity.
module interp_unit
  import bp_pkg::*;
(
  input  logic                       clk,
  input  logic signed [DR_W-1:0]     dr,
  input  logic signed [RVEC_W-1:0]   rvec_k,
  input  logic [IC_W-1:0]            interp_const,
  input  logic signed [RC_W-1:0]     rc0_re,
  input  logic signed [RC_W-1:0]     rc0_im,
  input  logic signed [RC_W-1:0]     rc1_re,
  input  logic signed [RC_W-1:0]     rc1_im,
  input  logic                       ok,
  output logic signed [INTERP_W-1:0] s_re,
  output logic signed [INTERP_W-1:0] s_im
);
  localparam int WW = ((DR_W > RVEC_W) ? DR_W : RVEC_W) + 1;
  localparam int PW = WW + IC_W + 1;
  localparam int SH = DIST_FRAC + IC_FRAC - T_W;
  localparam int MW = RC_W + 1 + T_W + 1;

  // stage 1
  logic signed [WW-1:0]   wd;
  logic signed [RC_W:0]   d_re1, d_im1;
  logic signed [RC_W-1:0] b_re1, b_im1;
  logic                   ok1;
  logic [IC_W-1:0]        ic1;
  // stage 2
  logic [T_W-1:0]         t2;
  logic signed [RC_W:0]   d_re2, d_im2;
  logic signed [RC_W-1:0] b_re2, b_im2;
  logic                   ok2;
  // stage 3
  logic signed [MW-1:0]   m_re3, m_im3;
  logic signed [RC_W-1:0] b_re3, b_im3;
  logic                   ok3;

  logic signed [PW-1:0]   wprod, tfull;

  always_ff @(posedge clk) begin
    wd    <= WW'(dr) - WW'(rvec_k);
    d_re1 <= (RC_W+1)'(rc1_re) - (RC_W+1)'(rc0_re);
    d_im1 <= (RC_W+1)'(rc1_im) - (RC_W+1)'(rc0_im);
    b_re1 <= rc0_re;
    b_im1 <= rc0_im;
    ok1   <= ok;
    ic1   <= interp_const;
  end

  assign wprod = PW'(wd) * $signed(PW'({1'b0, ic1}));
  assign tfull = wprod >>> SH;

  always_ff @(posedge clk) begin
    if (tfull < 0)                    t2 <= '0;
    else if (tfull > PW'(2**T_W - 1)) t2 <= '1;
    else                              t2 <= tfull[T_W-1:0];
    d_re2 <= d_re1;
    d_im2 <= d_im1;
    b_re2 <= b_re1;
    b_im2 <= b_im1;
    ok2   <= ok1;
  end

  always_ff @(posedge clk) begin
    m_re3 <= MW'(d_re2) * $signed(MW'({1'b0, t2}));
    m_im3 <= MW'(d_im2) * $signed(MW'({1'b0, t2}));
    b_re3 <= b_re2;
    b_im3 <= b_im2;
    ok3   <= ok2;
  end

  always_ff @(posedge clk) begin
    s_re <= ok3 ? INTERP_W'(b_re3) + INTERP_W'(m_re3 >>> T_W) : '0;
    s_im <= ok3 ? INTERP_W'(b_im3) + INTERP_W'(m_im3 >>> T_W) : '0;
  end
endmodule
