// One pulse lane: the inner-loop body of backprojection for one pulse,
// evaluated for one pixel per clock cycle.
//   range_unit  : dR = |antenna - pixel| - r0
//   bin_index   : k = floor((dR - r_vec[0]) * interp_const), range check
//   rc_buffer   : rc[k], rc[k+1];  rvec_mem : r_vec[k]
//   interp_unit : sample = (1-t)*rc[k] + t*rc[k+1]
//   phase       : ph = frac(min_f * dR) in turns  (phase 2*pi*ph of the
//                 matched filter; min_f holds 2*f_min/c in turns per metre)
//   sincos_unit : phasor = cos(2*pi*ph) + j*sin(2*pi*ph)
//   cmult       : contribution = sample * phasor
// The interpolation and phasor branches run in parallel from dR and are
// re-aligned by delay lines. The pulse constants sit in registers written by
// prm_we at the start of a pass; prm_en = 0 makes the lane contribute zero.
// The lane's rc buffer and r_vec copy are written through the load ports.
// Latency from pixel coordinates to contribution: bp_pkg::LANE_LAT cycles.
module bp_lane
  import bp_pkg::*;
#(
  parameter int NFFT = 4096,
  localparam int KW  = $clog2(NFFT)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // pulse constants
  input  logic                        prm_we,
  input  pulse_prm_t                  prm_in,
  input  logic                        prm_en,
  input  logic [IC_W-1:0]             interp_const,
  // memory loading
  input  logic                        rc_we,
  input  logic [KW-1:0]               rc_waddr,
  input  logic [2*RC_W-1:0]           rc_wdata,
  input  logic                        rv_we,
  input  logic [KW-1:0]               rv_waddr,
  input  logic signed [RVEC_W-1:0]    rv_wdata,
  // pixel
  input  logic signed [MAT_W-1:0]     pix_x,
  input  logic signed [MAT_W-1:0]     pix_y,
  input  logic                        pix_z,
  // contribution
  output logic signed [CONTRIB_W-1:0] c_re,
  output logic signed [CONTRIB_W-1:0] c_im
);
  pulse_prm_t prm;
  logic       en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prm <= '0;
      en  <= 1'b0;
    end else if (prm_we) begin
      prm <= prm_in;
      en  <= prm_en;
    end
  end

  // ---------------- range ----------------
  logic signed [DR_W-1:0] dr;
  range_unit u_range (
    .clk(clk), .ant_x(prm.ant_x), .ant_y(prm.ant_y), .ant_z(prm.ant_z),
    .r0(prm.r0), .pix_x(pix_x), .pix_y(pix_y), .pix_z(pix_z), .dr(dr));

  // ---------------- interpolation branch ----------------
  logic [KW-1:0]            k;
  logic                     ok, ok_m;
  logic signed [RVEC_W-1:0] rvec_k, rvec0;
  logic signed [RC_W-1:0]   rc0_re, rc0_im, rc1_re, rc1_im;
  logic signed [DR_W-1:0]   dr_i;
  logic signed [INTERP_W-1:0] s_re, s_im, s_re_a, s_im_a;

  bin_index #(.NFFT(NFFT)) u_bin (
    .clk(clk), .dr(dr), .rvec0(rvec0), .interp_const(interp_const), .k(k), .ok(ok));

  rc_buffer #(.NFFT(NFFT)) u_rc (
    .clk(clk), .we(rc_we), .waddr(rc_waddr), .wdata(rc_wdata), .k(k),
    .rc0_re(rc0_re), .rc0_im(rc0_im), .rc1_re(rc1_re), .rc1_im(rc1_im));

  rvec_mem #(.NFFT(NFFT)) u_rvec (
    .clk(clk), .we(rv_we), .waddr(rv_waddr), .wdata(rv_wdata), .k(k),
    .rvec_k(rvec_k), .rvec0(rvec0));

  always_ff @(posedge clk) ok_m <= ok & en;

  delay_line #(.W(DR_W), .N(BIN_LAT + MEM_LAT)) u_dr_dly (.clk(clk), .d(dr), .q(dr_i));

  interp_unit u_interp (
    .clk(clk), .dr(dr_i), .rvec_k(rvec_k), .interp_const(interp_const),
    .rc0_re(rc0_re), .rc0_im(rc0_im), .rc1_re(rc1_re), .rc1_im(rc1_im),
    .ok(ok_m), .s_re(s_re), .s_im(s_im));

  delay_line #(.W(2*INTERP_W), .N(ALIGN_T - SAMPLE_T)) u_s_dly (
    .clk(clk), .d({s_re, s_im}), .q({s_re_a, s_im_a}));

  // ---------------- matched-filter branch ----------------
  localparam int PPW = DR_W + MINF_W + 1;
  logic signed [PPW-1:0]  ph_prod;
  logic [PH_W-1:0]        ph;
  logic signed [SC_W-1:0] mf_re, mf_im, mf_re_a, mf_im_a;

  assign ph_prod = PPW'(dr) * $signed(PPW'({1'b0, prm.min_f}));
  always_ff @(posedge clk) ph <= ph_prod[MINF_FRAC + DIST_FRAC - 1 -: PH_W];

  sincos_unit u_sincos (.clk(clk), .ph(ph), .cos_o(mf_re), .sin_o(mf_im));

  delay_line #(.W(2*SC_W), .N(ALIGN_T - PHASOR_T)) u_mf_dly (
    .clk(clk), .d({mf_re, mf_im}), .q({mf_re_a, mf_im_a}));

  // ---------------- product ----------------
  cmult u_cmult (
    .clk(clk), .a_re(s_re_a), .a_im(s_im_a), .c_re(mf_re_a), .c_im(mf_im_a),
    .p_re(c_re), .p_im(c_im));
endmodule
