// Complex multiply of the interpolated sample by the matched-filter phasor:
//   p_re = a_re*c_re - a_im*c_im,  p_im = a_re*c_im + a_im*c_re
// The phasor is signed Q1.SC_FRAC, so the products are shifted right by
// SC_FRAC (rounding towards minus infinity) to keep the sample's scale.
// Latency bp_pkg::CMULT_LAT = 2 cycles (four products, then sum), one result
// per cycle.
module cmult
  import bp_pkg::*;
(
  input  logic                        clk,
  input  logic signed [INTERP_W-1:0]  a_re,
  input  logic signed [INTERP_W-1:0]  a_im,
  input  logic signed [SC_W-1:0]      c_re,
  input  logic signed [SC_W-1:0]      c_im,
  output logic signed [CONTRIB_W-1:0] p_re,
  output logic signed [CONTRIB_W-1:0] p_im
);
  localparam int PW = INTERP_W + SC_W;
  logic signed [PW-1:0] rr, ii, ri, ir;
  logic signed [PW:0]   sum_re, sum_im;

  always_ff @(posedge clk) begin
    rr <= PW'(a_re) * PW'(c_re);
    ii <= PW'(a_im) * PW'(c_im);
    ri <= PW'(a_re) * PW'(c_im);
    ir <= PW'(a_im) * PW'(c_re);
  end

  assign sum_re = (PW+1)'(rr) - (PW+1)'(ii);
  assign sum_im = (PW+1)'(ri) + (PW+1)'(ir);

  always_ff @(posedge clk) begin
    p_re <= CONTRIB_W'(sum_re >>> SC_FRAC);
    p_im <= CONTRIB_W'(sum_im >>> SC_FRAC);
  end
endmodule
