// Range-bin index of the inner loop:
//   k  = floor((dR - r_vec[0]) * interp_const)
//   ok = 0 <= k <= NFFT-2   (both neighbours k and k+1 exist)
// interp_const is the inverse of the range-bin spacing (bins per metre, Q16.16)
// and r_vec[0] the range of the first bin. A pixel whose bin falls outside the
// pulse gets ok = 0 and contributes nothing, which is what a linear
// interpolation with zero extrapolation gives.
// Latency bp_pkg::BIN_LAT = 2 cycles (subtract, then multiply and compare),
// one pixel per cycle.
module bin_index
  import bp_pkg::*;
#(
  parameter int NFFT = 4096,
  localparam int KW  = $clog2(NFFT)
) (
  input  logic                     clk,
  input  logic signed [DR_W-1:0]   dr,
  input  logic signed [RVEC_W-1:0] rvec0,
  input  logic [IC_W-1:0]          interp_const,
  output logic [KW-1:0]            k,
  output logic                     ok
);
  localparam int DW = ((DR_W > RVEC_W) ? DR_W : RVEC_W) + 1;
  localparam int PW = DW + IC_W + 1;

  logic signed [DW-1:0] diff;
  logic signed [PW-1:0] prod;
  logic signed [PW-1:0] kfull;

  logic [IC_W-1:0]      ic1;

  always_ff @(posedge clk) begin
    diff <= DW'(dr) - DW'(rvec0);
    ic1  <= interp_const;
  end

  assign prod  = PW'(diff) * $signed(PW'({1'b0, ic1}));
  assign kfull = prod >>> (DIST_FRAC + IC_FRAC);

  always_ff @(posedge clk) begin
    k  <= kfull[KW-1:0];
    ok <= (kfull >= 0) && (kfull <= PW'(NFFT - 2));
  end
endmodule
