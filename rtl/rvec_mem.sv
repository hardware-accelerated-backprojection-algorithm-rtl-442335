// Range axis memory: r_vec[k], the range (relative to r0) of range bin k, in
// metres with DIST_FRAC fraction bits. Written once before image formation;
// read at the interpolation bin k with one cycle of latency, to measure the
// interpolation weight from the stored bin range. The entry r_vec[0] is also
// kept in a register (rvec0) for the bin-index computation, captured when
// address 0 is written.
module rvec_mem
  import bp_pkg::*;
#(
  parameter int NFFT = 4096,
  localparam int KW  = $clog2(NFFT)
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [KW-1:0]            waddr,
  input  logic signed [RVEC_W-1:0] wdata,
  input  logic [KW-1:0]            k,
  output logic signed [RVEC_W-1:0] rvec_k,
  output logic signed [RVEC_W-1:0] rvec0
);
  logic signed [RVEC_W-1:0] mem [NFFT];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (we && waddr == '0) rvec0 <= wdata;
    rvec_k <= mem[k];
  end
endmodule
