// Range-compressed pulse buffer of one lane: NFFT complex samples of RC_W+RC_W
// bits, real and imaginary part packed into one word. The samples are split
// into an even and an odd bank, so that the two interpolation neighbours
// rc[k] and rc[k+1] always sit in different banks and are read in the same
// cycle from single-port-read memories.
// Write: one sample per cycle at any index (we, waddr, wdata = {re, im}).
// Read: k is presented, rc[k] and rc[k+1] appear one cycle later
// (bp_pkg::MEM_LAT). k must be at most NFFT-2 for rc[k+1] to be meaningful;
// for k = NFFT-1 rc1 is rc[0] and the caller discards it.
module rc_buffer
  import bp_pkg::*;
#(
  parameter int NFFT = 4096,
  localparam int KW  = $clog2(NFFT)
) (
  input  logic                   clk,
  input  logic                   we,
  input  logic [KW-1:0]          waddr,
  input  logic [2*RC_W-1:0]      wdata,
  input  logic [KW-1:0]          k,
  output logic signed [RC_W-1:0] rc0_re,
  output logic signed [RC_W-1:0] rc0_im,
  output logic signed [RC_W-1:0] rc1_re,
  output logic signed [RC_W-1:0] rc1_im
);
  localparam int HALF = NFFT / 2;

  logic [2*RC_W-1:0] bank_even [HALF];
  logic [2*RC_W-1:0] bank_odd  [HALF];
  logic [2*RC_W-1:0] rd_even, rd_odd;
  logic              k_odd;
  logic [KW-2:0]     a_even, a_odd;

  always_ff @(posedge clk) begin
    if (we) begin
      if (waddr[0]) bank_odd[waddr[KW-1:1]]  <= wdata;
      else          bank_even[waddr[KW-1:1]] <= wdata;
    end
  end

  // k even: rc[k] = even[k/2], rc[k+1] = odd[k/2]
  // k odd : rc[k] = odd[k/2],  rc[k+1] = even[k/2 + 1]
  assign a_odd  = k[KW-1:1];
  assign a_even = k[KW-1:1] + (KW-1)'(k[0]);

  always_ff @(posedge clk) begin
    rd_even <= bank_even[a_even];
    rd_odd  <= bank_odd[a_odd];
    k_odd   <= k[0];
  end

  always_comb begin
    if (k_odd) begin
      {rc0_re, rc0_im} = rd_odd;
      {rc1_re, rc1_im} = rd_even;
    end else begin
      {rc0_re, rc0_im} = rd_even;
      {rc1_re, rc1_im} = rd_odd;
    end
  end
endmodule
