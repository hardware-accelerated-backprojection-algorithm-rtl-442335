// Image-block accumulator: the complex image of one block (BLK_W columns of
// NY rows, IMG_W bits per component) and the adder that folds the lanes'
// contributions into it.
// Per valid input cycle it adds the LANES contributions of one pixel
// (cycle 1, while the stored pixel is read), then writes back stored + sum,
// or just sum on the first pass over the block (cycle 2). The pixel addresses
// of a pass are all different and the controller lets a pass drain before the
// next one starts, so a read never meets a pending write to the same pixel.
// last_done pulses in the cycle after the write of the pixel tagged last.
// When no pixel is being accumulated, rd_addr reads the image for the host:
// rd_re/rd_im are valid one cycle later.
// The 46-bit accumulators and the 501 x 42 block size are the original
// sizing; the single adder chain over the lanes and the overwrite on the
// first pass are this design's choices.
module image_accum
  import bp_pkg::*;
#(
  parameter int NY    = 501,
  parameter int BLK_W = 42,
  parameter int LANES = 4,
  localparam int NPIX = NY * BLK_W,
  localparam int AW   = $clog2(NPIX)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        first_pass,
  input  logic                        in_valid,
  input  logic [AW-1:0]               in_addr,
  input  logic                        in_last,
  input  logic signed [CONTRIB_W-1:0] c_re [LANES],
  input  logic signed [CONTRIB_W-1:0] c_im [LANES],
  output logic                        last_done,
  input  logic [AW-1:0]               rd_addr,
  output logic signed [IMG_W-1:0]     rd_re,
  output logic signed [IMG_W-1:0]     rd_im
);
  logic signed [IMG_W-1:0] img_re [NPIX];
  logic signed [IMG_W-1:0] img_im [NPIX];

  logic signed [IMG_W-1:0] sum_re, sum_im;
  logic signed [IMG_W-1:0] acc_re1, acc_im1;
  logic [AW-1:0]           addr1;
  logic                    v1, last1;

  always_comb begin
    sum_re = '0;
    sum_im = '0;
    for (int l = 0; l < LANES; l++) begin
      sum_re = sum_re + IMG_W'(c_re[l]);
      sum_im = sum_im + IMG_W'(c_im[l]);
    end
  end

  // cycle 1: lane sum and read of the stored pixel (or a host read)
  always_ff @(posedge clk) begin
    acc_re1 <= sum_re;
    acc_im1 <= sum_im;
    addr1   <= in_addr;
    rd_re   <= img_re[in_valid ? in_addr : rd_addr];
    rd_im   <= img_im[in_valid ? in_addr : rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      last1     <= 1'b0;
      last_done <= 1'b0;
    end else begin
      v1        <= in_valid;
      last1     <= in_valid & in_last;
      last_done <= v1 & last1;
    end
  end

  // cycle 2: write back
  always_ff @(posedge clk) begin
    if (v1) begin
      img_re[addr1] <= (first_pass ? '0 : rd_re) + acc_re1;
      img_im[addr1] <= (first_pass ? '0 : rd_im) + acc_im1;
    end
  end

  // Consecutive pixels of a pass are distinct: no read-after-write hazard.
  property p_no_raw;
    @(posedge clk) disable iff (!rst_n) (in_valid && v1) |-> (in_addr != addr1);
  endproperty
  a_no_raw: assert property (p_no_raw);
endmodule
