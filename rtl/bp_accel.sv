// Backprojection accelerator for SAR image formation (top level).
//
// The image is formed block by block (BLK_W columns of NY rows of an NX x NY
// image). For one block, the host:
//   1. loads once: the per-pulse constants (min_f, r0, antenna position) of
//      all N_PULSES pulses, the range axis r_vec and the 1-bit z_mat of the
//      whole image; per block: x_mat and y_mat of the block's pixels;
//   2. for each group of up to LANES pulses: loads their range-compressed
//      pulses, one per lane (rc buffers), and starts a pass. The pass walks
//      every pixel of the block, each lane computes its pulse's contribution,
//      and the sum of the lanes is accumulated into the image block memory
//      (overwritten instead on the pass flagged first_pass);
//   3. reads the finished block back through img_rd_addr.
//
// Load port (one word per cycle, any time the accelerator is not busy):
//   ld_sel  LD_MINF/LD_R0/LD_ANTX/LD_ANTY/LD_ANTZ  ld_addr = pulse index
//           LD_RC    ld_addr = range bin, ld_lane = lane, ld_data = {re, im}
//           LD_RVEC  ld_addr = range bin (written into every lane's copy)
//           LD_XMAT/LD_YMAT  ld_addr = x*NY + y inside the block
//           LD_ZMAT  ld_addr = col*NY + y in the whole image (bit 0)
// Pass control: start (one cycle, while busy is low) with pulse_base (pulse
// of lane 0), lane_cnt (lanes in use), blk_cols, blk_col0 (first image column
// of the block), first_pass and interp_const (bins per metre, Q16.16) stable
// until done. done pulses once the last pixel has been written.
// Throughput: one pixel per cycle for LANES pulses at once; a pass takes
// LANES + blk_cols*NY + LANE_LAT + a few cycles.
// Image read-back: img_rd_re/img_rd_im one cycle after img_rd_addr
// (x*NY + y), valid while busy is low.
//
// Sizes follow the evaluated configuration (117 pulses, 4096 range bins,
// 501 x 501 pixels, blocks of 501 x 42). The number of lanes is not given
// (it was set by the free FPGA resources); LANES = 4 is a choice of this
// design, as are the load/read-back port and pass protocol, which stand for
// the host interface.
module bp_accel
  import bp_pkg::*;
#(
  parameter int N_PULSES = 117,
  parameter int NFFT     = 4096,
  parameter int NX       = 501,
  parameter int NY       = 501,
  parameter int BLK_W    = 42,
  parameter int LANES    = 4,
  localparam int KW      = $clog2(NFFT),
  localparam int PAW     = $clog2(N_PULSES),
  localparam int LW      = (LANES > 1) ? $clog2(LANES) : 1,
  localparam int BAW     = $clog2(NY * BLK_W),
  localparam int IAW     = $clog2(NX * NY)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // load port
  input  logic                    ld_we,
  input  logic [3:0]              ld_sel,
  input  logic [LW-1:0]           ld_lane,
  input  logic [31:0]             ld_addr,
  input  logic [63:0]             ld_data,
  // pass control
  input  logic                    start,
  input  logic                    first_pass,
  input  logic [15:0]             pulse_base,
  input  logic [7:0]              lane_cnt,
  input  logic [15:0]             blk_cols,
  input  logic [15:0]             blk_col0,
  input  logic [IC_W-1:0]         interp_const,
  output logic                    busy,
  output logic                    done,
  // image read-back
  input  logic [BAW-1:0]          img_rd_addr,
  output logic signed [IMG_W-1:0] img_rd_re,
  output logic signed [IMG_W-1:0] img_rd_im
);
  localparam int TAG_LAT = MEM_LAT + LANE_LAT;   // pixel memory + lane

  ld_sel_e sel;
  assign sel = ld_sel_e'(ld_sel);

  // ---------------- controller ----------------
  logic           acc_last_done;
  logic [PAW-1:0] prm_rd_addr;
  logic           prm_we, prm_en;
  logic [LW-1:0]  prm_lane;
  logic           pix_valid, pix_last;
  logic [BAW-1:0] pix_addr;
  logic [IAW-1:0] pix_zaddr;

  bp_ctrl #(.N_PULSES(N_PULSES), .NX(NX), .NY(NY), .BLK_W(BLK_W), .LANES(LANES)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .pulse_base(pulse_base), .lane_cnt(lane_cnt),
    .blk_cols(blk_cols), .blk_col0(blk_col0), .acc_last_done(acc_last_done),
    .busy(busy), .done(done), .prm_rd_addr(prm_rd_addr), .prm_we(prm_we),
    .prm_lane(prm_lane), .prm_en(prm_en), .pix_valid(pix_valid), .pix_addr(pix_addr),
    .pix_zaddr(pix_zaddr), .pix_last(pix_last));

  logic first_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             first_q <= 1'b0;
    else if (start && !busy) first_q <= first_pass;
  end

  // ---------------- memories ----------------
  pulse_prm_t prm_rd;
  pulse_param_mem #(.N_PULSES(N_PULSES)) u_prm (
    .clk(clk), .we(ld_we && sel inside {LD_MINF, LD_R0, LD_ANTX, LD_ANTY, LD_ANTZ}),
    .sel(sel), .waddr(PAW'(ld_addr)), .wdata(ld_data), .rd_addr(prm_rd_addr), .rd_prm(prm_rd));

  logic signed [MAT_W-1:0] px, py;
  logic                    pz;
  pixel_mem #(.NX(NX), .NY(NY), .BLK_W(BLK_W)) u_pix (
    .clk(clk), .we_x(ld_we && sel == LD_XMAT), .we_y(ld_we && sel == LD_YMAT),
    .we_z(ld_we && sel == LD_ZMAT), .waddr(IAW'(ld_addr)), .wdata(ld_data[MAT_W-1:0]),
    .rd_addr(pix_addr), .rd_zaddr(pix_zaddr), .x(px), .y(py), .z(pz));

  // ---------------- lanes ----------------
  logic signed [CONTRIB_W-1:0] c_re [LANES];
  logic signed [CONTRIB_W-1:0] c_im [LANES];

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    bp_lane #(.NFFT(NFFT)) u_lane (
      .clk(clk), .rst_n(rst_n),
      .prm_we(prm_we && prm_lane == LW'(l)), .prm_in(prm_rd), .prm_en(prm_en),
      .interp_const(interp_const),
      .rc_we(ld_we && sel == LD_RC && ld_lane == LW'(l)), .rc_waddr(KW'(ld_addr)),
      .rc_wdata(ld_data[2*RC_W-1:0]),
      .rv_we(ld_we && sel == LD_RVEC), .rv_waddr(KW'(ld_addr)),
      .rv_wdata(ld_data[RVEC_W-1:0]),
      .pix_x(px), .pix_y(py), .pix_z(pz),
      .c_re(c_re[l]), .c_im(c_im[l]));
  end

  // ---------------- pixel tag alignment ----------------
  logic [TAG_LAT-1:0] v_sr, l_sr;
  logic [BAW-1:0]     acc_addr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_sr <= '0;
      l_sr <= '0;
    end else begin
      v_sr <= {v_sr[TAG_LAT-2:0], pix_valid};
      l_sr <= {l_sr[TAG_LAT-2:0], pix_last};
    end
  end
  delay_line #(.W(BAW), .N(TAG_LAT)) u_addr_dly (.clk(clk), .d(pix_addr), .q(acc_addr));

  // ---------------- image block accumulator ----------------
  image_accum #(.NY(NY), .BLK_W(BLK_W), .LANES(LANES)) u_acc (
    .clk(clk), .rst_n(rst_n), .first_pass(first_q),
    .in_valid(v_sr[TAG_LAT-1]), .in_addr(acc_addr), .in_last(l_sr[TAG_LAT-1]),
    .c_re(c_re), .c_im(c_im), .last_done(acc_last_done),
    .rd_addr(img_rd_addr), .rd_re(img_rd_re), .rd_im(img_rd_im));
endmodule
