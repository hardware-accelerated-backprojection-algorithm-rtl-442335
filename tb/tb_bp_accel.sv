// End-to-end testbench of bp_accel at reduced size: 6 pulses, 64 range bins,
// a 7 x 6 pixel image formed in blocks of 3 columns (3, 3 and 1 columns),
// 4 lanes (passes of 4 and 2 pulses).
// The host side loads the pulse constants, the range axis and z_mat, then
// for every block loads x_mat/y_mat, runs one pass per group of pulses
// (loading each lane's range-compressed pulse first) and reads the block
// back. Every pixel is compared with a real-valued backprojection of the same
// data (bp_ref_pkg) within the summed per-pulse tolerance, and the length of
// every pass is checked against one pixel per cycle plus the pipeline latency.
// Mechanisms counted, each must occur: overwriting first pass, accumulating
// pass, pass with idle lanes, narrow last block, pixels outside a pulse's
// range window, matched-filter phases in all four quadrants.
module tb_bp_accel;
  import bp_pkg::*;
  import bp_ref_pkg::*;
  localparam int NP = 6, NFFT = 64, NX = 7, NY = 6, BW = 3, L = 4;
  localparam real PIX_M = 1.5;                  // pixel spacing, metres
  localparam int KW = $clog2(NFFT), LW = $clog2(L), BAW = $clog2(NY * BW);
  localparam longint IC = 262144;               // 4 bins per metre, Q16.16
  localparam longint SP = 1024;                 // 0.25 m per bin
  localparam int BLK_FIRST = 0;                 // form all three blocks
  localparam int BLK_END = (NX + BW - 1) / BW;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

`include "tb_bp_accel_body.svh"

  bp_accel #(.N_PULSES(NP), .NFFT(NFFT), .NX(NX), .NY(NY), .BLK_W(BW), .LANES(L)) dut (
    .clk(clk), .rst_n(rst_n), .ld_we(ld_we), .ld_sel(ld_sel), .ld_lane(ld_lane),
    .ld_addr(ld_addr), .ld_data(ld_data), .start(start), .first_pass(first_pass),
    .pulse_base(pulse_base), .lane_cnt(lane_cnt), .blk_cols(blk_cols), .blk_col0(blk_col0),
    .interp_const(interp_const), .busy(busy), .done(done), .img_rd_addr(rd_addr),
    .img_rd_re(rd_re), .img_rd_im(rd_im));
endmodule
