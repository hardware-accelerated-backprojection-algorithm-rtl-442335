// Full-size testbench of bp_accel: the accelerator at its default size
// (117 pulses, 4096 range bins, 501 x 501 image in blocks of 42 columns,
// 4 lanes) forms the complete image: 12 blocks (eleven of 42 columns, the
// last of 39), each from all 117 pulses in 30 passes. Scene: flight track
// 2 km away and 1 km up, pixels 0.5 m apart, 0.25 m range bins. Checks and
// mechanism counts as in tb_bp_accel (shared body in tb_bp_accel_body.svh).
module tb_bp_accel_full;
  import bp_pkg::*;
  import bp_ref_pkg::*;
  localparam int NP = 117, NFFT = 4096, NX = 501, NY = 501, BW = 42, L = 4;
  localparam real PIX_M = 0.5;                  // pixel spacing, metres
  localparam int KW = $clog2(NFFT), LW = $clog2(L), BAW = $clog2(NY * BW);
  localparam longint IC = 262144;               // 4 bins per metre, Q16.16
  localparam longint SP = 1024;                 // 0.25 m per bin
  localparam int BLK_FIRST = 0;
  localparam int BLK_END = (NX + BW - 1) / BW;
  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

`include "tb_bp_accel_body.svh"

  bp_accel dut (
    .clk(clk), .rst_n(rst_n), .ld_we(ld_we), .ld_sel(ld_sel), .ld_lane(ld_lane),
    .ld_addr(ld_addr), .ld_data(ld_data), .start(start), .first_pass(first_pass),
    .pulse_base(pulse_base), .lane_cnt(lane_cnt), .blk_cols(blk_cols), .blk_col0(blk_col0),
    .interp_const(interp_const), .busy(busy), .done(done), .img_rd_addr(rd_addr),
    .img_rd_re(rd_re), .img_rd_im(rd_im));
endmodule
