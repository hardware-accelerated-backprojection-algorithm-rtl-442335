// Image-quality testbench of bp_accel: a synthetic point-target scene.
// Three point targets in a 24 x 24 pixel scene (0.5 m pixels) are observed by
// 16 pulses from a straight track 2 km away. Each range-compressed pulse is
// synthesised as a sinc main lobe at the target's range carrying the carrier
// phase -2*pi*min_f*dR, so that backprojection focuses the targets. The
// accelerator's image (two blocks of 12 columns, 4 lanes) is compared with a
// double-precision backprojection of the same data (exact ranges, no
// quantisation of range, weight or phase, exact sin/cos):
//   - structural similarity (SSIM, one window over the whole magnitude image)
//     must be at least 0.99, the quality target of the wordlength choice;
//   - each target pixel must be the local peak of the accelerator's image.
module tb_bp_quality;
  import bp_pkg::*;
  import bp_ref_pkg::*;
  localparam int NP = 16, NFFT = 256, NX = 24, NY = 24, BW = 12, L = 4;
  localparam int LW = $clog2(L), BAW = $clog2(NY * BW);
  localparam real PIX_M = 0.5;
  localparam longint IC = 262144;               // 4 bins per metre
  localparam longint SP = 1024;                 // 0.25 m per bin
  localparam real PI = 3.141592653589793;
  localparam int NT = 3;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, ld_we, start, first_pass, busy, done;
  logic [3:0] ld_sel;
  logic [LW-1:0] ld_lane;
  logic [31:0] ld_addr;
  logic [63:0] ld_data;
  logic [15:0] pulse_base, blk_cols, blk_col0;
  logic [7:0] lane_cnt;
  logic [IC_W-1:0] interp_const;
  logic [BAW-1:0] rd_addr;
  logic signed [IMG_W-1:0] rd_re, rd_im;

  bp_accel #(.N_PULSES(NP), .NFFT(NFFT), .NX(NX), .NY(NY), .BLK_W(BW), .LANES(L)) dut (
    .clk(clk), .rst_n(rst_n), .ld_we(ld_we), .ld_sel(ld_sel), .ld_lane(ld_lane),
    .ld_addr(ld_addr), .ld_data(ld_data), .start(start), .first_pass(first_pass),
    .pulse_base(pulse_base), .lane_cnt(lane_cnt), .blk_cols(blk_cols), .blk_col0(blk_col0),
    .interp_const(interp_const), .busy(busy), .done(done), .img_rd_addr(rd_addr),
    .img_rd_re(rd_re), .img_rd_im(rd_im));

  longint rc_re [NP][NFFT], rc_im [NP][NFFT];
  longint ax [NP], ay [NP], az [NP], r0 [NP], minf [NP];
  longint xm [NX][NY], ym [NX][NY];
  real    hw_mag [NX][NY], ref_mag [NX][NY];
  int     tx [NT] = '{5, 12, 18};
  int     ty [NT] = '{6, 15, 9};

  function automatic real rng(longint ax_, longint ay_, longint az_, real px, real py);
    real dx, dy, dz;
    dx = real'(ax_) / 4096.0 - px;
    dy = real'(ay_) / 4096.0 - py;
    dz = real'(az_) / 4096.0;
    return $sqrt(dx * dx + dy * dy + dz * dz);
  endfunction

  function automatic real sinc(real v);
    if (v == 0.0) return 1.0;
    return $sin(PI * v) / (PI * v);
  endfunction

  task automatic load(ld_sel_e s, longint a, logic [63:0] d, int lane = 0);
    @(negedge clk);
    ld_we = 1; ld_sel = s; ld_addr = 32'(a); ld_data = d; ld_lane = LW'(lane);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; ld_we = 0; start = 0; first_pass = 0; ld_sel = 0; ld_lane = 0; ld_addr = 0;
    ld_data = 0; pulse_base = 0; blk_cols = 1; blk_col0 = 0; lane_cnt = 0; rd_addr = 0;
    interp_const = IC_W'(IC);

    // ---------------- scene and synthetic pulses ----------------
    for (int x = 0; x < NX; x++)
      for (int y = 0; y < NY; y++) begin
        xm[x][y] = longint'((x - NX / 2) * PIX_M * 4096.0);
        ym[x][y] = longint'((y - NY / 2) * PIX_M * 4096.0);
      end
    for (int p = 0; p < NP; p++) begin
      ax[p] = 2000 * 4096;
      ay[p] = longint'((-60.0 + 8.0 * p) * 4096.0);
      az[p] = 1000 * 4096;
      r0[p] = longint'(rng(ax[p], ay[p], az[p], 0.0, 0.0) * 4096.0);
      minf[p] = longint'(62.0 * 134217728.0);
      for (int k = 0; k < NFFT; k++) begin
        real sr, si;
        sr = 0; si = 0;
        for (int t = 0; t < NT; t++) begin
          real dr, a, ph;
          dr = rng(ax[p], ay[p], az[p], real'(xm[tx[t]][ty[t]]) / 4096.0,
                   real'(ym[tx[t]][ty[t]]) / 4096.0) - real'(r0[p]) / 4096.0;
          a  = 1.0e6 * sinc(real'(k - NFFT / 2) - dr * 4.0);
          ph = -2.0 * PI * (real'(minf[p]) / 134217728.0) * dr;
          sr += a * $cos(ph);
          si += a * $sin(ph);
        end
        rc_re[p][k] = longint'(sr);
        rc_im[p][k] = longint'(si);
      end
    end

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++) begin
      load(LD_MINF, p, 64'(minf[p]));
      load(LD_R0,   p, 64'(r0[p]));
      load(LD_ANTX, p, 64'(ax[p]));
      load(LD_ANTY, p, 64'(ay[p]));
      load(LD_ANTZ, p, 64'(az[p]));
    end
    for (int k = 0; k < NFFT; k++) load(LD_RVEC, k, 64'((k - NFFT / 2) * SP));
    for (int i = 0; i < NX * NY; i++) load(LD_ZMAT, i, 64'(0));

    for (int b = 0; b < NX / BW; b++) begin
      for (int x = 0; x < BW; x++)
        for (int y = 0; y < NY; y++) begin
          load(LD_XMAT, x * NY + y, 64'(xm[b * BW + x][y]));
          load(LD_YMAT, x * NY + y, 64'(ym[b * BW + x][y]));
        end
      for (int g = 0; g < NP; g += L) begin
        for (int l = 0; l < L; l++)
          for (int k = 0; k < NFFT; k++)
            load(LD_RC, k, {RC_W'(rc_re[g + l][k]), RC_W'(rc_im[g + l][k])}, l);
        @(negedge clk);
        ld_we = 0; start = 1; first_pass = (g == 0); pulse_base = 16'(g); lane_cnt = 8'(L);
        blk_cols = 16'(BW); blk_col0 = 16'(b * BW);
        @(negedge clk);
        start = 0;
        while (!done) @(negedge clk);
      end
      for (int j = 0; j <= BW * NY; j++) begin
        @(negedge clk);
        if (j >= 1) begin
          real r, i;
          r = real'(rd_re); i = real'(rd_im);
          hw_mag[b * BW + (j - 1) / NY][(j - 1) % NY] = $sqrt(r * r + i * i);
        end
        if (j < BW * NY) rd_addr = BAW'(j);
      end
    end

    // ---------------- double-precision reference ----------------
    for (int x = 0; x < NX; x++)
      for (int y = 0; y < NY; y++) begin
        real ar, ai;
        ar = 0; ai = 0;
        for (int p = 0; p < NP; p++) begin
          real dr, bin, w, sr, si, ph;
          int k;
          dr  = rng(ax[p], ay[p], az[p], real'(xm[x][y]) / 4096.0, real'(ym[x][y]) / 4096.0)
                - real'(r0[p]) / 4096.0;
          bin = dr * 4.0 + real'(NFFT / 2);
          k   = int'($floor(bin));
          if (k < 0 || k > NFFT - 2) continue;
          w  = bin - real'(k);
          sr = (1.0 - w) * real'(rc_re[p][k]) + w * real'(rc_re[p][k + 1]);
          si = (1.0 - w) * real'(rc_im[p][k]) + w * real'(rc_im[p][k + 1]);
          ph = 2.0 * PI * (real'(minf[p]) / 134217728.0) * dr;
          ar += sr * $cos(ph) - si * $sin(ph);
          ai += sr * $sin(ph) + si * $cos(ph);
        end
        ref_mag[x][y] = $sqrt(ar * ar + ai * ai);
      end

    // ---------------- SSIM (single window) ----------------
    begin
      real n, mx, my, vx, vy, cxy, lmax, c1, c2, ssim;
      n = real'(NX * NY); mx = 0; my = 0; vx = 0; vy = 0; cxy = 0; lmax = 0;
      for (int x = 0; x < NX; x++)
        for (int y = 0; y < NY; y++) begin
          mx += ref_mag[x][y] / n; my += hw_mag[x][y] / n;
          if (ref_mag[x][y] > lmax) lmax = ref_mag[x][y];
        end
      for (int x = 0; x < NX; x++)
        for (int y = 0; y < NY; y++) begin
          vx  += (ref_mag[x][y] - mx) * (ref_mag[x][y] - mx) / n;
          vy  += (hw_mag[x][y] - my) * (hw_mag[x][y] - my) / n;
          cxy += (ref_mag[x][y] - mx) * (hw_mag[x][y] - my) / n;
        end
      c1 = (0.01 * lmax) * (0.01 * lmax);
      c2 = (0.03 * lmax) * (0.03 * lmax);
      ssim = ((2.0 * mx * my + c1) * (2.0 * cxy + c2)) /
             ((mx * mx + my * my + c1) * (vx + vy + c2));
      $display("SSIM of the accelerator image against double precision: %f", ssim);
      checks++;
      if (ssim < 0.99) begin failures++; $display("FAIL SSIM below 0.99"); end
    end

    // ---------------- targets focus ----------------
    for (int t = 0; t < NT; t++) begin
      bit peak;
      peak = 1;
      for (int dx = -1; dx <= 1; dx++)
        for (int dy = -1; dy <= 1; dy++)
          if ((dx != 0 || dy != 0) && hw_mag[tx[t] + dx][ty[t] + dy] > hw_mag[tx[t]][ty[t]]) peak = 0;
      checks++;
      if (!peak) begin failures++; $display("FAIL target %0d not focused", t); end
      $display("target %0d at (%0d,%0d): %f (reference %f)", t, tx[t], ty[t], hw_mag[tx[t]][ty[t]], ref_mag[tx[t]][ty[t]]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
