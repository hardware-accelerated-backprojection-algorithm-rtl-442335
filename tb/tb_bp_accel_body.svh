// Body shared by the end-to-end testbenches of bp_accel. The including module
// defines NP, NFFT, NX, NY, BW, L, PIX_M, KW, LW, BAW, IC, SP, BLK_FIRST and
// BLK_END (the image blocks BLK_FIRST .. BLK_END-1 are formed) and instantiates the
// accelerator as dut, connected to the signals declared here.
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_first = 0, n_accum = 0, n_idle_lane = 0, n_narrow = 0, n_out = 0;
  int n_quad [4] = '{0, 0, 0, 0};

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


  // scene data
  longint rvec [];
  longint rc_re [NP][], rc_im [NP][];
  longint ax [NP], ay [NP], az [NP], r0 [NP], minf [NP];
  longint xm [NX][NY], ym [NX][NY];
  bit     zm [NX][NY];

  task automatic load(ld_sel_e s, longint a, logic [63:0] d, int lane = 0);
    @(negedge clk);
    ld_we = 1; ld_sel = s; ld_addr = 32'(a); ld_data = d; ld_lane = LW'(lane);
  endtask

  task automatic load_end();
    @(negedge clk);
    ld_we = 0;
  endtask

  initial begin
    rst_n = 0; ld_we = 0; start = 0; first_pass = 0; ld_sel = 0; ld_lane = 0; ld_addr = 0;
    ld_data = 0; pulse_base = 0; blk_cols = 1; blk_col0 = 0; lane_cnt = 0; rd_addr = 0;
    interp_const = IC_W'(IC);

    // ---------------- scene ----------------
    rvec = new[NFFT];
    for (int k = 0; k < NFFT; k++) rvec[k] = (k - NFFT / 2) * SP;
    for (int p = 0; p < NP; p++) begin
      rc_re[p] = new[NFFT];
      rc_im[p] = new[NFFT];
      for (int k = 0; k < NFFT; k++) begin
        rc_re[p][k] = longint'($signed($urandom)) >>> 11;
        rc_im[p][k] = longint'($signed($urandom)) >>> 11;
      end
      // straight flight track along y, 2 km away in x, 1 km up
      ax[p] = 2000 * 4096 + longint'($urandom_range(4095));
      ay[p] = longint'((-1500.0 + 5.0 * p) * 4096.0);
      az[p] = 1000 * 4096;
      r0[p] = range_dr(ax[p], ay[p], az[p], 0, 0, 0, 0);
      // pulse 1: r0 moved by half the range window, part of the scene falls out
      if (p == 1) r0[p] += (NFFT / 2) * SP;
      minf[p] = longint'((62.0 + 0.01 * p) * 134217728.0);
    end
    for (int x = 0; x < NX; x++)
      for (int y = 0; y < NY; y++) begin
        xm[x][y] = longint'((x - NX / 2) * PIX_M * 4096.0) + longint'($urandom_range(255));
        ym[x][y] = longint'((y - NY / 2) * PIX_M * 4096.0) + longint'($urandom_range(255));
        zm[x][y] = 1'($urandom);
      end

    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---------------- load once ----------------
    for (int p = 0; p < NP; p++) begin
      load(LD_MINF, p, 64'(minf[p]));
      load(LD_R0,   p, 64'(r0[p]));
      load(LD_ANTX, p, 64'(ax[p]));
      load(LD_ANTY, p, 64'(ay[p]));
      load(LD_ANTZ, p, 64'(az[p]));
    end
    for (int k = 0; k < NFFT; k++) load(LD_RVEC, k, 64'(rvec[k]));
    for (int x = 0; x < NX; x++)
      for (int y = 0; y < NY; y++) load(LD_ZMAT, x * NY + y, 64'(zm[x][y]));
    load_end();

    // ---------------- blocks ----------------
    for (int b = BLK_FIRST; b < BLK_END; b++) begin
      int c0, nc;
      c0 = b * BW;
      nc = (NX - c0 < BW) ? NX - c0 : BW;
      if (nc < BW) n_narrow++;
      for (int x = 0; x < nc; x++)
        for (int y = 0; y < NY; y++) begin
          load(LD_XMAT, x * NY + y, 64'(xm[c0 + x][y]));
          load(LD_YMAT, x * NY + y, 64'(ym[c0 + x][y]));
        end
      load_end();
      for (int g = 0; g < NP; g += L) begin
        int nl, cyc, exp_cyc;
        nl = (NP - g < L) ? NP - g : L;
        for (int l = 0; l < nl; l++)
          for (int k = 0; k < NFFT; k++)
            load(LD_RC, k, {RC_W'(rc_re[g + l][k]), RC_W'(rc_im[g + l][k])}, l);
        load_end();
        @(negedge clk);
        start = 1; first_pass = (g == 0); pulse_base = 16'(g); lane_cnt = 8'(nl);
        blk_cols = 16'(nc); blk_col0 = 16'(c0);
        if (g == 0) n_first++; else n_accum++;
        if (nl < L) n_idle_lane++;
        @(negedge clk);
        start = 0;
        cyc = 1;
        while (!done) begin @(negedge clk); cyc++; end
        // parameter load, one pixel per cycle, pixel memory, lane,
        // accumulator (2) and controller (1)
        exp_cyc = L + nc * NY + MEM_LAT + LANE_LAT + 3;
        checks++;
        if (cyc != exp_cyc) begin
          failures++;
          $display("FAIL pass length %0d cycles, expected %0d", cyc, exp_cyc);
        end
      end
      // read back and compare
      for (int j = 0; j <= nc * NY; j++) begin
        @(negedge clk);
        if (j >= 1) begin
          int x, y;
          real er, ei, tol;
          x = c0 + (j - 1) / NY;
          y = (j - 1) % NY;
          er = 0; ei = 0; tol = 0;
          for (int p = 0; p < NP; p++) begin
            real cr, ci, mag;
            bit inr;
            longint dr;
            dr = range_dr(ax[p], ay[p], az[p], xm[x][y], ym[x][y], zm[x][y], r0[p]);
            contrib(dr, minf[p], IC, NFFT, rvec, rc_re[p], rc_im[p], cr, ci, mag, inr);
            er += cr; ei += ci; tol += 3.0 + mag * 5e-4;
            if (!inr) n_out++;
            else n_quad[phase16(dr, minf[p]) >> 14]++;
          end
          checks++;
          if (rabs(real'(rd_re) - er) > tol || rabs(real'(rd_im) - ei) > tol) begin
            failures++;
            if (failures < 10)
              $display("FAIL pixel (%0d,%0d) got %0d,%0d exp %f,%f", x, y, rd_re, rd_im, er, ei);
          end
        end
        if (j < nc * NY) rd_addr = BAW'(j);
      end
    end

    $display("mechanisms: first pass %0d, accumulate %0d, idle lanes %0d, narrow block %0d, out of range %0d, quadrants %0d/%0d/%0d/%0d",
             n_first, n_accum, n_idle_lane, n_narrow, n_out, n_quad[0], n_quad[1], n_quad[2], n_quad[3]);
    checks++;
    if (n_first == 0 || n_accum == 0 || n_idle_lane == 0 || n_narrow == 0 || n_out == 0 ||
        n_quad[0] == 0 || n_quad[1] == 0 || n_quad[2] == 0 || n_quad[3] == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
