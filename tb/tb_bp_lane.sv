// Testbench of bp_lane (NFFT = 64): loads a range axis of 0.25 m bins and a
// random pulse, an antenna about 230 m from the scene and an X-band phase
// constant, then streams pixels (most inside the range window, some far
// outside) one per cycle. Each contribution, LANE_LAT cycles after its pixel,
// must match the real-valued reference within 3 LSB + 5e-4 of the sample
// magnitude. A second run with the lane disabled must give zeros.
module tb_bp_lane;
  import bp_pkg::*;
  import bp_ref_pkg::*;
  localparam int NFFT = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_in = 0, n_out = 0;

  logic rst_n, prm_we, prm_en, rc_we, rv_we, pz;
  pulse_prm_t prm;
  logic [IC_W-1:0] ic;
  logic [5:0] rc_wa, rv_wa;
  logic [2*RC_W-1:0] rc_wd;
  logic signed [RVEC_W-1:0] rv_wd;
  logic signed [MAT_W-1:0] px, py;
  logic signed [CONTRIB_W-1:0] cre, cim;
  bp_lane #(.NFFT(NFFT)) dut (.clk(clk), .rst_n(rst_n), .prm_we(prm_we), .prm_in(prm),
    .prm_en(prm_en), .interp_const(ic), .rc_we(rc_we), .rc_waddr(rc_wa), .rc_wdata(rc_wd),
    .rv_we(rv_we), .rv_waddr(rv_wa), .rv_wdata(rv_wd), .pix_x(px), .pix_y(py), .pix_z(pz),
    .c_re(cre), .c_im(cim));

  localparam longint SP = 1024;                 // 0.25 m in 2^-12 m
  localparam int N = 600;
  longint rvec [], rre [], rim [];
  longint spx [N], spy [N];
  bit     spz [N];
  longint ax, ay, az, r0, minf;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic stream(bit enabled);
    for (int j = 0; j < N + LANE_LAT; j++) begin
      @(negedge clk);
      if (j >= LANE_LAT) begin
        int i;
        real er, ei, mag, tol;
        bit inr;
        longint dr;
        i  = j - LANE_LAT;
        dr = range_dr(ax, ay, az, spx[i], spy[i], spz[i], r0);
        contrib(dr, minf, 262144, NFFT, rvec, rre, rim, er, ei, mag, inr);
        if (!enabled) begin er = 0; ei = 0; mag = 0; end
        tol = 3.0 + mag * 5e-4;
        checks++;
        if (rabs(real'(cre) - er) > tol || rabs(real'(cim) - ei) > tol) begin
          failures++;
          if (failures < 10) $display("FAIL pixel %0d got %0d,%0d exp %f,%f", i, cre, cim, er, ei);
        end
        if (enabled) begin if (inr) n_in++; else n_out++; end
      end
      if (j < N) begin px = MAT_W'(spx[j]); py = MAT_W'(spy[j]); pz = spz[j]; end
    end
  endtask

  initial begin
    rst_n = 0; prm_we = 0; prm_en = 0; rc_we = 0; rv_we = 0; px = 0; py = 0; pz = 0;
    ic = 262144;                                 // 4 bins per metre
    rvec = new[NFFT]; rre = new[NFFT]; rim = new[NFFT];
    for (int k = 0; k < NFFT; k++) begin
      rvec[k] = (k - NFFT / 2) * SP;
      rre[k]  = longint'($signed($urandom)) >>> 11;
      rim[k]  = longint'($signed($urandom)) >>> 11;
    end
    ax = 200 * 4096; ay = -100 * 4096 + 1234; az = 60 * 4096 + 77;
    r0 = range_dr(ax, ay, az, 0, 0, 0, 0);
    minf = longint'(62.3 * 134217728.0);         // 2*f/c in turns per metre, Q8.27
    for (int i = 0; i < N; i++) begin
      if (i % 10 == 9) begin
        spx[i] = longint'($signed(18'($urandom))) * 2;   // up to +-64 m: mostly out of range
        spy[i] = longint'($signed(18'($urandom))) * 2;
      end else begin
        spx[i] = longint'($signed(15'($urandom)));        // within +-4 m
        spy[i] = longint'($signed(15'($urandom)));
      end
      spz[i] = 1'($urandom);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NFFT; k++) begin
      @(negedge clk);
      rc_we = 1; rc_wa = 6'(k); rc_wd = {RC_W'(rre[k]), RC_W'(rim[k])};
      rv_we = 1; rv_wa = 6'(k); rv_wd = RVEC_W'(rvec[k]);
    end
    @(negedge clk);
    rc_we = 0; rv_we = 0;
    prm = '{min_f: MINF_W'(minf), r0: R0_W'(r0), ant_x: ANT_W'(ax), ant_y: ANT_W'(ay), ant_z: ANT_W'(az)};
    prm_we = 1; prm_en = 1;
    @(negedge clk);
    prm_we = 0;
    stream(1);
    @(negedge clk);
    prm_we = 1; prm_en = 0;
    @(negedge clk);
    prm_we = 0;
    stream(0);
    checks++;
    if (n_in == 0 || n_out == 0) failures++;
    $display("in range %0d, out of range %0d", n_in, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
