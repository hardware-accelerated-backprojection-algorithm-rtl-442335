// Testbench of interp_unit: random neighbour samples, random position of dR
// inside the bin (and some outside, to exercise the weight clamp), ok low on
// a fraction of the inputs. Expected sample = rc0 + floor((rc1-rc0)*t/2^16)
// with t the clamped weight; result after INTERP_LAT cycles. Fails if the
// clamp or the ok = 0 case never happened.
module tb_interp_unit;
  import bp_pkg::*;
  import bp_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_clamp = 0, n_off = 0;

  typedef logic signed [127:0] s128_t;
  logic signed [DR_W-1:0]     dr;
  logic signed [RVEC_W-1:0]   rvk;
  logic [IC_W-1:0]            ic;
  logic signed [RC_W-1:0]     a_re, a_im, b_re, b_im;
  logic                       ok;
  logic signed [INTERP_W-1:0] s_re, s_im;
  interp_unit dut (.clk(clk), .dr(dr), .rvec_k(rvk), .interp_const(ic),
                   .rc0_re(a_re), .rc0_im(a_im), .rc1_re(b_re), .rc1_im(b_im),
                   .ok(ok), .s_re(s_re), .s_im(s_im));

  localparam int N = 3000;
  longint sdr [N], srv [N], sic [N], sa_re [N], sa_im [N], sb_re [N], sb_im [N];
  bit     sok [N];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      longint sp;
      sp     = 200 + longint'($urandom_range(2000));
      sic[i] = (longint'(1) <<< 28) / sp;
      srv[i] = longint'($signed(30'($urandom)));
      sdr[i] = srv[i] + longint'($urandom_range(sp + 40)) - 20;
      sa_re[i] = longint'($signed($urandom)); sa_im[i] = longint'($signed($urandom));
      sb_re[i] = longint'($signed($urandom)); sb_im[i] = longint'($signed($urandom));
      sok[i] = ($urandom_range(9) != 0);
    end
    for (int j = 0; j < N + INTERP_LAT; j++) begin
      @(negedge clk);
      if (j >= INTERP_LAT) begin
        int i;
        longint t;
        s128_t pr, pi, er, ei;
        i = j - INTERP_LAT;
        t = weight_t(sdr[i], srv[i], sic[i]);
        pr = s128_t'(sb_re[i] - sa_re[i]) * t;
        pi = s128_t'(sb_im[i] - sa_im[i]) * t;
        er = sok[i] ? s128_t'(sa_re[i]) + (pr >>> 16) : 0;
        ei = sok[i] ? s128_t'(sa_im[i]) + (pi >>> 16) : 0;
        checks++;
        if (s128_t'(s_re) != er || s128_t'(s_im) != ei) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d got %0d,%0d exp %0d,%0d", i, s_re, s_im, er, ei);
        end
        if (sok[i] && (t == 0 || t == 65535) && sdr[i] != srv[i]) n_clamp++;
        if (!sok[i]) n_off++;
      end
      if (j < N) begin
        dr = DR_W'(sdr[j]); rvk = RVEC_W'(srv[j]); ic = IC_W'(sic[j]); ok = sok[j];
        a_re = RC_W'(sa_re[j]); a_im = RC_W'(sa_im[j]); b_re = RC_W'(sb_re[j]); b_im = RC_W'(sb_im[j]);
      end
    end
    checks++;
    if (n_clamp == 0 || n_off == 0) failures++;
    $display("clamped %0d, ok low %0d", n_clamp, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
