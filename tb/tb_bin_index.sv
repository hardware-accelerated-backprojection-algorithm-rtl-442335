// Testbench of bin_index (NFFT = 64): random dR around the range window,
// random bin spacing; k and the in-range flag are compared with the
// reference floor((dR - r_vec[0]) * interp_const) after BIN_LAT cycles.
// Counts in-range and out-of-range cases and fails if either never occurs.
module tb_bin_index;
  import bp_pkg::*;
  import bp_ref_pkg::*;
  localparam int NFFT = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_in = 0, n_out = 0;

  logic signed [DR_W-1:0]   dr;
  logic signed [RVEC_W-1:0] rv0;
  logic [IC_W-1:0]          ic;
  logic [5:0]               k;
  logic                     ok;
  bin_index #(.NFFT(NFFT)) dut (.clk(clk), .dr(dr), .rvec0(rv0), .interp_const(ic), .k(k), .ok(ok));

  localparam int N = 3000;
  longint sdr [N], srv [N], sic [N];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      longint sp;
      sp     = 200 + longint'($urandom_range(2000));       // bin spacing, 2^-12 m
      sic[i] = (longint'(1) <<< 28) / sp;                  // bins per metre, Q16.16
      srv[i] = -(NFFT / 2) * sp;
      sdr[i] = longint'($urandom_range(NFFT * 3 / 2)) * sp / 1 - (NFFT * 3 / 4) * sp
               + longint'($urandom_range(500));
    end
    for (int j = 0; j < N + BIN_LAT; j++) begin
      @(negedge clk);
      if (j >= BIN_LAT) begin
        int i;
        longint ek;
        bit     eok;
        i   = j - BIN_LAT;
        ek  = bin_k(sdr[i], srv[i], sic[i]);
        eok = (ek >= 0 && ek <= NFFT - 2);
        checks++;
        if (ok != eok || (eok && longint'(k) != ek)) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d k=%0d ok=%0d exp %0d %0d", i, k, ok, ek, eok);
        end
        if (eok) n_in++; else n_out++;
      end
      if (j < N) begin
        dr = DR_W'(sdr[j]); rv0 = RVEC_W'(srv[j]); ic = IC_W'(sic[j]);
      end
    end
    checks++;
    if (n_in == 0 || n_out == 0) failures++;
    $display("in range %0d, out of range %0d", n_in, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
