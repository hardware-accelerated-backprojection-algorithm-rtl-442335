// Testbench of cmult: random samples and phasors (including the extreme
// values), one per cycle; the expected product is computed with 128-bit
// integers and must match exactly after the 2-cycle latency.
module tb_cmult;
  import bp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [INTERP_W-1:0]  ar, ai;
  logic signed [SC_W-1:0]      cr, ci;
  logic signed [CONTRIB_W-1:0] pr, pi;
  cmult dut (.clk(clk), .a_re(ar), .a_im(ai), .c_re(cr), .c_im(ci), .p_re(pr), .p_im(pi));

  typedef logic signed [127:0] s128_t;
  localparam int N = 2000;
  longint sar [N], sai [N], scr [N], sci [N];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      sar[i] = longint'($signed(INTERP_W'({$urandom, $urandom})));
      sai[i] = longint'($signed(INTERP_W'({$urandom, $urandom})));
      scr[i] = longint'($signed(17'($urandom))) ;
      sci[i] = longint'($signed(17'($urandom)));
    end
    sar[0] = -(64'sd1 <<< 32); sai[0] = (64'sd1 <<< 32) - 1; scr[0] = 65536; sci[0] = -65536;
    for (int j = 0; j < N + CMULT_LAT; j++) begin
      @(negedge clk);
      if (j >= CMULT_LAT) begin
        int i;
        s128_t er, ei;
        i  = j - CMULT_LAT;
        er = (s128_t'(sar[i]) * scr[i] - s128_t'(sai[i]) * sci[i]) >>> 16;
        ei = (s128_t'(sar[i]) * sci[i] + s128_t'(sai[i]) * scr[i]) >>> 16;
        checks++;
        if (s128_t'(pr) != er || s128_t'(pi) != ei) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d got %0d,%0d exp %0d,%0d", i, pr, pi, er, ei);
        end
      end
      if (j < N) begin
        ar = INTERP_W'(sar[j]); ai = INTERP_W'(sai[j]);
        cr = SC_W'(scr[j]);     ci = SC_W'(sci[j]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
