// Testbench of sincos_unit: sweeps the phase over all four quadrants
// (every 7th code plus the quadrant edges), compares cos/sin with $cos/$sin
// scaled to Q1.16 within 24 LSB, and checks the 7-cycle latency by
// streaming one phase per cycle.
module tb_sincos_unit;
  import bp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [PH_W-1:0]        ph;
  logic signed [SC_W-1:0] c, s;
  sincos_unit dut (.clk(clk), .ph(ph), .cos_o(c), .sin_o(s));

  int stim [$];
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    for (int v = 0; v < 65536; v += 7) stim.push_back(v);
    for (int qd = 0; qd < 4; qd++) begin
      stim.push_back(qd * 16384);
      stim.push_back(qd * 16384 + 1);
      stim.push_back((qd * 16384 + 16383) % 65536);
    end
    n = stim.size();
    ph = '0;
    for (int j = 0; j < n + SINCOS_LAT; j++) begin
      @(negedge clk);
      if (j >= SINCOS_LAT) begin
        real a, ec, es;
        a  = 2.0 * 3.141592653589793 * real'(stim[j - SINCOS_LAT]) / 65536.0;
        ec = $cos(a) * 65536.0;
        es = $sin(a) * 65536.0;
        checks++;
        if ((real'(c) - ec > 24.0) || (ec - real'(c) > 24.0) ||
            (real'(s) - es > 24.0) || (es - real'(s) > 24.0)) begin
          failures++;
          if (failures < 10)
            $display("FAIL ph=%0d cos=%0d (%f) sin=%0d (%f)", stim[j - SINCOS_LAT], c, ec, s, es);
        end
      end
      if (j < n) ph = PH_W'(stim[j]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
