// Testbench of rvec_mem (NFFT = 128): writes a linear range axis with a
// random start and spacing, checks r_vec[0] on rvec0 and every r_vec[k]
// one cycle after k.
module tb_rvec_mem;
  import bp_pkg::*;
  localparam int NFFT = 128;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                     we;
  logic [6:0]               waddr, k;
  logic signed [RVEC_W-1:0] wdata, rvk, rv0;
  rvec_mem #(.NFFT(NFFT)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .k(k),
                              .rvec_k(rvk), .rvec0(rv0));
  longint base, sp;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; k = 0;
    base = -longint'($urandom_range(1 << 20));
    sp   = 100 + longint'($urandom_range(1000));
    for (int i = 0; i < NFFT; i++) begin
      @(negedge clk);
      we = 1; waddr = 7'(i); wdata = RVEC_W'(base + i * sp);
    end
    @(negedge clk);
    we = 0;
    checks++;
    if (longint'(rv0) != base) failures++;
    for (int j = 0; j <= NFFT; j++) begin
      @(negedge clk);
      if (j >= 1) begin
        checks++;
        if (longint'(rvk) != base + (j - 1) * sp) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d got %0d", j - 1, rvk);
        end
      end
      if (j < NFFT) k = 7'(j);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
