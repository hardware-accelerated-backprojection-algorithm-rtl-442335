// Testbench of rc_buffer (NFFT = 256): fills the buffer with random complex
// samples, then reads every k from 0 to NFFT-2 (even and odd) plus random k,
// one per cycle, and checks rc[k] and rc[k+1] one cycle later.
module tb_rc_buffer;
  import bp_pkg::*;
  localparam int NFFT = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              we;
  logic [7:0]        waddr, k;
  logic [2*RC_W-1:0] wdata;
  logic signed [RC_W-1:0] r0r, r0i, r1r, r1i;
  rc_buffer #(.NFFT(NFFT)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .k(k),
    .rc0_re(r0r), .rc0_im(r0i), .rc1_re(r1r), .rc1_im(r1i));

  logic [2*RC_W-1:0] ref_mem [NFFT];
  int ks [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; k = 0;
    for (int i = 0; i < NFFT; i++) ref_mem[i] = {$urandom, $urandom};
    for (int i = NFFT - 1; i >= 0; i--) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = ref_mem[i];
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i <= NFFT - 2; i++) ks.push_back(i);
    for (int i = 0; i < 500; i++) ks.push_back($urandom_range(NFFT - 2));
    for (int j = 0; j <= ks.size(); j++) begin
      @(negedge clk);
      if (j >= 1) begin
        int kk;
        kk = ks[j-1];
        checks++;
        if ({r0r, r0i} != ref_mem[kk] || {r1r, r1i} != ref_mem[kk+1]) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d", kk);
        end
      end
      if (j < ks.size()) k = 8'(ks[j]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
