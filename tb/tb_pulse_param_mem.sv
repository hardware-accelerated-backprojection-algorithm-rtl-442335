// Testbench of pulse_param_mem (117 pulses): writes random constants for
// every pulse, field by field in mixed order, then reads every pulse and
// checks the whole record one cycle after the address.
module tb_pulse_param_mem;
  import bp_pkg::*;
  localparam int NP = 117;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we;
  ld_sel_e     sel;
  logic [6:0]  waddr, raddr;
  logic [63:0] wdata;
  pulse_prm_t  rd;
  pulse_param_mem #(.N_PULSES(NP)) dut (.clk(clk), .we(we), .sel(sel), .waddr(waddr),
                                        .wdata(wdata), .rd_addr(raddr), .rd_prm(rd));
  pulse_prm_t ref_p [NP];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; raddr = 0;
    for (int i = 0; i < NP; i++) ref_p[i] = {$urandom, $urandom, $urandom, $urandom, $urandom};
    for (int f = 4; f >= 0; f--)
      for (int i = 0; i < NP; i++) begin
        @(negedge clk);
        we = 1; waddr = 7'(i); sel = ld_sel_e'(f);
        unique case (f)
          0: wdata = 64'(ref_p[i].min_f);
          1: wdata = 64'(ref_p[i].r0);
          2: wdata = 64'(ref_p[i].ant_x);
          3: wdata = 64'(ref_p[i].ant_y);
          default: wdata = 64'(ref_p[i].ant_z);
        endcase
      end
    @(negedge clk);
    we = 1; sel = LD_RC; waddr = 0; wdata = '1;    // not a pulse field: ignored
    for (int j = 0; j <= NP; j++) begin
      @(negedge clk);
      we = 0;
      if (j >= 1) begin
        checks++;
        if (rd != ref_p[j-1]) begin
          failures++;
          if (failures < 10) $display("FAIL pulse %0d", j - 1);
        end
      end
      if (j < NP) raddr = 7'(j);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
