// Per-pulse constant memory: for every pulse p it holds min_f[p] (phase
// constant, turns per metre), r0[p] (range to the scene centre) and the
// antenna position ant_x/y/z[p]. These are loaded once, before image
// formation starts, and read by the controller at the start of each pass to
// fill the lane registers.
// Write: one field per cycle, selected by sel (LD_MINF .. LD_ANTZ), LSBs of
// wdata. Read: rd_addr in, the whole record on rd_prm one cycle later.
module pulse_param_mem
  import bp_pkg::*;
#(
  parameter int N_PULSES = 117,
  localparam int AW      = $clog2(N_PULSES)
) (
  input  logic          clk,
  input  logic          we,
  input  ld_sel_e       sel,
  input  logic [AW-1:0] waddr,
  input  logic [63:0]   wdata,
  input  logic [AW-1:0] rd_addr,
  output pulse_prm_t    rd_prm
);
  logic [MINF_W-1:0] m_minf [N_PULSES];
  logic [R0_W-1:0]   m_r0   [N_PULSES];
  logic [ANT_W-1:0]  m_antx [N_PULSES];
  logic [ANT_W-1:0]  m_anty [N_PULSES];
  logic [ANT_W-1:0]  m_antz [N_PULSES];

  always_ff @(posedge clk) begin
    if (we) begin
      unique case (sel)
        LD_MINF: m_minf[waddr] <= wdata[MINF_W-1:0];
        LD_R0:   m_r0[waddr]   <= wdata[R0_W-1:0];
        LD_ANTX: m_antx[waddr] <= wdata[ANT_W-1:0];
        LD_ANTY: m_anty[waddr] <= wdata[ANT_W-1:0];
        LD_ANTZ: m_antz[waddr] <= wdata[ANT_W-1:0];
        default: ;
      endcase
    end
    rd_prm.min_f <= m_minf[rd_addr];
    rd_prm.r0    <= m_r0[rd_addr];
    rd_prm.ant_x <= m_antx[rd_addr];
    rd_prm.ant_y <= m_anty[rd_addr];
    rd_prm.ant_z <= m_antz[rd_addr];
  end
endmodule
