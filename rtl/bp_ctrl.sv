// Loop controller of one pass: LANES pulses over one image block.
// A pass is one iteration of the pulse loop of the block, unrolled LANES
// times; the x loop (block columns) is outside the y loop (rows), as in the
// pixel loop nest of the algorithm, so one pixel is issued per cycle.
//   IDLE  : wait for start.
//   LOADP : read the constants of pulses pulse_base .. pulse_base+LANES-1 from
//           the pulse memory, one per cycle; one cycle later prm_we writes
//           them into lane prm_lane, enabled only if prm_lane < lane_cnt
//           (the last pass may have fewer pulses than lanes).
//   RUN   : for x in 0..blk_cols-1, for y in 0..NY-1: pix_valid with the
//           block address x*NY+y and the image address (blk_col0+x)*NY+y;
//           the final pixel is tagged pix_last.
//   DRAIN : wait until the accumulator reports the last pixel written, then
//           pulse done for one cycle.
// busy is high from the cycle after start until done.
// The loop order and the per-block, per-pulse-group processing follow the
// algorithm's loop nest and block decomposition; the start/done protocol and
// the pass inputs are this design's own.
module bp_ctrl
  import bp_pkg::*;
#(
  parameter int N_PULSES = 117,
  parameter int NX       = 501,
  parameter int NY       = 501,
  parameter int BLK_W    = 42,
  parameter int LANES    = 4,
  localparam int PAW     = $clog2(N_PULSES),
  localparam int LW      = (LANES > 1) ? $clog2(LANES) : 1,
  localparam int BAW     = $clog2(NY * BLK_W),
  localparam int IAW     = $clog2(NX * NY)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [15:0]    pulse_base,
  input  logic [7:0]     lane_cnt,
  input  logic [15:0]    blk_cols,
  input  logic [15:0]    blk_col0,
  input  logic           acc_last_done,
  output logic           busy,
  output logic           done,
  output logic [PAW-1:0] prm_rd_addr,
  output logic           prm_we,
  output logic [LW-1:0]  prm_lane,
  output logic           prm_en,
  output logic           pix_valid,
  output logic [BAW-1:0] pix_addr,
  output logic [IAW-1:0] pix_zaddr,
  output logic           pix_last
);
  typedef enum logic [1:0] {S_IDLE, S_LOADP, S_RUN, S_DRAIN} state_e;
  state_e state;

  logic [LW-1:0]  lcnt;
  logic [15:0]    xcnt;
  logic [15:0]    ycnt;

  logic x_last, y_last;
  assign y_last = (ycnt == 16'(NY - 1));
  assign x_last = (xcnt == blk_cols - 16'd1);

  assign busy        = (state != S_IDLE);
  assign pix_valid   = (state == S_RUN);
  assign pix_last    = (state == S_RUN) && x_last && y_last;
  assign prm_rd_addr = PAW'(pulse_base + 16'(lcnt));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      lcnt      <= '0;
      xcnt      <= '0;
      ycnt      <= '0;
      pix_addr  <= '0;
      pix_zaddr <= '0;
      prm_we    <= 1'b0;
      prm_lane  <= '0;
      prm_en    <= 1'b0;
      done      <= 1'b0;
    end else begin
      done     <= 1'b0;
      prm_we   <= (state == S_LOADP);
      prm_lane <= lcnt;
      prm_en   <= (8'(lcnt) < lane_cnt);
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_LOADP;
          lcnt  <= '0;
        end
        S_LOADP: begin
          if (lcnt == LW'(LANES - 1)) begin
            state     <= S_RUN;
            xcnt      <= '0;
            ycnt      <= '0;
            pix_addr  <= '0;
            pix_zaddr <= IAW'(blk_col0) * IAW'(NY);
          end
          lcnt <= lcnt + 1'b1;
        end
        S_RUN: begin
          pix_addr  <= pix_addr + 1'b1;
          pix_zaddr <= pix_zaddr + 1'b1;
          if (y_last) begin
            ycnt <= '0;
            xcnt <= xcnt + 16'd1;
            if (x_last) state <= S_DRAIN;
          end else begin
            ycnt <= ycnt + 16'd1;
          end
        end
        S_DRAIN: if (acc_last_done) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_cols: assert property (@(posedge clk) disable iff (!rst_n)
                           (state == S_IDLE && start) |-> (blk_cols != 0 && blk_cols <= 16'(BLK_W)));
endmodule
