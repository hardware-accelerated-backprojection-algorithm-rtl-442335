// Shared types, fixed-point formats and pipeline latencies of the
// backprojection accelerator.
//
// Storage widths follow the memory tables of the design (antenna position and
// r0 25 bits, min_f 35 bits, r_vec 33 bits, pixel coordinates 32 bits, z_mat 1
// bit, range-compressed samples 32+32 bits, image accumulators 46+46 bits).
// The binary-point positions are not fixed by those tables; the choices made
// here are:
//   distances (ant_*, x_mat, y_mat, r0, r_vec, dR)  : metres, DIST_FRAC = 12
//   min_f (phase constant 2*f_min/c)                 : turns per metre, Q8.27
//   interp_const (1 / range-bin spacing)             : bins per metre, Q16.16
//   phase into the SIN/COS unit                      : turns, PH_W = 16 bits
//   SIN/COS outputs                                  : signed Q1.16, 18 bits
//   interpolation weight t                           : unsigned Q0.16
// A phase in turns makes the reduction modulo 2*pi a plain truncation of the
// integer bits, which is the variable transformation the SIN/COS unit relies on.
package bp_pkg;

  // ---------------- storage widths (memory tables) ----------------
  localparam int ANT_W     = 25;   // ant_x, ant_y, ant_z
  localparam int R0_W      = 25;   // r0, unsigned
  localparam int MINF_W    = 35;   // min_f, unsigned
  localparam int MAT_W     = 32;   // x_mat, y_mat
  localparam int RVEC_W    = 33;   // r_vec
  localparam int RC_W      = 32;   // one component of a range-compressed sample
  localparam int IMG_W     = 46;   // one component of an image accumulator

  // ---------------- fixed-point formats (design choices) ----------------
  localparam int DIST_FRAC = 12;
  localparam int MINF_FRAC = 27;
  localparam int IC_W      = 32;
  localparam int IC_FRAC   = 16;
  localparam int T_W       = 16;
  localparam int PH_W      = 16;
  localparam int SC_W      = 18;
  localparam int SC_FRAC   = 16;

  // ---------------- derived datapath widths ----------------
  localparam int DIST_W    = MAT_W + 1;          // ant - pixel coordinate
  localparam int RAD_W     = 2 * DIST_W + 2;     // x^2 + y^2 + z^2 (even)
  localparam int SQRT_W    = RAD_W / 2;          // range R
  localparam int DR_W      = 33;                 // dR = R - r0
  localparam int INTERP_W  = RC_W + 1;           // interpolated sample
  localparam int CONTRIB_W = 36;                 // one pulse's contribution

  // ---------------- pipeline latencies (clock cycles) ----------------
  localparam int SQRT_LAT   = SQRT_W;            // one result bit per stage
  localparam int RANGE_LAT  = 3 + SQRT_LAT + 1;  // dist, square, sum, sqrt, -r0
  localparam int BIN_LAT    = 2;
  localparam int MEM_LAT    = 1;
  localparam int INTERP_LAT = 4;
  localparam int PHASE_LAT  = 1;
  localparam int SINCOS_LAT = 7;
  localparam int CMULT_LAT  = 2;
  localparam int SAMPLE_T   = BIN_LAT + MEM_LAT + INTERP_LAT;
  localparam int PHASOR_T   = PHASE_LAT + SINCOS_LAT;
  localparam int ALIGN_T    = (SAMPLE_T > PHASOR_T) ? SAMPLE_T : PHASOR_T;
  localparam int LANE_LAT   = RANGE_LAT + ALIGN_T + CMULT_LAT;

  // ---------------- per-pulse constants ----------------
  typedef struct packed {
    logic [MINF_W-1:0]        min_f;
    logic [R0_W-1:0]          r0;
    logic signed [ANT_W-1:0]  ant_x;
    logic signed [ANT_W-1:0]  ant_y;
    logic signed [ANT_W-1:0]  ant_z;
  } pulse_prm_t;

  // ---------------- host load port: target selector ----------------
  typedef enum logic [3:0] {
    LD_MINF = 4'd0,
    LD_R0   = 4'd1,
    LD_ANTX = 4'd2,
    LD_ANTY = 4'd3,
    LD_ANTZ = 4'd4,
    LD_RC   = 4'd5,
    LD_RVEC = 4'd6,
    LD_XMAT = 4'd7,
    LD_YMAT = 4'd8,
    LD_ZMAT = 4'd9
  } ld_sel_e;

endpackage
