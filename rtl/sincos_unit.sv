// SIN/COS unit of the matched filter: cos(2*pi*ph) and sin(2*pi*ph).
// The phase arrives in turns (unsigned, PH_W bits, 1.0 = 2*pi), so the
// argument is already reduced to [0, 2*pi): no remainder of 2*pi is computed.
// The two top bits select the quadrant; the rest, x in [0,1), is the position
// inside it. Both S = sin(pi/2*x) and C = sin(pi/2*(1-x)) are evaluated with
// the odd polynomial  u*(a1 + u^2*(a3 + u^2*(a5 + u^2*a7)))  (Taylor terms of
// sin(pi/2*u), error below 2e-4) in Q.16 arithmetic, and the quadrant then
// swaps and negates them. The approximation method is this design's choice.
// Outputs are signed Q1.16 in SC_W = 18 bits. Latency bp_pkg::SINCOS_LAT = 7
// cycles, one phase per cycle.
module sincos_unit
  import bp_pkg::*;
(
  input  logic                   clk,
  input  logic [PH_W-1:0]        ph,
  output logic signed [SC_W-1:0] cos_o,
  output logic signed [SC_W-1:0] sin_o
);
  localparam int F  = 16;           // fraction bits of the polynomial datapath
  localparam int VW = 20;           // value width (|v| <= 2.0)
  localparam int PW = 2 * VW;       // product width
  localparam logic signed [VW-1:0] A1 = 20'sd102944;   //  pi/2
  localparam logic signed [VW-1:0] A3 = -20'sd42334;   // -(pi/2)^3/3!
  localparam logic signed [VW-1:0] A5 = 20'sd5223;     //  (pi/2)^5/5!
  localparam logic signed [VW-1:0] A7 = -20'sd307;     // -(pi/2)^7/7!

  function automatic logic signed [VW-1:0] fmul(input logic signed [VW-1:0] a,
                                                input logic signed [VW-1:0] b);
    logic signed [PW-1:0] p;
    p = PW'(a) * PW'(b);
    return VW'(p >>> F);
  endfunction

  logic [1:0]            q [7];           // quadrant per stage (index = stage)
  logic signed [VW-1:0]  u1 [2], u2 [2], u3 [2], u4 [2], u5 [2];
  logic signed [VW-1:0]  sq2 [2], sq3 [2], sq4 [2];
  logic signed [VW-1:0]  h3 [2], h4 [2], h5 [2];
  logic signed [VW-1:0]  r6 [2];

  // stage 1: quadrant and the two polynomial arguments x and 1-x
  always_ff @(posedge clk) begin
    q[1]  <= ph[PH_W-1 -: 2];
    u1[0] <= VW'({ph[PH_W-3:0], 2'b00});
    u1[1] <= VW'(1 <<< F) - VW'({ph[PH_W-3:0], 2'b00});
  end

  always_ff @(posedge clk) begin
    for (int i = 2; i < 7; i++) q[i] <= q[i-1];
    for (int j = 0; j < 2; j++) begin
      // stage 2: u^2
      sq2[j] <= fmul(u1[j], u1[j]);
      u2[j]  <= u1[j];
      // stage 3: a5 + u^2*a7
      h3[j]  <= A5 + fmul(sq2[j], A7);
      sq3[j] <= sq2[j];
      u3[j]  <= u2[j];
      // stage 4: a3 + u^2*(...)
      h4[j]  <= A3 + fmul(sq3[j], h3[j]);
      sq4[j] <= sq3[j];
      u4[j]  <= u3[j];
      // stage 5: a1 + u^2*(...)
      h5[j]  <= A1 + fmul(sq4[j], h4[j]);
      u5[j]  <= u4[j];
      // stage 6: u*(...)
      r6[j]  <= fmul(u5[j], h5[j]);
    end
  end

  // stage 7: quadrant mapping, S = r6[0], C = r6[1]
  always_ff @(posedge clk) begin
    unique case (q[6])
      2'd0: begin sin_o <= SC_W'( r6[0]); cos_o <= SC_W'( r6[1]); end
      2'd1: begin sin_o <= SC_W'( r6[1]); cos_o <= SC_W'(-r6[0]); end
      2'd2: begin sin_o <= SC_W'(-r6[0]); cos_o <= SC_W'(-r6[1]); end
      default: begin sin_o <= SC_W'(-r6[1]); cos_o <= SC_W'( r6[0]); end
    endcase
  end
endmodule
