// Pipelined integer square root: q = floor(sqrt(rad)).
// Restoring digit-by-digit method, one result bit per stage: each stage brings
// down the next two radicand bits into the partial remainder, tries to
// subtract (4*root + 1) and shifts the new root bit in. Latency OUT_W = IN_W/2
// cycles, one new operand accepted every cycle. Helper of range_unit; the
// square-root method is this design's own choice.
module isqrt_pipe #(
  parameter int IN_W = 68             // must be even
) (
  input  logic                 clk,
  input  logic [IN_W-1:0]      rad,
  output logic [IN_W/2-1:0]    root
);
  localparam int OUT_W = IN_W / 2;
  localparam int REM_W = OUT_W + 2;

  logic [IN_W-1:0]  rad_q  [OUT_W+1];
  logic [REM_W-1:0] rem_q  [OUT_W+1];
  logic [OUT_W-1:0] root_q [OUT_W+1];

  assign rad_q[0]  = rad;
  assign rem_q[0]  = '0;
  assign root_q[0] = '0;

  for (genvar s = 0; s < OUT_W; s++) begin : g_stage
    logic [REM_W-1:0] rem_in;
    logic [REM_W-1:0] trial;
    assign rem_in = {rem_q[s][REM_W-3:0], rad_q[s][IN_W-1 -: 2]};
    assign trial  = {root_q[s], 2'b01};
    always_ff @(posedge clk) begin
      rad_q[s+1] <= rad_q[s] << 2;
      if (rem_in >= trial) begin
        rem_q[s+1]  <= rem_in - trial;
        root_q[s+1] <= {root_q[s][OUT_W-2:0], 1'b1};
      end else begin
        rem_q[s+1]  <= rem_in;
        root_q[s+1] <= {root_q[s][OUT_W-2:0], 1'b0};
      end
    end
  end

  assign root = root_q[OUT_W];
endmodule
