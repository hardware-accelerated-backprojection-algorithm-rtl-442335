// Fixed delay of a W-bit bus by N clock cycles (N = 0 gives a plain wire).
// Used to keep side signals aligned with the datapath pipelines. No reset:
// the stages are data only; qualifying valid bits are delayed with reset by
// their owners.
module delay_line #(
  parameter int W = 1,
  parameter int N = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_pipe
    logic [W-1:0] stage [N];
    always_ff @(posedge clk) begin
      stage[0] <= d;
      for (int i = 1; i < N; i++) stage[i] <= stage[i-1];
    end
    assign q = stage[N-1];
  end
endmodule
