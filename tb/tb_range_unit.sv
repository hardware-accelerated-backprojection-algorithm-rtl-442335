// Testbench of range_unit: random antenna positions (full 25-bit range),
// pixel coordinates within +-256 m, both z_mat values and random r0; one
// pixel per cycle. dR must equal the exact floor square root minus r0 and
// appear RANGE_LAT cycles after the inputs.
module tb_range_unit;
  import bp_pkg::*;
  import bp_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [ANT_W-1:0] ax, ay, az;
  logic [R0_W-1:0]         r0;
  logic signed [MAT_W-1:0] px, py;
  logic                    pz;
  logic signed [DR_W-1:0]  dr;
  range_unit dut (.clk(clk), .ant_x(ax), .ant_y(ay), .ant_z(az), .r0(r0),
                  .pix_x(px), .pix_y(py), .pix_z(pz), .dr(dr));

  localparam int N = 3000;
  longint sax [N], say [N], saz [N], sr0 [N], spx [N], spy [N];
  bit     spz [N];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      sax[i] = longint'($signed(ANT_W'($urandom)));
      say[i] = longint'($signed(ANT_W'($urandom)));
      saz[i] = longint'($signed(ANT_W'($urandom)));
      spx[i] = longint'($signed(21'($urandom)));
      spy[i] = longint'($signed(21'($urandom)));
      spz[i] = 1'($urandom);
      sr0[i] = longint'(R0_W'($urandom));
    end
    // pixel right under the antenna, zero distance
    sax[1] = 1000; say[1] = -77; saz[1] = 0; spx[1] = 1000; spy[1] = -77; spz[1] = 0; sr0[1] = 0;
    for (int j = 0; j < N + RANGE_LAT; j++) begin
      @(negedge clk);
      if (j >= RANGE_LAT) begin
        int i;
        longint e;
        i = j - RANGE_LAT;
        e = range_dr(sax[i], say[i], saz[i], spx[i], spy[i], spz[i], sr0[i]);
        checks++;
        if (longint'(dr) != e) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d dr=%0d exp=%0d", i, dr, e);
        end
      end
      if (j < N) begin
        ax = ANT_W'(sax[j]); ay = ANT_W'(say[j]); az = ANT_W'(saz[j]);
        px = MAT_W'(spx[j]); py = MAT_W'(spy[j]); pz = spz[j]; r0 = R0_W'(sr0[j]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
