// Testbench of pixel_mem (image 9 x 7, blocks of 3 columns): loads x_mat and
// y_mat of a block and z_mat of the whole image with random values, then
// reads every pixel of the block at a given image column offset and checks
// the three coordinates one cycle later.
module tb_pixel_mem;
  import bp_pkg::*;
  localparam int NX = 9, NY = 7, BW = 3, NPIX = NY * BW, NIMG = NX * NY;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                    we_x, we_y, we_z;
  logic [5:0]              waddr, rz;
  logic [4:0]              ra;
  logic [MAT_W-1:0]        wdata;
  logic signed [MAT_W-1:0] x, y;
  logic                    z;
  pixel_mem #(.NX(NX), .NY(NY), .BLK_W(BW)) dut (.clk(clk), .we_x(we_x), .we_y(we_y), .we_z(we_z),
    .waddr(waddr), .wdata(wdata), .rd_addr(ra), .rd_zaddr(rz), .x(x), .y(y), .z(z));

  logic [MAT_W-1:0] rx [NPIX], ry [NPIX];
  bit               rzm [NIMG];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int col0;
    we_x = 0; we_y = 0; we_z = 0; ra = 0; rz = 0;
    for (int i = 0; i < NPIX; i++) begin rx[i] = $urandom; ry[i] = $urandom; end
    for (int i = 0; i < NIMG; i++) rzm[i] = 1'($urandom);
    for (int i = 0; i < NIMG; i++) begin
      @(negedge clk); we_z = 1; waddr = 6'(i); wdata = MAT_W'(rzm[i]) | 32'hFFFF_FFF0;
    end
    @(negedge clk); we_z = 0;
    for (int i = 0; i < NPIX; i++) begin
      @(negedge clk); we_x = 1; we_y = 0; waddr = 6'(i); wdata = rx[i];
      @(negedge clk); we_x = 0; we_y = 1; waddr = 6'(i); wdata = ry[i];
    end
    @(negedge clk); we_y = 0;
    col0 = 3;
    for (int j = 0; j <= NPIX; j++) begin
      @(negedge clk);
      if (j >= 1) begin
        checks++;
        if (x != rx[j-1] || y != ry[j-1] || z != rzm[col0 * NY + j - 1]) begin
          failures++;
          if (failures < 10) $display("FAIL pixel %0d", j - 1);
        end
      end
      if (j < NPIX) begin ra = 5'(j); rz = 6'(col0 * NY + j); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
