// Testbench of image_accum (5 x 3 pixel block, 3 lanes): four passes over
// the block with random lane contributions and random idle cycles, the
// first two flagged first_pass (the second must discard what the first left). Checks that last_done follows the last pixel by two
// cycles and, after the passes, reads the block back and compares with a
// model of the accumulation.
module tb_image_accum;
  import bp_pkg::*;
  localparam int NY = 5, BW = 3, L = 3, NPIX = NY * BW;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, first, iv, il, ld;
  logic [3:0] ia, ra;
  logic signed [CONTRIB_W-1:0] cre [L], cim [L];
  logic signed [IMG_W-1:0] rre, rim;
  image_accum #(.NY(NY), .BLK_W(BW), .LANES(L)) dut (.clk(clk), .rst_n(rst_n), .first_pass(first),
    .in_valid(iv), .in_addr(ia), .in_last(il), .c_re(cre), .c_im(cim), .last_done(ld),
    .rd_addr(ra), .rd_re(rre), .rd_im(rim));

  longint mre [NPIX], mim [NPIX];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; iv = 0; il = 0; ia = 0; ra = 0; first = 0;
    for (int l = 0; l < L; l++) begin cre[l] = '0; cim[l] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // pass 0 leaves data behind; pass 1 must overwrite it (first_pass)
    for (int p = 0; p < 4; p++) begin
      first = (p <= 1);
      for (int a = 0; a < NPIX; a++) begin
        @(negedge clk);
        while ($urandom_range(3) == 0) begin iv = 0; il = 0; @(negedge clk); end
        iv = 1; ia = 4'(a); il = (a == NPIX - 1);
        if (first) begin mre[a] = 0; mim[a] = 0; end
        for (int l = 0; l < L; l++) begin
          cre[l] = CONTRIB_W'($signed({$urandom, $urandom}) >>> 30);
          cim[l] = CONTRIB_W'($signed({$urandom, $urandom}) >>> 30);
          mre[a] += longint'(cre[l]);
          mim[a] += longint'(cim[l]);
        end
      end
      @(negedge clk); iv = 0; il = 0;
      checks++;
      if (ld) failures++;
      @(negedge clk);
      checks++;
      if (!ld) begin failures++; $display("FAIL last_done timing, pass %0d", p); end
      @(negedge clk);
    end
    for (int j = 0; j <= NPIX; j++) begin
      @(negedge clk);
      if (j >= 1) begin
        checks++;
        if (longint'(rre) != mre[j-1] || longint'(rim) != mim[j-1]) begin
          failures++;
          if (failures < 10) $display("FAIL pixel %0d got %0d,%0d exp %0d,%0d", j-1, rre, rim, mre[j-1], mim[j-1]);
        end
      end
      if (j < NPIX) ra = 4'(j);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
