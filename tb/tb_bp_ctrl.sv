// Testbench of bp_ctrl (4 rows, blocks of up to 3 columns, 3 lanes): runs a
// full pass and a partial pass (fewer lanes and columns, column offset).
// An accumulator stand-in returns last_done 6 cycles after the last pixel.
// Checks the lane parameter loads (pulse address, lane, enable), the pixel
// order x-outer/y-inner with block and image addresses, the single last tag,
// done one cycle after last_done, and the pass length in cycles.
module tb_bp_ctrl;
  import bp_pkg::*;
  localparam int NP = 10, NX = 8, NY = 4, BW = 3, L = 3, D = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, start, ald, busy, done, prm_we, prm_en, pv, pl;
  logic [15:0] pbase, cols, col0;
  logic [7:0]  lcnt;
  logic [3:0]  prm_addr;
  logic [1:0]  prm_lane;
  logic [3:0]  pa;
  logic [4:0]  pza;
  bp_ctrl #(.N_PULSES(NP), .NX(NX), .NY(NY), .BLK_W(BW), .LANES(L)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .pulse_base(pbase), .lane_cnt(lcnt),
    .blk_cols(cols), .blk_col0(col0), .acc_last_done(ald), .busy(busy), .done(done),
    .prm_rd_addr(prm_addr), .prm_we(prm_we), .prm_lane(prm_lane), .prm_en(prm_en),
    .pix_valid(pv), .pix_addr(pa), .pix_zaddr(pza), .pix_last(pl));

  logic [D-1:0] dl;
  always_ff @(posedge clk) dl <= rst_n ? {dl[D-2:0], pl} : '0;
  assign ald = dl[D-1];

  // monitor
  int npix, nlast, nprm, cyc;
  logic [3:0] prm_addr_q;
  always_ff @(posedge clk) prm_addr_q <= prm_addr;

  task automatic run_pass(int b, int lc, int c, int c0);
    int n_exp;
    npix = 0; nlast = 0; nprm = 0; cyc = 0;
    @(negedge clk);
    pbase = 16'(b); lcnt = 8'(lc); cols = 16'(c); col0 = 16'(c0); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      cyc++;
      if (prm_we) begin
        checks++;
        if (prm_lane != 2'(nprm) || prm_en != (nprm < lc) || prm_addr_q != 4'(b + nprm)) begin
          failures++; $display("FAIL lane load %0d", nprm);
        end
        nprm++;
      end
      if (pv) begin
        int x, y;
        x = npix / NY; y = npix % NY;
        checks++;
        if (pa != 4'(x * NY + y) || pza != 5'((c0 + x) * NY + y) || pl != (npix == c * NY - 1)) begin
          failures++; $display("FAIL pixel %0d: addr %0d zaddr %0d last %0d", npix, pa, pza, pl);
        end
        if (pl) nlast++;
        npix++;
      end
      if (!busy) begin failures++; $display("FAIL busy dropped"); end
      @(negedge clk);
    end
    n_exp = L + c * NY + D;   // load, one pixel per cycle, accumulator delay
    checks += 3;
    if (npix != c * NY) begin failures++; $display("FAIL pixel count %0d", npix); end
    if (nprm != L || nlast != 1) begin failures++; $display("FAIL loads %0d lasts %0d", nprm, nlast); end
    if (cyc != n_exp) begin failures++; $display("FAIL pass length %0d, expected %0d", cyc, n_exp); end
    @(negedge clk);
    checks++;
    if (busy || done) failures++;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; pbase = 0; lcnt = 0; cols = 1; col0 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_pass(0, 3, 3, 0);
    run_pass(6, 2, 2, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
