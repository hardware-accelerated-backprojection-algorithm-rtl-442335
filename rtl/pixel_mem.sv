// Pixel coordinate memories.
//   x_mat, y_mat : x and y coordinate (metres, DIST_FRAC fraction bits) of
//                  every pixel of the current image block, BLK_W columns of
//                  NY rows, address x*NY + y (column by column).
//   z_mat        : one bit per pixel of the whole NX x NY image, address
//                  col*NY + y, loaded once before image formation.
// Three write enables share one address/data pair. The read port takes the
// block address and the image address of the same pixel and returns its
// three coordinates one cycle later.
module pixel_mem
  import bp_pkg::*;
#(
  parameter int NX    = 501,
  parameter int NY    = 501,
  parameter int BLK_W = 42,
  localparam int NPIX = NY * BLK_W,
  localparam int NIMG = NX * NY,
  localparam int BAW  = $clog2(NPIX),
  localparam int IAW  = $clog2(NIMG)
) (
  input  logic                    clk,
  input  logic                    we_x,
  input  logic                    we_y,
  input  logic                    we_z,
  input  logic [IAW-1:0]          waddr,
  input  logic [MAT_W-1:0]        wdata,
  input  logic [BAW-1:0]          rd_addr,
  input  logic [IAW-1:0]          rd_zaddr,
  output logic signed [MAT_W-1:0] x,
  output logic signed [MAT_W-1:0] y,
  output logic                    z
);
  logic [MAT_W-1:0] xmat [NPIX];
  logic [MAT_W-1:0] ymat [NPIX];
  logic             zmat [NIMG];

  always_ff @(posedge clk) begin
    if (we_x) xmat[BAW'(waddr)] <= wdata;
    if (we_y) ymat[BAW'(waddr)] <= wdata;
    if (we_z) zmat[waddr]       <= wdata[0];
    x <= xmat[rd_addr];
    y <= ymat[rd_addr];
    z <= zmat[rd_zaddr];
  end
endmodule
