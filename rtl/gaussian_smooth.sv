// gaussian_smooth: 3x3 Gaussian smoothing of an 8-bit raster image stream.
//
// The mask is separable, so it is applied as two 1-D convolutions with the
// kernel [1 2 1]: first down each of the three window columns, then across the
// three column sums. The total gain of 16 is removed with rounding:
//   out = (sum_ij k_i k_j p(i,j) + 8) >> 4,  k = [1 2 1].
// Separable 3x3 smoothing follows the document; the coefficients and the
// border rule (nearest in-image pixel is repeated) are this design's choice.
//
// Interface: valid/ready stream in (in_pixel), valid/ready stream out
// (out_pixel), raster order, IMG_W x IMG_H pixels per block. The window
// generator adds IMG_W+1 samples of delay and a result register one cycle;
// at full rate one pixel leaves per clock.
module gaussian_smooth #(
  parameter int IMG_W = 256,
  parameter int IMG_H = 256
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  canny_pkg::pix_t        in_pixel,
  output logic                   out_valid,
  input  logic                   out_ready,
  output canny_pkg::pix_t        out_pixel
);
  import canny_pkg::*;

  logic                     w_valid, w_ready;
  logic [2:0][2:0][PIX_W-1:0] win;
  logic [PIX_W+1:0]         col_sum [3];
  logic [PIX_W+3:0]         row_sum;
  pix_t                     smooth;

  window3x3 #(.IMG_W(IMG_W), .IMG_H(IMG_H), .WIDTH(PIX_W), .REPLICATE(1'b1)) u_win (
    .clk, .rst, .in_valid, .in_ready, .in_data(in_pixel),
    .out_valid(w_valid), .out_ready(w_ready), .win);

  always_comb begin
    for (int j = 0; j < 3; j++)
      col_sum[j] = (PIX_W+2)'(win[0][j]) + ((PIX_W+2)'(win[1][j]) << 1) + (PIX_W+2)'(win[2][j]);
    row_sum = (PIX_W+4)'(col_sum[0]) + ((PIX_W+4)'(col_sum[1]) << 1) + (PIX_W+4)'(col_sum[2]);
    smooth  = PIX_W'((row_sum + (PIX_W+4)'(8)) >> 4);
  end

  pipe_reg #(.WIDTH(PIX_W)) u_out (
    .clk, .rst, .in_valid(w_valid), .in_ready(w_ready), .in_data(smooth),
    .out_valid, .out_ready, .out_data(out_pixel));
endmodule
