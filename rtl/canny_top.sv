// canny_top: streaming Canny edge detector for one block of IMG_W x IMG_H
// 8-bit grey pixels.
//
// Five units in a valid/ready pipeline, one pixel per clock at full rate:
//   gaussian_smooth  3x3 separable Gaussian smoothing
//   gradient_unit    GRAD_K x GRAD_K Sobel-type Gx, Gy and magnitude
//                    sqrt(Gx^2+Gy^2)/4 (GRAD_K = 3, 5, 7 or 9; default 3)
//   nms_unit         directional non-maximum suppression with interpolation
//   threshold_calc   8-bin non-uniform histogram -> ThH, ThL for the block
//   hysteresis_unit  strong/weak classification and 8-neighbour linking
// The NMS output is fed both to threshold_calc and to block_buffer, which
// holds the block until its thresholds exist and then replays it into the
// hysteresis unit; the next block is written meanwhile into the second bank.
// The five units are the document's; the buffer, the stream protocol and the
// detailed rules noted in each unit are this design's choices.
//
// Interface: in_valid/in_ready/in_pixel in raster order, blocks back to back;
// out_valid/out_ready/out_edge in the same order. thr_valid pulses with the
// thresholds of each block as they are found. Each window stage drains itself
// at the end of a block (IMG_W+1 cycles for a 3x3 window, R*IMG_W+R for the
// gradient window with R = (GRAD_K-1)/2), so the input stalls briefly between
// blocks; the edge map of a block appears about one block time after its
// pixels entered.
module canny_top #(
  parameter int IMG_W = 256,
  parameter int IMG_H = 256,
  parameter int P1_Q8 = 205,
  parameter int THR_W = 10,
  parameter int GRAD_K = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  output logic             in_ready,
  input  canny_pkg::pix_t  in_pixel,
  output logic             out_valid,
  input  logic             out_ready,
  output logic             out_edge,
  output logic             thr_valid,
  output logic [THR_W-1:0] thr_high,
  output logic [THR_W-1:0] thr_low
);
  import canny_pkg::*;

  localparam int NPIX = IMG_W * IMG_H;

  logic  s_valid, s_ready;
  pix_t  s_pixel;
  logic  g_valid, g_ready;
  grad_t g_gx, g_gy;
  mag_t  g_mag;
  logic  n_valid, n_ready;
  mag_t  n_mag;
  logic  b_valid, b_ready;
  mag_t  b_mag;
  logic [THR_W-1:0] b_thh, b_thl;

  gaussian_smooth #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_smooth (
    .clk, .rst, .in_valid, .in_ready, .in_pixel,
    .out_valid(s_valid), .out_ready(s_ready), .out_pixel(s_pixel));

  gradient_unit #(.IMG_W(IMG_W), .IMG_H(IMG_H), .KSIZE(GRAD_K)) u_grad (
    .clk, .rst, .in_valid(s_valid), .in_ready(s_ready), .in_pixel(s_pixel),
    .out_valid(g_valid), .out_ready(g_ready), .out_gx(g_gx), .out_gy(g_gy), .out_mag(g_mag));

  nms_unit #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_nms (
    .clk, .rst, .in_valid(g_valid), .in_ready(g_ready),
    .in_gx(g_gx), .in_gy(g_gy), .in_mag(g_mag),
    .out_valid(n_valid), .out_ready(n_ready), .out_mag(n_mag));

  threshold_calc #(.NPIX(NPIX), .P1_Q8(P1_Q8), .THR_W(THR_W)) u_thr (
    .clk, .rst, .en(n_valid && n_ready), .data_in(n_mag),
    .thr_valid, .high_threshold(thr_high), .low_threshold(thr_low));

  block_buffer #(.NPIX(NPIX), .THR_W(THR_W)) u_buf (
    .clk, .rst, .in_valid(n_valid), .in_ready(n_ready), .in_mag(n_mag),
    .thr_valid, .thr_high, .thr_low,
    .out_valid(b_valid), .out_ready(b_ready), .out_mag(b_mag),
    .out_thr_high(b_thh), .out_thr_low(b_thl));

  hysteresis_unit #(.IMG_W(IMG_W), .IMG_H(IMG_H), .THR_W(THR_W)) u_hyst (
    .clk, .rst, .in_valid(b_valid), .in_ready(b_ready), .in_mag(b_mag),
    .thr_high(b_thh), .thr_low(b_thl),
    .out_valid, .out_ready, .out_edge);
endmodule
