// gradient_unit: horizontal and vertical gradients and gradient magnitude.
//
// A KSIZE x KSIZE window of the smoothed image is convolved with a separable
// derivative kernel pair: Gx = sum s[i]*d[j]*p[i][j] and Gy = sum d[i]*s[j]*p[i][j],
// where s is the binomial smoothing row C(K-1, j) and d the binomial
// derivative d[j] = C(K-2, j-1) - C(K-2, j). For KSIZE=3 this is the Sobel pair
// (s = 1 2 1, d = -1 0 1); 5, 7 and 9 give the usual larger Sobel-type
// kernels. Gx grows to the right and Gy grows downward (rows are numbered
// from the top). For KSIZE > 3 the sums are scaled down by 2^SH with
// rounding, SH being the smallest shift that keeps the largest possible
// gradient within the 3x3 range (|G| <= 1020), so the later stages see the
// same 11-bit gradients whatever the kernel. grad_magnitude turns Gx, Gy
// into the 8-bit magnitude. The results are registered together; one pixel
// per clock at full rate.
//
// Computing both gradients and the magnitude in one pipelined stage, and
// kernels from 3x3 up to 9x9 chosen by image sharpness, follow the document.
// The document gives no coefficients: the binomial kernels, the scaling and
// the default of 3 are this design's choices. KSIZE is fixed at build time.
// Borders repeat the nearest pixel.
//
// Interface: valid/ready stream of smoothed pixels in; valid/ready stream of
// {Gx, Gy, |G|} out. Latency R*IMG_W+R accepted samples plus one cycle, with
// R = (KSIZE-1)/2 (IMG_W+1 for the 3x3 kernel).
module gradient_unit #(
  parameter int IMG_W = 256,
  parameter int IMG_H = 256,
  parameter int KSIZE = 3
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  canny_pkg::pix_t        in_pixel,
  output logic                   out_valid,
  input  logic                   out_ready,
  output canny_pkg::grad_t       out_gx,
  output canny_pkg::grad_t       out_gy,
  output canny_pkg::mag_t        out_mag
);
  import canny_pkg::*;

  initial assert (KSIZE >= 3 && KSIZE <= 9 && KSIZE % 2 == 1)
    else $error("gradient_unit: KSIZE must be 3, 5, 7 or 9");

  function automatic int binom(input int n, input int j);
    int b;
    if (j < 0 || j > n) return 0;
    b = 1;
    for (int t = 1; t <= j; t++) b = b * (n - j + t) / t;
    return b;
  endfunction

  function automatic int smooth_c(input int j);
    return binom(KSIZE - 1, j);
  endfunction

  function automatic int deriv_c(input int j);
    return binom(KSIZE - 2, j - 1) - binom(KSIZE - 2, j);
  endfunction

  // smallest shift keeping the largest gradient of 8-bit data within 1020
  function automatic int scale_shift();
    int pos, gmax, sh;
    pos = 0;
    for (int j = 0; j < KSIZE; j++) if (deriv_c(j) > 0) pos += deriv_c(j);
    gmax = 255 * (1 << (KSIZE - 1)) * pos;
    sh = 0;
    while ((gmax >> sh) > 1020) sh++;
    return sh;
  endfunction

  localparam int SH   = scale_shift();
  localparam int HALF = (SH > 0) ? (1 << (SH - 1)) : 0;

  logic                                   w_valid, w_ready;
  logic [KSIZE-1:0][KSIZE-1:0][PIX_W-1:0] win;
  grad_t                                  gx, gy;
  mag_t                                   mag;

  window_kxk #(.IMG_W(IMG_W), .IMG_H(IMG_H), .WIDTH(PIX_W), .K(KSIZE), .REPLICATE(1'b1)) u_win (
    .clk, .rst, .in_valid, .in_ready, .in_data(in_pixel),
    .out_valid(w_valid), .out_ready(w_ready), .win);

  always_comb begin
    int ax, ay;
    ax = 0;
    ay = 0;
    for (int i = 0; i < KSIZE; i++) begin
      for (int j = 0; j < KSIZE; j++) begin
        ax += smooth_c(i) * deriv_c(j) * int'(win[i][j]);
        ay += deriv_c(i) * smooth_c(j) * int'(win[i][j]);
      end
    end
    ax = (ax + HALF) >>> SH;
    ay = (ay + HALF) >>> SH;
    gx = G_W'(ax);
    gy = G_W'(ay);
  end

  grad_magnitude u_mag (.gx, .gy, .mag);

  pipe_reg #(.WIDTH(2 * G_W + MAG_W)) u_out (
    .clk, .rst, .in_valid(w_valid), .in_ready(w_ready), .in_data({gx, gy, mag}),
    .out_valid, .out_ready, .out_data({out_gx, out_gy, out_mag}));
endmodule
