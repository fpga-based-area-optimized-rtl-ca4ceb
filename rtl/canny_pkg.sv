// canny_pkg: widths and small shared functions of the Canny edge pipeline.
//
// Pixels and gradient magnitudes are 8-bit unsigned. The 3x3 Sobel gradients of
// an 8-bit image lie in -1020..1020 and are carried as 11-bit signed values.
// Hysteresis thresholds are 10 bits wide so that the top histogram edge (256)
// fits. The non-uniform histogram uses octave bins: magnitude m >= 1 falls in
// bin floor(log2(m)), bins [1,2) [2,4) ... [128,256); zero is not binned.
// The 8-bit data and 10-bit threshold widths and the 8-bin histogram follow
// the reference architecture; the gradient width and the octave bin edges
// are this design's choices.
package canny_pkg;
  localparam int PIX_W = 8;
  localparam int G_W   = 11;
  localparam int MAG_W = 8;
  localparam int NBINS = 8;

  typedef logic [PIX_W-1:0]        pix_t;
  typedef logic signed [G_W-1:0]   grad_t;
  typedef logic [MAG_W-1:0]        mag_t;

  // Bin index of a non-zero magnitude: position of its leading one.
  function automatic logic [2:0] mag_bin(input mag_t m);
    logic [2:0] b;
    b = '0;
    for (int i = 0; i < MAG_W; i++)
      if (m[i]) b = 3'(i);
    return b;
  endfunction
endpackage
