// grad_magnitude: gradient magnitude |G| = sqrt(Gx^2 + Gy^2) as an 8-bit value.
//
// Gx^2 + Gy^2 (at most 2*1020^2, 21 bits) goes through an exact integer square
// root computed digit by digit (one result bit per step, 11 steps, all
// combinational). The 3x3 Sobel kernels have a gain of 4, so the root is
// divided by 4 with rounding and saturated at 255 to give the 8-bit magnitude
// that the later stages use. The formula follows the document; the square-root
// method, the scaling and the saturation are this design's choices.
module grad_magnitude (
  input  canny_pkg::grad_t gx,
  input  canny_pkg::grad_t gy,
  output canny_pkg::mag_t  mag
);
  import canny_pkg::*;

  localparam int SW = 2 * G_W;   // width of the sum of squares

  function automatic logic [G_W-1:0] isqrt(input logic [SW-1:0] v);
    logic [SW-1:0] x, r, b;
    x = v;
    r = '0;
    b = SW'(1) << (SW - 2);
    for (int i = 0; i < G_W; i++) begin
      if (x >= r + b) begin
        x = x - (r + b);
        r = (r >> 1) + b;
      end else begin
        r = r >> 1;
      end
      b = b >> 2;
    end
    return G_W'(r);
  endfunction

  logic signed [SW-1:0] gxe, gye;
  logic [SW-1:0]  sq;
  logic [G_W-1:0] root;
  logic [G_W-2:0] scaled;

  always_comb begin
    gxe    = SW'(gx);
    gye    = SW'(gy);
    sq     = unsigned'(gxe * gxe) + unsigned'(gye * gye);
    root   = isqrt(sq);
    scaled = (G_W-1)'((G_W'(root) + G_W'(2)) >> 2);
    mag    = (scaled > (G_W-1)'(255)) ? 8'd255 : MAG_W'(scaled);
  end
endmodule
