// nms_arith: the arithmetic unit of directional non-maximum suppression.
//
// One divider, two multipliers and one adder, as the document lists them. The
// divider forms the interpolation weight w = num/den as a FRAC-bit fraction
// (0 <= w <= 1, since num <= den; den = 0 gives w = 0, truncated otherwise).
// The multipliers scale the axial neighbour by (1-w) and the diagonal one by
// w, and the adder sums them:
//   interp = m_a * (2^FRAC - w) + m_b * w
// which is the magnitude along the gradient with FRAC fraction bits.
// Purely combinational; the fixed-point format is this design's choice.
module nms_arith #(
  parameter int FRAC = 8
) (
  input  canny_pkg::mag_t                       m_a,
  input  canny_pkg::mag_t                       m_b,
  input  logic [canny_pkg::G_W-1:0]             num,
  input  logic [canny_pkg::G_W-1:0]             den,
  output logic [canny_pkg::MAG_W+FRAC-1:0]      interp
);
  import canny_pkg::*;

  localparam int QW = G_W + FRAC;          // dividend width
  localparam int PW = MAG_W + FRAC + 1;    // product width

  logic [QW-1:0] quot;
  logic [FRAC:0] w, wc;
  logic [PW-1:0] p_a, p_b, sum;

  always_comb begin
    quot   = (den == '0) ? '0 : (QW'(num) << FRAC) / QW'(den);
    w      = (FRAC+1)'(quot);
    wc     = (FRAC+1)'(1 << FRAC) - w;
    p_a    = PW'(m_a) * PW'(wc);
    p_b    = PW'(m_b) * PW'(w);
    sum    = p_a + p_b;
    interp = (MAG_W+FRAC)'(sum);
  end
endmodule
