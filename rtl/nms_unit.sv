// nms_unit: directional non-maximum suppression with interpolation.
//
// Two line FIFOs (inside window3x3) give the 3x3 neighbourhood of gradient
// magnitudes; Gx and Gy travel in the same FIFOs so that the centre's
// gradient is at hand with its window. nms_selector picks, on each side of the
// centre, the axial and the diagonal neighbour that bracket the gradient
// direction; two nms_arith units (one per side) interpolate the magnitude
// where the gradient line crosses the ring of neighbours. The centre keeps its
// magnitude if it is at least as large as both interpolated values, otherwise
// it becomes 0. Out-of-image neighbours count as 0.
// Structure (FIFOs, selector, divider/multiplier/adder unit, comparison)
// follows the document; the tie rule, the border rule and the use of one
// arithmetic unit per side are this design's choices.
//
// Interface: valid/ready stream of {Gx, Gy, |G|} in, valid/ready stream of the
// suppressed magnitude out. Latency IMG_W+1 accepted samples plus one cycle.
module nms_unit #(
  parameter int IMG_W = 256,
  parameter int IMG_H = 256
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  canny_pkg::grad_t       in_gx,
  input  canny_pkg::grad_t       in_gy,
  input  canny_pkg::mag_t        in_mag,
  output logic                   out_valid,
  input  logic                   out_ready,
  output canny_pkg::mag_t        out_mag
);
  import canny_pkg::*;

  localparam int FRAC = 8;
  localparam int DW   = 2 * G_W + MAG_W;

  logic                       w_valid, w_ready;
  logic [2:0][2:0][DW-1:0]    win;
  logic [2:0][2:0][MAG_W-1:0] mwin;
  grad_t                      cgx, cgy;
  mag_t                       m_a1, m_b1, m_a2, m_b2, result;
  logic [G_W-1:0]             num, den;
  logic [MAG_W+FRAC-1:0]      i1, i2, centre;

  window3x3 #(.IMG_W(IMG_W), .IMG_H(IMG_H), .WIDTH(DW), .REPLICATE(1'b0)) u_win (
    .clk, .rst, .in_valid, .in_ready, .in_data({in_gx, in_gy, in_mag}),
    .out_valid(w_valid), .out_ready(w_ready), .win);

  always_comb begin
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        mwin[i][j] = win[i][j][MAG_W-1:0];
    cgx = win[1][1][DW-1 -: G_W];
    cgy = win[1][1][MAG_W +: G_W];
  end

  nms_selector u_sel (
    .win(mwin), .gx(cgx), .gy(cgy),
    .m_a1, .m_b1, .m_a2, .m_b2, .num, .den);

  nms_arith #(.FRAC(FRAC)) u_side1 (.m_a(m_a1), .m_b(m_b1), .num, .den, .interp(i1));
  nms_arith #(.FRAC(FRAC)) u_side2 (.m_a(m_a2), .m_b(m_b2), .num, .den, .interp(i2));

  always_comb begin
    centre = {mwin[1][1], FRAC'(0)};
    result = (centre >= i1 && centre >= i2) ? mwin[1][1] : '0;
  end

  pipe_reg #(.WIDTH(MAG_W)) u_out (
    .clk, .rst, .in_valid(w_valid), .in_ready(w_ready), .in_data(result),
    .out_valid, .out_ready, .out_data(out_mag));
endmodule
