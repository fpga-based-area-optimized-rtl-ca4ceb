// nms_selector: picks the neighbours of the window centre that lie along the
// gradient direction, for interpolated non-maximum suppression.
//
// The gradient (Gx, Gy) points into one of eight octants. Let sx, sy be the
// signs of Gx and Gy (zero counts as positive). When |Gx| >= |Gy| the
// gradient is mostly horizontal: side 1 uses the axial neighbour (0, sx) and
// the diagonal (sy, sx), side 2 the mirrored pair (0, -sx) and (-sy, -sx), and
// the interpolation weight is |Gy|/|Gx|. Otherwise it is mostly vertical:
// side 1 uses (sy, 0) and (sy, sx), side 2 (-sy, 0) and (-sy, -sx), and the
// weight is |Gx|/|Gy|. Offsets are (row, column), rows growing downward.
// The selector steered by Gx and Gy is the document's; the octant rule is
// this design's reading of it. Purely combinational.
module nms_selector (
  input  logic [2:0][2:0][canny_pkg::MAG_W-1:0] win,
  input  canny_pkg::grad_t                      gx,
  input  canny_pkg::grad_t                      gy,
  output canny_pkg::mag_t                       m_a1,
  output canny_pkg::mag_t                       m_b1,
  output canny_pkg::mag_t                       m_a2,
  output canny_pkg::mag_t                       m_b2,
  output logic [canny_pkg::G_W-1:0]             num,
  output logic [canny_pkg::G_W-1:0]             den
);
  import canny_pkg::*;

  logic [G_W-1:0] ax, ay;
  logic [1:0]     rp, rn, cp, cn;   // window indices for +s and -s offsets

  always_comb begin
    ax = gx[G_W-1] ? G_W'(-gx) : G_W'(gx);
    ay = gy[G_W-1] ? G_W'(-gy) : G_W'(gy);
    // column index for offset +sx / -sx, row index for +sy / -sy
    cp = gx[G_W-1] ? 2'd0 : 2'd2;
    cn = gx[G_W-1] ? 2'd2 : 2'd0;
    rp = gy[G_W-1] ? 2'd0 : 2'd2;
    rn = gy[G_W-1] ? 2'd2 : 2'd0;
    if (ax >= ay) begin
      m_a1 = win[1][cp];
      m_b1 = win[rp][cp];
      m_a2 = win[1][cn];
      m_b2 = win[rn][cn];
      num  = ay;
      den  = ax;
    end else begin
      m_a1 = win[rp][1];
      m_b1 = win[rp][cp];
      m_a2 = win[rn][1];
      m_b2 = win[rn][cn];
      num  = ax;
      den  = ay;
    end
  end
endmodule
