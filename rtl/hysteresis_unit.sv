// hysteresis_unit: thresholding with hysteresis of the NMS output.
//
// Each incoming pixel f is classified against its block's thresholds into a
// strong-edge bit (f1: f >= ThH) and a weak-edge bit (f2: f >= ThL); zero
// pixels are neither. Only these two bits per pixel enter the two line FIFOs
// of a 3x3 window (out-of-image neighbours count as no edge). A pixel is an
// edge if it is strong, or if it is weak and at least one of its eight
// neighbours is strong. This is a single pipelined pass: weak pixels are
// joined through direct neighbours only, not along longer weak chains.
// Strong/weak images from two thresholds in a pipelined unit follow the
// document; the one-neighbour connection rule is this design's choice.
//
// Interface: valid/ready stream of {f, ThH, ThL} in, valid/ready stream of
// 1-bit edges out. Latency IMG_W+1 accepted samples plus one cycle.
module hysteresis_unit #(
  parameter int IMG_W = 256,
  parameter int IMG_H = 256,
  parameter int THR_W = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  output logic             in_ready,
  input  canny_pkg::mag_t  in_mag,
  input  logic [THR_W-1:0] thr_high,
  input  logic [THR_W-1:0] thr_low,
  output logic             out_valid,
  input  logic             out_ready,
  output logic             out_edge
);
  import canny_pkg::*;

  typedef struct packed {
    logic is_strong;
    logic is_weak;
  } cls_t;

  cls_t                 cls;
  logic                 w_valid, w_ready;
  logic [2:0][2:0][1:0] win;
  logic                 nbr_strong, edge_c;
  cls_t                 centre;

  always_comb begin
    cls.is_strong = (in_mag != '0) && (THR_W'(in_mag) >= thr_high);
    cls.is_weak   = (in_mag != '0) && (THR_W'(in_mag) >= thr_low);
  end

  window3x3 #(.IMG_W(IMG_W), .IMG_H(IMG_H), .WIDTH(2), .REPLICATE(1'b0)) u_win (
    .clk, .rst, .in_valid, .in_ready, .in_data(cls),
    .out_valid(w_valid), .out_ready(w_ready), .win);

  always_comb begin
    nbr_strong = 1'b0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        if (!(i == 1 && j == 1)) nbr_strong |= win[i][j][1];
    centre = cls_t'(win[1][1]);
    edge_c = centre.is_strong || (centre.is_weak && nbr_strong);
  end

  pipe_reg #(.WIDTH(1)) u_out (
    .clk, .rst, .in_valid(w_valid), .in_ready(w_ready), .in_data(edge_c),
    .out_valid, .out_ready, .out_data(out_edge));
endmodule
