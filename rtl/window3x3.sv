// window3x3: 3x3 neighbourhood generator for a raster-order pixel stream.
//
// Two line_fifo instances hold the two previous rows; three 3-word shift
// registers hold the newest three columns of the three rows. After each
// accepted sample the window is centred IMG_W+1 samples back in the stream.
// win[i][j] is the sample at (row+i-1, col+j-1) of the centre (row, col);
// win[1][1] is the centre.
//
// Out-of-image neighbours are replaced: with REPLICATE=1 by the nearest
// in-image sample of the window (rows first, then columns), with REPLICATE=0
// by zero. The document does not say how borders are handled; this is the
// design's choice.
//
// Handshake: in_valid/in_ready on the input, out_valid/out_ready on the
// window. The window register advances when it is empty or taken. After the
// last pixel of a block (IMG_W*IMG_H samples) the generator drains itself for
// IMG_W+1 steps with zero samples, in_ready low, so that every block yields
// exactly IMG_W*IMG_H windows and the next block starts clean. Latency is
// IMG_W+1 accepted samples plus one cycle.
module window3x3 #(
  parameter int IMG_W     = 256,
  parameter int IMG_H     = 256,
  parameter int WIDTH     = 8,
  parameter bit REPLICATE = 1'b0
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [WIDTH-1:0]            in_data,
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [2:0][2:0][WIDTH-1:0]  win
);
  localparam int NPIX = IMG_W * IMG_H;
  localparam int KW   = $clog2(NPIX + IMG_W + 1);
  localparam int RW   = (IMG_H > 1) ? $clog2(IMG_H) : 1;
  localparam int CW   = (IMG_W > 1) ? $clog2(IMG_W) : 1;

  logic [2:0][2:0][WIDTH-1:0] w;
  logic [KW-1:0] k;
  logic          drain;
  logic [RW-1:0] nxt_r, cr;
  logic [CW-1:0] nxt_c, cc;
  logic          en, step;
  logic [WIDTH-1:0] sample, l1, l2;

  assign en       = !out_valid || out_ready;
  assign step     = en && (drain || in_valid);
  assign in_ready = en && !drain;
  assign sample   = drain ? '0 : in_data;

  line_fifo #(.WIDTH(WIDTH), .DEPTH(IMG_W)) u_lb1 (
    .clk, .rst, .en(step), .din(sample), .dout(l1));
  line_fifo #(.WIDTH(WIDTH), .DEPTH(IMG_W)) u_lb2 (
    .clk, .rst, .en(step), .din(l1), .dout(l2));

  // window shift registers
  always_ff @(posedge clk) begin
    if (step) begin
      for (int i = 0; i < 3; i++) begin
        w[i][0] <= w[i][1];
        w[i][1] <= w[i][2];
      end
      w[2][2] <= sample;
      w[1][2] <= l1;
      w[0][2] <= l2;
    end
  end

  // block position and drain control
  always_ff @(posedge clk) begin
    if (rst) begin
      k         <= '0;
      drain     <= 1'b0;
      out_valid <= 1'b0;
      nxt_r     <= '0;
      nxt_c     <= '0;
      cr        <= '0;
      cc        <= '0;
    end else if (step) begin
      if (k == KW'(NPIX + IMG_W)) begin
        k     <= '0;
        drain <= 1'b0;
      end else begin
        k <= k + 1'b1;
        if (k == KW'(NPIX - 1)) drain <= 1'b1;
      end
      out_valid <= (k >= KW'(IMG_W + 1));
      if (k >= KW'(IMG_W + 1)) begin
        cr <= nxt_r;
        cc <= nxt_c;
        if (nxt_c == CW'(IMG_W - 1)) begin
          nxt_c <= '0;
          nxt_r <= (nxt_r == RW'(IMG_H - 1)) ? '0 : nxt_r + 1'b1;
        end else begin
          nxt_c <= nxt_c + 1'b1;
        end
      end
    end else if (en) begin
      out_valid <= 1'b0;
    end
  end

  // border substitution
  always_comb begin
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 3; j++) begin
        logic row_out, col_out;
        int   ri, cj;
        row_out = (i == 0 && cr == '0) || (i == 2 && cr == RW'(IMG_H - 1));
        col_out = (j == 0 && cc == '0) || (j == 2 && cc == CW'(IMG_W - 1));
        ri = row_out ? 1 : i;
        cj = col_out ? 1 : j;
        if (REPLICATE)                win[i][j] = w[ri][cj];
        else if (row_out || col_out)  win[i][j] = '0;
        else                          win[i][j] = w[i][j];
      end
    end
  end
endmodule
