// window_kxk: KxK neighbourhood generator (K odd) for a raster-order stream.
//
// The same scheme as window3x3, widened: K-1 chained line_fifo instances
// hold the K-1 previous rows and a KxK register array holds the newest K
// columns of the K rows. With R = (K-1)/2 the window is centred
// R*IMG_W+R samples back in the stream; win[i][j] is the sample at
// (row+i-R, col+j-R) of the centre (row, col), and win[R][R] is the centre.
//
// Out-of-image neighbours are replaced: with REPLICATE=1 by the nearest
// in-image sample (row and column clamped to the image separately), with
// REPLICATE=0 by zero. Border handling is this design's choice.
//
// Handshake: in_valid/in_ready on the input, out_valid/out_ready on the
// window. After the last pixel of a block (IMG_W*IMG_H samples) the generator
// drains itself for R*IMG_W+R steps with zero samples and in_ready low, so
// each block yields exactly IMG_W*IMG_H windows. Latency is R*IMG_W+R
// accepted samples plus one cycle. For K=3 this behaves exactly as
// window3x3. It serves the larger gradient kernels.
module window_kxk #(
  parameter int IMG_W     = 256,
  parameter int IMG_H     = 256,
  parameter int WIDTH     = 8,
  parameter int K         = 3,
  parameter bit REPLICATE = 1'b1
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            in_valid,
  output logic                            in_ready,
  input  logic [WIDTH-1:0]                in_data,
  output logic                            out_valid,
  input  logic                            out_ready,
  output logic [K-1:0][K-1:0][WIDTH-1:0]  win
);
  localparam int R    = (K - 1) / 2;
  localparam int NPIX = IMG_W * IMG_H;
  localparam int D    = R * IMG_W + R;
  localparam int KW   = $clog2(NPIX + D + 1);
  localparam int RW   = (IMG_H > 1) ? $clog2(IMG_H) : 1;
  localparam int CW   = (IMG_W > 1) ? $clog2(IMG_W) : 1;

  initial assert (K >= 3 && K % 2 == 1) else $error("window_kxk: K must be odd and at least 3");

  logic [K-1:0][K-1:0][WIDTH-1:0] w;
  logic [K-1:0][WIDTH-1:0]        lines;   // lines[0] = newest sample, lines[n] = n rows back
  logic [KW-1:0] k;
  logic          drain;
  logic [RW-1:0] nxt_r, cr;
  logic [CW-1:0] nxt_c, cc;
  logic          en, step;

  assign en       = !out_valid || out_ready;
  assign step     = en && (drain || in_valid);
  assign in_ready = en && !drain;
  assign lines[0] = drain ? '0 : in_data;

  for (genvar n = 1; n < K; n++) begin : g_lb
    line_fifo #(.WIDTH(WIDTH), .DEPTH(IMG_W)) u_lb (
      .clk, .rst, .en(step), .din(lines[n-1]), .dout(lines[n]));
  end

  // window shift registers: row i of the window is K-1-i rows back
  always_ff @(posedge clk) begin
    if (step) begin
      for (int i = 0; i < K; i++) begin
        for (int j = 0; j < K - 1; j++) w[i][j] <= w[i][j+1];
        w[i][K-1] <= lines[K-1-i];
      end
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
      if (k == KW'(NPIX + D - 1)) begin
        k     <= '0;
        drain <= 1'b0;
      end else begin
        k <= k + 1'b1;
        if (k == KW'(NPIX - 1)) drain <= 1'b1;
      end
      out_valid <= (k >= KW'(D));
      if (k >= KW'(D)) begin
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
    for (int i = 0; i < K; i++) begin
      for (int j = 0; j < K; j++) begin
        int r, c, rc, ccl;
        r   = int'(cr) + i - R;
        c   = int'(cc) + j - R;
        rc  = (r < 0) ? 0 : (r > IMG_H - 1) ? IMG_H - 1 : r;
        ccl = (c < 0) ? 0 : (c > IMG_W - 1) ? IMG_W - 1 : c;
        if (REPLICATE)                  win[i][j] = w[rc - int'(cr) + R][ccl - int'(cc) + R];
        else if (rc != r || ccl != c)   win[i][j] = '0;
        else                            win[i][j] = w[i][j];
      end
    end
  end
endmodule
