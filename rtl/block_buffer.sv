// block_buffer: holds a block of NMS output until its thresholds are known.
//
// The thresholds of a block come from the histogram of the whole block, so
// the block's pixels have to wait for them before hysteresis thresholding.
// Two banks of NPIX words alternate: while one block is replayed from one
// bank, the next is written into the other. A bank is "full" once its last
// pixel is written and "armed" once thr_valid has delivered its thresholds
// (thresholds arrive in block order). An armed, full bank is read out in
// raster order with its ThH and ThL attached to every pixel, then freed.
// Writing stalls (in_ready low) only when the bank to be written is still
// waiting or being read. The buffer itself is this design's addition.
//
// Interface: valid/ready stream in, valid/ready stream out; the RAM read is
// synchronous and the output is a single register, so a bank streams out at
// one pixel per clock.
module block_buffer #(
  parameter int NPIX  = 65536,
  parameter int THR_W = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  output logic             in_ready,
  input  canny_pkg::mag_t  in_mag,
  input  logic             thr_valid,
  input  logic [THR_W-1:0] thr_high,
  input  logic [THR_W-1:0] thr_low,
  output logic             out_valid,
  input  logic             out_ready,
  output canny_pkg::mag_t  out_mag,
  output logic [THR_W-1:0] out_thr_high,
  output logic [THR_W-1:0] out_thr_low
);
  import canny_pkg::*;

  localparam int AW = $clog2(NPIX);

  mag_t             mem [2 * NPIX];
  logic [1:0]       full, armed;
  logic             wb, rb, tb;          // write, read and threshold bank
  logic [AW-1:0]    wa, ra;
  logic [THR_W-1:0] th_h [2];
  logic [THR_W-1:0] th_l [2];
  logic             en, rd, wr;
  logic [AW:0]      waddr, raddr;        // bank b occupies words b*NPIX ..

  assign waddr = wb ? (AW+1)'(NPIX) + (AW+1)'(wa) : (AW+1)'(wa);
  assign raddr = rb ? (AW+1)'(NPIX) + (AW+1)'(ra) : (AW+1)'(ra);

  assign in_ready = !full[wb];
  assign wr       = in_valid && in_ready;
  assign en       = !out_valid || out_ready;
  assign rd       = en && full[rb] && armed[rb];

  always_ff @(posedge clk) begin
    if (wr) mem[waddr] <= in_mag;
  end

  always_ff @(posedge clk) begin
    if (rd) begin
      out_mag      <= mem[raddr];
      out_thr_high <= th_h[rb];
      out_thr_low  <= th_l[rb];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      full      <= '0;
      armed     <= '0;
      wb        <= 1'b0;
      rb        <= 1'b0;
      tb        <= 1'b0;
      wa        <= '0;
      ra        <= '0;
      out_valid <= 1'b0;
    end else begin
      if (wr) begin
        if (wa == AW'(NPIX - 1)) begin
          wa       <= '0;
          full[wb] <= 1'b1;
          wb       <= !wb;
        end else begin
          wa <= wa + 1'b1;
        end
      end
      if (thr_valid) begin
        th_h[tb]  <= thr_high;
        th_l[tb]  <= thr_low;
        armed[tb] <= 1'b1;
        tb        <= !tb;
      end
      if (en) out_valid <= rd;
      if (rd) begin
        if (ra == AW'(NPIX - 1)) begin
          ra        <= '0;
          full[rb]  <= 1'b0;
          armed[rb] <= 1'b0;
          rb        <= !rb;
        end else begin
          ra <= ra + 1'b1;
        end
      end
    end
  end

  // thresholds may only arrive for a bank that does not hold unread ones
  always_ff @(posedge clk) begin
    if (!rst && thr_valid)
      assert (!armed[tb]) else $error("block_buffer: thresholds overrun");
  end
endmodule
