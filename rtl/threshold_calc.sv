// threshold_calc: block-based hysteresis thresholds from an 8-bin non-uniform
// histogram of the non-maximum-suppressed gradient magnitudes.
//
// Every accepted pixel (en high) counts towards the block of NPIX pixels. A
// non-zero magnitude m increments bin floor(log2(m)); the bins are octaves,
// [1,2) [2,4) ... [128,256), narrow where most surviving magnitudes lie.
// Suppressed (zero) pixels are not binned. When the last pixel of a block has
// been counted the histogram is copied to a snapshot and cleared for the next
// block, and a scan walks the snapshot one bin per clock, accumulating the
// cumulative count. ThH is the lower edge 2^k of the first bin k at which the
// cumulative count reaches the fraction P1 (P1_Q8/256, 0.8 by default) of all
// binned pixels, i.e. of the bin that holds the P1 quantile of the edge
// candidates, so the quantile pixel itself and all above it are strong.
// ThL = round(0.4 * ThH), at least 1. thr_valid pulses for one cycle with the
// thresholds 9 cycles after the last pixel; they stay on the outputs until the
// next block's. An 8-bin non-uniform histogram and block thresholds are the
// document's; the bin edges, P1, the 0.4 ratio and the exclusion of zeros are
// this design's choices.
module threshold_calc #(
  parameter int NPIX  = 65536,
  parameter int P1_Q8 = 205,
  parameter int THR_W = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  canny_pkg::mag_t  data_in,
  output logic             thr_valid,
  output logic [THR_W-1:0] high_threshold,
  output logic [THR_W-1:0] low_threshold
);
  import canny_pkg::*;

  localparam int CNTW = $clog2(NPIX + 1);
  localparam int PRW  = CNTW + 9;

  logic [CNTW-1:0] hist [NBINS];
  logic [CNTW-1:0] snap [NBINS];
  logic [CNTW-1:0] count;        // pixels of the current block so far
  logic [CNTW-1:0] total;        // binned pixels of the block being scanned
  logic [CNTW-1:0] cum;
  logic            scanning, found;
  logic [2:0]      idx;
  logic [THR_W-1:0] thh, thh_out;
  logic            last;
  logic [CNTW-1:0] cum_next;
  logic [THR_W+7:0] thl_prod;

  assign last     = en && (count == CNTW'(NPIX - 1));
  assign cum_next = cum + snap[idx];

  // live histogram and pixel count
  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      for (int b = 0; b < NBINS; b++) hist[b] <= '0;
    end else if (en) begin
      if (last) begin
        count <= '0;
        for (int b = 0; b < NBINS; b++) hist[b] <= '0;
      end else begin
        count <= count + 1'b1;
        if (data_in != '0) hist[mag_bin(data_in)] <= hist[mag_bin(data_in)] + 1'b1;
      end
    end
  end

  // snapshot and cumulative scan
  always_ff @(posedge clk) begin
    if (rst) begin
      scanning  <= 1'b0;
      found     <= 1'b0;
      idx       <= '0;
      cum       <= '0;
      total     <= '0;
      thh       <= THR_W'(1 << NBINS);
      thh_out   <= THR_W'(1 << NBINS);
      thr_valid <= 1'b0;
      for (int b = 0; b < NBINS; b++) snap[b] <= '0;
    end else begin
      thr_valid <= 1'b0;
      if (last) begin
        logic [CNTW-1:0] t;
        t = '0;
        for (int b = 0; b < NBINS; b++) begin
          snap[b] <= hist[b] + CNTW'(data_in != '0 && mag_bin(data_in) == 3'(b));
          t = t + hist[b];
        end
        total    <= t + CNTW'(data_in != '0);
        scanning <= 1'b1;
        found    <= 1'b0;
        idx      <= '0;
        cum      <= '0;
      end else if (scanning) begin
        cum <= cum_next;
        if (!found && (PRW'(cum_next) << 8) >= PRW'(total) * PRW'(P1_Q8)) begin
          found <= 1'b1;
          thh   <= THR_W'(1) << idx;
        end
        idx <= idx + 1'b1;
        if (idx == 3'(NBINS - 1)) begin
          // the last bin always reaches P1 when no earlier one did
          scanning  <= 1'b0;
          thr_valid <= 1'b1;
          thh_out   <= found ? thh : THR_W'(1) << idx;
        end
      end
    end
  end

  always_comb begin
    thl_prod       = (THR_W+8)'(thh_out) * (THR_W+8)'(102) + (THR_W+8)'(128);
    high_threshold = thh_out;
    low_threshold  = (thl_prod[THR_W+7:8] == '0) ? THR_W'(1) : thl_prod[THR_W+7:8];
  end

  // NPIX must exceed the scan length so that scans never overlap
  initial assert (NPIX > NBINS) else $error("threshold_calc: NPIX must exceed %0d", NBINS);
endmodule
