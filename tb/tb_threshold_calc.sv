// tb_threshold_calc: feeds blocks of 64 magnitudes with different
// distributions (mixed, all zero, all saturated, narrow) into threshold_calc,
// partly back to back so that a block's scan overlaps the next block's
// pixels, and checks each block's ThH/ThL against the reference histogram
// rule and that thr_valid pulses exactly 9 cycles after the block's last pixel.
module tb_threshold_calc;
  import canny_ref_pkg::*;
  localparam int NPIX = 64, NB = 6, P1 = 205;

  logic clk = 0, rst = 1, en = 0, thr_valid;
  logic [7:0] data_in = '0;
  logic [9:0] high_threshold, low_threshold;
  int checks = 0, failures = 0;
  int eh[$], el[$], tlast[$];
  int cyc = 0, nthr = 0, sent = 0;

  threshold_calc #(.NPIX(NPIX), .P1_Q8(P1), .THR_W(10)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (en) begin
      sent++;
      if (sent % NPIX == 0) tlast.push_back(cyc);
    end
    if (!rst && thr_valid) begin
      int h, l, t;
      h = eh.pop_front();
      l = el.pop_front();
      t = tlast.pop_front();
      checks += 2;
      if (int'(high_threshold) != h || int'(low_threshold) != l) begin
        failures++;
        $display("block %0d: got %0d/%0d exp %0d/%0d", nthr, high_threshold, low_threshold, h, l);
      end
      if (cyc - t != 9) begin
        failures++;
        $display("block %0d: thresholds %0d cycles after last pixel", nthr, cyc - t);
      end
      nthr++;
    end
  end

  initial begin
    img_t v;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int b = 0; b < NB; b++) begin
      int h, l;
      v = new[NPIX];
      foreach (v[i]) begin
        case (b)
          0: v[i] = ($urandom % 3 == 0) ? 0 : int'($urandom % 256);
          1: v[i] = 0;
          2: v[i] = 255;
          3: v[i] = 5 + int'($urandom % 3);
          4: v[i] = ($urandom % 2 == 0) ? 1 : int'($urandom % 40);
          default: v[i] = int'($urandom % 256) >> ($urandom % 8);
        endcase
      end
      thr_ref(v, P1, h, l);
      eh.push_back(h);
      el.push_back(l);
      foreach (v[i]) begin
        @(negedge clk);
        en = (b % 2 == 0) || ($urandom % 3 != 0);
        data_in = 8'(v[i]);
        while (!en) begin
          @(negedge clk);
          en = ($urandom % 3 != 0);
        end
      end
      @(negedge clk);
      en = 0;
      if (b == 2) repeat (20) @(negedge clk);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (nthr != NB) begin
      failures++;
      $display("%0d threshold pulses, expected %0d", nthr, NB);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
