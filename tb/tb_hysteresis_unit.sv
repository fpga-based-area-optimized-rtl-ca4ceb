// tb_hysteresis_unit: streams four frames of NMS-like magnitudes, each with
// its own thresholds, through hysteresis_unit and compares every edge bit with
// the reference (strong, or weak with a strong 8-neighbour). Counts strong,
// weak-promoted and weak-rejected pixels; each must occur.
module tb_hysteresis_unit;
  import canny_ref_pkg::*;
  localparam int W = 12, H = 10, NPIX = W * H, NF = 4;

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_edge;
  logic [7:0] in_mag = '0;
  logic [9:0] thr_high = '0, thr_low = '0;
  int checks = 0, failures = 0;
  int qm[$], qh[$], ql[$], expq[$];
  int nout = 0, n_promoted = 0, n_strong = 0, n_rejected = 0;

  hysteresis_unit #(.IMG_W(W), .IMG_H(H), .THR_W(10)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (in_valid && in_ready) begin
      void'(qm.pop_front());
      void'(qh.pop_front());
      void'(ql.pop_front());
    end
    if (!rst && out_valid && out_ready) begin
      int e;
      e = expq.pop_front();
      checks++;
      if (int'(out_edge) != e) begin
        failures++;
        $display("pixel %0d: got %0d exp %0d", nout, out_edge, e);
      end
      nout++;
    end
  end

  always @(negedge clk) begin
    if (!rst) begin
      in_valid  = qm.size() > 0 && ($urandom % 4) != 0;
      in_mag    = (qm.size() > 0) ? 8'(qm[0]) : '0;
      thr_high  = (qm.size() > 0) ? 10'(qh[0]) : '0;
      thr_low   = (qm.size() > 0) ? 10'(ql[0]) : '0;
      out_ready = ($urandom % 4) != 0;
    end
  end

  initial begin
    img_t v, e;
    int ths[NF] = '{64, 128, 32, 16};
    for (int f = 0; f < NF; f++) begin
      int thh, thl, np;
      thh = ths[f];
      thl = (thh * 102 + 128) / 256;
      v = new[NPIX];
      foreach (v[i]) begin
        int k;
        k = $urandom % 4;
        v[i] = (k == 0) ? 0 : (k == 1) ? thh + int'($urandom % 20) - 2 : int'($urandom % thh);
        if (v[i] > 255) v[i] = 255;
      end
      hyst_ref(v, W, H, thh, thl, e, np);
      n_promoted += np;
      foreach (v[i]) begin
        qm.push_back(v[i]);
        qh.push_back(thh);
        ql.push_back(thl);
        expq.push_back(e[i]);
        if (v[i] >= thh) n_strong++;
        else if (v[i] >= thl && e[i] == 0) n_rejected++;
      end
    end
    repeat (3) @(posedge clk);
    rst = 0;
    wait (nout == NF * NPIX);
    repeat (5) @(posedge clk);
    $display("strong %0d promoted %0d rejected %0d", n_strong, n_promoted, n_rejected);
    checks++;
    if (n_strong == 0 || n_promoted == 0 || n_rejected == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
