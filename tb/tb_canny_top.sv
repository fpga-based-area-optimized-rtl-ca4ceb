// tb_canny_top: end-to-end test of canny_top on small frames.
//
// Two instances run side by side, one with the default 3x3 gradient kernel
// and one with GRAD_K = 7, each fed its own copy of the same five frames
// (shapes, shapes, noise, flat, shapes). The reference chain (smoothing,
// gradients of the matching kernel size, NMS, histogram thresholds,
// hysteresis) gives the expected thresholds and edge map of each frame.
// Frames 0-2 run at full rate. Frame 0 must enter in IMG_W*IMG_H + IMG_W + 1
// cycles (one pixel per clock plus the drain of the smoothing window, as the
// later stages are still empty); from then on the widest window sets the
// pace and frame 1 must take IMG_W*IMG_H + R*IMG_W + R cycles, with
// R = max(1, (GRAD_K-1)/2). Frames 3-4 use random
// input gaps and output back-pressure.
// Each mechanism is counted per instance and must happen: input stalls,
// output back-pressure, window drains, both buffer banks used, NMS
// suppression of a non-zero magnitude, weak pixels promoted and rejected by
// hysteresis, and more than one distinct ThH.
module tb_canny_top;
  import canny_ref_pkg::*;
  localparam int W = 16, H = 12, NPIX = W * H, NF = 5, P1 = 205, NCFG = 2;
  localparam int KINDS[NF] = '{1, 1, 0, 2, 1};

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  int cyc = 0, ndone = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int GK = (g == 0) ? 3 : 7;
    localparam int R  = (GK > 3) ? (GK - 1) / 2 : 1;

    logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_edge, thr_valid;
    logic [7:0] in_pixel = '0;
    logic [9:0] thr_high, thr_low;
    int inq[$], expq[$], eh[$], el[$];
    int nin = 0, nout = 0, nthr = 0;
    int frame_start[NF + 1];
    int n_stall = 0, n_bp = 0, n_drain = 0, n_bank1 = 0, n_supp = 0, n_prom = 0, n_rej = 0, n_edges = 0;
    int thh_seen[$];

    canny_top #(.IMG_W(W), .IMG_H(H), .P1_Q8(P1), .THR_W(10), .GRAD_K(GK)) dut (
      .clk, .rst, .in_valid, .in_ready, .in_pixel, .out_valid, .out_ready, .out_edge,
      .thr_valid, .thr_high, .thr_low);

    always @(posedge clk) begin
      if (!rst) begin
        if (in_valid && !in_ready) n_stall++;
        if (out_valid && !out_ready) n_bp++;
        if (dut.u_smooth.u_win.drain) n_drain++;
        if (dut.u_buf.rb && dut.u_buf.out_valid) n_bank1++;
      end
      if (in_valid && in_ready) begin
        if (nin % NPIX == 0) frame_start[nin / NPIX] = cyc;
        nin++;
        void'(inq.pop_front());
      end
      if (!rst && thr_valid) begin
        int h, l;
        h = eh.pop_front();
        l = el.pop_front();
        checks++;
        if (int'(thr_high) != h || int'(thr_low) != l) begin
          failures++;
          $display("K=%0d frame %0d thresholds: got %0d/%0d exp %0d/%0d", GK, nthr, thr_high, thr_low, h, l);
        end
        if (!(int'(thr_high) inside {thh_seen})) thh_seen.push_back(int'(thr_high));
        nthr++;
      end
      if (!rst && out_valid && out_ready) begin
        int e;
        e = expq.pop_front();
        checks++;
        if (int'(out_edge) != e) begin
          failures++;
          if (failures < 20) $display("K=%0d pixel %0d (frame %0d): got %0d exp %0d", GK, nout, nout / NPIX, out_edge, e);
        end
        n_edges += int'(out_edge);
        nout++;
      end
    end

    always @(negedge clk) begin
      if (!rst) begin
        bit rnd;
        rnd = nin >= 3 * NPIX;
        in_valid  = inq.size() > 0 && (!rnd || ($urandom % 4) != 0);
        in_pixel  = (inq.size() > 0) ? 8'(inq[0]) : '0;
        out_ready = nout < 3 * NPIX || ($urandom % 3) != 0;
      end
    end

    initial begin
      img_t img, sm, gx, gy, mg, nm, e;
      for (int f = 0; f < NF; f++) begin
        int h, l, np;
        gen_image(W, H, KINDS[f], img);
        gauss_ref(img, W, H, sm);
        if (GK == 3) sobel_ref(sm, W, H, gx, gy, mg);
        else         sobel_k_ref(sm, W, H, GK, gx, gy, mg);
        nms_ref(mg, gx, gy, W, H, nm);
        thr_ref(nm, P1, h, l);
        hyst_ref(nm, W, H, h, l, e, np);
        eh.push_back(h);
        el.push_back(l);
        n_prom += np;
        foreach (img[i]) begin
          inq.push_back(img[i]);
          expq.push_back(e[i]);
          if (mg[i] != 0 && nm[i] == 0) n_supp++;
          if (nm[i] != 0 && nm[i] >= l && nm[i] < h && e[i] == 0) n_rej++;
        end
        $display("K=%0d frame %0d: ThH %0d ThL %0d", GK, f, h, l);
      end
      wait (!rst);
      wait (nout == NF * NPIX);
      repeat (50) @(posedge clk);
      for (int f = 1; f < 3; f++) begin
        int per;
        per = (f == 1) ? NPIX + W + 1 : NPIX + R * W + R;
        checks++;
        if (frame_start[f] - frame_start[f - 1] != per) begin
          failures++;
          $display("K=%0d frame %0d took %0d input cycles, expected %0d", GK, f - 1,
                   frame_start[f] - frame_start[f - 1], per);
        end
      end
      $display("K=%0d stalls %0d backpressure %0d drain %0d bank1 %0d suppressed %0d promoted %0d rejected %0d edges %0d distinct ThH %0d",
               GK, n_stall, n_bp, n_drain, n_bank1, n_supp, n_prom, n_rej, n_edges, thh_seen.size());
      checks += 10;
      if (n_stall == 0) begin failures++; $display("K=%0d: no input stall", GK); end
      if (n_bp == 0) begin failures++; $display("K=%0d: no output back-pressure", GK); end
      if (n_drain == 0) begin failures++; $display("K=%0d: no drain", GK); end
      if (n_bank1 == 0) begin failures++; $display("K=%0d: bank 1 never read", GK); end
      if (n_supp == 0) begin failures++; $display("K=%0d: no suppression", GK); end
      if (n_prom == 0) begin failures++; $display("K=%0d: no weak pixel promoted", GK); end
      if (n_rej == 0) begin failures++; $display("K=%0d: no weak pixel rejected", GK); end
      if (n_edges == 0) begin failures++; $display("K=%0d: no edges", GK); end
      if (thh_seen.size() < 2) begin failures++; $display("K=%0d: thresholds never changed", GK); end
      if (nthr != NF || out_valid) begin failures++; $display("K=%0d: %0d threshold pulses", GK, nthr); end
      ndone++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (ndone == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
