// tb_canny_full: canny_top at its default size (256 x 256 blocks), end to
// end. Two blocks (noise-free shapes, then noise) are streamed at full rate; every edge
// bit and both blocks' thresholds are compared with the reference chain, and
// the input must take exactly 256*256+257 cycles for the first block (one
// pixel per clock plus the first window's drain).
module tb_canny_full;
  import canny_ref_pkg::*;
  localparam int W = 256, H = 256, NPIX = W * H, NF = 2, P1 = 205;

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, out_edge, thr_valid;
  logic [7:0] in_pixel = '0;
  logic [9:0] thr_high, thr_low;
  int checks = 0, failures = 0;
  int inq[$], expq[$], eh[$], el[$];
  int cyc = 0, nin = 0, nout = 0, nthr = 0, n_edges = 0;
  int frame_start[NF + 1];

  canny_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
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
        $display("block %0d thresholds: got %0d/%0d exp %0d/%0d", nthr, thr_high, thr_low, h, l);
      end
      nthr++;
    end
    if (!rst && out_valid && out_ready) begin
      int e;
      e = expq.pop_front();
      checks++;
      if (int'(out_edge) != e) begin
        failures++;
        if (failures < 20) $display("pixel %0d: got %0d exp %0d", nout, out_edge, e);
      end
      n_edges += int'(out_edge);
      nout++;
    end
  end

  always @(negedge clk) begin
    if (!rst) begin
      in_valid = inq.size() > 0;
      in_pixel = (inq.size() > 0) ? 8'(inq[0]) : '0;
    end
  end

  initial begin
    img_t img, sm, gx, gy, mg, nm, e;
    for (int f = 0; f < NF; f++) begin
      int h, l, np;
      gen_image(W, H, f == 0 ? 3 : 0, img);
      gauss_ref(img, W, H, sm);
      sobel_ref(sm, W, H, gx, gy, mg);
      nms_ref(mg, gx, gy, W, H, nm);
      thr_ref(nm, P1, h, l);
      hyst_ref(nm, W, H, h, l, e, np);
      eh.push_back(h);
      el.push_back(l);
      foreach (img[i]) begin
        inq.push_back(img[i]);
        expq.push_back(e[i]);
      end
      $display("block %0d: ThH %0d ThL %0d, %0d weak pixels promoted", f, h, l, np);
    end
    repeat (3) @(posedge clk);
    rst = 0;
    wait (nout == NF * NPIX);
    repeat (20) @(posedge clk);
    checks += 3;
    if (frame_start[1] - frame_start[0] != NPIX + W + 1) begin
      failures++;
      $display("block 0 input took %0d cycles, expected %0d", frame_start[1] - frame_start[0], NPIX + W + 1);
    end
    if (nthr != NF) failures++;
    if (n_edges == 0) failures++;
    $display("edges %0d, %0d cycles", n_edges, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
