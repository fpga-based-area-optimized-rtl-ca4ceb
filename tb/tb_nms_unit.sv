// tb_nms_unit: feeds nms_unit with the Sobel gradients of three small frames
// (noise, shapes, shapes) and compares each output with the reference
// interpolating non-maximum suppression. Counts how many pixels were kept and
// suppressed (both must occur). Frame 0 runs at full rate with its duration
// checked; the others with random gaps and back-pressure.
module tb_nms_unit;
  import canny_ref_pkg::*;
  localparam int W = 12, H = 9, NPIX = W * H, NF = 3;

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic signed [10:0] in_gx = '0, in_gy = '0;
  logic [7:0] in_mag = '0, out_mag;
  int checks = 0, failures = 0;
  int qx[$], qy[$], qm[$], expq[$];
  int cyc = 0, first_in = -1, last_out0 = -1, nout = 0, kept = 0, suppressed = 0;

  nms_unit #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (in_valid && in_ready) begin
      if (first_in < 0) first_in = cyc;
      void'(qx.pop_front());
      void'(qy.pop_front());
      void'(qm.pop_front());
    end
    if (!rst && out_valid && out_ready) begin
      int e;
      e = expq.pop_front();
      checks++;
      if (int'(out_mag) != e) begin
        failures++;
        $display("pixel %0d: got %0d exp %0d", nout, out_mag, e);
      end
      if (e != 0) kept++;
      else suppressed++;
      nout++;
      if (nout == NPIX) last_out0 = cyc;
    end
  end

  always @(negedge clk) begin
    if (!rst) begin
      bit rnd;
      rnd = nout >= NPIX;
      in_valid  = qm.size() > 0 && (!rnd || ($urandom % 4) != 0);
      in_gx     = (qm.size() > 0) ? 11'(qx[0]) : '0;
      in_gy     = (qm.size() > 0) ? 11'(qy[0]) : '0;
      in_mag    = (qm.size() > 0) ? 8'(qm[0]) : '0;
      out_ready = !rnd || ($urandom % 3) != 0;
    end
  end

  initial begin
    img_t img, sm, gx, gy, mg, o;
    for (int f = 0; f < NF; f++) begin
      gen_image(W, H, f == 0 ? 0 : 1, img);
      gauss_ref(img, W, H, sm);
      sobel_ref(sm, W, H, gx, gy, mg);
      nms_ref(mg, gx, gy, W, H, o);
      foreach (img[i]) begin
        qx.push_back(gx[i]);
        qy.push_back(gy[i]);
        qm.push_back(mg[i]);
        expq.push_back(o[i]);
      end
    end
    repeat (3) @(posedge clk);
    rst = 0;
    wait (nout == NF * NPIX);
    repeat (5) @(posedge clk);
    checks += 3;
    if (last_out0 - first_in != NPIX + W + 2) begin
      failures++;
      $display("frame 0 took %0d cycles, expected %0d", last_out0 - first_in, NPIX + W + 2);
    end
    if (kept == 0 || suppressed == 0) begin
      failures++;
      $display("kept=%0d suppressed=%0d", kept, suppressed);
    end
    if (out_valid) failures++;
    $display("kept %0d suppressed %0d", kept, suppressed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
