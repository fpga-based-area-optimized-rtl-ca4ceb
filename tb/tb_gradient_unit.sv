// tb_gradient_unit: streams three small frames through gradient_unit built
// with each kernel size (3, 5, 7 and 9, one instance each, run side by side)
// and compares Gx, Gy and the magnitude of every pixel with the reference
// model. The 3x3 instance is checked against the plain Sobel reference, the
// others against the general KxK reference. Frame 0 runs at full rate and its
// duration is checked (one result per clock: the last result leaves
// IMG_W*IMG_H + R*IMG_W + R + 1 cycles after the first pixel, R = (K-1)/2);
// frames 1 and 2 use random gaps and back-pressure.
module tb_gradient_unit;
  import canny_ref_pkg::*;
  localparam int W = 10, H = 7, NPIX = W * H, NF = 3, NK = 4;

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  int cyc = 0;
  bit loaded = 0;
  int ndone = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NK; g++) begin : g_k
    localparam int K = 3 + 2 * g;
    localparam int R = (K - 1) / 2;

    logic in_valid = 0, in_ready, out_valid, out_ready = 0;
    logic [7:0] in_pixel = '0, out_mag;
    logic signed [10:0] out_gx, out_gy;
    int inq[$], exq[$], eyq[$], emq[$];
    int first_in = -1, last_out0 = -1, nout = 0;

    gradient_unit #(.IMG_W(W), .IMG_H(H), .KSIZE(K)) dut (
      .clk, .rst, .in_valid, .in_ready, .in_pixel,
      .out_valid, .out_ready, .out_gx, .out_gy, .out_mag);

    initial begin
      img_t img, gx, gy, mg;
      for (int f = 0; f < NF; f++) begin
        gen_image(W, H, f == 2 ? 1 : f, img);
        if (K == 3) sobel_ref(img, W, H, gx, gy, mg);
        else        sobel_k_ref(img, W, H, K, gx, gy, mg);
        foreach (img[i]) begin
          inq.push_back(img[i]);
          exq.push_back(gx[i]);
          eyq.push_back(gy[i]);
          emq.push_back(mg[i]);
        end
      end
    end

    always @(posedge clk) begin
      if (in_valid && in_ready) begin
        if (first_in < 0) first_in = cyc;
        void'(inq.pop_front());
      end
      if (!rst && out_valid && out_ready) begin
        int ex, ey, em;
        ex = exq.pop_front();
        ey = eyq.pop_front();
        em = emq.pop_front();
        checks++;
        if (int'(out_gx) != ex || int'(out_gy) != ey || int'(out_mag) != em) begin
          failures++;
          $display("K=%0d pixel %0d: got %0d %0d %0d exp %0d %0d %0d",
                   K, nout, out_gx, out_gy, out_mag, ex, ey, em);
        end
        nout++;
        if (nout == NPIX) last_out0 = cyc;
        if (nout == NF * NPIX) begin
          checks++;
          if (last_out0 - first_in != NPIX + R * W + R + 1) begin
            failures++;
            $display("K=%0d: frame 0 took %0d cycles, expected %0d",
                     K, last_out0 - first_in, NPIX + R * W + R + 1);
          end
          ndone++;
        end
      end
    end

    always @(negedge clk) begin
      if (!rst) begin
        bit rnd;
        rnd = nout >= NPIX;
        in_valid  = inq.size() > 0 && (!rnd || ($urandom % 4) != 0);
        in_pixel  = (inq.size() > 0) ? 8'(inq[0]) : '0;
        out_ready = !rnd || ($urandom % 3) != 0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (ndone == NK);
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
