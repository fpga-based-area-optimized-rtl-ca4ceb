// tb_gaussian_smooth: streams three small frames (noise, shapes, flat) through
// gaussian_smooth and compares every output with the reference smoothing.
// Frame 0 runs at full rate and its duration is checked: IMG_W*IMG_H input
// cycles, IMG_W+1 drain cycles, the window register and the result register,
// so the last result leaves IMG_W*IMG_H+IMG_W+2 cycles after the first pixel. Frames 1 and 2 use
// random input gaps and random output back-pressure.
module tb_gaussian_smooth;
  import canny_ref_pkg::*;
  localparam int W = 9, H = 6, NPIX = W * H, NF = 3;

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [7:0] in_pixel = '0, out_pixel;
  int checks = 0, failures = 0;
  int inq[$], expq[$];
  int cyc = 0, first_in = -1, last_out0 = -1, nout = 0;
  bit random_mode = 0;

  gaussian_smooth #(.IMG_W(W), .IMG_H(H)) dut (.*);

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
      void'(inq.pop_front());
    end
    if (!rst && out_valid && out_ready) begin
      int e;
      e = expq.pop_front();
      checks++;
      if (int'(out_pixel) != e) begin
        failures++;
        $display("pixel %0d: got %0d exp %0d", nout, out_pixel, e);
      end
      nout++;
      if (nout == NPIX) last_out0 = cyc;
    end
  end

  always @(negedge clk) begin
    if (!rst) begin
      random_mode = nout >= NPIX;
      in_valid  = inq.size() > 0 && (!random_mode || ($urandom % 4) != 0);
      in_pixel  = (inq.size() > 0) ? 8'(inq[0]) : '0;
      out_ready = !random_mode || ($urandom % 3) != 0;
    end
  end

  initial begin
    img_t img, ref_o;
    for (int f = 0; f < NF; f++) begin
      gen_image(W, H, f, img);
      gauss_ref(img, W, H, ref_o);
      foreach (img[i]) inq.push_back(img[i]);
      foreach (ref_o[i]) expq.push_back(ref_o[i]);
    end
    repeat (3) @(posedge clk);
    rst = 0;
    wait (nout == NF * NPIX);
    repeat (5) @(posedge clk);
    checks++;
    if (last_out0 - first_in != NPIX + W + 2) begin
      failures++;
      $display("frame 0 took %0d cycles, expected %0d", last_out0 - first_in, NPIX + W + 2);
    end
    checks++;
    if (expq.size() != 0 || out_valid) begin
      failures++;
      $display("extra or missing outputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
