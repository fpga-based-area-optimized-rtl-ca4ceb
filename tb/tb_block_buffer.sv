// tb_block_buffer: writes five blocks of 12 pixels (not a power of two) into block_buffer, delivers
// each block's thresholds a random time after the block is complete, and
// reads with random back-pressure. Checks that every pixel comes out in order
// with its own block's thresholds, that no pixel of a block leaves before its
// thresholds were given, and that the writer is stalled at least once while
// both banks are occupied.
module tb_block_buffer;
  localparam int NPIX = 12, NB = 5;

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, thr_valid = 0, out_valid, out_ready = 0;
  logic [7:0] in_mag = '0, out_mag;
  logic [9:0] thr_high = '0, thr_low = '0, out_thr_high, out_thr_low;
  int checks = 0, failures = 0;
  int pix[$], written = 0, nout = 0, thr_sent = 0, stalls = 0;

  block_buffer #(.NPIX(NPIX), .THR_W(10)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int thh_of(input int b);
    return 100 + b;
  endfunction

  always @(posedge clk) begin
    if (in_valid && !in_ready) stalls++;
    if (in_valid && in_ready) written++;
    if (thr_valid) thr_sent++;
    if (!rst && out_valid && out_ready) begin
      int b;
      b = nout / NPIX;
      checks++;
      if (int'(out_mag) != pix[nout] || int'(out_thr_high) != thh_of(b) || int'(out_thr_low) != 500 + b) begin
        failures++;
        $display("pixel %0d: got %0d %0d %0d", nout, out_mag, out_thr_high, out_thr_low);
      end
      checks++;
      if (thr_sent <= b) begin
        failures++;
        $display("pixel %0d left before its thresholds", nout);
      end
      nout++;
    end
  end

  // writer
  initial begin
    for (int i = 0; i < NB * NPIX; i++) pix.push_back(int'($urandom % 256));
    repeat (3) @(posedge clk);
    rst = 0;
    while (written < NB * NPIX) begin
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      in_mag   = 8'(pix[written]);
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
  end

  // thresholds, one pulse per completed block, after a random delay
  initial begin
    wait (!rst);
    for (int b = 0; b < NB; b++) begin
      wait (written >= (b + 1) * NPIX);
      repeat (1 + $urandom % 30) @(negedge clk);
      @(negedge clk);
      thr_valid = 1;
      thr_high  = 10'(thh_of(b));
      thr_low   = 10'(500 + b);
      @(negedge clk);
      thr_valid = 0;
    end
  end

  // reader
  always @(negedge clk) out_ready = ($urandom % 3) != 0;

  initial begin
    wait (nout == NB * NPIX);
    repeat (5) @(posedge clk);
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("writer never stalled");
    end
    $display("stalls %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
