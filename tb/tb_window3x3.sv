// tb_window3x3: drives two window3x3 instances (nearest-pixel and zero border)
// with the same random frames and compares every window they produce with
// windows cut from the frame by the reference, border rules included.
// Also checks that each frame yields exactly IMG_W*IMG_H windows, that the
// input is held off during the IMG_W+1 drain cycles, and the full-rate
// duration of frame 0.
module tb_window3x3;
  import canny_ref_pkg::*;
  localparam int W = 7, H = 5, NPIX = W * H, NF = 3;

  logic clk = 0, rst = 1;
  logic in_valid = 0, out_ready = 0;
  logic in_ready_r, in_ready_z, out_valid_r, out_valid_z;
  logic [7:0] in_data = '0;
  logic [2:0][2:0][7:0] win_r, win_z;
  int checks = 0, failures = 0;
  int inq[$];
  img_t frames[NF];
  int cyc = 0, first_in = -1, last_out0 = -1, nout = 0, drain_cycles = 0;

  window3x3 #(.IMG_W(W), .IMG_H(H), .WIDTH(8), .REPLICATE(1'b1)) dut_r (
    .clk, .rst, .in_valid, .in_ready(in_ready_r), .in_data,
    .out_valid(out_valid_r), .out_ready, .win(win_r));
  window3x3 #(.IMG_W(W), .IMG_H(H), .WIDTH(8), .REPLICATE(1'b0)) dut_z (
    .clk, .rst, .in_valid, .in_ready(in_ready_z), .in_data,
    .out_valid(out_valid_z), .out_ready, .win(win_z));

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
    if (!rst && (in_ready_r != in_ready_z || out_valid_r != out_valid_z)) begin
      failures++;
      $display("instances out of step at cycle %0d", cyc);
    end
    if (!rst && !in_ready_r && out_ready) drain_cycles++;
    if (in_valid && in_ready_r) begin
      if (first_in < 0) first_in = cyc;
      void'(inq.pop_front());
    end
    if (!rst && out_valid_r && out_ready) begin
      int f, p, r, c;
      f = nout / NPIX;
      p = nout % NPIX;
      r = p / W;
      c = p % W;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          checks++;
          if (int'(win_r[i][j]) != px_clamp(frames[f], W, H, r + i - 1, c + j - 1) ||
              int'(win_z[i][j]) != px_zero(frames[f], W, H, r + i - 1, c + j - 1)) begin
            failures++;
            $display("frame %0d (%0d,%0d) [%0d][%0d]: got %0d/%0d", f, r, c, i, j, win_r[i][j], win_z[i][j]);
          end
        end
      nout++;
      if (nout == NPIX) last_out0 = cyc;
    end
  end

  always @(negedge clk) begin
    if (!rst) begin
      bit rnd;
      rnd = nout >= NPIX;
      in_valid  = inq.size() > 0 && (!rnd || ($urandom % 3) != 0);
      in_data   = (inq.size() > 0) ? 8'(inq[0]) : '0;
      out_ready = !rnd || ($urandom % 3) != 0;
    end
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      gen_image(W, H, 0, frames[f]);
      foreach (frames[f][i]) inq.push_back(frames[f][i]);
    end
    repeat (3) @(posedge clk);
    rst = 0;
    wait (nout == NF * NPIX);
    repeat (20) @(posedge clk);
    checks += 3;
    // window register only: one cycle less than a full stage
    if (last_out0 - first_in != NPIX + W + 1) begin
      failures++;
      $display("frame 0 took %0d cycles, expected %0d", last_out0 - first_in, NPIX + W + 1);
    end
    if (drain_cycles != NF * (W + 1)) begin
      failures++;
      $display("drain cycles %0d, expected %0d", drain_cycles, NF * (W + 1));
    end
    if (out_valid_r) begin
      failures++;
      $display("extra window after the last frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
