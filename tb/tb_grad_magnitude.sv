// tb_grad_magnitude: compares grad_magnitude with a real-valued square root
// for the extreme gradients and for random ones.
module tb_grad_magnitude;
  import canny_ref_pkg::*;
  logic signed [10:0] gx, gy;
  logic [7:0] mag;
  int checks = 0, failures = 0;

  grad_magnitude dut (.*);

  task automatic check(input int x, input int y);
    int e;
    gx = 11'(x);
    gy = 11'(y);
    #1;
    e = mag_ref(x, y);
    checks++;
    if (int'(mag) != e) begin
      failures++;
      $display("gx=%0d gy=%0d got %0d exp %0d", x, y, mag, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0); check(1020, 1020); check(-1020, -1020); check(-1020, 0); check(0, 1020);
    check(3, 4); check(-6, 8); check(2, 0); check(1, 1); check(600, -800);
    for (int i = 0; i < 3000; i++) begin
      int x, y;
      x = int'($urandom % 2041) - 1020;
      y = int'($urandom % 2041) - 1020;
      if (i % 3 == 0) begin
        x = x / 16;
        y = y / 16;
      end
      check(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
