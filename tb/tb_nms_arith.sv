// tb_nms_arith: compares the interpolated magnitude of nms_arith with the
// fixed-point formula a*(256-w)+b*w, w = floor(256*num/den), including den=0
// and num=den.
module tb_nms_arith;
  import canny_ref_pkg::*;
  logic [7:0]  m_a, m_b;
  logic [10:0] num, den;
  logic [15:0] interp;
  int checks = 0, failures = 0;

  nms_arith #(.FRAC(8)) dut (.*);

  task automatic check(input int a, input int b, input int n, input int d);
    int e;
    m_a = 8'(a); m_b = 8'(b); num = 11'(n); den = 11'(d);
    #1;
    e = interp_ref(a, b, n, d);
    checks++;
    if (int'(interp) != e) begin
      failures++;
      $display("a=%0d b=%0d n=%0d d=%0d got %0d exp %0d", a, b, n, d, interp, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(255, 255, 1020, 1020); check(255, 0, 0, 1020); check(10, 200, 0, 0); check(0, 255, 1020, 1020);
    check(100, 50, 1, 3);
    for (int i = 0; i < 2000; i++) begin
      int d, n;
      d = int'($urandom % 1021);
      n = (d == 0) ? 0 : int'($urandom % (d + 1));
      check(int'($urandom % 256), int'($urandom % 256), n, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
