// tb_nms_selector: for random windows and gradients, checks that the selector
// delivers the neighbours found by stepping from the centre along and across
// the gradient direction, and the min/max of |Gx|, |Gy|.
module tb_nms_selector;
  logic [2:0][2:0][7:0] win;
  logic signed [10:0] gx, gy;
  logic [7:0] m_a1, m_b1, m_a2, m_b2;
  logic [10:0] num, den;
  int checks = 0, failures = 0;
  int octant_seen[8];

  nms_selector dut (.*);

  function automatic int at(input int dr, input int dc);
    return int'(win[1 + dr][1 + dc]);
  endfunction

  task automatic cmp(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: gx=%0d gy=%0d got %0d exp %0d", what, gx, gy, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    octant_seen = '{default: 0};
    for (int n = 0; n < 3000; n++) begin
      int x, y, ax, ay, sx, sy;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) win[i][j] = 8'($urandom);
      x = int'($urandom % 2041) - 1020;
      y = int'($urandom % 2041) - 1020;
      if (n % 7 == 0) y = x;
      if (n % 11 == 0) x = 0;
      gx = 11'(x);
      gy = 11'(y);
      #1;
      ax = (x < 0) ? -x : x;
      ay = (y < 0) ? -y : y;
      sx = (x < 0) ? -1 : 1;
      sy = (y < 0) ? -1 : 1;
      octant_seen[(ax >= ay ? 0 : 4) + (x < 0 ? 2 : 0) + (y < 0 ? 1 : 0)]++;
      if (ax >= ay) begin
        cmp("a1", int'(m_a1), at(0, sx));   cmp("b1", int'(m_b1), at(sy, sx));
        cmp("a2", int'(m_a2), at(0, -sx));  cmp("b2", int'(m_b2), at(-sy, -sx));
        cmp("num", int'(num), ay);          cmp("den", int'(den), ax);
      end else begin
        cmp("a1", int'(m_a1), at(sy, 0));   cmp("b1", int'(m_b1), at(sy, sx));
        cmp("a2", int'(m_a2), at(-sy, 0));  cmp("b2", int'(m_b2), at(-sy, -sx));
        cmp("num", int'(num), ax);          cmp("den", int'(den), ay);
      end
    end
    foreach (octant_seen[o]) begin
      checks++;
      if (octant_seen[o] == 0) begin
        failures++;
        $display("octant %0d never exercised", o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
