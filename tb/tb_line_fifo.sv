// tb_line_fifo: checks that line_fifo returns each sample exactly DEPTH
// enabled cycles after it was written, with random gaps in the enable.
// The first DEPTH outputs (stale RAM) are not checked.
module tb_line_fifo;
  localparam int WIDTH = 8;
  localparam int DEPTH = 5;

  logic clk = 0, rst = 1, en = 0;
  logic [WIDTH-1:0] din = '0, dout;
  int checks = 0, failures = 0;
  int hist[$];

  line_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en  = ($urandom % 3) != 0;
      din = WIDTH'($urandom);
      if (en) begin
        if (hist.size() >= DEPTH) begin
          checks++;
          if (dout !== hist[hist.size() - DEPTH]) begin
            failures++;
            $display("mismatch at %0d: got %0h exp %0h", n, dout, hist[hist.size() - DEPTH]);
          end
        end
        hist.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
