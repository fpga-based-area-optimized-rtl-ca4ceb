// line_fifo: one image row of delay, one of the two FIFO buffers that give a
// 3x3 neighbourhood access to the previous two rows of a raster stream.
//
// A circular RAM of DEPTH words and one pointer. On a cycle with en high the
// word at the pointer is presented on dout (the sample written DEPTH enabled
// cycles earlier) and replaced by din, and the pointer advances. dout is a
// combinational read of the RAM, so the caller samples it in the same cycle as
// it writes din. The RAM itself is not reset; only the pointer is. The FIFO
// role follows the document, the circular-RAM form is this design's choice.
module line_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 256
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst)       ptr <= '0;
    else if (en)      ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
  end
endmodule
