// pipe_reg: one registered pipeline stage with a valid/ready handshake.
//
// The register loads whenever it is empty or its content is being taken
// (out_ready), so in_ready = !out_valid || out_ready and a full-rate stream
// passes with one cycle of latency. Used to register the results of the
// combinational arithmetic in the processing stages. A generic helper of this
// design; the handshake is its own choice, not taken from a specification.
module pipe_reg #(
  parameter int WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else if (in_ready) out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_ready && in_valid) out_data <= in_data;
  end
endmodule
