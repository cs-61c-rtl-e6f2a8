// register_en: N-bit register with write enable.
//
// On each rising clock edge the output takes the input when we is 1 and
// holds its value when we is 0, as the register building block describes.
// The active-low asynchronous reset, which loads RESET_VALUE, is this
// design's addition: the processor needs a defined PC to start from.
module register_en #(
  parameter int unsigned   N           = 32,
  parameter logic [N-1:0]  RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= RESET_VALUE;
    else if (we) q <= d;
  end

endmodule
