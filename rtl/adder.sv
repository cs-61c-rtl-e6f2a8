// adder: W-bit binary adder with carry in and carry out.
//
// Sum = A + B + CarryIn, CarryOut is the carry from the top bit. Purely
// combinational. The ports and the 32-bit default width follow the adder
// building block of the datapath; it is used for PC + 4, for the branch
// target and inside the ALU for addition and subtraction.
module adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         carry_in,
  output logic [W-1:0] sum,
  output logic         carry_out
);

  always_comb begin
    {carry_out, sum} = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, carry_in};
  end

endmodule
