// alu: 32-bit arithmetic-logic unit of the MIPS-lite datapath.
//
// Operations, chosen by alu_ctr: ADD (a + b), SUB (a - b), OR, AND and SLT
// (1 when a < b as signed numbers, else 0). Addition and subtraction share
// one adder instance; subtraction feeds ~b with a carry-in of 1, and SLT
// takes the sign of that difference corrected for overflow. The output
// equal is 1 when the result is zero, so SUB turns it into the a == b test
// that beq needs. Purely combinational. The operation list is that of the
// textbook MIPS-lite ALU (add, subtract, OR, equality test, plus AND and
// set-less-than); the alu_ctr encoding and the use of one shared adder are
// this design's.
module alu
  import mips_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  aluctr_e     alu_ctr,
  output logic [31:0] result,
  output logic        equal
);

  logic        subtract;
  logic [31:0] b_in;
  logic [31:0] sum;
  logic        carry_out;
  logic        overflow;
  logic        less;

  // ADD uses a + b; SUB and SLT use a + ~b + 1
  assign subtract = (alu_ctr == ALU_SUB) || (alu_ctr == ALU_SLT);
  assign b_in     = subtract ? ~b : b;

  adder #(.W(32)) u_adder (
    .a        (a),
    .b        (b_in),
    .carry_in (subtract),
    .sum      (sum),
    .carry_out(carry_out)
  );

  // Signed overflow of a - b: operands of different sign and the
  // difference's sign differs from a's
  assign overflow = (a[31] != b[31]) && (sum[31] != a[31]);
  assign less     = sum[31] ^ overflow;

  always_comb begin
    unique case (alu_ctr)
      ALU_ADD: result = sum;
      ALU_SUB: result = sum;
      ALU_OR:  result = a | b;
      ALU_AND: result = a & b;
      ALU_SLT: result = {31'b0, less};
      default: result = sum;
    endcase
  end

  assign equal = (result == 32'b0);

  // The unsigned carry is not used by any MIPS-lite instruction
  logic unused_carry;
  assign unused_carry = carry_out;

endmodule
