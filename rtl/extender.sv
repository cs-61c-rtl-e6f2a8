// extender: widens the 16-bit immediate field to 32 bits.
//
// ext_op = 1 replicates bit 15 (sign extension, used by lw, sw and slti);
// ext_op = 0 fills with zeros (zero extension, used by ori). Purely
// combinational. The function and the ExtOp control come from the
// datapath; the polarity of ext_op is this design's choice.
module extender (
  input  logic [15:0] imm16,
  input  logic        ext_op,
  output logic [31:0] imm32
);

  always_comb imm32 = {{16{ext_op & imm16[15]}}, imm16};

endmodule
