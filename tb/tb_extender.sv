// tb_extender: self-checking test of the immediate extender.
// Every 16-bit immediate is applied with ext_op = 1 (compared with the
// testbench's signed cast) and ext_op = 0 (compared with zero fill).
module tb_extender;
  logic [15:0] imm16;
  logic        ext_op;
  logic [31:0] imm32, exp;
  int checks = 0, failures = 0;

  extender dut (.imm16(imm16), .ext_op(ext_op), .imm32(imm32));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      for (int e = 0; e < 2; e++) begin
        imm16 = 16'(v); ext_op = 1'(e);
        #1;
        exp = e ? 32'(signed'(imm16)) : {16'h0, imm16};
        checks++;
        if (imm32 !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL imm16=%h ext_op=%0d got %h exp %h", imm16, e, imm32, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
