// tb_alu: self-checking test of the ALU.
// For each operation (add, subtract, OR, AND, signed set-less-than) it
// applies corner operands (zero, all ones, the most negative and most
// positive numbers, equal operands) and random ones, and compares result and
// equal with values computed in the testbench from SystemVerilog operators.
module tb_alu;
  import mips_pkg::*;
  logic [31:0] a, b, result, exp;
  aluctr_e     op;
  logic        equal;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .alu_ctr(op), .result(result), .equal(equal));

  function automatic logic [31:0] ref_alu(aluctr_e o, logic [31:0] x, logic [31:0] y);
    case (o)
      ALU_ADD: return x + y;
      ALU_SUB: return x - y;
      ALU_OR:  return x | y;
      ALU_AND: return x & y;
      ALU_SLT: return ($signed(x) < $signed(y)) ? 32'd1 : 32'd0;
      default: return 32'd0;
    endcase
  endfunction

  task automatic check_one(aluctr_e o, logic [31:0] x, logic [31:0] y);
    op = o; a = x; b = y;
    #1;
    exp = ref_alu(o, x, y);
    checks++;
    if (result !== exp || equal !== (exp == 32'd0)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h got %h/%b exp %h", o, x, y, result, equal, exp);
    end
  endtask

  localparam logic [31:0] CORNER [6] = '{32'h0, 32'hffff_ffff, 32'h8000_0000,
                                         32'h7fff_ffff, 32'h1, 32'd17};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    aluctr_e ops [5] = '{ALU_ADD, ALU_SUB, ALU_OR, ALU_AND, ALU_SLT};
    foreach (ops[k]) begin
      foreach (CORNER[i]) foreach (CORNER[j]) check_one(ops[k], CORNER[i], CORNER[j]);
      for (int n = 0; n < 1000; n++) begin
        logic [31:0] x = $urandom;
        check_one(ops[k], x, (n % 5 == 0) ? x : $urandom);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
