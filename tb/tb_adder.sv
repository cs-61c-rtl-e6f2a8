// tb_adder: self-checking test of the 32-bit adder.
// Drives corner cases (carry out of the top bit, carry-in rippling through
// all ones) and random operands, and compares {carry_out, sum} with a 33-bit
// sum worked out in the testbench.
module tb_adder;
  logic [31:0] a, b, sum;
  logic        ci, co;
  int checks = 0, failures = 0;

  adder #(.W(32)) dut (.a(a), .b(b), .carry_in(ci), .sum(sum), .carry_out(co));

  task automatic check_one(input logic [31:0] ta, input logic [31:0] tb_, input logic tc);
    logic [32:0] exp;
    a = ta; b = tb_; ci = tc;
    #1;
    exp = 33'(ta) + 33'(tb_) + 33'(tc);
    checks++;
    if ({co, sum} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h ci=%b got %b_%h exp %h", ta, tb_, tc, co, sum, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(32'h0, 32'h0, 1'b0);
    check_one(32'hffff_ffff, 32'h0, 1'b1);
    check_one(32'hffff_ffff, 32'hffff_ffff, 1'b1);
    check_one(32'h8000_0000, 32'h8000_0000, 1'b0);
    check_one(32'h7fff_ffff, 32'h1, 1'b0);
    check_one(32'h0000_0004, 32'hffff_fff0, 1'b0);
    for (int i = 0; i < 2000; i++) check_one($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
