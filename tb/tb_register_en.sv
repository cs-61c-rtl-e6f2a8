// tb_register_en: self-checking test of the N-bit register with write enable.
// Random data and enables over many clock edges; a reference copy kept in the
// testbench is updated only when we = 1 and compared after every edge. Also
// checks that the output does not change between edges and that reset loads
// the reset value.
module tb_register_en;
  localparam logic [31:0] RV = 32'h1234_5678;
  logic        clk = 0, rst_n = 0, we;
  logic [31:0] d, q, model;
  int checks = 0, failures = 0;

  register_en #(.N(32), .RESET_VALUE(RV)) dut (.clk(clk), .rst_n(rst_n), .we(we), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; d = 0;
    #12;
    checks++;
    if (q !== RV) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1;
    model = RV;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = ($urandom % 3) == 0;
      d  = $urandom;
      #2;  // input changes away from the edge must not reach q
      checks++;
      if (q !== model) begin failures++; $display("FAIL between edges q=%h exp %h", q, model); end
      @(posedge clk);
      if (we) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL cycle %0d we=%b q=%h exp %h", i, we, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
