// tb_regfile: self-checking test of the 32 x 32-bit register file.
// A reference array in the testbench follows every write (register 0 stays
// zero). Each cycle random write and read addresses are applied; both read
// ports are compared combinationally before the edge (reads see the old
// value) and the written register is read back after it.
module tb_regfile;
  logic        clk = 0, rst_n = 0, we;
  logic [4:0]  rw, ra, rb;
  logic [31:0] bus_w, bus_a, bus_b;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk(clk), .rst_n(rst_n), .we(we), .rw(rw), .ra(ra), .rb(rb),
               .bus_w(bus_w), .bus_a(bus_a), .bus_b(bus_b));

  always #5 clk = ~clk;

  task automatic cmp(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; rw = 0; ra = 0; rb = 0; bus_w = 0;
    foreach (model[i]) model[i] = '0;
    #12 rst_n = 1;
    // after reset every register reads zero
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rb = 5'(31 - i); #1;
      cmp("reset A", bus_a, 32'h0);
      cmp("reset B", bus_b, 32'h0);
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      we    = ($urandom % 4) != 0;
      rw    = 5'($urandom);
      if (i < 64) rw = 5'(i);   // visit every register early, including 0
      bus_w = $urandom;
      ra    = 5'($urandom);
      rb    = (i % 3 == 0) ? rw : 5'($urandom);
      #1;
      cmp("busA", bus_a, model[ra]);
      cmp("busB", bus_b, model[rb]);
      @(posedge clk);
      if (we && rw != 0) model[rw] = bus_w;
      #1;
      ra = rw;
      #1;
      cmp("readback", bus_a, model[rw]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
