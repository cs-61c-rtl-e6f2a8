// tb_magic_memory: self-checking test of the idealized memory.
// Fills a small instance (64 words) through the write port, then mixes
// random reads and writes against a reference array. Checks that reads are
// combinational, that writes take effect only at the rising edge and only
// with we = 1, and that the two low address bits and address bits above the
// memory size are ignored.
module tb_magic_memory;
  localparam int WORDS = 64;
  logic        clk = 0, we;
  logic [31:0] addr, din, dout;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  magic_memory #(.WORDS(WORDS), .WIDTH(32)) dut (.clk(clk), .we(we), .addr(addr), .din(din), .dout(dout));

  always #5 clk = ~clk;

  function automatic int widx(logic [31:0] ad);
    return int'(ad[7:2]);
  endfunction

  task automatic cmp(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s addr=%h got %h exp %h", what, addr, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; din = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      we = 1; addr = 32'(i * 4); din = $urandom; model[i] = din;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < WORDS; i++) begin
      addr = 32'(i * 4) | 32'($urandom % 4) | ({$urandom} << 8);
      #1;
      cmp("fill read", dout, model[widx(addr)]);
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      we   = ($urandom % 2) == 0;
      addr = $urandom;
      din  = $urandom;
      #1;
      cmp("before edge", dout, model[widx(addr)]);
      @(posedge clk);
      if (we) model[widx(addr)] = din;
      #1;
      cmp("after edge", dout, model[widx(addr)]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
