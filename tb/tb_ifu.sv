// tb_ifu: self-checking test of the instruction fetch unit.
// Loads 256 random words into a 256-word instruction memory while reset is
// held, then releases reset and, every cycle, drives a random npc_sel and
// imm16. A testbench copy of the PC follows PC + 4 or
// PC + 4 + {sign_ext(imm16), 2'b00} (wrapping with the memory) and is
// compared with pc; instr must equal the loaded word at that PC. The PC must
// advance on every clock edge (one fetch per cycle).
module tb_ifu;
  localparam int WORDS = 256;
  logic        clk = 0, rst_n = 0, npc_sel, imem_we;
  logic [15:0] imm16;
  logic [31:0] imem_addr, imem_wdata, pc, pc_plus4, instr;
  logic [31:0] prog [WORDS];
  logic [31:0] model_pc;
  int checks = 0, failures = 0, taken = 0, back = 0;

  ifu #(.IMEM_WORDS(WORDS)) dut (
    .clk(clk), .rst_n(rst_n), .npc_sel(npc_sel), .imm16(imm16),
    .imem_we(imem_we), .imem_addr(imem_addr), .imem_wdata(imem_wdata),
    .pc(pc), .pc_plus4(pc_plus4), .instr(instr));

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
    npc_sel = 0; imm16 = 0; imem_we = 0; imem_addr = 0; imem_wdata = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      prog[i] = $urandom;
      imem_we = 1; imem_addr = 32'(i * 4); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 0;
    #1;
    cmp("reset pc", pc, 32'h0);
    rst_n = 1;
    model_pc = 0;
    for (int i = 0; i < 5000; i++) begin
      if (i != 0) @(negedge clk);
      npc_sel = ($urandom % 3) == 0;
      imm16   = 16'($urandom);
      #1;
      cmp("pc", pc, model_pc);
      cmp("pc+4", pc_plus4, model_pc + 4);
      cmp("instr", instr, prog[model_pc[9:2]]);
      @(posedge clk);
      if (npc_sel) begin
        taken++;
        if (imm16[15]) back++;
        model_pc = model_pc + 4 + {{14{imm16[15]}}, imm16, 2'b00};
      end else begin
        model_pc = model_pc + 4;
      end
    end
    checks++;
    if (taken == 0 || back == 0) begin failures++; $display("FAIL no taken/backward branch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
