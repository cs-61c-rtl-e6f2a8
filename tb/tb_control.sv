// tb_control: self-checking test of the main decoder.
// For each supported instruction the expected control settings are written
// out by hand from its register transfer (which register is written and from
// where, which ALU operation, which extension, whether memory is written),
// and compared with the decoder for both values of equal. Fields that the
// instruction does not use are not compared. Random unsupported opcodes and
// R-format funct values must decode as no-ops with illegal set.
module tb_control;
  import mips_pkg::*;
  logic [5:0] op, funct;
  logic       equal, npc_sel, illegal;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  control dut (.op(op), .funct(funct), .equal(equal), .ctrl(ctrl), .npc_sel(npc_sel), .illegal(illegal));

  // expected: reg_dst reg_wr ext_op alu_src alu_ctr mem_wr mem_to_reg beq
  typedef struct {
    string   name;
    logic [5:0] op, funct;
    logic    reg_dst, reg_wr, ext_op, alu_src;
    aluctr_e alu_ctr;
    logic    mem_wr, mem_to_reg, is_beq;
  } exp_t;

  exp_t tbl [7] = '{
    '{"addu", 6'h00, 6'h21, 1'b1, 1'b1, 1'b0, 1'b0, ALU_ADD, 1'b0, 1'b0, 1'b0},
    '{"subu", 6'h00, 6'h23, 1'b1, 1'b1, 1'b0, 1'b0, ALU_SUB, 1'b0, 1'b0, 1'b0},
    '{"ori",  6'h0d, 6'h3f, 1'b0, 1'b1, 1'b0, 1'b1, ALU_OR,  1'b0, 1'b0, 1'b0},
    '{"lw",   6'h23, 6'h15, 1'b0, 1'b1, 1'b1, 1'b1, ALU_ADD, 1'b0, 1'b1, 1'b0},
    '{"sw",   6'h2b, 6'h00, 1'b0, 1'b0, 1'b1, 1'b1, ALU_ADD, 1'b1, 1'b0, 1'b0},
    '{"beq",  6'h04, 6'h21, 1'b0, 1'b0, 1'b0, 1'b0, ALU_SUB, 1'b0, 1'b0, 1'b1},
    '{"slti", 6'h0a, 6'h2a, 1'b0, 1'b1, 1'b1, 1'b1, ALU_SLT, 1'b0, 1'b0, 1'b0}
  };

  task automatic cmp(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL op=%h funct=%h eq=%b %s got %b exp %b", op, funct, equal, what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (tbl[i]) begin
      for (int e = 0; e < 2; e++) begin
        op = tbl[i].op; funct = tbl[i].funct; equal = 1'(e);
        #1;
        cmp({tbl[i].name, " reg_wr"}, ctrl.reg_wr, tbl[i].reg_wr);
        cmp({tbl[i].name, " mem_wr"}, ctrl.mem_wr, tbl[i].mem_wr);
        cmp({tbl[i].name, " alu_src"}, ctrl.alu_src, tbl[i].alu_src);
        cmp({tbl[i].name, " npc_sel"}, npc_sel, tbl[i].is_beq & equal);
        cmp({tbl[i].name, " illegal"}, illegal, 1'b0);
        checks++;
        if (ctrl.alu_ctr !== tbl[i].alu_ctr) begin
          failures++;
          $display("FAIL %s alu_ctr got %0d exp %0d", tbl[i].name, ctrl.alu_ctr, tbl[i].alu_ctr);
        end
        if (tbl[i].reg_wr) begin
          cmp({tbl[i].name, " reg_dst"}, ctrl.reg_dst, tbl[i].reg_dst);
          cmp({tbl[i].name, " mem_to_reg"}, ctrl.mem_to_reg, tbl[i].mem_to_reg);
        end
        if (tbl[i].alu_src) cmp({tbl[i].name, " ext_op"}, ctrl.ext_op, tbl[i].ext_op);
      end
    end
    // unsupported encodings
    for (int n = 0; n < 500; n++) begin
      logic known;
      op = 6'($urandom); funct = 6'($urandom); equal = 1'($urandom);
      if (n % 4 == 0) op = 6'h00;
      known = (op == 6'h00 && (funct == 6'h21 || funct == 6'h23)) ||
              op inside {6'h0d, 6'h23, 6'h2b, 6'h04, 6'h0a};
      #1;
      if (!known) begin
        cmp("illegal flag", illegal, 1'b1);
        cmp("illegal reg_wr", ctrl.reg_wr, 1'b0);
        cmp("illegal mem_wr", ctrl.mem_wr, 1'b0);
        cmp("illegal npc_sel", npc_sel, 1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
