// control: main decoder of the single-cycle MIPS-lite processor.
//
// From the opcode and funct fields of the current instruction it sets every
// control point of the datapath: RegDst, RegWr, ExtOp, ALUSrc, ALUctr, MemWr,
// MemtoReg, and nPC_sel, which selects the branch target when the
// instruction is beq and the ALU reports Equal. Purely combinational; the
// outputs are valid one control-logic delay after the instruction word.
//
// The settings follow from the register transfers of each instruction:
//   addu  R[rd] <- R[rs] + R[rt]
//   subu  R[rd] <- R[rs] - R[rt]
//   ori   R[rt] <- R[rs] | zero_ext(imm16)
//   lw    R[rt] <- MEM[R[rs] + sign_ext(imm16)]
//   sw    MEM[R[rs] + sign_ext(imm16)] <- R[rt]
//   beq   if (R[rs] == R[rt]) PC <- PC + 4 + {sign_ext(imm16), 2'b00}
//   slti  R[rt] <- (R[rs] < sign_ext(imm16)) ? 1 : 0   (signed compare)
// Any other opcode or funct is executed as a no-op: nothing is written and
// the PC advances by 4 (this design's choice); illegal flags it.
module control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  input  logic       equal,
  output ctrl_t      ctrl,
  output logic       npc_sel,
  output logic       illegal
);

  always_comb begin
    ctrl    = '{reg_dst: 1'b0, reg_wr: 1'b0, ext_op: 1'b0, alu_src: 1'b0,
                alu_ctr: ALU_ADD, mem_wr: 1'b0, mem_to_reg: 1'b0,
                branch: 1'b0};
    illegal = 1'b0;
    case (op)
      OP_RTYPE: begin
        ctrl.reg_dst = 1'b1;
        case (funct)
          FUNCT_ADDU: begin ctrl.reg_wr = 1'b1; ctrl.alu_ctr = ALU_ADD; end
          FUNCT_SUBU: begin ctrl.reg_wr = 1'b1; ctrl.alu_ctr = ALU_SUB; end
          default:    illegal = 1'b1;
        endcase
      end
      OP_ORI: begin
        ctrl.reg_wr  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.alu_ctr = ALU_OR;
      end
      OP_LW: begin
        ctrl.reg_wr     = 1'b1;
        ctrl.ext_op     = 1'b1;
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
      end
      OP_SW: begin
        ctrl.ext_op  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.mem_wr  = 1'b1;
      end
      OP_BEQ: begin
        ctrl.alu_ctr = ALU_SUB;
        ctrl.branch  = 1'b1;
      end
      OP_SLTI: begin
        ctrl.reg_wr  = 1'b1;
        ctrl.ext_op  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.alu_ctr = ALU_SLT;
      end
      default: illegal = 1'b1;
    endcase
  end

  assign npc_sel = ctrl.branch & equal;

endmodule
