// mips_lite_cpu: single-cycle MIPS-lite processor.
//
// Every instruction completes in one long clock cycle. In that cycle the
// instruction fetch unit presents mem[PC]; its rs and rt fields address the
// register file (busA, busB); the extender widens imm16; the ALU operates on
// busA and either busB or the extended immediate; the data memory is read,
// or written on the closing clock edge; and the register file is written on
// the same edge with either the ALU result or the loaded word. The PC moves
// to PC + 4 or, for a taken beq, to the branch target on that edge too. All
// state elements are clocked by the rising edge of clk.
//
// Supported instructions: addu, subu, ori, lw, sw, beq (the MIPS-lite
// subset) and slti. The structure (two adders and PC Ext in front of the PC,
// RegDst mux on the write register, ALUSrc mux on ALU input B, Extender with
// ExtOp, MemtoReg mux on busW) is the one of the single-cycle datapath
// diagram. Choices of this design: memory sizes, active-low asynchronous
// reset (PC = 0, registers = 0), register 0 fixed at zero, unknown
// instructions executed as no-ops, and a program-load port into the
// instruction memory (hold rst_n low while using it; an assertion checks
// this).
//
// The remaining outputs expose the cycle's activity for observation: the
// fetch address and instruction, the data memory write, the register write
// and the illegal-instruction flag.
module mips_lite_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  // program load into instruction memory
  input  logic        imem_we,
  input  logic [31:0] imem_addr,
  input  logic [31:0] imem_wdata,
  // observation
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        dmem_we,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  output logic        reg_we,
  output logic [4:0]  reg_waddr,
  output logic [31:0] reg_wdata,
  output logic        illegal
);

  rtype_t      f;
  ctrl_t       ctrl;
  logic        npc_sel;
  logic        equal;
  logic [31:0] pc_plus4;
  logic [4:0]  rw;
  logic [31:0] bus_a, bus_b, bus_w;
  logic [31:0] imm32;
  logic [31:0] alu_b;
  logic [31:0] alu_out;
  logic [31:0] dmem_out;

  ifu #(.IMEM_WORDS(IMEM_WORDS)) u_ifu (
    .clk       (clk),
    .rst_n     (rst_n),
    .npc_sel   (npc_sel),
    .imm16     (instr[15:0]),
    .imem_we   (imem_we),
    .imem_addr (imem_addr),
    .imem_wdata(imem_wdata),
    .pc        (pc),
    .pc_plus4  (pc_plus4),
    .instr     (instr)
  );

  assign f = rtype_t'(instr);

  control u_control (
    .op     (f.op),
    .funct  (f.funct),
    .equal  (equal),
    .ctrl   (ctrl),
    .npc_sel(npc_sel),
    .illegal(illegal)
  );

  // RegDst: 1 selects rd, 0 selects rt
  mux2 #(.W(5)) u_regdst_mux (
    .a  (f.rt),
    .b  (f.rd),
    .sel(ctrl.reg_dst),
    .y  (rw)
  );

  // Register writes are blocked while the processor is held in reset
  regfile u_regfile (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (ctrl.reg_wr),
    .rw   (rw),
    .ra   (f.rs),
    .rb   (f.rt),
    .bus_w(bus_w),
    .bus_a(bus_a),
    .bus_b(bus_b)
  );

  extender u_extender (
    .imm16 (instr[15:0]),
    .ext_op(ctrl.ext_op),
    .imm32 (imm32)
  );

  // ALUSrc: 1 selects the extended immediate, 0 selects busB
  mux2 #(.W(32)) u_alusrc_mux (
    .a  (bus_b),
    .b  (imm32),
    .sel(ctrl.alu_src),
    .y  (alu_b)
  );

  alu u_alu (
    .a      (bus_a),
    .b      (alu_b),
    .alu_ctr(ctrl.alu_ctr),
    .result (alu_out),
    .equal  (equal)
  );

  // Data memory: address from the ALU, Data In from busB
  magic_memory #(.WORDS(DMEM_WORDS), .WIDTH(32)) u_dmem (
    .clk (clk),
    .we  (ctrl.mem_wr & rst_n),
    .addr(alu_out),
    .din (bus_b),
    .dout(dmem_out)
  );

  // MemtoReg: 1 selects the loaded word, 0 the ALU result
  mux2 #(.W(32)) u_memtoreg_mux (
    .a  (alu_out),
    .b  (dmem_out),
    .sel(ctrl.mem_to_reg),
    .y  (bus_w)
  );

  assign dmem_we    = ctrl.mem_wr & rst_n;
  assign dmem_addr  = alu_out;
  assign dmem_wdata = bus_b;
  assign reg_we     = ctrl.reg_wr & (rw != 5'd0);
  assign reg_waddr  = rw;
  assign reg_wdata  = bus_w;

  // The program-load port may only be used while the processor is held in
  // reset; a write while running would replace the instruction being fetched.
  a_load_in_reset : assert property (@(posedge clk) disable iff (!rst_n) !imem_we)
    else $error("instruction memory written while the processor runs");

  logic unused;
  assign unused = ^{pc_plus4, f.shamt, ctrl.branch};

endmodule
