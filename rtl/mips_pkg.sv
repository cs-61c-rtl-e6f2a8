// mips_pkg: types and constants shared by the MIPS-lite single-cycle datapath.
//
// Holds the instruction field layout (R-format and I-format, 32 bits each),
// the opcode and funct values of the supported instructions, and the ALU
// operation code driven on ALUctr. The field positions follow the MIPS
// instruction formats: op[31:26], rs[25:21], rt[20:16], rd[15:11],
// shamt[10:6], funct[5:0], imm16[15:0]. The numeric opcode and funct values
// are the standard MIPS encodings; the ALUctr encoding is this design's own.
package mips_pkg;

  localparam int unsigned XLEN = 32;  // data path and instruction width
  localparam int unsigned NREG = 32;  // architectural registers
  localparam int unsigned RIDX = 5;   // register specifier width

  // Opcode field values (instruction bits 31:26)
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_BEQ   = 6'h04,
    OP_SLTI  = 6'h0a,
    OP_ORI   = 6'h0d,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2b
  } opcode_e;

  // funct field values (instruction bits 5:0) used with OP_RTYPE
  localparam logic [5:0] FUNCT_ADDU = 6'h21;
  localparam logic [5:0] FUNCT_SUBU = 6'h23;

  // ALU operation select (ALUctr)
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_OR  = 3'd2,
    ALU_AND = 3'd3,
    ALU_SLT = 3'd4
  } aluctr_e;

  // R-format view of an instruction word
  typedef struct packed {
    logic [5:0]      op;
    logic [RIDX-1:0] rs;
    logic [RIDX-1:0] rt;
    logic [RIDX-1:0] rd;
    logic [4:0]      shamt;
    logic [5:0]      funct;
  } rtype_t;

  // I-format view of an instruction word
  typedef struct packed {
    logic [5:0]      op;
    logic [RIDX-1:0] rs;
    logic [RIDX-1:0] rt;
    logic [15:0]     imm16;
  } itype_t;

  // Control points of the datapath, as named on the datapath diagram
  typedef struct packed {
    logic    reg_dst;     // 1: write register is rd, 0: rt
    logic    reg_wr;      // register file write enable
    logic    ext_op;      // 1: sign-extend imm16, 0: zero-extend
    logic    alu_src;     // 1: ALU B input is extended immediate, 0: busB
    aluctr_e alu_ctr;     // ALU operation
    logic    mem_wr;      // data memory write enable
    logic    mem_to_reg;  // 1: busW from data memory, 0: from ALU
    logic    branch;      // instruction is beq
  } ctrl_t;

endpackage
