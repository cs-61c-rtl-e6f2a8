// ifu: instruction fetch unit of the single-cycle MIPS-lite datapath.
//
// Holds the program counter, fetches mem[PC] from the instruction memory and
// computes the next PC. The next-address logic has two adders: one forms
// PC + 4, the other adds the branch offset {sign_ext(imm16), 2'b00} (PC Ext)
// to PC + 4. A multiplexer controlled by npc_sel picks the branch target
// (npc_sel = 1) or PC + 4 (npc_sel = 0), and the PC register loads it on
// every rising clock edge, so one instruction is fetched per cycle. As on the
// datapath diagram, the two low PC bits are hard-wired to 00; the register
// holds bits 31:2 only.
//
// Timing: pc changes just after the rising edge; instr follows
// combinationally. imm16 and npc_sel are expected back from the same
// instruction within the cycle.
//
// This design's own choices: the PC resets asynchronously to RESET_PC, and
// the instruction memory has a write port (imem_we/imem_addr/imem_wdata)
// used to load a program; while imem_we is 1 the memory is addressed by
// imem_addr instead of the PC. Hold rst_n low while loading.
module ifu #(
  parameter int unsigned  IMEM_WORDS = 1024,
  parameter logic [31:0]  RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        npc_sel,
  input  logic [15:0] imm16,
  input  logic        imem_we,
  input  logic [31:0] imem_addr,
  input  logic [31:0] imem_wdata,
  output logic [31:0] pc,
  output logic [31:0] pc_plus4,
  output logic [31:0] instr
);

  logic [29:0] pc_word;
  logic [31:0] pc_ext;
  logic [31:0] br_target;
  logic [31:0] next_pc;
  logic [31:0] imem_a;
  logic        co_seq, co_br;

  register_en #(.N(30), .RESET_VALUE(RESET_PC[31:2])) u_pc (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (1'b1),
    .d    (next_pc[31:2]),
    .q    (pc_word)
  );

  assign pc = {pc_word, 2'b00};

  adder #(.W(32)) u_add_seq (
    .a        (pc),
    .b        (32'd4),
    .carry_in (1'b0),
    .sum      (pc_plus4),
    .carry_out(co_seq)
  );

  // PC Ext: sign-extended word offset, shifted left by two
  assign pc_ext = {{14{imm16[15]}}, imm16, 2'b00};

  adder #(.W(32)) u_add_br (
    .a        (pc_plus4),
    .b        (pc_ext),
    .carry_in (1'b0),
    .sum      (br_target),
    .carry_out(co_br)
  );

  mux2 #(.W(32)) u_npc_mux (
    .a  (pc_plus4),
    .b  (br_target),
    .sel(npc_sel),
    .y  (next_pc)
  );

  assign imem_a = imem_we ? imem_addr : pc;

  magic_memory #(.WORDS(IMEM_WORDS), .WIDTH(32)) u_imem (
    .clk (clk),
    .we  (imem_we),
    .addr(imem_a),
    .din (imem_wdata),
    .dout(instr)
  );

  // PC arithmetic wraps modulo 2^32; the carries are not used
  logic unused;
  assign unused = ^{co_seq, co_br, next_pc[1:0]};

endmodule
