// tb_mips_lite_cpu: end-to-end test of the single-cycle MIPS-lite processor
// at its default sizes (1024-word instruction and data memories).
//
// The whole instruction memory is loaded through the program-load port: a
// hand-written program at address 0, whose results are also checked against
// values worked out by hand, followed by random instructions of every
// supported kind (and a few unsupported encodings). Random branches only go
// forward, so execution sweeps through the whole memory and wraps back to the
// prologue instead of sticking in a loop. The data memory starts
// with random contents written into it by the testbench.
//
// An instruction-level model in the testbench executes the same memory
// image, one instruction per clock cycle. Before each rising edge the
// processor's PC, register write (enable, register, value) and data memory
// write (enable, address, value) are compared with the model's; at the end
// every register and every data memory word is compared. Because the model
// retires exactly one instruction per cycle, a processor that needed more
// than one cycle for any instruction would fall out of step with it.
//
// Each mechanism of the datapath is counted, and a count of zero is a
// failure: every instruction kind, beq taken and not taken, a backward
// branch, ori with immediate bit 15 set (zero extension), a memory access
// with a negative offset (sign extension), slti true and false, a write to
// register 0 (ignored), an unsupported encoding (executed as a no-op).
module tb_mips_lite_cpu;
  import mips_pkg::*;

  localparam int IW     = 1024;
  localparam int DW     = 1024;
  localparam int CYCLES = 20000;

  logic        clk = 0, rst_n = 0;
  logic        imem_we;
  logic [31:0] imem_addr, imem_wdata;
  logic [31:0] pc, instr, dmem_addr, dmem_wdata, reg_wdata;
  logic        dmem_we, reg_we, illegal;
  logic [4:0]  reg_waddr;

  mips_lite_cpu dut (
    .clk(clk), .rst_n(rst_n),
    .imem_we(imem_we), .imem_addr(imem_addr), .imem_wdata(imem_wdata),
    .pc(pc), .instr(instr),
    .dmem_we(dmem_we), .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata),
    .reg_we(reg_we), .reg_waddr(reg_waddr), .reg_wdata(reg_wdata),
    .illegal(illegal));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- encoders
  function automatic logic [31:0] r_type(logic [5:0] fn, int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] i_type(logic [5:0] opc, int rt, int rs, int imm);
    return {opc, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] addu_i(int rd, int rs, int rt); return r_type(6'h21, rd, rs, rt); endfunction
  function automatic logic [31:0] subu_i(int rd, int rs, int rt); return r_type(6'h23, rd, rs, rt); endfunction
  function automatic logic [31:0] ori_i (int rt, int rs, int imm); return i_type(6'h0d, rt, rs, imm); endfunction
  function automatic logic [31:0] slti_i(int rt, int rs, int imm); return i_type(6'h0a, rt, rs, imm); endfunction
  function automatic logic [31:0] lw_i  (int rt, int imm, int rs); return i_type(6'h23, rt, rs, imm); endfunction
  function automatic logic [31:0] sw_i  (int rt, int imm, int rs); return i_type(6'h2b, rt, rs, imm); endfunction
  function automatic logic [31:0] beq_i (int rs, int rt, int off); return i_type(6'h04, rt, rs, off); endfunction

  // ----------------------------------------------------------- model state
  logic [31:0] imem [IW];
  logic [31:0] m_reg [32];
  logic [31:0] m_mem [DW];
  logic [31:0] m_pc;

  // mechanism counters
  int n_addu, n_subu, n_ori, n_lw, n_sw, n_slti, n_beq_taken, n_beq_not;
  int n_back, n_ori_zext, n_neg_off, n_slti_1, n_slti_0, n_r0_wr, n_illegal;

  // What the model expects the processor to do in the current cycle
  typedef struct {
    logic        reg_we;
    logic [4:0]  reg_waddr;
    logic [31:0] reg_wdata;
    logic        mem_we;
    logic [31:0] mem_addr;
    logic [31:0] mem_wdata;
    logic [31:0] next_pc;
  } effect_t;

  function automatic effect_t model_eval(logic [31:0] w);
    effect_t     e;
    logic [5:0]  opc = w[31:26];
    logic [4:0]  rs = w[25:21], rt = w[20:16], rd = w[15:11];
    logic [5:0]  fn = w[5:0];
    logic [31:0] se = {{16{w[15]}}, w[15:0]};
    logic [31:0] ze = {16'h0, w[15:0]};
    logic [31:0] a = m_reg[rs], b = m_reg[rt];
    e = '{reg_we: 0, reg_waddr: 0, reg_wdata: 0, mem_we: 0, mem_addr: 0,
          mem_wdata: 0, next_pc: m_pc + 4};
    case (opc)
      6'h00: begin
        if (fn == 6'h21)      begin e.reg_we = 1; e.reg_waddr = rd; e.reg_wdata = a + b; end
        else if (fn == 6'h23) begin e.reg_we = 1; e.reg_waddr = rd; e.reg_wdata = a - b; end
      end
      6'h0d: begin e.reg_we = 1; e.reg_waddr = rt; e.reg_wdata = a | ze; end
      6'h0a: begin e.reg_we = 1; e.reg_waddr = rt; e.reg_wdata = ($signed(a) < $signed(se)) ? 1 : 0; end
      6'h23: begin e.reg_we = 1; e.reg_waddr = rt; e.reg_wdata = m_mem[((a + se) >> 2) % DW]; end
      6'h2b: begin e.mem_we = 1; e.mem_addr = a + se; e.mem_wdata = b; end
      6'h04: if (a == b) e.next_pc = m_pc + 4 + (se << 2);
      default: ;
    endcase
    if (e.reg_waddr == 0) e.reg_we = 0;
    return e;
  endfunction

  task automatic count(logic [31:0] w, effect_t e);
    logic [5:0] opc = w[31:26];
    logic [5:0] fn  = w[5:0];
    case (opc)
      6'h00: if (fn == 6'h21) n_addu++; else if (fn == 6'h23) n_subu++; else n_illegal++;
      6'h0d: begin n_ori++; if (w[15]) n_ori_zext++; end
      6'h0a: begin n_slti++; if (e.reg_wdata == 1) n_slti_1++; else n_slti_0++; end
      6'h23: begin n_lw++; if (w[15]) n_neg_off++; end
      6'h2b: begin n_sw++; if (w[15]) n_neg_off++; end
      6'h04: if (e.next_pc != m_pc + 4) begin n_beq_taken++; if (w[15]) n_back++; end
             else n_beq_not++;
      default: n_illegal++;
    endcase
    if ((opc == 6'h00 && (fn == 6'h21 || fn == 6'h23) && w[15:11] == 0) ||
        ((opc == 6'h0d || opc == 6'h0a || opc == 6'h23) && w[20:16] == 0)) n_r0_wr++;
  endtask

  task automatic cmp(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at pc=%h instr=%h: got %h exp %h", what, m_pc, instr, got, exp);
    end
  endtask

  task automatic cmp_min(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  // ------------------------------------------------------------ program
  // Hand-written prologue. Register values after it (checked at the end
  // of the prologue against numbers worked out by hand):
  //   r1 = 3, r2 = 0x8001, r3 = 0x8004, r4 = 1, r5 = -3, r6 = 0,
  //   r7 = 0x8004, r8 = 0x8004, r9 = 24, r10 = 0, r11 = 6, r12 = 0, r13 = 1
  //   mem[20] = 0x8004
  localparam int PROLOGUE = 22;
  task automatic build_prologue();
    int k = 0;
    imem[k++] = ori_i (1, 0, 3);          // 0  r1 = 3
    imem[k++] = ori_i (2, 0, 16'h8001);   // 1  r2 = 0x00008001 (zero-extended)
    imem[k++] = addu_i(3, 1, 2);          // 2  r3 = r1 + r2 = 0x8004
    imem[k++] = slti_i(4, 1, 17);         // 3  r4 = (3 < 17) = 1
    imem[k++] = subu_i(5, 0, 1);          // 4  r5 = 0 - 3
    imem[k++] = slti_i(6, 5, -4);         // 5  r6 = (-3 < -4) = 0
    imem[k++] = sw_i  (3, 17, 1);         // 6  mem[3 + 17] = r3
    imem[k++] = lw_i  (7, 17, 1);         // 7  r7 = mem[20]
    imem[k++] = ori_i (9, 0, 24);         // 8  r9 = 24
    imem[k++] = lw_i  (8, -4, 9);         // 9  r8 = mem[24 - 4]
    imem[k++] = addu_i(0, 1, 1);          // 10 write to r0 is ignored
    imem[k++] = beq_i (7, 3, 1);          // 11 taken: skip 12
    imem[k++] = ori_i (10, 0, 16'hdead);  // 12 skipped
    imem[k++] = beq_i (1, 2, 5);          // 13 not taken
    imem[k++] = ori_i (12, 0, 3);         // 14 r12 = 3 (loop counter)
    imem[k++] = ori_i (13, 0, 1);         // 15 r13 = 1
    imem[k++] = addu_i(11, 11, 13);       // 16 loop: r11 += 1
    imem[k++] = subu_i(12, 12, 13);       // 17 r12 -= 1
    imem[k++] = beq_i (12, 0, 1);         // 18 leave the loop when r12 == 0
    imem[k++] = beq_i (0, 0, -4);         // 19 back to 16
    imem[k++] = addu_i(11, 11, 1);        // 20 r11 = 3 + r1 = 6
    imem[k++] = ori_i (0, 0, 0);          // 21 write to r0 again
  endtask

  function automatic logic [31:0] random_instr();
    int kind = $urandom % 16;
    int r1 = 1 + $urandom % 15, r2 = $urandom % 16, r3 = $urandom % 16;
    int imm = $urandom;
    case (kind)
      0, 1:   return addu_i(r1, r2, r3);
      2, 3:   return subu_i(r1, r2, r3);
      4, 5:   return ori_i (r1, r2, imm);
      6, 7:   return slti_i(r1, r2, ($urandom % 2) ? imm : $signed(imm % 64));
      8, 9:   return lw_i  (r1, $signed(imm % 256), $urandom % 4);
      10, 11: return sw_i  (r3, $signed(imm % 256), $urandom % 4);
      12, 13: return beq_i (r2 % 8, r3 % 8, int'($urandom % 12));
      14:     return (($urandom % 4) == 0) ? r_type(6'h24, r1, r2, r3) : addu_i(r1, r2, r3);
      default: return (($urandom % 4) == 0) ? {6'h02, 26'($urandom)} : ori_i(r1, 0, imm);
    endcase
  endfunction

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (CYCLES + IW + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ main
  initial begin
    effect_t e;
    int cycles = 0;
    imem_we = 0; imem_addr = 0; imem_wdata = 0;
    build_prologue();
    for (int i = PROLOGUE; i < IW; i++) imem[i] = random_instr();
    for (int i = 0; i < DW; i++) begin
      m_mem[i] = $urandom;
      dut.u_dmem.mem[i] = m_mem[i];
    end
    for (int i = 0; i < 32; i++) m_reg[i] = 0;
    m_pc = 0;

    // load the program while the processor is held in reset
    for (int i = 0; i < IW; i++) begin
      @(negedge clk);
      imem_we = 1; imem_addr = 32'(i * 4); imem_wdata = imem[i];
    end
    @(negedge clk);
    imem_we = 0;
    #1;
    cmp("pc in reset", pc, 32'h0);
    cmp("no data write in reset", 32'(dmem_we), 32'h0);
    rst_n = 1;

    for (cycles = 0; cycles < CYCLES; cycles++) begin
      if (cycles != 0) @(negedge clk);
      cmp("pc", pc, m_pc);
      cmp("instr", instr, imem[m_pc[11:2]]);
      e = model_eval(imem[m_pc[11:2]]);
      count(imem[m_pc[11:2]], e);
      cmp("reg_we", 32'(reg_we), 32'(e.reg_we));
      if (e.reg_we) begin
        cmp("reg_waddr", 32'(reg_waddr), 32'(e.reg_waddr));
        cmp("reg_wdata", reg_wdata, e.reg_wdata);
      end
      cmp("dmem_we", 32'(dmem_we), 32'(e.mem_we));
      if (e.mem_we) begin
        cmp("dmem_addr", dmem_addr, e.mem_addr);
        cmp("dmem_wdata", dmem_wdata, e.mem_wdata);
      end
      // the model retires the instruction at the same clock edge
      @(posedge clk);
      if (e.reg_we) m_reg[e.reg_waddr] = e.reg_wdata;
      if (e.mem_we) m_mem[(e.mem_addr >> 2) % DW] = e.mem_wdata;
      m_pc = e.next_pc;
      if (cycles == 27) begin
        // hand-computed prologue results (the prologue takes 28 cycles)
        #1;
        cmp("hand r1",  dut.u_regfile.regs[1],  32'd3);
        cmp("hand r2",  dut.u_regfile.regs[2],  32'h8001);
        cmp("hand r3",  dut.u_regfile.regs[3],  32'h8004);
        cmp("hand r4",  dut.u_regfile.regs[4],  32'd1);
        cmp("hand r5",  dut.u_regfile.regs[5],  32'hffff_fffd);
        cmp("hand r6",  dut.u_regfile.regs[6],  32'd0);
        cmp("hand r7",  dut.u_regfile.regs[7],  32'h8004);
        cmp("hand r8",  dut.u_regfile.regs[8],  32'h8004);
        cmp("hand r10", dut.u_regfile.regs[10], 32'd0);
        cmp("hand r11", dut.u_regfile.regs[11], 32'd6);
        cmp("hand r12", dut.u_regfile.regs[12], 32'd0);
        cmp("hand mem[20]", dut.u_dmem.mem[5], 32'h8004);
      end
    end
    #1;
    // final architectural state
    for (int i = 1; i < 32; i++) cmp($sformatf("final r%0d", i), dut.u_regfile.regs[i], m_reg[i]);
    for (int i = 0; i < DW; i++) cmp($sformatf("final mem[%0d]", i), dut.u_dmem.mem[i], m_mem[i]);
    // one instruction per cycle: the model retired CYCLES instructions
    cmp("cycles per instruction", 32'(cycles), 32'(CYCLES));

    cmp_min("addu", n_addu);        cmp_min("subu", n_subu);
    cmp_min("ori", n_ori);          cmp_min("lw", n_lw);
    cmp_min("sw", n_sw);            cmp_min("slti", n_slti);
    cmp_min("beq taken", n_beq_taken);  cmp_min("beq not taken", n_beq_not);
    cmp_min("backward branch", n_back); cmp_min("ori zero extension", n_ori_zext);
    cmp_min("negative memory offset", n_neg_off);
    cmp_min("slti true", n_slti_1); cmp_min("slti false", n_slti_0);
    cmp_min("write to r0", n_r0_wr); cmp_min("unsupported encoding", n_illegal);
    $display("mechanisms: addu=%0d subu=%0d ori=%0d lw=%0d sw=%0d slti=%0d beq_taken=%0d beq_not=%0d",
             n_addu, n_subu, n_ori, n_lw, n_sw, n_slti, n_beq_taken, n_beq_not);
    $display("mechanisms: backward=%0d ori_zext=%0d neg_offset=%0d slti1=%0d slti0=%0d r0_write=%0d unsupported=%0d",
             n_back, n_ori_zext, n_neg_off, n_slti_1, n_slti_0, n_r0_wr, n_illegal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the illegal flag must agree with the model's view of supported encodings
  always @(negedge clk) if (rst_n) begin
    logic [5:0] o;
    logic       known;
    o     = instr[31:26];
    known = (o == 6'h00 && (instr[5:0] == 6'h21 || instr[5:0] == 6'h23)) ||
            o inside {6'h0d, 6'h0a, 6'h23, 6'h2b, 6'h04};
    checks++;
    if (illegal !== !known) begin failures++; $display("FAIL illegal flag instr=%h", instr); end
  end
endmodule
