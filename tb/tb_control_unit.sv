// Self-checking test of the control unit. The expected signals for lw, sw, add,
// sub, slt, or, and, addi and beq are the rows of the classic single-cycle control table
// (ALUControl, ALUSrc, RegWrite, MemWrite, MemToReg, Branch); slti, ori, andi,
// jal, jalr, lui and auipc and a set of unimplemented encodings are checked
// against this design's extension of that table.
module tb_control_unit;
  import rv_pkg::*;
  import rv_asm_pkg::*;

  logic [31:0] instr;
  ctrl_t       c;
  int          checks = 0, failures = 0;

  control_unit dut (.opcode(instr[6:0]), .funct3(instr[14:12]), .funct7(instr[31:25]), .ctrl(c));

  // exp: {alu_src, reg_write, mem_write, mem_to_reg, branch}; mem_to_reg ignored when mtr_x
  task automatic check(string name, logic [31:0] ins, alu_op_e aop, logic [4:0] exp,
                       bit mtr_x = 0, logic jump = 0, logic jump_reg = 0, logic link = 0,
                       srca_sel_e sa = SRCA_RS1, logic illegal = 0);
    logic [4:0] got;
    instr = ins;
    #1;
    got = {c.alu_src, c.reg_write, c.mem_write, c.mem_to_reg, c.branch};
    if (mtr_x) begin got[1] = 0; exp[1] = 0; end
    checks++;
    if (got !== exp || c.jump !== jump || c.jump_reg !== jump_reg || c.link !== link ||
        c.srca_sel !== sa || c.illegal !== illegal ||
        (!illegal && (exp[3] || exp[2] || exp[0]) && !jump && c.alu_control !== aop)) begin
      failures++;
      $display("FAIL %s: got src/rw/mw/m2r/br=%b alu=%s j=%b jr=%b l=%b sa=%s ill=%b", name, got,
               c.alu_control.name(), c.jump, c.jump_reg, c.link, c.srca_sel.name(), c.illegal);
    end
  endtask

  task automatic check_imm(string name, logic [31:0] ins, imm_type_e t);
    instr = ins;
    #1;
    checks++;
    if (c.imm_type !== t) begin
      failures++;
      $display("FAIL %s imm type %s", name, c.imm_type.name());
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 40; r++) begin
      int rd = $urandom % 32, a = $urandom % 32, b = $urandom % 32, im = $signed(12'($urandom));
      //                                       ALUSrc RegW MemW M2R Branch
      check("lw",   LW(rd, im, a),   ALU_ADD, 5'b1_1_0_1_0);
      check("sw",   SW(b, im, a),    ALU_ADD, 5'b1_0_1_0_0);
      check("add",  ADD(rd, a, b),   ALU_ADD, 5'b0_1_0_0_0);
      check("sub",  SUB(rd, a, b),   ALU_SUB, 5'b0_1_0_0_0);
      check("slt",  SLT(rd, a, b),   ALU_SLT, 5'b0_1_0_0_0);
      check("or",   OR(rd, a, b),    ALU_OR,  5'b0_1_0_0_0);
      check("and",  AND(rd, a, b),   ALU_AND, 5'b0_1_0_0_0);
      check("addi", ADDI(rd, a, im), ALU_ADD, 5'b1_1_0_0_0);
      check("beq",  BEQ(a, b, im & ~1), ALU_SUB, 5'b0_0_0_0_1, 1);
      check("slti", SLTI(rd, a, im), ALU_SLT, 5'b1_1_0_0_0);
      check("ori",  ORI(rd, a, im),  ALU_OR,  5'b1_1_0_0_0);
      check("andi", ANDI(rd, a, im), ALU_AND, 5'b1_1_0_0_0);
      check("jal",  JAL(rd, im & ~1), ALU_ADD, 5'b0_1_0_0_0, 0, 1, 0, 1);
      check("jalr", JALR(rd, a, im), ALU_ADD, 5'b1_1_0_0_0, 0, 0, 1, 1);
      check("lui",  LUI(rd, im),     ALU_ADD, 5'b1_1_0_0_0, 0, 0, 0, 0, SRCA_ZERO);
      check("auipc", AUIPC(rd, im),  ALU_ADD, 5'b1_1_0_0_0, 0, 0, 0, 0, SRCA_PC);
      // encodings outside the subset: nothing written, no branch
      check("bne",  BNE(a, b, 8),    ALU_SUB, 5'b0_0_0_0_0, 1, 0, 0, 0, SRCA_RS1, 1);
      check("srli", SRLI(rd, a, 1),  ALU_ADD, 5'b1_0_0_0_0, 0, 0, 0, 0, SRCA_RS1, 1);
      check("lb",   i_type(im, a, 3'b000, rd, 7'b0000011), ALU_ADD, 5'b0_0_0_0_0, 0, 0, 0, 0, SRCA_RS1, 1);
      check("sb",   s_type(im, b, a, 3'b000, 7'b0100011),  ALU_ADD, 5'b0_0_0_0_0, 0, 0, 0, 0, SRCA_RS1, 1);
      check("mul",  r_type(7'h01, b, a, 3'b000, rd, 7'b0110011), ALU_ADD, 5'b0_0_0_0_0, 0, 0, 0, 0, SRCA_RS1, 1);
      check("subi?", i_type(im, a, 3'b001, rd, 7'b0010011), ALU_ADD, 5'b1_0_0_0_0, 0, 0, 0, 0, SRCA_RS1, 1);
      check("fp-ld", i_type(im, a, 3'b010, rd, 7'b0000111), ALU_ADD, 5'b0_0_0_0_0, 0, 0, 0, 0, SRCA_RS1, 1);
      check_imm("lw",  LW(rd, im, a), IMM_I);
      check_imm("sw",  SW(b, im, a),  IMM_S);
      check_imm("beq", BEQ(a, b, 8),  IMM_B);
      check_imm("lui", LUI(rd, im),   IMM_U);
      check_imm("auipc", AUIPC(rd, im), IMM_U);
      check_imm("jal", JAL(rd, 8),    IMM_J);
      check_imm("jalr", JALR(rd, a, im), IMM_I);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
