// Control unit of the single-cycle CPU: a purely combinational decoder.
//
// Turns the instruction fields opcode (instr[6:0]), funct3 (instr[14:12]) and
// funct7 (instr[31:25]) into the control bundle ctrl (rv_pkg::ctrl_t):
//
//   instr  ALUControl ALUSrc RegWrite MemWrite MemToReg Branch  others
//   lw     add        1      1        0        1        0
//   sw     add        1      0        1        0        0       imm S
//   add    add        0      1        0        0        0
//   sub    sub        0      1        0        0        0
//   slt    slt        0      1        0        0        0
//   or     or         0      1        0        0        0
//   and    and        0      1        0        0        0
//   addi/slti/ori/andi  like the R-type op, ALUSrc 1
//   beq    sub        0      0        0        0        1       imm B, taken on Zero
//   jal    -          -      1        0        0        0       jump, link, imm J
//   jalr   add        1      1        0        0        0       jump_reg, link
//   lui    add        1      1        0        0        0       SrcA = 0, imm U
//   auipc  add        1      1        0        0        0       SrcA = PC, imm U
//
// The first nine rows are the classic single-cycle control table. The jal, jalr, lui and
// auipc rows, the extra signals (jump, jump_reg, link, srca_sel) and the rule that
// any other encoding (including lw/sw with another width, or a branch other than
// beq) writes neither a register nor memory and does not branch, are this
// design's own. Such an encoding raises ctrl.illegal.
module control_unit
  import rv_pkg::*;
(
  input  logic [6:0] opcode,
  input  logic [2:0] funct3,
  input  logic [6:0] funct7,
  output ctrl_t      ctrl
);

  // ALU operation for R-type (use_f7 = 1) and ALU-immediate instructions;
  // valid = 0 for an unimplemented combination.
  function automatic logic [3:0] alu_decode(input logic [2:0] f3, input logic [6:0] f7,
                                            input logic use_f7);
    logic [6:0] f7v;
    f7v = use_f7 ? f7 : F7_ADD;
    unique case (f3)
      F3_ADD:  if (f7v == F7_ADD)                 return {1'b1, ALU_ADD};
               else if (use_f7 && f7v == F7_SUB)  return {1'b1, ALU_SUB};
               else                               return {1'b0, ALU_ADD};
      F3_SLT:  return {(f7v == F7_ADD), ALU_SLT};
      F3_OR:   return {(f7v == F7_ADD), ALU_OR};
      F3_AND:  return {(f7v == F7_ADD), ALU_AND};
      default: return {1'b0, ALU_ADD};
    endcase
  endfunction

  logic [3:0] alu_dec;

  always_comb begin
    ctrl = '{alu_control: ALU_ADD, alu_src: 1'b0, reg_write: 1'b0, mem_write: 1'b0,
             mem_to_reg: 1'b0, branch: 1'b0, jump: 1'b0, jump_reg: 1'b0, link: 1'b0,
             srca_sel: SRCA_RS1, imm_type: IMM_I, illegal: 1'b0};
    alu_dec = alu_decode(funct3, funct7, opcode == OP_REG);

    unique case (opcode)
      OP_LOAD: begin
        if (funct3 == F3_SLT) begin            // 010: word
          ctrl.alu_src    = 1'b1;
          ctrl.reg_write  = 1'b1;
          ctrl.mem_to_reg = 1'b1;
        end else ctrl.illegal = 1'b1;
      end
      OP_STORE: begin
        ctrl.imm_type = IMM_S;
        if (funct3 == F3_SLT) begin            // 010: word
          ctrl.alu_src   = 1'b1;
          ctrl.mem_write = 1'b1;
        end else ctrl.illegal = 1'b1;
      end
      OP_REG, OP_IMM: begin
        ctrl.alu_control = alu_op_e'(alu_dec[2:0]);
        ctrl.alu_src     = (opcode == OP_IMM);
        ctrl.reg_write   = alu_dec[3];
        ctrl.illegal     = !alu_dec[3];
      end
      OP_BRANCH: begin
        ctrl.imm_type    = IMM_B;
        ctrl.alu_control = ALU_SUB;
        if (funct3 == F3_ADD) ctrl.branch = 1'b1;   // 000: beq
        else                  ctrl.illegal = 1'b1;
      end
      OP_JAL: begin
        ctrl.imm_type  = IMM_J;
        ctrl.jump      = 1'b1;
        ctrl.link      = 1'b1;
        ctrl.reg_write = 1'b1;
      end
      OP_JALR: begin
        if (funct3 == F3_ADD) begin
          ctrl.alu_src   = 1'b1;
          ctrl.jump_reg  = 1'b1;
          ctrl.link      = 1'b1;
          ctrl.reg_write = 1'b1;
        end else ctrl.illegal = 1'b1;
      end
      OP_LUI: begin
        ctrl.imm_type  = IMM_U;
        ctrl.alu_src   = 1'b1;
        ctrl.srca_sel  = SRCA_ZERO;
        ctrl.reg_write = 1'b1;
      end
      OP_AUIPC: begin
        ctrl.imm_type  = IMM_U;
        ctrl.alu_src   = 1'b1;
        ctrl.srca_sel  = SRCA_PC;
        ctrl.reg_write = 1'b1;
      end
      default: ctrl.illegal = 1'b1;
    endcase
  end

endmodule
