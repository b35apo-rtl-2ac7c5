// Shared types and constants of the single-cycle RISC-V CPU.
//
// The opcodes are those of the RV32I base encoding for the instruction subset the
// CPU executes (lw, sw, R-type ALU, ALU-immediate, beq, jal, jalr, lui, auipc).
// The three-bit ALUControl code and the immediate-type code that the control unit
// hands to the immediate decoder are this design's own encodings: the datapath
// only needs them to be distinct.
package rv_pkg;

  // Major opcodes, instr[6:0]
  localparam logic [6:0] OP_LOAD   = 7'b0000011;  // lw
  localparam logic [6:0] OP_STORE  = 7'b0100011;  // sw
  localparam logic [6:0] OP_REG    = 7'b0110011;  // add, sub, slt, or, and
  localparam logic [6:0] OP_IMM    = 7'b0010011;  // addi, slti, ori, andi
  localparam logic [6:0] OP_BRANCH = 7'b1100011;  // beq
  localparam logic [6:0] OP_JAL    = 7'b1101111;  // jal
  localparam logic [6:0] OP_JALR   = 7'b1100111;  // jalr
  localparam logic [6:0] OP_LUI    = 7'b0110111;  // lui
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;  // auipc

  // funct3 values used by the subset
  localparam logic [2:0] F3_ADD  = 3'b000;  // add/sub/addi, also beq
  localparam logic [2:0] F3_SLT  = 3'b010;  // slt/slti, also lw/sw width "word"
  localparam logic [2:0] F3_OR   = 3'b110;
  localparam logic [2:0] F3_AND  = 3'b111;

  localparam logic [6:0] F7_ADD = 7'b0000000;
  localparam logic [6:0] F7_SUB = 7'b0100000;

  // ALUControl[2:0]
  typedef enum logic [2:0] {
    ALU_ADD = 3'b000,
    ALU_SUB = 3'b001,
    ALU_AND = 3'b010,
    ALU_OR  = 3'b011,
    ALU_SLT = 3'b101
  } alu_op_e;

  // Immediate format selected for the immediate decoder (TypeRISBUJ).
  // R-type has no immediate; IMM_I is then used and the value is ignored.
  typedef enum logic [2:0] {
    IMM_I = 3'd0,
    IMM_S = 3'd1,
    IMM_B = 3'd2,
    IMM_U = 3'd3,
    IMM_J = 3'd4
  } imm_type_e;

  // Source of the ALU's A operand: register rs1, the PC (auipc) or zero (lui)
  typedef enum logic [1:0] {
    SRCA_RS1  = 2'd0,
    SRCA_PC   = 2'd1,
    SRCA_ZERO = 2'd2
  } srca_sel_e;

  // Control signals produced by the control unit
  typedef struct packed {
    alu_op_e   alu_control;  // ALUControl
    logic      alu_src;      // ALUSrc: 0 = RD2, 1 = SignImm
    logic      reg_write;    // RegWrite
    logic      mem_write;    // MemWrite
    logic      mem_to_reg;   // MemToReg: 0 = AluOut, 1 = ReadData
    logic      branch;       // Branch (beq)
    logic      jump;         // jal: unconditional PC <- PC + SignImm
    logic      jump_reg;     // jalr: PC <- (rs1 + SignImm) & ~1
    logic      link;         // write PC+4 into rd (jal, jalr)
    srca_sel_e srca_sel;     // SrcA source
    imm_type_e imm_type;     // TypeRISBUJ
    logic      illegal;      // opcode/funct outside the implemented subset
  } ctrl_t;

endpackage
