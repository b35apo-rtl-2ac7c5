// Immediate decoder ("Imm decode").
//
// Picks the immediate bits that the instruction format scatters over the
// instruction word and sign-extends them to a 32-bit signed value, SignImm:
//   I: instr[31:20]                                  (lw, addi, jalr, ...)
//   S: instr[31:25], instr[11:7]                     (sw)
//   B: instr[31], instr[7], instr[30:25], instr[11:8], 0   (beq, offset in bytes)
//   U: instr[31:12], twelve zeros                    (lui, auipc)
//   J: instr[31], instr[19:12], instr[20], instr[30:21], 0 (jal)
// The bit placement is that of the RISC-V formats; instr[31] is always the sign.
// imm_type comes from the control unit. Purely combinational.
module imm_decode
  import rv_pkg::*;
(
  input  logic [31:0] instr,
  input  imm_type_e   imm_type,
  output logic [31:0] sign_imm
);

  always_comb begin
    unique case (imm_type)
      IMM_I:   sign_imm = {{20{instr[31]}}, instr[31:20]};
      IMM_S:   sign_imm = {{20{instr[31]}}, instr[31:25], instr[11:7]};
      IMM_B:   sign_imm = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
      IMM_U:   sign_imm = {instr[31:12], 12'b0};
      IMM_J:   sign_imm = {{11{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};
      default: sign_imm = {{20{instr[31]}}, instr[31:20]};
    endcase
  end

endmodule
