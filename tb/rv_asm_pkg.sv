// Instruction encoders for the testbenches: build RV32I machine words from
// register numbers and immediates, following the R/I/S/B/U/J field layouts of
// the base ISA. Written independently of the design's decoder, so that a
// testbench can assemble programs and know what each field should decode to.
package rv_asm_pkg;

  function automatic logic [31:0] r_type(input logic [6:0] f7, input int rs2, input int rs1,
                                         input logic [2:0] f3, input int rd, input logic [6:0] op);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), op};
  endfunction

  function automatic logic [31:0] i_type(input int imm, input int rs1, input logic [2:0] f3,
                                         input int rd, input logic [6:0] op);
    logic [11:0] i = 12'(imm);
    return {i, 5'(rs1), f3, 5'(rd), op};
  endfunction

  function automatic logic [31:0] s_type(input int imm, input int rs2, input int rs1,
                                         input logic [2:0] f3, input logic [6:0] op);
    logic [11:0] i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), f3, i[4:0], op};
  endfunction

  function automatic logic [31:0] b_type(input int imm, input int rs2, input int rs1,
                                         input logic [2:0] f3, input logic [6:0] op);
    logic [12:0] i = 13'(imm);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), f3, i[4:1], i[11], op};
  endfunction

  function automatic logic [31:0] u_type(input int imm20, input int rd, input logic [6:0] op);
    logic [19:0] i = 20'(imm20);
    return {i, 5'(rd), op};
  endfunction

  function automatic logic [31:0] j_type(input int imm, input int rd, input logic [6:0] op);
    logic [20:0] i = 21'(imm);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), op};
  endfunction

  // Named instructions of the implemented subset
  function automatic logic [31:0] ADD (int rd, int rs1, int rs2); return r_type(7'h00, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SUB (int rd, int rs1, int rs2); return r_type(7'h20, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLT (int rd, int rs1, int rs2); return r_type(7'h00, rs2, rs1, 3'b010, rd, 7'b0110011); endfunction
  function automatic logic [31:0] OR  (int rd, int rs1, int rs2); return r_type(7'h00, rs2, rs1, 3'b110, rd, 7'b0110011); endfunction
  function automatic logic [31:0] AND (int rd, int rs1, int rs2); return r_type(7'h00, rs2, rs1, 3'b111, rd, 7'b0110011); endfunction
  function automatic logic [31:0] ADDI(int rd, int rs1, int imm); return i_type(imm, rs1, 3'b000, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLTI(int rd, int rs1, int imm); return i_type(imm, rs1, 3'b010, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ORI (int rd, int rs1, int imm); return i_type(imm, rs1, 3'b110, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ANDI(int rd, int rs1, int imm); return i_type(imm, rs1, 3'b111, rd, 7'b0010011); endfunction
  function automatic logic [31:0] LW  (int rd, int imm, int rs1); return i_type(imm, rs1, 3'b010, rd, 7'b0000011); endfunction
  function automatic logic [31:0] SW  (int rs2, int imm, int rs1); return s_type(imm, rs2, rs1, 3'b010, 7'b0100011); endfunction
  function automatic logic [31:0] BEQ (int rs1, int rs2, int off); return b_type(off, rs2, rs1, 3'b000, 7'b1100011); endfunction
  function automatic logic [31:0] BNE (int rs1, int rs2, int off); return b_type(off, rs2, rs1, 3'b001, 7'b1100011); endfunction
  function automatic logic [31:0] JAL (int rd, int off);           return j_type(off, rd, 7'b1101111); endfunction
  function automatic logic [31:0] JALR(int rd, int rs1, int imm);  return i_type(imm, rs1, 3'b000, rd, 7'b1100111); endfunction
  function automatic logic [31:0] LUI (int rd, int imm20);         return u_type(imm20, rd, 7'b0110111); endfunction
  function automatic logic [31:0] AUIPC(int rd, int imm20);        return u_type(imm20, rd, 7'b0010111); endfunction
  function automatic logic [31:0] SRLI(int rd, int rs1, int sh);   return i_type(sh, rs1, 3'b101, rd, 7'b0010011); endfunction

  // A random instruction, mostly from the implemented subset. Registers are drawn
  // from x0..x15 so that operands repeat often (equal operands make beq taken).
  // Branch and jal offsets stay within +-256 bytes; jalr goes wherever its
  // register points. About one instruction in 40 is outside the subset.
  function automatic logic [31:0] rand_instr();
    int rd = $urandom % 16, a = $urandom % 16, b = $urandom % 16;
    int im = $signed(12'($urandom));
    int off = (int'($urandom % 128) - 64) * 4;
    int sel = int'($urandom % 40);
    if (off == 0) off = 8;
    case (sel)
      0, 1:   return ADD(rd, a, b);
      2, 3:   return SUB(rd, a, b);
      4, 5:   return SLT(rd, a, b);
      6, 7:   return OR(rd, a, b);
      8, 9:   return AND(rd, a, b);
      10, 11, 12, 13: return ADDI(rd, a, im);
      14, 15: return SLTI(rd, a, im);
      16, 17: return ORI(rd, a, im);
      18, 19: return ANDI(rd, a, im);
      20, 21, 22: return LW(rd, im, a);
      23, 24, 25: return SW(b, im, a);
      26, 27: return BEQ(a, b, off);
      28:     return BEQ(a, a, off);
      29:     return JAL(rd, off);
      30:     return JALR(rd, a, im);
      31, 32: return LUI(rd, int'($urandom));
      33, 34: return AUIPC(rd, int'($urandom));
      35:     return ADD(0, a, b);
      36:     return ADDI(rd, 0, im);
      37:     return SW(b, $signed(12'($urandom % 64) << 2), 0);
      38:     return BNE(a, b, off);
      default: return $urandom;
    endcase
  endfunction

endpackage
