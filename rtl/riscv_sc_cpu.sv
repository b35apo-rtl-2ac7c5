// Single-cycle RISC-V CPU core (RV32I subset).
//
// Every instruction is fetched, decoded and executed within one clock period; the
// only state updated at the rising clock edge is the PC, the register file and
// the data memory. The datapath:
//
//   PC -> instruction memory -> Instr
//   Instr[19:15] -> A1 -> RD1 -> SrcA     Instr[24:20] -> A2 -> RD2 -> WriteData
//   Instr -> Imm decode -> SignImm;  SrcB = ALUSrc ? SignImm : RD2
//   ALU(SrcA, SrcB) -> AluOut -> data memory A;  Result = MemToReg ? ReadData : AluOut
//   Result -> WD3, Instr[11:7] -> A3
//   PCPlus4 = PC + 4;  PCBranch = PC + SignImm
//   PC' = (Branch & Zero) ? PCBranch : PCPlus4
//
// This is the classic single-cycle datapath for lw, sw, add, sub, and, or, slt, addi and beq
// (with slti, ori and andi that use the same path). For jal, jalr, lui and auipc,
// which that basic datapath does not cover, this design adds: a SrcA selector
// (rs1, PC for auipc, zero for lui), an unconditional jump that takes PCBranch
// (jal), a register jump that takes AluOut with bit 0 cleared (jalr), and a
// PCPlus4 input to the result selector for the link value (jal, jalr).
//
// Memories sit outside the core: imem_* is the instruction-memory read port and
// dmem_* the data-memory port (combinational read, write at the clock edge).
// illegal flags an encoding outside the subset; it then changes nothing but the
// PC, which advances by 4. While rst is high the core stores nothing to memory
// and the register file is held cleared.
module riscv_sc_cpu
  import rv_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0200
) (
  input  logic        clk,
  input  logic        rst,
  // instruction memory
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  // data memory
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  output logic        dmem_we,
  input  logic [31:0] dmem_rdata,
  // the current instruction is outside the implemented subset (executed as a no-op)
  output logic        illegal
);

  logic [31:0] pc, pc_next, pc_seq_or_branch, pc_plus4, pc_branch, pc_jalr;
  logic [31:0] instr, sign_imm;
  logic [31:0] rd1, rd2, src_a, src_b, alu_out;
  logic [31:0] mem_or_alu, result;
  logic        zero, negative, pc_src;
  ctrl_t       ctrl;

  // ---- fetch --------------------------------------------------------------
  pc_register #(.WIDTH(32), .RESET_VALUE(RESET_PC)) u_pc (
    .clk(clk), .rst(rst), .d(pc_next), .q(pc)
  );

  assign imem_addr = pc;
  assign instr     = imem_rdata;

  adder #(.WIDTH(32)) u_pc_plus4 (.a(pc), .b(32'd4), .y(pc_plus4));

  // ---- decode -------------------------------------------------------------
  control_unit u_ctrl (
    .opcode(instr[6:0]), .funct3(instr[14:12]), .funct7(instr[31:25]), .ctrl(ctrl)
  );

  regfile #(.WIDTH(32), .NREGS(32)) u_rf (
    .clk(clk), .rst(rst), .we3(ctrl.reg_write),
    .a1(instr[19:15]), .a2(instr[24:20]), .a3(instr[11:7]),
    .wd3(result), .rd1(rd1), .rd2(rd2)
  );

  imm_decode u_imm (.instr(instr), .imm_type(ctrl.imm_type), .sign_imm(sign_imm));

  // ---- execute ------------------------------------------------------------
  always_comb begin
    unique case (ctrl.srca_sel)
      SRCA_PC:   src_a = pc;
      SRCA_ZERO: src_a = '0;
      default:   src_a = rd1;
    endcase
  end

  mux2 #(.WIDTH(32)) u_srcb_mux (.d0(rd2), .d1(sign_imm), .s(ctrl.alu_src), .y(src_b));

  alu #(.WIDTH(32)) u_alu (
    .src_a(src_a), .src_b(src_b), .alu_control(ctrl.alu_control),
    .alu_out(alu_out), .zero(zero), .negative(negative)
  );

  // ---- memory -------------------------------------------------------------
  assign dmem_addr  = alu_out;
  assign dmem_wdata = rd2;
  assign dmem_we    = ctrl.mem_write & ~rst;   // no stores while reset is held

  // ---- write back ---------------------------------------------------------
  mux2 #(.WIDTH(32)) u_result_mux (
    .d0(alu_out), .d1(dmem_rdata), .s(ctrl.mem_to_reg), .y(mem_or_alu)
  );
  mux2 #(.WIDTH(32)) u_link_mux (
    .d0(mem_or_alu), .d1(pc_plus4), .s(ctrl.link), .y(result)
  );

  // ---- next PC ------------------------------------------------------------
  adder #(.WIDTH(32)) u_pc_branch (.a(pc), .b(sign_imm), .y(pc_branch));

  assign pc_src  = (ctrl.branch & zero) | ctrl.jump;
  assign pc_jalr = {alu_out[31:1], 1'b0};

  mux2 #(.WIDTH(32)) u_pc_mux (
    .d0(pc_plus4), .d1(pc_branch), .s(pc_src), .y(pc_seq_or_branch)
  );
  mux2 #(.WIDTH(32)) u_jalr_mux (
    .d0(pc_seq_or_branch), .d1(pc_jalr), .s(ctrl.jump_reg), .y(pc_next)
  );

  assign illegal = ctrl.illegal;

  // An instruction never writes both a register and memory.
  a_no_double_write: assert property (@(posedge clk) disable iff (rst)
    !(ctrl.reg_write && ctrl.mem_write));

  // The sign flag is not used by the instruction subset (beq needs only Zero).
  logic unused_negative;
  assign unused_negative = negative;

endmodule
