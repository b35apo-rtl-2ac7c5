// Top level: a small Harvard computer built around the single-cycle RISC-V CPU,
// with the gate-level storage elements of a register beside it.
//
// The computer part joins riscv_sc_cpu to a separate instruction memory (instr_mem)
// and data memory (data_mem). A host loads the program through prog_* (one word
// per clock, byte address) while rst is held, then releases rst: the PC starts at
// RESET_PC and one instruction completes per clock. pc, instr and the data-memory
// bus (dmem_*) are brought out so that the program's progress and its stores can be
// observed. The I/O devices of a von Neumann computer are not part of this design.
//
// Independently of the computer, the top carries a D latch (latch_*), the same
// latch as a NAND-gate model with gate delays (gl_latch_*), and a D flip-flop made
// from the NAND-gate latch and a clock-edge pulse generator (ff_*). The gate-level latch and
// the flip-flop are behavioural timing models: they work through modelled gate
// delays, so they are meaningful in an event-driven simulation and not in
// synthesis.
module sc_computer #(
  parameter int          IMEM_WORDS = 1024,
  parameter int          DMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0200
) (
  input  logic        clk,
  input  logic        rst,
  // program loading
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_wdata,
  // observation
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        dmem_we,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  output logic        illegal_instr,
  // D latch
  input  logic        latch_d,
  input  logic        latch_e,
  output logic        latch_q,
  output logic        latch_qn,
  // the same latch as a NAND-gate timing model
  input  logic        gl_latch_d,
  input  logic        gl_latch_e,
  output logic        gl_latch_q,
  output logic        gl_latch_qn,
  // edge-triggered D flip-flop built from the latch
  input  logic        ff_d,
  input  logic        ff_clk,
  output logic        ff_q,
  output logic        ff_qn
);

  logic [31:0] dmem_rdata;

  riscv_sc_cpu #(.RESET_PC(RESET_PC)) u_cpu (
    .clk(clk), .rst(rst),
    .imem_addr(pc), .imem_rdata(instr),
    .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata), .dmem_we(dmem_we),
    .dmem_rdata(dmem_rdata), .illegal(illegal_instr)
  );

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk(clk), .load_we(prog_we), .load_addr(prog_addr), .load_data(prog_wdata),
    .a(pc), .rd(instr)
  );

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk(clk), .we(dmem_we), .a(dmem_addr), .wd(dmem_wdata), .rd(dmem_rdata)
  );

  d_latch u_latch (.d(latch_d), .e(latch_e), .q(latch_q), .q_n(latch_qn));

  nand_d_latch u_gl_latch (.d(gl_latch_d), .e(gl_latch_e), .q(gl_latch_q), .q_n(gl_latch_qn));

  pulse_dff u_ff (.d(ff_d), .clk(ff_clk), .q(ff_q), .q_n(ff_qn));

endmodule
