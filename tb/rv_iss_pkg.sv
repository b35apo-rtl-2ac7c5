// Instruction-level reference model for the CPU testbenches.
//
// rv_iss executes one instruction per call of step(), straight from the RV32I
// semantics of the implemented subset (lw, sw, add, sub, slt, or, and, addi,
// slti, ori, andi, beq, jal, jalr, lui, auipc); any other encoding changes only
// the PC (+4), as the design specifies. Both memories hold 1024 words and are
// indexed by address bits [11:2], like the design's default memories, so a
// program may jump or store anywhere. step() reports what the instruction did so
// that a testbench can compare the design's PC and data-memory writes with it and
// count which mechanisms a program exercised.
package rv_iss_pkg;

  typedef enum int {
    EV_LW, EV_SW, EV_ADD, EV_SUB, EV_SLT, EV_OR, EV_AND, EV_ADDI, EV_SLTI, EV_ORI,
    EV_ANDI, EV_BEQ_TAKEN, EV_BEQ_NOT_TAKEN, EV_JAL, EV_JALR, EV_LUI, EV_AUIPC,
    EV_ILLEGAL, EV_COUNT
  } event_e;

  typedef struct {
    logic [31:0] pc;         // address of the executed instruction
    logic [31:0] instr;
    bit          store;      // a data-memory write happened
    logic [31:0] st_addr;
    logic [31:0] st_data;
    bit          illegal;
    bit          x0_write;   // a result was written to x0 and discarded
    event_e      ev;
  } step_t;

  class rv_iss;
    logic [31:0] x    [32];
    logic [31:0] imem [1024];
    logic [31:0] dmem [1024];
    logic [31:0] pc;

    function new(logic [31:0] reset_pc);
      pc = reset_pc;
      foreach (x[i]) x[i] = 0;
      foreach (imem[i]) imem[i] = 0;
      foreach (dmem[i]) dmem[i] = 0;
    endfunction

    function automatic step_t step();
      step_t       s;
      logic [31:0] ins = imem[pc[11:2]];
      logic [6:0]  op  = ins[6:0];
      logic [2:0]  f3  = ins[14:12];
      logic [6:0]  f7  = ins[31:25];
      int          rd  = int'(ins[11:7]), rs1 = int'(ins[19:15]), rs2 = int'(ins[24:20]);
      logic [31:0] a   = x[rs1], b = x[rs2];
      logic [31:0] ii  = {{20{ins[31]}}, ins[31:20]};
      logic [31:0] is  = {{20{ins[31]}}, ins[31:25], ins[11:7]};
      logic [31:0] ib  = {{20{ins[31]}}, ins[7], ins[30:25], ins[11:8], 1'b0};
      logic [31:0] iu  = {ins[31:12], 12'b0};
      logic [31:0] ij  = {{12{ins[31]}}, ins[19:12], ins[20], ins[30:21], 1'b0};
      logic [31:0] npc = pc + 4;
      logic [31:0] wv;
      bit          wr  = 0;
      s.pc = pc; s.instr = ins; s.store = 0; s.st_addr = 0; s.st_data = 0; s.illegal = 0;
      s.ev = EV_ILLEGAL;
      case (op)
        7'b0000011: if (f3 == 3'b010) begin wv = dmem[(a + ii) >> 2 & 1023]; wr = 1; s.ev = EV_LW; end
        7'b0100011: if (f3 == 3'b010) begin
                      s.store = 1; s.st_addr = a + is; s.st_data = b; s.ev = EV_SW;
                      dmem[s.st_addr[11:2]] = b;
                    end
        7'b0110011: begin
          case ({f7, f3})
            {7'h00, 3'b000}: begin wv = a + b; wr = 1; s.ev = EV_ADD; end
            {7'h20, 3'b000}: begin wv = a - b; wr = 1; s.ev = EV_SUB; end
            {7'h00, 3'b010}: begin wv = ($signed(a) < $signed(b)) ? 1 : 0; wr = 1; s.ev = EV_SLT; end
            {7'h00, 3'b110}: begin wv = a | b; wr = 1; s.ev = EV_OR; end
            {7'h00, 3'b111}: begin wv = a & b; wr = 1; s.ev = EV_AND; end
            default: ;
          endcase
        end
        7'b0010011: begin
          case (f3)
            3'b000: begin wv = a + ii; wr = 1; s.ev = EV_ADDI; end
            3'b010: begin wv = ($signed(a) < $signed(ii)) ? 1 : 0; wr = 1; s.ev = EV_SLTI; end
            3'b110: begin wv = a | ii; wr = 1; s.ev = EV_ORI; end
            3'b111: begin wv = a & ii; wr = 1; s.ev = EV_ANDI; end
            default: ;
          endcase
        end
        7'b1100011: if (f3 == 3'b000) begin
                      if (a == b) begin npc = pc + ib; s.ev = EV_BEQ_TAKEN; end
                      else s.ev = EV_BEQ_NOT_TAKEN;
                    end
        7'b1101111: begin wv = pc + 4; wr = 1; npc = pc + ij; s.ev = EV_JAL; end
        7'b1100111: if (f3 == 3'b000) begin
                      wv = pc + 4; wr = 1; npc = (a + ii) & ~32'd1; s.ev = EV_JALR;
                    end
        7'b0110111: begin wv = iu; wr = 1; s.ev = EV_LUI; end
        7'b0010111: begin wv = pc + iu; wr = 1; s.ev = EV_AUIPC; end
        default: ;
      endcase
      s.illegal = (s.ev == EV_ILLEGAL);
      s.x0_write = wr && rd == 0;
      if (wr && rd != 0) x[rd] = wv;
      pc = npc;
      return s;
    endfunction
  endclass

endpackage
