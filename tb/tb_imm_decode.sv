// Self-checking test of the immediate decoder. Instructions are assembled from
// known immediates (including the machine codes of the textbook examples:
// lw x2,0x400(x0), addi x7,x7,4, beq/bne of the loop example) and the decoded
// SignImm is compared with the immediate that was encoded.
module tb_imm_decode;
  import rv_pkg::*;
  import rv_asm_pkg::*;

  logic [31:0] instr, imm;
  imm_type_e   t;
  int          checks = 0, failures = 0;

  imm_decode dut (.instr(instr), .imm_type(t), .sign_imm(imm));

  task automatic check(logic [31:0] ins, imm_type_e ty, int exp);
    instr = ins; t = ty;
    #1;
    checks++;
    if (imm !== 32'(exp)) begin
      failures++;
      $display("FAIL %s instr=%h imm=%h exp=%h", ty.name(), ins, imm, 32'(exp));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h4000_2103, IMM_I, 'h400);   // lw x2, 0x400(x0)
    check(32'h0043_8393, IMM_I, 4);       // addi x7, x7, 4
    check(32'hfff0_0313, IMM_I, -1);      // addi t1, zero, -1
    check(32'h0005_0863, IMM_B, 16);      // beq a0, zero, done
    check(32'hfe05_1ce3, IMM_B, -8);      // bne a0, zero, loop
    check(BEQ(1, 2, -4096), IMM_B, -4096);
    check(BEQ(1, 2, 4094), IMM_B, 4094);
    for (int i = 0; i < 300; i++) begin
      int v;
      v = $signed(12'($urandom));          check(ADDI(i % 32, 3, v), IMM_I, v);
      v = $signed(12'($urandom));          check(SW(5, v, 6), IMM_S, v);
      v = $signed({13'($urandom)} & 13'h1ffe); check(BEQ(7, 8, v), IMM_B, v);
      v = int'($urandom) & 32'hffff_f000;  check(LUI(9, v >>> 12), IMM_U, v);
      v = $signed({21'($urandom)} & 21'h1ffffe); check(JAL(1, v), IMM_J, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
