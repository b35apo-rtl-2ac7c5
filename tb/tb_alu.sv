// Self-checking test of the ALU: directed corner cases and random operands for
// add, sub, and, or and slt, compared with a reference computed here; checks the
// zero and sign flags too. Combinational: results are sampled 1 ns after inputs.
module tb_alu;
  import rv_pkg::*;

  logic [31:0] a, b, y;
  alu_op_e     op;
  logic        zero, negative;
  int          checks = 0, failures = 0;

  alu dut (.src_a(a), .src_b(b), .alu_control(op), .alu_out(y), .zero(zero), .negative(negative));

  function automatic logic [31:0] ref_alu(alu_op_e o, logic [31:0] x, logic [31:0] z);
    case (o)
      ALU_ADD: return x + z;
      ALU_SUB: return x - z;
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_SLT: begin
        // signed compare done by hand: differing signs decide, else unsigned order
        if (x[31] != z[31]) return {31'b0, x[31]};
        return {31'b0, (x < z)};
      end
      default: return 0;
    endcase
  endfunction

  task automatic check(alu_op_e o, logic [31:0] x, logic [31:0] z);
    logic [31:0] e;
    a = x; b = z; op = o;
    #1;
    e = ref_alu(o, x, z);
    checks++;
    if (y !== e || zero !== (e == 0) || negative !== e[31]) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h z=%b n=%b", o.name(), x, z, y, e, zero, negative);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e ops[5] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_SLT};
    check(ALU_ADD, 32'd2, 32'd3);
    check(ALU_ADD, 32'hffff_ffff, 32'd1);          // wraps to zero
    check(ALU_SUB, 32'd5, 32'd5);                  // zero flag (beq equal)
    check(ALU_SUB, 32'd3, 32'd5);                  // negative
    check(ALU_SLT, 32'hffff_ffff, 32'd1);          // -1 < 1
    check(ALU_SLT, 32'd1, 32'hffff_ffff);
    check(ALU_SLT, 32'h8000_0000, 32'h7fff_ffff);
    check(ALU_AND, 32'hf0f0_f0f0, 32'h0ff0_0ff0);
    check(ALU_OR,  32'hf0f0_0000, 32'h0000_0f0f);
    for (int i = 0; i < 2000; i++) check(ops[i % 5], $urandom, $urandom);
    for (int i = 0; i < 500; i++) begin
      logic [31:0] r = $urandom;
      check(ALU_SUB, r, r);
      check(ALU_SLT, r, r + ($urandom % 4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
