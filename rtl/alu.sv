// Arithmetic-logic unit of the single-cycle CPU.
//
// Applies the operation chosen by alu_control (ALUControl) to src_a and src_b and
// drives the result on alu_out. Operations: add, sub, and, or and slt (signed
// set-less-than, result 1 or 0). Two flags describe the result: zero (used by beq
// after a subtraction) and negative, the result's sign bit. Purely combinational.
// The set of operations follows the instruction subset; the three-bit operation
// codes are defined in rv_pkg and are this design's own.
module alu
  import rv_pkg::*;
#(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] src_a,
  input  logic [WIDTH-1:0] src_b,
  input  alu_op_e          alu_control,
  output logic [WIDTH-1:0] alu_out,
  output logic             zero,
  output logic             negative
);

  always_comb begin
    unique case (alu_control)
      ALU_ADD: alu_out = src_a + src_b;
      ALU_SUB: alu_out = src_a - src_b;
      ALU_AND: alu_out = src_a & src_b;
      ALU_OR:  alu_out = src_a | src_b;
      ALU_SLT: alu_out = WIDTH'($signed(src_a) < $signed(src_b));
      default: alu_out = '0;
    endcase
  end

  assign zero     = (alu_out == '0);
  assign negative = alu_out[WIDTH-1];

endmodule
