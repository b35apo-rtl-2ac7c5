// Two-operand adder of the datapath (PC+4 and the branch target PC+SignImm).
// Combinational, result taken modulo 2**WIDTH.
module adder #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  always_comb y = a + b;

endmodule
