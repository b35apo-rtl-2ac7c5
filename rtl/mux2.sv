// Two-input multiplexer.
//
// Copies d0 to y when the select input s is 0 and d1 when it is 1. The CPU uses it
// for the ALU's B operand (ALUSrc), the write-back value (MemToReg) and the next PC
// (PCSrc). Purely combinational; WIDTH defaults to the 32-bit datapath width.
module mux2 #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             s,
  output logic [WIDTH-1:0] y
);

  always_comb y = s ? d1 : d0;

endmodule
