// Register file: NREGS general-purpose registers of WIDTH bits.
//
// Two read ports: a1 and a2 select the registers shown, combinationally, on rd1
// and rd2. One write port: when we3 is high, wd3 is written into the register
// selected by a3 at the rising clock edge. Register 0 is the constant zero: it
// reads as 0 and writes to it are discarded. A read of the register being written
// in the same cycle returns the old value; the new one appears after the edge.
// The synchronous reset that clears every register is this design's choice, so
// that a program never reads an uninitialised register.
module regfile #(
  parameter int WIDTH = 32,
  parameter int NREGS = 32,
  localparam int AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we3,
  input  logic [AW-1:0]    a1,
  input  logic [AW-1:0]    a2,
  input  logic [AW-1:0]    a3,
  input  logic [WIDTH-1:0] wd3,
  output logic [WIDTH-1:0] rd1,
  output logic [WIDTH-1:0] rd2
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we3 && a3 != '0) begin
      regs[a3] <= wd3;
    end
  end

  assign rd1 = (a1 == '0) ? '0 : regs[a1];
  assign rd2 = (a2 == '0) ? '0 : regs[a2];

endmodule
