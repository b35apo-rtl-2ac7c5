// Program counter: a WIDTH-bit register that stores its input d at the rising
// clock edge.
//
// Every clock the PC takes the next-instruction address PC' computed by the
// datapath, which starts the fetch of that instruction. A synchronous active-high
// reset loads RESET_VALUE, the address of the first instruction. The reset value
// 0x200 follows the example program, whose entry point sits at that address; the
// synchronous reset itself is this design's choice.
module pc_register #(
  parameter int               WIDTH       = 32,
  parameter logic [WIDTH-1:0] RESET_VALUE = 'h200
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst) q <= RESET_VALUE;
    else     q <= d;
  end

endmodule
