// Data memory of WORDS 32-bit words.
//
// Read: rd shows, combinationally, the word at byte address a (a[1:0] ignored,
// word index taken modulo WORDS). Write: when we is high, wd is stored into the
// addressed word at the rising clock edge. Only whole words are accessed, which is
// all lw and sw need. The size and the address wrap-around are this design's
// choices.
module data_mem #(
  parameter int WORDS = 1024,
  localparam int IW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] a,
  input  logic [31:0] wd,
  output logic [31:0] rd
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[a[IW+1:2]] <= wd;
  end

  assign rd = mem[a[IW+1:2]];

endmodule
