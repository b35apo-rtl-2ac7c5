// Instruction memory of WORDS 32-bit words.
//
// The CPU side is read-only: rd shows, combinationally, the word addressed by the
// byte address a (a[1:0] ignored, the word index taken modulo WORDS), as the
// asynchronous-read memory of the single-cycle CPU requires. A separate load port
// (load_we, load_addr, load_data, written at the rising clock edge) lets a host
// place the program in memory before it runs; this port, the memory size and the
// address wrap-around are this design's choices.
module instr_mem #(
  parameter int WORDS = 1024,
  localparam int IW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  input  logic [31:0] a,
  output logic [31:0] rd
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[IW+1:2]] <= load_data;
  end

  assign rd = mem[a[IW+1:2]];

endmodule
