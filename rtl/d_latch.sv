// Level-sensitive D latch.
//
// While the enable e is 1 the latch is transparent: q follows d and q_n is its
// complement. When e falls to 0, q and q_n keep the values they had at that
// moment, whatever d does, until e rises again. The classic gate realisation is a
// cross-coupled pair of NAND gates fed by two NAND gates that gate d and its
// inverse with e; this model describes the same function at register-transfer
// level with always_latch, so the storage element it infers is the intended latch.
//
// Interface: d, e in; q, q_n out. No clock; q changes as soon as e or d do.
module d_latch (
  input  logic d,
  input  logic e,
  output logic q,
  output logic q_n
);

  always_latch begin
    if (e) q = d;
  end

  assign q_n = ~q;

endmodule
