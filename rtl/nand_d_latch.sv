// Behavioural model (gate delays, not synthesizable logic): D latch built from
// NAND gates.
//
// The gate-level form of d_latch. An inverter makes ~d; two input NAND gates gate
// d and ~d with the enable e; a cross-coupled NAND pair stores the state:
//   s_n = ~(d & e)      r_n = ~(~d & e)
//   q   = ~(s_n & q_n)  q_n = ~(r_n & q)
// With e = 1 the input gate on the side of the new value drives 0 into the pair
// and forces q (or q_n) to 1; the other output follows one gate delay later. With
// e = 0 both input gates give 1, and the pair keeps whichever of the states
// q = 1, q_n = 0 or q = 0, q_n = 1 it was in. The loop through the two output gates
// is the storage itself: it is a deliberate combinational loop, which is why this
// is a timing model rather than RTL.
//
// Every gate is a transport delay of NAND_DELAY (the inverter INV_DELAY) time
// units; the values are this design's choice. After e falls, d must be held for
// about three gate delays, and an enable pulse must last at least that long, for
// the pair to settle. Until e is first raised the state is undefined and the pair
// may oscillate, as a real latch may power up in either state.
module nand_d_latch #(
  parameter int NAND_DELAY = 1,
  parameter int INV_DELAY  = 1
) (
  input  logic d,
  input  logic e,
  output logic q,
  output logic q_n
);

  logic d_n, s_n, r_n;

  assign #(INV_DELAY)  d_n = ~d;
  assign #(NAND_DELAY) s_n = ~(d & e);
  assign #(NAND_DELAY) r_n = ~(d_n & e);
  assign #(NAND_DELAY) q   = ~(s_n & q_n);
  assign #(NAND_DELAY) q_n = ~(r_n & q);

endmodule
