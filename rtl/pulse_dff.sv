// Behavioural model (gate delays, not synthesizable logic): edge-triggered D
// flip-flop built from a NAND-gate D latch and a clock-edge pulse generator.
//
// edge_pulse_gen turns each rising edge of clk into an enable pulse lasting
// INV_STAGES * INV_DELAY time units; the NAND-gate latch is transparent only
// during that pulse, so the flip-flop records d at the rising clock edge and holds
// it for the rest of the clock period. q settles about three gate delays after the
// edge.
//
// The pulse must outlast the latch's settling time (about three NAND delays),
// otherwise the cross-coupled pair never takes the new value: with 1 ns gates a
// single inverter gives a 1 ns pulse, which is too short, and the chain of three
// inverters (3 ns) is the default. d must be stable from the edge until the pulse
// has ended and the latch has settled (about INV_STAGES * INV_DELAY + 3 *
// NAND_DELAY): that is this flip-flop's hold time.
//
// Interface: d, clk in; q, q_n out. Before the first clock edge q is undefined.
module pulse_dff #(
  parameter int INV_STAGES = 3,
  parameter int INV_DELAY  = 1,
  parameter int NAND_DELAY = 1
) (
  input  logic d,
  input  logic clk,
  output logic q,
  output logic q_n
);

  logic en_pulse;

  edge_pulse_gen #(.INV_STAGES(INV_STAGES), .INV_DELAY(INV_DELAY)) u_pulse (
    .e(clk), .e_pulse(en_pulse)
  );

  nand_d_latch #(.NAND_DELAY(NAND_DELAY), .INV_DELAY(INV_DELAY)) u_latch (
    .d(d), .e(en_pulse), .q(q), .q_n(q_n)
  );

endmodule
