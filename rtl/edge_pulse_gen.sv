// Behavioural model (timing only, not synthesizable logic): clock-edge pulse
// generator.
//
// The output e_pulse is e AND (e delayed and inverted by a chain of INV_STAGES
// inverters). In an ideal circuit the two AND inputs are never both 1. With real
// gate delays the inverted copy lags behind e, so right after each rising edge of
// e both inputs are 1 for the delay of the chain: e_pulse is a pulse of width
// INV_STAGES * INV_DELAY time units starting at the edge. A longer (odd) chain
// gives a longer pulse, which is used when the pulse must outlast the settling
// time of the latch it enables. Falling edges give no pulse.
//
// Each inverter is modelled as a transport delay of INV_DELAY; the AND gate has
// no delay. INV_STAGES must be odd. The chain lengths 1 and 3 are those of the
// two textbook variants; the delay value is this design's choice.
module edge_pulse_gen #(
  parameter int INV_STAGES = 1,
  parameter int INV_DELAY  = 1
) (
  input  logic e,
  output logic e_pulse
);

  logic [INV_STAGES:0] chain;

  assign chain[0] = e;

  for (genvar i = 0; i < INV_STAGES; i++) begin : g_inv
    assign #(INV_DELAY) chain[i+1] = ~chain[i];
  end

  assign e_pulse = e & chain[INV_STAGES];

  initial begin
    if (INV_STAGES % 2 == 0) $error("edge_pulse_gen: INV_STAGES must be odd");
  end

endmodule
