// Self-checking test of the edge pulse generator with a 1-inverter and a
// 3-inverter chain (inverter delay 1 ns): E' must rise at each rising edge of E,
// stay high for exactly the chain delay (1 ns or 3 ns) and stay low otherwise,
// including at falling edges.
module tb_edge_pulse_gen;
  logic e1 = 0, p1, p3;
  int   checks = 0, failures = 0;

  edge_pulse_gen #(.INV_STAGES(1), .INV_DELAY(1)) dut1 (.e(e1), .e_pulse(p1));
  edge_pulse_gen #(.INV_STAGES(3), .INV_DELAY(1)) dut3 (.e(e1), .e_pulse(p3));

  task automatic expect_p(logic x1, logic x3, string what);
    checks++;
    if (p1 !== x1 || p3 !== x3) begin
      failures++;
      $display("FAIL %s at %0t: p1=%b p3=%b exp %b %b", what, $time, p1, p3, x1, x3);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;
    for (int i = 0; i < 20; i++) begin
      expect_p(0, 0, "low before edge");
      e1 = 1;
      #0.5 expect_p(1, 1, "pulse just after rising edge");
      #1   expect_p(0, 1, "1-stage pulse over, 3-stage still on");   // t = 1.5
      #1   expect_p(0, 1, "3-stage pulse still on");                 // t = 2.5
      #1   expect_p(0, 0, "both pulses over");                       // t = 3.5
      #6.5 expect_p(0, 0, "high level gives no pulse");
      e1 = 0;
      #0.5 expect_p(0, 0, "no pulse at falling edge");
      #1.5 expect_p(0, 0, "no pulse at falling edge");
      #3 expect_p(0, 0, "no pulse at falling edge");
      #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
