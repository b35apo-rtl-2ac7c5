// Self-checking test of the pulsed D flip-flop (1 ns gates).
//
// Default flip-flop (3-inverter pulse, 3 ns): Q takes D at each rising clock edge
// (D set 3 ns before the edge, held 8 ns after it) and keeps it while D changes
// during the rest of the period, including at the falling edge.
// Short-pulse flip-flop (1 inverter, 1 ns pulse): the pulse is shorter than the
// NAND latch's settling time, so it must fail to take D at most edges; the test
// counts the edges it missed and fails if it never missed one.
module tb_pulse_dff;
  logic d = 0, clk = 0, q, q_n, q_s, q_n_s;
  logic exp_q;
  int   checks = 0, failures = 0, short_misses = 0;

  pulse_dff dut (.d(d), .clk(clk), .q(q), .q_n(q_n));
  pulse_dff #(.INV_STAGES(1)) dut_short (.d(d), .clk(clk), .q(q_s), .q_n(q_n_s));

  task automatic check(string what);
    checks++;
    if (q !== exp_q || q_n !== ~exp_q) begin
      failures++;
      $display("FAIL %s at %0t: q=%b q_n=%b exp %b", what, $time, q, q_n, exp_q);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2;
    for (int i = 0; i < 100; i++) begin
      // period 20 ns: D set 3 ns before the rising edge
      d = 1'($urandom);
      #3 clk = 1;
      exp_q = d;
      #7 check("Q after rising edge");
      if (q_s !== exp_q) short_misses++;
      #1 d = ~d;                            // change D after the hold time
      #2 check("D change after edge ignored");
      #1 clk = 0;
      #1 d = ~d;
      #2 check("falling edge ignored");
      #3;
    end
    $display("1-inverter pulse missed %0d of 100 edges", short_misses);
    checks++;
    if (short_misses == 0) begin
      failures++;
      $display("FAIL the 1 ns pulse captured every edge; it should be too short");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
