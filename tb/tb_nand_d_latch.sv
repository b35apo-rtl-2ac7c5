// Self-checking test of the NAND-gate D latch (gate delay 1 ns). With E = 1, after
// the gates settle (3 ns) Q follows D and not-Q is its complement; with E = 0 both
// outputs keep their values while D toggles; an enable pulse of 4 ns captures D.
module tb_nand_d_latch;
  logic d = 0, e = 1, q, q_n;
  logic held;
  int   checks = 0, failures = 0;

  nand_d_latch #(.NAND_DELAY(1), .INV_DELAY(1)) dut (.d(d), .e(e), .q(q), .q_n(q_n));

  task automatic check(logic exp, string what);
    checks++;
    if (q !== exp || q_n !== ~exp) begin
      failures++;
      $display("FAIL %s at %0t: d=%b e=%b q=%b q_n=%b exp q=%b", what, $time, d, e, q, q_n, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5 check(0, "transparent after settling, D=0");
    d = 1; #5 check(1, "transparent, D=1");
    d = 0; #5 check(0, "transparent, D=0 again");
    for (int i = 0; i < 100; i++) begin
      // transparent phase
      e = 1; d = 1'($urandom);
      #5 check(d, "transparent");
      held = d;
      e = 0;
      #3 check(held, "hold after E falls");
      repeat (3) begin
        d = ~d;
        #5 check(held, "hold while D toggles");
      end
      // capture by a 4 ns enable pulse
      d = 1'($urandom);
      #2 e = 1;
      #4 e = 0;
      held = d;
      #4 check(held, "captured by enable pulse");
      d = ~d;
      #5 check(held, "hold after pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
