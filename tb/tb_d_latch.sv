// Self-checking test of the D latch: with E=1 Q follows D (and not-Q is its
// complement), with E=0 both outputs keep the value held when E fell, however D
// changes.
module tb_d_latch;
  logic d, e, q, q_n;
  logic held;
  int   checks = 0, failures = 0;

  d_latch dut (.d(d), .e(e), .q(q), .q_n(q_n));

  task automatic check(logic exp, string what);
    checks++;
    if (q !== exp || q_n !== ~exp) begin
      failures++;
      $display("FAIL %s: d=%b e=%b q=%b q_n=%b exp q=%b", what, d, e, q, q_n, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e = 1; d = 0; #1 check(0, "transparent, D=0");
    d = 1;        #1 check(1, "transparent, D=1");
    for (int i = 0; i < 200; i++) begin
      e = 1; d = 1'($urandom); #1 check(d, "transparent");
      held = d;
      e = 0; #1 check(held, "hold at E fall");
      repeat (3) begin
        d = ~d; #1 check(held, "hold while D toggles");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
