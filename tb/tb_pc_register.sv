// Self-checking test of the PC register: the reset loads 0x200, the input is
// taken only at the rising clock edge, and reset wins over the input.
module tb_pc_register;
  logic        clk = 0, rst;
  logic [31:0] d, q, expq;
  int          checks = 0, failures = 0;

  pc_register dut (.clk(clk), .rst(rst), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (q !== expq) begin
      failures++;
      $display("FAIL %s q=%h exp=%h", what, q, expq);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; d = 32'h1234_5678;
    @(posedge clk); #1 expq = 32'h200; check("reset");
    rst = 0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      d = $urandom;
      #1 check("hold between edges");
      @(posedge clk); #1 expq = d; check("load at edge");
    end
    @(negedge clk) rst = 1; d = $urandom;
    @(posedge clk); #1 expq = 32'h200; check("reset over d");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
