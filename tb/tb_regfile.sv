// Self-checking test of the register file against a reference array: reset
// clears all registers, random writes land at the clock edge only, both read
// ports are combinational, x0 always reads 0, and WE3 = 0 blocks a write.
module tb_regfile;
  logic        clk = 0, rst, we3;
  logic [4:0]  a1, a2, a3;
  logic [31:0] wd3, rd1, rd2;
  logic [31:0] model [32];
  int          checks = 0, failures = 0;

  regfile dut (.clk(clk), .rst(rst), .we3(we3), .a1(a1), .a2(a2), .a3(a3), .wd3(wd3),
               .rd1(rd1), .rd2(rd2));

  always #5 clk = ~clk;

  task automatic check_reads();
    for (int r = 0; r < 32; r++) begin
      a1 = 5'(r); a2 = 5'(31 - r);
      #1;
      checks++;
      if (rd1 !== model[r] || rd2 !== model[31-r]) begin
        failures++;
        $display("FAIL read x%0d=%h (exp %h) x%0d=%h (exp %h)", r, rd1, model[r], 31-r, rd2, model[31-r]);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we3 = 0; a1 = 0; a2 = 0; a3 = 0; wd3 = 0;
    foreach (model[i]) model[i] = 0;
    @(posedge clk); #1 rst = 0;
    check_reads();
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      we3 = ($urandom % 4) != 0;
      a3  = 5'($urandom);
      wd3 = $urandom;
      // before the edge the old value is still read
      a1 = a3; #1;
      checks++;
      if (rd1 !== model[a3]) begin
        failures++;
        $display("FAIL write visible before the clock edge x%0d", a3);
      end
      @(posedge clk);
      if (we3 && a3 != 0) model[a3] = wd3;
      #1;
      if (i % 50 == 0) check_reads();
      a1 = a3; a2 = 0; #1;
      checks++;
      if (rd1 !== model[a3] || rd2 !== 0) begin
        failures++;
        $display("FAIL after write x%0d=%h exp %h", a3, rd1, model[a3]);
      end
    end
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
