// Self-checking test of the data memory: random writes (WE on or off) at random
// word addresses, checked against a reference array; a write takes effect only at
// the rising clock edge, reads are combinational.
module tb_data_mem;
  logic        clk = 0, we;
  logic [31:0] a, wd, rd;
  logic [31:0] model [1024];
  int          checks = 0, failures = 0;

  data_mem dut (.clk(clk), .we(we), .a(a), .wd(wd), .rd(rd));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise every word through the write port
    for (int w = 0; w < 1024; w++) begin
      @(negedge clk); we = 1; a = 32'(w) << 2; wd = 32'(w) * 32'h9e37_79b9; model[w] = wd;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = ($urandom % 2) == 1; a = {20'b0, 10'($urandom), 2'($urandom)}; wd = $urandom;
      #1;
      checks++;
      if (rd !== model[a[11:2]]) begin
        failures++;
        $display("FAIL read before edge a=%h rd=%h exp=%h", a, rd, model[a[11:2]]);
      end
      @(posedge clk);
      if (we) model[a[11:2]] = wd;
      #1;
      checks++;
      if (rd !== model[a[11:2]]) begin
        failures++;
        $display("FAIL read after edge a=%h rd=%h exp=%h", a, rd, model[a[11:2]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
