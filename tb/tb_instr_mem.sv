// Self-checking test of the instruction memory: words written through the load
// port at random word addresses are read back combinationally on RD by byte
// address, with the low two address bits ignored.
module tb_instr_mem;
  logic        clk = 0, we;
  logic [31:0] waddr, wdata, a, rd;
  logic [31:0] model [1024];
  bit          valid [1024];
  int          checks = 0, failures = 0;

  instr_mem dut (.clk(clk), .load_we(we), .load_addr(waddr), .load_data(wdata), .a(a), .rd(rd));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; a = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      we = 1; waddr = {20'b0, 10'($urandom), 2'b00}; wdata = $urandom;
      @(posedge clk);
      model[waddr[11:2]] = wdata; valid[waddr[11:2]] = 1;
      #1 we = 0;
      a = waddr | 32'($urandom % 4); #1;
      checks++;
      if (rd !== wdata) begin
        failures++;
        $display("FAIL read after load a=%h rd=%h exp=%h", a, rd, wdata);
      end
    end
    for (int w = 0; w < 1024; w++) if (valid[w]) begin
      a = 32'(w) << 2; #1;
      checks++;
      if (rd !== model[w]) begin
        failures++;
        $display("FAIL word %0d rd=%h exp=%h", w, rd, model[w]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
