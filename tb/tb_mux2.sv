// Self-checking test of the two-input multiplexer with random data on both
// inputs and both select values.
module tb_mux2;
  logic [31:0] d0, d1, y;
  logic        s;
  int          checks = 0, failures = 0;

  mux2 #(.WIDTH(32)) dut (.d0(d0), .d1(d1), .s(s), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      d0 = $urandom; d1 = $urandom; s = i[0];
      #1;
      checks++;
      if (y !== (i[0] ? d1 : d0)) begin
        failures++;
        $display("FAIL s=%b d0=%h d1=%h y=%h", s, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
