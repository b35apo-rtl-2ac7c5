// Self-checking test of the single-cycle CPU core with testbench memories.
//
// 1. The textbook instruction examples: lw x2,0x400(x0), add x4,x2,x3 and
//    addi x7,x7,4 (machine codes 0x40002103, 0x00310233, 0x00438393), followed by
//    stores of the results, whose values are worked out here.
// 2. Random programs that fill the whole instruction memory: after every clock the
//    core's PC and its data-memory writes are compared with the reference model
//    (rv_iss_pkg), which also advances one instruction per clock; this checks the
//    one-instruction-per-cycle timing as well as every result that reaches memory
//    or the PC.
module tb_riscv_sc_cpu;
  import rv_asm_pkg::*;
  import rv_iss_pkg::*;

  localparam logic [31:0] RESET_PC = 32'h200;

  logic        clk = 0, rst;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic        dmem_we, illegal;
  logic [31:0] imem [1024];
  logic [31:0] dmem [1024];
  int          checks = 0, failures = 0;

  riscv_sc_cpu #(.RESET_PC(RESET_PC)) dut (
    .clk(clk), .rst(rst), .imem_addr(imem_addr), .imem_rdata(imem_rdata),
    .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata), .dmem_we(dmem_we), .dmem_rdata(dmem_rdata),
    .illegal(illegal)
  );

  assign imem_rdata = imem[imem_addr[11:2]];
  assign dmem_rdata = dmem[dmem_addr[11:2]];
  always_ff @(posedge clk) if (dmem_we) dmem[dmem_addr[11:2]] <= dmem_wdata;

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic do_reset();
    rst = 1;
    @(posedge clk); @(posedge clk);
    #1 rst = 0;
    #1;
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rv_iss_pkg::rv_iss iss;
    rv_iss_pkg::step_t st;
    int    n;

    // ---- 1. textbook examples -----------------------------------------------
    foreach (imem[i]) imem[i] = ADDI(0, 0, 0);
    foreach (dmem[i]) dmem[i] = 0;
    dmem['h400 >> 2] = 32'hcafe_0042;
    n = 0;
    imem[(RESET_PC >> 2) + n++] = ADDI(3, 0, 1000);        // x3 = 1000
    imem[(RESET_PC >> 2) + n++] = 32'h4000_2103;           // lw   x2, 0x400(x0)
    imem[(RESET_PC >> 2) + n++] = 32'h0031_0233;           // add  x4, x2, x3
    imem[(RESET_PC >> 2) + n++] = ADDI(7, 0, 38);          // x7 = 38
    imem[(RESET_PC >> 2) + n++] = 32'h0043_8393;           // addi x7, x7, 4
    imem[(RESET_PC >> 2) + n++] = SW(2, 'h10, 0);
    imem[(RESET_PC >> 2) + n++] = SW(4, 'h14, 0);
    imem[(RESET_PC >> 2) + n++] = SW(7, 'h18, 0);
    imem[(RESET_PC >> 2) + n++] = BEQ(0, 0, 0);            // stop: branch to itself
    do_reset();
    // one instruction per clock: after n-1 clocks the PC is at the final beq
    repeat (n - 1) @(posedge clk);
    #1 expect_eq("pc after program (cycles)", imem_addr, RESET_PC + 4 * (n - 1));
    repeat (3) @(posedge clk);
    #1 expect_eq("beq to itself holds pc", imem_addr, RESET_PC + 4 * (n - 1));
    expect_eq("lw x2,0x400(x0)", dmem['h10 >> 2], 32'hcafe_0042);
    expect_eq("add x4,x2,x3",    dmem['h14 >> 2], 32'hcafe_0042 + 1000);
    expect_eq("addi x7,x7,4",    dmem['h18 >> 2], 42);

    // ---- 2. random programs against the reference model ----------------------
    for (int prog = 0; prog < 20; prog++) begin
      iss = new(RESET_PC);
      foreach (imem[i]) begin imem[i] = rand_instr(); iss.imem[i] = imem[i]; end
      foreach (dmem[i]) begin dmem[i] = $urandom;     iss.dmem[i] = dmem[i]; end
      do_reset();
      for (int cyc = 0; cyc < 2000; cyc++) begin
        // before the edge: compare the current instruction's effects
        expect_eq("pc", imem_addr, iss.pc);
        st = iss.step();
        checks++;
        if (dmem_we !== st.store || illegal !== st.illegal ||
            (st.store && (dmem_addr[11:2] !== st.st_addr[11:2] || dmem_wdata !== st.st_data))) begin
          failures++;
          if (failures < 20)
            $display("FAIL prog %0d cyc %0d pc=%h instr=%h: we=%b a=%h d=%h ill=%b exp we=%b a=%h d=%h ill=%b",
                     prog, cyc, st.pc, st.instr, dmem_we, dmem_addr, dmem_wdata, illegal,
                     st.store, st.st_addr, st.st_data, st.illegal);
        end
        @(posedge clk);
        #1;
      end
      foreach (dmem[i]) expect_eq("final data memory", dmem[i], iss.dmem[i]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
