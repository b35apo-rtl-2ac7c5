// End-to-end test of the whole top level at its default parameters (1024-word
// memories, reset PC 0x200).
//
// Computer: programs are loaded through the program port while reset is held and
// then run; every clock the PC, the illegal-instruction flag and the data-memory
// writes are compared with the reference model (rv_iss_pkg), which starts from the
// same data-memory contents.
//   * A log2 program: y = floor(log2(157)) by a subroutine (jal/jalr) with a
//     doubling loop (slt, beq, add), then lui/ori, auipc, lw, sub, and, or and sw.
//     The stored results and the cycle count (68 instructions, one per clock, until
//     the final self-branch) are checked against values worked out here.
//   * Random programs filling the whole instruction memory.
// Every mechanism of the design is counted (each instruction kind, taken and
// untaken beq, discarded x0 writes, illegal encodings, latch hold, flip-flop edge
// capture) and one that never happened counts as a failure.
// Storage elements: the D latch, its NAND-gate model and the pulsed D flip-flop
// are exercised through their own ports.
module tb_sc_computer;
  import rv_asm_pkg::*;
  import rv_iss_pkg::*;

  localparam logic [31:0] RESET_PC = 32'h200;

  logic        clk = 0, rst = 1;
  logic        prog_we = 0;
  logic [31:0] prog_addr = 0, prog_wdata = 0;
  logic [31:0] pc, instr, dmem_addr, dmem_wdata;
  logic        dmem_we, illegal_instr;
  logic        latch_d = 0, latch_e = 0, latch_q, latch_qn;
  logic        gl_d = 0, gl_e = 1, gl_q, gl_qn;
  logic        ff_d = 0, ff_clk = 0, ff_q, ff_qn;

  int checks = 0, failures = 0;
  int ev_count [EV_COUNT];
  int x0_writes = 0, latch_holds = 0, ff_captures = 0, gl_holds = 0;

  sc_computer dut (
    .clk(clk), .rst(rst), .prog_we(prog_we), .prog_addr(prog_addr), .prog_wdata(prog_wdata),
    .pc(pc), .instr(instr), .dmem_we(dmem_we), .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata),
    .illegal_instr(illegal_instr),
    .latch_d(latch_d), .latch_e(latch_e), .latch_q(latch_q), .latch_qn(latch_qn),
    .gl_latch_d(gl_d), .gl_latch_e(gl_e), .gl_latch_q(gl_q), .gl_latch_qn(gl_qn),
    .ff_d(ff_d), .ff_clk(ff_clk), .ff_q(ff_q), .ff_qn(ff_qn)
  );

  always #5 clk = ~clk;

  logic [31:0] prog [1024];
  logic [31:0] stored [1024];      // data-memory writes seen on the bus

  always @(posedge clk) if (!rst && dmem_we) stored[dmem_addr[11:2]] <= dmem_wdata;

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // Load prog[] into the instruction memory through the program port, reset held.
  task automatic load_program();
    rst = 1;
    for (int w = 0; w < 1024; w++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 32'(w) << 2; prog_wdata = prog[w];
    end
    @(negedge clk) prog_we = 0;
    @(negedge clk);
  endtask

  // Release reset and run `cycles` clocks in lockstep with the reference model.
  task automatic run_lockstep(rv_iss_pkg::rv_iss iss, int cycles);
    rv_iss_pkg::step_t st;
    rst = 0;
    for (int cyc = 0; cyc < cycles; cyc++) begin
      #1;
      expect_eq("pc", pc, iss.pc);
      st = iss.step();
      ev_count[st.ev]++;
      if (st.x0_write) x0_writes++;
      checks++;
      if (dmem_we !== st.store || illegal_instr !== st.illegal ||
          (st.store && (dmem_addr[11:2] !== st.st_addr[11:2] || dmem_wdata !== st.st_data))) begin
        failures++;
        if (failures < 20)
          $display("FAIL cyc %0d pc=%h instr=%h: we=%b a=%h d=%h ill=%b, exp we=%b a=%h d=%h ill=%b",
                   cyc, st.pc, st.instr, dmem_we, dmem_addr, dmem_wdata, illegal_instr,
                   st.store, st.st_addr, st.st_data, st.illegal);
      end
      @(negedge clk);
    end
    rst = 1;
  endtask

  function automatic rv_iss_pkg::rv_iss new_iss();
    rv_iss_pkg::rv_iss iss = new(RESET_PC);
    foreach (prog[i]) iss.imem[i] = prog[i];
    foreach (iss.dmem[i]) iss.dmem[i] = dut.u_dmem.mem[i];   // same starting data
    return iss;
  endfunction

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rv_iss_pkg::rv_iss iss;
    localparam int B = RESET_PC >> 2;   // word index of the reset address
    int cycles_to_done;

    // ---- log2 program ---------------------------------------------------------
    foreach (prog[i]) prog[i] = ADDI(0, 0, 0);
    prog[B+0]  = ADDI(10, 0, 157);        // a0 = x = 157
    prog[B+1]  = ADDI(6, 0, -1);          // t1 = y = -1
    prog[B+2]  = JAL(1, (16 - 2) * 4);    // call log2
    prog[B+3]  = SW(6, 'h100, 0);         // mem[0x100] = y
    prog[B+4]  = LUI(7, 'h12345);
    prog[B+5]  = ORI(7, 7, 'h678);        // t2 = 0x12345678
    prog[B+6]  = SW(7, 'h104, 0);
    prog[B+7]  = AUIPC(28, 0);            // t3 = address of this instruction
    prog[B+8]  = SW(28, 'h108, 0);
    prog[B+9]  = LW(8, 'h100, 0);         // s0 = y
    prog[B+10] = SUB(9, 7, 8);            // s1 = t2 - y
    prog[B+11] = SW(9, 'h10c, 0);
    prog[B+12] = AND(18, 7, 9);
    prog[B+13] = OR(19, 18, 10);
    prog[B+14] = SW(19, 'h110, 0);
    prog[B+15] = BEQ(0, 0, 0);            // done: branch to itself
    // log2: y = -1; p = 1; while (!(x < p)) { y++; p = p + p; }
    prog[B+16] = ADDI(5, 0, 1);           // t0 = p = 1
    prog[B+17] = SLT(29, 10, 5);          // loop: t4 = x < p
    prog[B+18] = ADDI(30, 0, 1);
    prog[B+19] = BEQ(29, 30, (23 - 19) * 4);
    prog[B+20] = ADDI(6, 6, 1);
    prog[B+21] = ADD(5, 5, 5);
    prog[B+22] = BEQ(0, 0, (17 - 22) * 4);
    prog[B+23] = JALR(0, 1, 0);           // return

    load_program();
    iss = new_iss();
    run_lockstep(iss, 68);
    #1;
    // 3 + 1 + 8 loop passes * 6 + 3 + 1 + 12 = 68 instructions before "done"
    expect_eq("cycles to reach the final instruction", pc, RESET_PC + 15 * 4);
    iss.pc = RESET_PC;
    begin
      logic [31:0] y = 7, c = 32'h1234_5678;
      expect_eq("floor(log2(157))", stored['h100 >> 2], y);
      expect_eq("lui+ori", stored['h104 >> 2], c);
      expect_eq("auipc", stored['h108 >> 2], RESET_PC + 7 * 4);
      expect_eq("lw+sub", stored['h10c >> 2], c - y);
      expect_eq("and+or", stored['h110 >> 2], (c & (c - y)) | 32'd157);
    end

    // ---- random programs --------------------------------------------------------
    for (int p = 0; p < 40; p++) begin
      foreach (prog[i]) prog[i] = rand_instr();
      load_program();
      iss = new_iss();
      run_lockstep(iss, 300);
    end

    // ---- D latch ---------------------------------------------------------------
    for (int i = 0; i < 50; i++) begin
      logic held;
      latch_e = 1; latch_d = 1'($urandom); #1;
      expect_eq("latch transparent", {latch_q, latch_qn}, {latch_d, ~latch_d});
      held = latch_d;
      latch_e = 0; #1 latch_d = ~latch_d; #1;
      expect_eq("latch hold", {latch_q, latch_qn}, {held, ~held});
      if (latch_q == held && latch_d != held) latch_holds++;
    end

    // ---- NAND-gate D latch (1 ns gates: settles within 3 ns) ------------------
    for (int i = 0; i < 50; i++) begin
      logic held;
      gl_e = 1; gl_d = 1'($urandom); #5;
      expect_eq("gate-level latch transparent", {gl_q, gl_qn}, {gl_d, ~gl_d});
      held = gl_d;
      gl_e = 0; #3 gl_d = ~gl_d; #5;
      expect_eq("gate-level latch hold", {gl_q, gl_qn}, {held, ~held});
      if (gl_q == held && gl_d != held) gl_holds++;
    end

    // ---- pulsed D flip-flop ---------------------------------------------------
    for (int i = 0; i < 50; i++) begin
      logic v = 1'($urandom);
      ff_d = v; #3 ff_clk = 1; #7;
      expect_eq("flip-flop captures D at rising edge", {ff_q, ff_qn}, {v, ~v});
      #1 ff_d = ~v; #4 ff_clk = 0; #1;
      expect_eq("flip-flop holds after falling edge", {ff_q, ff_qn}, {v, ~v});
      if (ff_q == v) ff_captures++;
    end

    // ---- mechanism coverage -------------------------------------------------------
    for (int e = 0; e < EV_COUNT; e++) begin
      rv_iss_pkg::event_e ev;
      ev = rv_iss_pkg::event_e'(e);
      $display("  %-18s %0d", ev.name(), ev_count[e]);
      checks++;
      if (ev_count[e] == 0) begin failures++; $display("FAIL mechanism %s never happened", ev.name()); end
    end
    $display("  %-18s %0d", "X0_WRITE", x0_writes);
    $display("  %-18s %0d", "LATCH_HOLD", latch_holds);
    $display("  %-18s %0d", "FF_CAPTURE", ff_captures);
    $display("  %-18s %0d", "GATE_LATCH_HOLD", gl_holds);
    checks += 4;
    if (gl_holds == 0)    begin failures++; $display("FAIL gate-level latch never held"); end
    if (x0_writes == 0)   begin failures++; $display("FAIL no discarded x0 write"); end
    if (latch_holds == 0) begin failures++; $display("FAIL latch never held"); end
    if (ff_captures == 0) begin failures++; $display("FAIL flip-flop never captured"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
