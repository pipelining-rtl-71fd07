// tb_pipelining_top: end-to-end test of the three designs in the top, at
// their default sizes.
//
// addq processor: loads a program that mixes independent instructions
// (one per cycle), results read two and one instruction later (two and one
// stall cycles) and results read three instructions later (no stall, the
// register file is written the cycle before it is read), runs it, and
// compares the registers with an instruction-by-instruction model and the
// cycle count with the hand-counted one. Then a long random program is run
// and checked the same way. Memory stage: a store then a load to the same
// address. Times three: a stream of operands at one per cycle. OPq + jXX
// processor: a loop that counts a register down with subq and jumps back
// with jne until it reaches zero, so conditional jumps wait for the flags,
// are taken and finally fall through.
// Every mechanism is counted; one that never happens is a failure.
`timescale 1ns/1ps
module tb_pipelining_top;
  import y86_pkg::*;

  logic clk = 0, rst = 1;
  logic cpu_imem_we = 0; word_t cpu_imem_waddr = 0; logic [7:0] cpu_imem_wdata = 0;
  logic cpu_rf_ld_we = 0; regid_t cpu_rf_ld_addr = 0; word_t cpu_rf_ld_data = 0;
  regid_t cpu_rf_dbg_addr = 0; word_t cpu_rf_dbg_data;
  pP_t cpu_P; fD_t cpu_D; dE_t cpu_E; eW_t cpu_W; logic cpu_stall;
  icode_t mem_f_icode = I_NOP; word_t mem_e_valE = 0, mem_e_valA = 0;
  icode_t mem_M_icode, mem_W_icode; logic mem_read, mem_write; word_t mem_W_valM;
  logic [31:0] t3_a = 0, t3_y;
  logic br_imem_we = 0; word_t br_imem_waddr = 0; logic [7:0] br_imem_wdata = 0;
  logic br_rf_ld_we = 0; regid_t br_rf_ld_addr = 0; word_t br_rf_ld_data = 0;
  regid_t br_rf_dbg_addr = 0; word_t br_rf_dbg_data;
  pP_t br_P; fDj_t br_D; dEj_t br_E; eW_t br_W; cc_t br_CC; logic br_stall;
  int n_br_stall = 0, n_br_taken = 0, n_br_not_taken = 0;

  int checks = 0, failures = 0;
  int n_stall_cycles = 0, n_stall2 = 0, n_stall1 = 0, n_back_to_back = 0;
  int n_wb_then_read = 0, n_mem_read = 0, n_mem_write = 0, n_t3 = 0;

  pipelining_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  typedef struct { regid_t a; regid_t b; } ins_t;

  task automatic load(ins_t prog[$], word_t init[NREGS]);
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      cpu_imem_we = 1; cpu_imem_waddr = i;
      if (i / 2 < prog.size()) cpu_imem_wdata = (i % 2 == 0) ? 8'h60 : {prog[i/2].a, prog[i/2].b};
      else cpu_imem_wdata = 8'h10;
      @(negedge clk);
    end
    cpu_imem_we = 0;
    for (int r = 0; r < NREGS; r++) begin
      cpu_rf_ld_we = 1; cpu_rf_ld_addr = regid_t'(r); cpu_rf_ld_data = init[r];
      @(negedge clk);
    end
    cpu_rf_ld_we = 0;
    @(negedge clk);
    rst = 0;
  endtask

  task automatic check_reg(string what, regid_t r, word_t exp);
    cpu_rf_dbg_addr = r;
    #1;
    check(what, cpu_rf_dbg_data, exp);
  endtask

  // Runs a loaded program of n instructions; returns the cycle in which the
  // last one is in writeback, counting stall runs and back-to-back issues.
  task automatic run(ins_t prog[$], output int last_wb);
    int cyc = 0, run_len = 0, done = 0, fetched = 0;
    regid_t prev_wdst = REG_NONE;
    last_wb = -1;
    while (last_wb < 0 && cyc < 2000) begin
      #1;
      if (cpu_stall) begin
        n_stall_cycles++;
        run_len++;
      end else begin
        if (run_len == 2) n_stall2++;
        if (run_len == 1) n_stall1++;
        run_len = 0;
      end
      // an instruction reads in decode a register written at the end of the
      // previous cycle by writeback
      if (prev_wdst != REG_NONE && (cpu_D.rA == prev_wdst || cpu_D.rB == prev_wdst))
        n_wb_then_read++;
      // two instructions complete in consecutive cycles
      if (prev_wdst != REG_NONE && cpu_W.dstE != REG_NONE) n_back_to_back++;
      prev_wdst = cpu_W.dstE;
      if (cpu_W.dstE != REG_NONE) begin
        done++;
        if (done == prog.size()) last_wb = cyc;
      end
      @(negedge clk);
      cyc++;
    end
  endtask

  word_t init[NREGS], model[NREGS];
  ins_t  prog[$];
  int    last_wb;

  initial begin
    repeat (2) @(negedge clk);

    // ---------------- addq processor: directed program ----------------
    for (int r = 0; r < NREGS; r++) init[r] = word_t'(100 * r);
    prog = '{'{8, 9}, '{10, 11}, '{12, 13}, '{9, 8},     // independent, then read 3 later
             '{8, 1}, '{1, 2},                           // read 1 later: 2 stalls
             '{3, 4}, '{5, 6}, '{4, 5},                  // read 2 later: 1 stall
             '{6, 7}};
    foreach (init[r]) model[r] = init[r];
    foreach (prog[i]) model[prog[i].b] = model[prog[i].a] + model[prog[i].b];
    load(prog, init);
    run(prog, last_wb);
    // fetch cycles by hand: 0,1,2,3 | 6 (2 stalls) | 9 (2 stalls) | 10,11 |
    // 13 (1 stall) | 14; the last is in writeback 3 cycles after its fetch
    check("directed: last writeback cycle", last_wb, 17);
    check("directed: stall cycles", n_stall_cycles, 5);
    repeat (2) @(negedge clk);
    for (int r = 0; r < NREGS; r++) check_reg($sformatf("directed R%0d", r), regid_t'(r), model[r]);

    // ---------------- addq processor: long random program ----------------
    begin
      int n;
      n = 120;
      prog = {};
      for (int r = 0; r < NREGS; r++) begin init[r] = {$urandom, $urandom}; model[r] = init[r]; end
      for (int i = 0; i < n; i++)
        prog.push_back('{regid_t'($urandom_range(0, 5)), regid_t'($urandom_range(0, 5))});
      foreach (prog[i]) model[prog[i].b] = model[prog[i].a] + model[prog[i].b];
      load(prog, init);
      run(prog, last_wb);
      check("random: finished", last_wb > 0, 1);
      repeat (2) @(negedge clk);
      for (int r = 0; r < NREGS; r++) check_reg($sformatf("random R%0d", r), regid_t'(r), model[r]);
    end

    // ---------------- memory stage: store then load ----------------
    rst = 1; @(negedge clk); rst = 0;
    for (int i = 0; i < 10; i++) begin
      // fetch order: rmmovq, nop, mrmovq, nops
      mem_f_icode = (i == 0) ? I_RMMOVQ : (i == 2) ? I_MRMOVQ : I_NOP;
      // execute sees instruction i-2
      mem_e_valE = 64'h40;
      mem_e_valA = (i == 2) ? 64'h1234_5678_9ABC_DEF0 : 64'h0;
      #1;
      if (mem_read) n_mem_read++;
      if (mem_write) n_mem_write++;
      if (i == 3) check("store in memory stage", mem_write, 1);
      if (i == 5) check("load in memory stage", mem_read, 1);
      if (i == 6) begin
        check("load icode in writeback", mem_W_icode, I_MRMOVQ);
        check("loaded value", mem_W_valM, 64'h1234_5678_9ABC_DEF0);
      end
      @(negedge clk);
    end

    // ---------------- OPq + jXX processor: count-down loop ----------------
    begin
      logic [7:0] img [256];
      word_t last_pc;
      int cyc;
      foreach (img[i]) img[i] = 8'h10;
      // 0x00 loop: addq %r2,%r3 ; subq %r1,%r4 ; jne 0x00 ; then at 0x0D: jmp 0x0D
      img[0] = 8'h60; img[1] = 8'h23;
      img[2] = 8'h61; img[3] = 8'h14;
      img[4] = 8'h74; for (int k = 0; k < 8; k++) img[5 + k] = 8'h00;
      img[13] = 8'h70; img[14] = 8'h0D; for (int k = 1; k < 8; k++) img[14 + k] = 8'h00;
      rst = 1;
      @(negedge clk);
      for (int i = 0; i < 256; i++) begin
        br_imem_we = 1; br_imem_waddr = i; br_imem_wdata = img[i];
        @(negedge clk);
      end
      br_imem_we = 0;
      for (int r = 0; r < NREGS; r++) begin
        br_rf_ld_we = 1; br_rf_ld_addr = regid_t'(r);
        br_rf_ld_data = (r == 1) ? 1 : (r == 2) ? 5 : (r == 4) ? 10 : 0;
        @(negedge clk);
      end
      br_rf_ld_we = 0;
      @(negedge clk);
      rst = 0;
      last_pc = 0;
      for (cyc = 0; cyc < 200; cyc++) begin
        #1;
        if (br_stall) n_br_stall++;
        if (!br_stall && last_pc == 4 && br_P.pc == 0) n_br_taken++;
        if (last_pc == 4 && br_P.pc == 13) n_br_not_taken++;
        last_pc = br_P.pc;
        @(negedge clk);
      end
      // 10 iterations: r4 counts 10 -> 0, r3 = 10 x 5
      br_rf_dbg_addr = 4; #1; check("loop counter", br_rf_dbg_data, 0);
      br_rf_dbg_addr = 3; #1; check("loop sum", br_rf_dbg_data, 50);
      check("loop jumps taken", n_br_taken, 9);
      check("loop exit", n_br_not_taken, 1);
      check("flags after loop", br_CC.zf, 1);
      // each jne waits two cycles behind the subq just before it
      check("control stall cycles", n_br_stall, 20);
    end

    // ---------------- times three ----------------
    begin
      logic [31:0] sent[$];
      for (int i = 0; i < 200; i++) begin
        t3_a = (i == 0) ? 7 : (i == 1) ? 17 : $urandom;
        sent.push_back(t3_a);
        @(negedge clk);
        if (i >= 2) begin
          check($sformatf("3 x A[%0d]", i - 2), t3_y, 32'(3 * sent[i - 2]));
          n_t3++;
        end
      end
    end

    $display("mechanisms: stall cycles=%0d two-stall hazards=%0d one-stall hazards=%0d back-to-back=%0d writeback-then-read=%0d mem reads=%0d mem writes=%0d x3 results=%0d",
             n_stall_cycles, n_stall2, n_stall1, n_back_to_back, n_wb_then_read, n_mem_read, n_mem_write, n_t3);
    check("stall happened", n_stall_cycles > 0, 1);
    check("two-cycle stall happened", n_stall2 > 0, 1);
    check("one-cycle stall happened", n_stall1 > 0, 1);
    check("back-to-back issue happened", n_back_to_back > 0, 1);
    check("writeback-then-read happened", n_wb_then_read > 0, 1);
    check("memory read happened", n_mem_read > 0, 1);
    check("memory write happened", n_mem_write > 0, 1);
    check("times-three results", n_t3 > 0, 1);
    $display("mechanisms: control stall cycles=%0d jumps taken=%0d not taken=%0d", n_br_stall, n_br_taken, n_br_not_taken);
    check("control stall happened", n_br_stall > 0, 1);
    check("taken jump happened", n_br_taken > 0, 1);
    check("not-taken jump happened", n_br_not_taken > 0, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
