// tb_addq_cpu: self-checking testbench for the pipelined addq processor.
//
// Part 1 runs three short programs and compares the pipeline registers,
// cycle by cycle, with hand-worked timing tables (registers start at
// R[i] = 100*i): a dependence-free sequence, a read-after-write pair that
// needs two stall cycles, and a sequence that needs exactly one. Part 2 runs
// random addq programs and compares the final registers with an
// instruction-by-instruction model, and the completion cycle with a timing
// model in which an instruction cannot be fetched earlier than three cycles
// after the instruction whose result it reads.
`timescale 1ns/1ps
module tb_addq_cpu;
  import y86_pkg::*;

  logic clk = 0, rst = 1;
  logic imem_we = 0; word_t imem_waddr = 0; logic [7:0] imem_wdata = 0;
  logic rf_ld_we = 0; regid_t rf_ld_addr = 0; word_t rf_ld_data = 0;
  regid_t rf_dbg_addr = 0; word_t rf_dbg_data;
  pP_t P; fD_t D; dE_t E; eW_t W; logic stall;

  int checks = 0, failures = 0;

  addq_cpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%0h) expected %0d (0x%0h)", what, got, got, exp, exp);
    end
  endtask

  // program bytes: 2 per instruction, 0x60 then rA:rB; rest of memory 0x10 (nop)
  typedef struct { regid_t a; regid_t b; } ins_t;

  task automatic load(ins_t prog[$], word_t init[NREGS]);
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      imem_we = 1; imem_waddr = i;
      if (i / 2 < prog.size()) imem_wdata = (i % 2 == 0) ? 8'h60 : {prog[i/2].a, prog[i/2].b};
      else imem_wdata = 8'h10;
      @(negedge clk);
    end
    imem_we = 0;
    for (int r = 0; r < NREGS; r++) begin
      rf_ld_we = 1; rf_ld_addr = regid_t'(r); rf_ld_data = init[r];
      @(negedge clk);
    end
    rf_ld_we = 0;
    @(negedge clk);
    rst = 0;   // now in cycle 0
  endtask

  task automatic check_reg(string what, regid_t r, word_t exp);
    rf_dbg_addr = r;
    #1;
    check(what, rf_dbg_data, exp);
  endtask

  // expected row of a timing table; -1 = not checked
  typedef struct { longint pc, drA, drB, eA, eB, edst, wval, wdst, st; } row_t;

  task automatic run_table(string name, row_t rows[]);
    for (int c = 0; c < rows.size(); c++) begin
      #1;
      if (rows[c].pc   >= 0) check($sformatf("%s c%0d PC", name, c), P.pc, rows[c].pc);
      if (rows[c].drA  >= 0) check($sformatf("%s c%0d D_rA", name, c), D.rA, rows[c].drA);
      if (rows[c].drB  >= 0) check($sformatf("%s c%0d D_rB", name, c), D.rB, rows[c].drB);
      if (rows[c].eA   >= 0) check($sformatf("%s c%0d E_valA", name, c), E.valA, rows[c].eA);
      if (rows[c].eB   >= 0) check($sformatf("%s c%0d E_valB", name, c), E.valB, rows[c].eB);
      if (rows[c].edst >= 0) check($sformatf("%s c%0d E_dstE", name, c), E.dstE, rows[c].edst);
      if (rows[c].wval >= 0) check($sformatf("%s c%0d W_valE", name, c), W.valE, rows[c].wval);
      if (rows[c].wdst >= 0) check($sformatf("%s c%0d W_dstE", name, c), W.dstE, rows[c].wdst);
      if (rows[c].st   >= 0) check($sformatf("%s c%0d stall", name, c), stall, rows[c].st);
      @(negedge clk);
    end
  endtask

  word_t init100[NREGS];
  ins_t  prog[$];
  row_t  rows[];
  localparam longint X = -1;

  initial begin
    for (int r = 0; r < NREGS; r++) init100[r] = word_t'(100 * r);

    // ---- table 1: no hazards, one instruction per cycle ----
    prog = '{'{8, 9}, '{10, 11}, '{12, 13}, '{9, 8}};
    load(prog, init100);
    rows = new[7];
    rows[0] = '{0, 15, 15, 0, 0, 15, 0, 15, 0};
    rows[1] = '{2, 8, 9, X, X, 15, X, 15, 0};
    rows[2] = '{4, 10, 11, 800, 900, 9, X, 15, 0};
    rows[3] = '{6, 12, 13, 1000, 1100, 11, 1700, 9, 0};
    rows[4] = '{X, 9, 8, 1200, 1300, 13, 2100, 11, 0};
    rows[5] = '{X, X, X, 1700, 800, 8, 2500, 13, X};
    rows[6] = '{X, X, X, X, X, X, 2500, 8, X};
    run_table("seq", rows);
    repeat (3) @(negedge clk);
    check_reg("seq R9", 9, 1700);
    check_reg("seq R11", 11, 2100);
    check_reg("seq R13", 13, 2500);
    check_reg("seq R8", 8, 2500);

    // ---- table 2: read-after-write, two stall cycles ----
    prog = '{'{8, 9}, '{9, 8}, '{10, 11}};
    load(prog, init100);
    rows = new[7];
    rows[0] = '{0, 15, 15, X, X, 15, X, 15, 0};
    rows[1] = '{2, 8, 9, X, X, 15, X, 15, 1};
    rows[2] = '{2, 15, 15, 800, 900, 9, X, 15, 1};
    rows[3] = '{2, 15, 15, 0, 0, 15, 1700, 9, 0};
    rows[4] = '{4, 9, 8, X, X, 15, X, 15, 0};
    rows[5] = '{X, 10, 11, 1700, 800, 8, X, 15, 0};
    rows[6] = '{X, X, X, 1000, 1100, 11, 2500, 8, X};
    run_table("stall2", rows);
    repeat (3) @(negedge clk);
    check_reg("stall2 R9", 9, 1700);
    check_reg("stall2 R8", 8, 2500);
    check_reg("stall2 R11", 11, 2100);

    // ---- table 3: hazard exercise, one stall cycle ----
    prog = '{'{8, 9}, '{10, 11}, '{9, 8}, '{11, 10}};
    load(prog, init100);
    rows = new[9];
    rows[0] = '{0, X, X, X, X, X, X, X, 0};
    rows[1] = '{2, 8, 9, X, X, X, X, X, 0};
    rows[2] = '{4, 10, 11, X, X, 9, X, X, 1};
    rows[3] = '{4, 15, 15, X, X, 11, X, 9, 0};
    rows[4] = '{6, 9, 8, X, X, 15, X, 11, 0};
    rows[5] = '{X, 11, 10, 1700, 800, 8, X, 15, 0};
    rows[6] = '{X, X, X, 2100, 1000, 10, 2500, 8, 0};
    rows[7] = '{X, X, X, X, X, X, 3100, 10, X};
    rows[8] = '{X, X, X, X, X, 15, X, X, X};
    run_table("stall1", rows);
    check_reg("stall1 R10", 10, 3100);
    check_reg("stall1 R8", 8, 2500);

    // ---- random programs against an ISA model and a timing model ----
    for (int t = 0; t < 20; t++) begin
      word_t  init[NREGS], model[NREGS];
      int     n, fetch_at[$], last_fetch, stalls_seen, cyc;
      n = 5 + $urandom_range(0, 40);
      prog = {};
      for (int r = 0; r < NREGS; r++) begin
        init[r] = {$urandom, $urandom};
        model[r] = init[r];
      end
      for (int i = 0; i < n; i++) begin
        // small register pool, so that dependences are frequent
        int pool;
        pool = (t % 2 == 0) ? 4 : 15;
        prog.push_back('{regid_t'($urandom_range(0, pool - 1)), regid_t'($urandom_range(0, pool - 1))});
      end
      // ISA model
      foreach (prog[i]) model[prog[i].b] = model[prog[i].a] + model[prog[i].b];
      // timing model: fetch cycle of each instruction
      fetch_at = {};
      foreach (prog[i]) begin
        int f;
        f = (i == 0) ? 0 : fetch_at[i-1] + 1;
        for (int j = 0; j < i; j++)
          if (prog[j].b == prog[i].a || prog[j].b == prog[i].b)
            if (fetch_at[j] + 3 > f) f = fetch_at[j] + 3;
        fetch_at.push_back(f);
      end
      last_fetch = fetch_at[n-1];
      load(prog, init);
      stalls_seen = 0;
      cyc = 0;
      while (cyc <= last_fetch + 3) begin
        #1;
        if (stall) stalls_seen++;
        if (cyc == last_fetch + 3) begin
          check($sformatf("rand%0d last W_dstE", t), W.dstE, prog[n-1].b);
          check($sformatf("rand%0d last W_valE", t), W.valE, model[prog[n-1].b]);
        end
        @(negedge clk);
        cyc++;
      end
      check($sformatf("rand%0d stall cycles", t), stalls_seen, last_fetch - (n - 1));
      repeat (2) @(negedge clk);
      for (int r = 0; r < NREGS; r++)
        check_reg($sformatf("rand%0d R%0d", t, r), regid_t'(r), model[r]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
