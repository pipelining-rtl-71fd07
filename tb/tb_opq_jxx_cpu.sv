// tb_opq_jxx_cpu: self-checking testbench for the OPq + jXX processor.
//
// Part 1 runs the control-hazard example (addq %r8,%r9; je 0xFFFF;
// addq %r10,%r11) and compares pipeline registers, flags and the stall
// signal cycle by cycle with a hand-worked table: the je waits two cycles
// for the addq to write SF/ZF, is not taken, and the next addq follows.
// The same with subq %r8,%r8 (ZF = 1) checks that the jump is taken.
// Part 2 runs random programs of OPq instructions, forward conditional and
// unconditional jumps and no-ops, ending in a jump to itself. The final
// registers and flags are compared with an instruction-level model, and the
// cycle in which the final jump is fetched with a timing model: an OPq is
// fetched at least three cycles after the OPq whose result it reads, a
// conditional jump at least three cycles after the last OPq before it.
`timescale 1ns/1ps
module tb_opq_jxx_cpu;
  import y86_pkg::*;

  logic clk = 0, rst = 1;
  logic imem_we = 0; word_t imem_waddr = 0; logic [7:0] imem_wdata = 0;
  logic rf_ld_we = 0; regid_t rf_ld_addr = 0; word_t rf_ld_data = 0;
  regid_t rf_dbg_addr = 0; word_t rf_dbg_data;
  pP_t P; fDj_t D; dEj_t E; eW_t W; cc_t CC; logic stall;

  int checks = 0, failures = 0;
  int n_ctrl_stall = 0, n_taken = 0, n_not_taken = 0;

  opq_jxx_cpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
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

  task automatic check_reg(string what, regid_t r, word_t exp);
    rf_dbg_addr = r;
    #1;
    check(what, rf_dbg_data, exp);
  endtask

  logic [7:0] image [256];

  task automatic load(word_t init[NREGS]);
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      imem_we = 1; imem_waddr = i; imem_wdata = image[i];
      @(negedge clk);
    end
    imem_we = 0;
    for (int r = 0; r < NREGS; r++) begin
      rf_ld_we = 1; rf_ld_addr = regid_t'(r); rf_ld_data = init[r];
      @(negedge clk);
    end
    rf_ld_we = 0;
    @(negedge clk);
    rst = 0;
  endtask

  function automatic void put_opq(int at, int fn, int a, int b);
    image[at] = 8'(8'h60 | fn); image[at + 1] = 8'((a << 4) | b);
  endfunction
  function automatic void put_jxx(int at, int cond, word_t dest);
    image[at] = 8'(8'h70 | cond);
    for (int k = 0; k < 8; k++) image[at + 1 + k] = dest[8*k +: 8];
  endfunction

  typedef struct { longint pc, st, drA, drB, eA, eB, edst, wval, wdst, sf, zf; } row_t;
  localparam longint X = -1;

  task automatic run_table(string name, row_t rows[]);
    for (int c = 0; c < rows.size(); c++) begin
      #1;
      if (rows[c].pc   >= 0) check($sformatf("%s c%0d PC", name, c), P.pc, rows[c].pc);
      if (rows[c].st   >= 0) check($sformatf("%s c%0d stall", name, c), stall, rows[c].st);
      if (rows[c].drA  >= 0) check($sformatf("%s c%0d D_rA", name, c), D.rA, rows[c].drA);
      if (rows[c].drB  >= 0) check($sformatf("%s c%0d D_rB", name, c), D.rB, rows[c].drB);
      if (rows[c].eA   >= 0) check($sformatf("%s c%0d E_valA", name, c), E.valA, rows[c].eA);
      if (rows[c].eB   >= 0) check($sformatf("%s c%0d E_valB", name, c), E.valB, rows[c].eB);
      if (rows[c].edst >= 0) check($sformatf("%s c%0d E_dstE", name, c), E.dstE, rows[c].edst);
      if (rows[c].wval >= 0) check($sformatf("%s c%0d W_valE", name, c), W.valE, rows[c].wval);
      if (rows[c].wdst >= 0) check($sformatf("%s c%0d W_dstE", name, c), W.dstE, rows[c].wdst);
      if (rows[c].sf   >= 0) check($sformatf("%s c%0d SF", name, c), CC.sf, rows[c].sf);
      if (rows[c].zf   >= 0) check($sformatf("%s c%0d ZF", name, c), CC.zf, rows[c].zf);
      @(negedge clk);
    end
  endtask

  word_t init100[NREGS];
  row_t  rows[];

  // random-program items
  typedef struct { int kind; int fn; int a; int b; int target; int addr; } item_t; // kind 0 OPq, 1 jXX, 2 nop, 3 end
  item_t items[$];

  initial begin
    for (int r = 0; r < NREGS; r++) init100[r] = word_t'(100 * r);

    // ---- control hazard: je not taken ----
    foreach (image[i]) image[i] = 8'h10;
    put_opq(0, 0, 8, 9);                 // addq %r8, %r9
    put_jxx(2, 3, 64'hFFFF);             // je 0xFFFF
    put_opq(11, 0, 10, 11);              // addq %r10, %r11
    put_jxx(13, 0, 64'd13);              // jmp . (spin)
    load(init100);
    rows = new[7];
    rows[0] = '{0,   0, 15, 15, X, X, 15, X, 15, 0, 1};
    rows[1] = '{2,   1, 8,  9,  X, X, 15, X, 15, 0, 1};
    rows[2] = '{2,   1, 15, 15, 800, 900, 9, X, 15, 0, 1};
    rows[3] = '{2,   0, 15, 15, 0, 0, 15, 1700, 9, 0, 0};
    rows[4] = '{11,  0, 15, 15, X, X, 15, X, 15, 0, 0};
    rows[5] = '{13,  0, 10, 11, X, X, 15, X, 15, 0, 0};
    rows[6] = '{X,   X, X, X, 1000, 1100, 11, X, 15, 0, 0};
    run_table("je-not-taken", rows);
    repeat (3) @(negedge clk);
    check_reg("je-not-taken R9", 9, 1700);
    check_reg("je-not-taken R11", 11, 2100);

    // ---- control hazard: je taken after subq %r8,%r8 ----
    foreach (image[i]) image[i] = 8'h10;
    put_opq(0, 1, 8, 8);                 // subq %r8, %r8 -> 0, ZF = 1
    put_jxx(2, 3, 64'hFFFF);             // je 0xFFFF
    load(init100);
    rows = new[5];
    rows[0] = '{0,      0, X, X, X, X, X, X, X, 0, 1};
    rows[1] = '{2,      1, 8, 8, X, X, X, X, X, 0, 1};
    rows[2] = '{2,      1, 15, 15, 800, 800, 8, X, X, 0, 1};
    rows[3] = '{2,      0, X, X, X, X, 15, 0, 8, 0, 1};
    rows[4] = '{'hFFFF, X, X, X, X, X, X, X, X, 0, 1};
    run_table("je-taken", rows);

    // ---- random programs ----
    for (int t = 0; t < 30; t++) begin
      word_t init[NREGS], model[NREGS];
      cc_t   mcc;
      int    n, addr, pc_i, f_prev, f_last_opq, f_end, cyc, seen_end;
      int    f_of_reg[NREGS];
      int    dyn_count;
      items = {};
      n = 5 + $urandom_range(0, 20);
      addr = 0;
      for (int i = 0; i < n; i++) begin
        item_t it;
        int k;
        k = $urandom_range(0, 9);
        it.kind = (k < 6) ? 0 : (k < 9) ? 1 : 2;
        it.fn = (it.kind == 0) ? $urandom_range(0, 3) : $urandom_range(0, 6);
        it.a = $urandom_range(0, 4); it.b = $urandom_range(0, 4);
        it.target = 0;
        it.addr = addr;
        addr += (it.kind == 0) ? 2 : (it.kind == 1) ? 9 : 1;
        items.push_back(it);
      end
      begin
        item_t e;
        e.kind = 3; e.addr = addr; e.fn = 0; e.a = 0; e.b = 0; e.target = n;
        items.push_back(e);
      end
      // forward jump targets
      foreach (items[i]) if (items[i].kind == 1) items[i].target = $urandom_range(i + 1, n);
      foreach (image[i]) image[i] = 8'h10;
      foreach (items[i]) begin
        case (items[i].kind)
          0: put_opq(items[i].addr, items[i].fn, items[i].a, items[i].b);
          1: put_jxx(items[i].addr, items[i].fn, word_t'(items[items[i].target].addr));
          3: put_jxx(items[i].addr, 0, word_t'(items[i].addr));
          default: ;
        endcase
      end
      for (int r = 0; r < NREGS; r++) begin init[r] = {$urandom, $urandom}; model[r] = init[r]; end
      if (t % 3 == 0) for (int r = 0; r < 5; r++) init[r] = word_t'(r % 2);  // frequent zero results
      for (int r = 0; r < NREGS; r++) model[r] = init[r];
      // instruction-level and timing model
      mcc = CC_INIT;
      pc_i = 0; f_prev = -1; f_last_opq = -100;
      for (int r = 0; r < NREGS; r++) f_of_reg[r] = -100;
      dyn_count = 0;
      while (items[pc_i].kind != 3) begin
        int f;
        item_t it;
        it = items[pc_i];
        f = f_prev + 1;
        if (it.kind == 0) begin
          word_t a, b, v;
          if (f_of_reg[it.a] + 3 > f) f = f_of_reg[it.a] + 3;
          if (f_of_reg[it.b] + 3 > f) f = f_of_reg[it.b] + 3;
          a = model[it.a]; b = model[it.b];
          case (it.fn)
            0: v = b + a;
            1: v = b - a;
            2: v = b & a;
            default: v = b ^ a;
          endcase
          model[it.b] = v;
          mcc.sf = v[63]; mcc.zf = (v == 0);
          f_of_reg[it.b] = f;
          f_last_opq = f;
          pc_i++;
        end else if (it.kind == 1) begin
          logic tk;
          if (it.fn != 0 && f_last_opq + 3 > f) begin
            f = f_last_opq + 3;
            n_ctrl_stall++;
          end
          case (it.fn)
            0: tk = 1;
            1: tk = mcc.sf | mcc.zf;
            2: tk = mcc.sf;
            3: tk = mcc.zf;
            4: tk = !mcc.zf;
            5: tk = !mcc.sf;
            default: tk = !mcc.sf && !mcc.zf;
          endcase
          if (tk) n_taken++; else n_not_taken++;
          pc_i = tk ? it.target : pc_i + 1;
        end else begin
          pc_i++;
        end
        f_prev = f;
        dyn_count++;
      end
      f_end = f_prev + 1;
      load(init);
      cyc = 0; seen_end = -1;
      while (cyc < f_end + 8) begin
        #1;
        if (seen_end < 0 && P.pc == word_t'(items[n].addr)) seen_end = cyc;
        @(negedge clk);
        cyc++;
      end
      check($sformatf("rand%0d end fetched at cycle", t), seen_end, f_end);
      for (int r = 0; r < NREGS; r++) check_reg($sformatf("rand%0d R%0d", t, r), regid_t'(r), model[r]);
      check($sformatf("rand%0d SF", t), CC.sf, mcc.sf);
      check($sformatf("rand%0d ZF", t), CC.zf, mcc.zf);
    end

    $display("random programs: jumps waiting for flags=%0d taken=%0d not taken=%0d",
             n_ctrl_stall, n_taken, n_not_taken);
    check("a jump waited for flags", n_ctrl_stall > 0, 1);
    check("a jump was taken", n_taken > 0, 1);
    check("a jump was not taken", n_not_taken > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
