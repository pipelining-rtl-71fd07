// tb_fetch_jxx: random instruction bytes, PCs and flags; checks decoding of
// OPq (2 bytes, rA:rB), jXX (9 bytes, destination, condition from SF/ZF)
// and other codes (1-byte no-op).
`timescale 1ns/1ps
module tb_fetch_jxx;
  import y86_pkg::*;
  word_t pc, next_pc; ibytes_t ibytes; cc_t cc; icode_t f_icode; fDj_t f;
  logic cond_jump, taken;
  int checks = 0, failures = 0;
  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got 0x%0h expected 0x%0h", what, got, exp);
    end
  endtask
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  fetch_jxx dut (.*);
  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [3:0] ic, fn; logic t; word_t dest;
      pc = {$urandom, $urandom};
      ic = (i % 3 == 0) ? 4'h6 : (i % 3 == 1) ? 4'h7 : 4'($urandom);
      fn = (ic == 4'h7) ? 4'($urandom_range(0, 7)) : 4'($urandom);
      cc = cc_t'($urandom);
      ibytes = {$urandom, $urandom, $urandom};
      ibytes[7:0] = {ic, fn};
      dest = ibytes[71:8];
      case (fn)
        0: t = 1;
        1: t = cc.sf || cc.zf;
        2: t = cc.sf;
        3: t = cc.zf;
        4: t = !cc.zf;
        5: t = !cc.sf;
        6: t = !cc.sf && !cc.zf;
        default: t = 0;
      endcase
      #1;
      check("icode", f_icode, ic);
      if (ic == 4'h6) begin
        check("opq", f.opq, 1); check("fn", f.fn, fn);
        check("rA", f.rA, ibytes[15:12]); check("rB", f.rB, ibytes[11:8]);
        check("next_pc opq", next_pc, pc + 2);
        check("cond_jump opq", cond_jump, 0);
      end else if (ic == 4'h7) begin
        check("jxx opq", f.opq, 0); check("jxx rA", f.rA, 15); check("jxx rB", f.rB, 15);
        check("taken", taken, t);
        check("next_pc jxx", next_pc, t ? dest : pc + 9);
        check("cond_jump", cond_jump, fn != 0);
      end else begin
        check("nop opq", f.opq, 0); check("nop rB", f.rB, 15);
        check("next_pc nop", next_pc, pc + 1);
        check("cond_jump nop", cond_jump, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
