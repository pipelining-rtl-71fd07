// tb_alu: random and corner operands for add, sub, and, xor; checks the
// result and the sign and zero flags.
`timescale 1ns/1ps
module tb_alu;
  import y86_pkg::*;
  alufn_t fn; word_t valA, valB, valE; cc_t cc;
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
  alu dut (.*);
  initial begin
    for (int i = 0; i < 4000; i++) begin
      word_t exp;
      fn = alufn_t'(i % 4);
      valA = {$urandom, $urandom}; valB = {$urandom, $urandom};
      if (i % 7 == 0) valB = valA;          // sub and xor give zero
      if (i == 4) begin valA = 800; valB = 900; end
      case (i % 4)
        0: exp = valA + valB;
        1: exp = valB - valA;
        2: exp = valA & valB;
        default: exp = valA ^ valB;
      endcase
      #1;
      check($sformatf("valE fn%0d", i % 4), valE, exp);
      check("SF", cc.sf, exp[63]);
      check("ZF", cc.zf, exp == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
