// tb_alu_add: random and corner-case operands, including wrap-around.
`timescale 1ns/1ps
module tb_alu_add;
  import y86_pkg::*;
  word_t valA, valB, valE;
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
  alu_add dut (.*);
  initial begin
    valA = 800; valB = 900; #1; check("800+900", valE, 1700);
    valA = '1; valB = 1; #1; check("wrap", valE, 0);
    for (int i = 0; i < 2000; i++) begin
      valA = {$urandom, $urandom}; valB = {$urandom, $urandom};
      #1;
      check("add", valE, valA + valB);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
