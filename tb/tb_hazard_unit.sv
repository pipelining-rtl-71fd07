// tb_hazard_unit: exhaustive over the four register numbers. A stall is
// expected exactly when a fetched source register (not 0xF) equals the
// destination in decode or in execute.
`timescale 1ns/1ps
module tb_hazard_unit;
  import y86_pkg::*;
  regid_t f_rA, f_rB, d_dstE, E_dstE; logic stall_F, bubble_D;
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
  hazard_unit dut (.*);
  initial begin
    for (int v = 0; v < 65536; v++) begin
      logic exp;
      {f_rA, f_rB, d_dstE, E_dstE} = 16'(v);
      exp = 0;
      if (f_rA != 15 && (f_rA == d_dstE || f_rA == E_dstE)) exp = 1;
      if (f_rB != 15 && (f_rB == d_dstE || f_rB == E_dstE)) exp = 1;
      #1;
      check($sformatf("stall %h", v), stall_F, exp);
      check($sformatf("bubble %h", v), bubble_D, exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
