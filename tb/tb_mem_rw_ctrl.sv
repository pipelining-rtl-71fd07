// tb_mem_rw_ctrl: all sixteen instruction codes; reads for mrmovq, popq,
// ret; writes for rmmovq, pushq, call; nothing for the rest.
`timescale 1ns/1ps
module tb_mem_rw_ctrl;
  import y86_pkg::*;
  icode_t icode; logic mem_read, mem_write;
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
  mem_rw_ctrl dut (.*);
  initial begin
    for (int c = 0; c < 16; c++) begin
      icode = icode_t'(c);
      #1;
      check($sformatf("read %0d", c), mem_read, (c == 5 || c == 11 || c == 9));
      check($sformatf("write %0d", c), mem_write, (c == 4 || c == 10 || c == 8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
