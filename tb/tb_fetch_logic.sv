// tb_fetch_logic: random instruction bytes and PCs; checks PC + 2 and the
// rA/rB split (high/low nibble of byte 1) for addq, REG_NONE otherwise.
`timescale 1ns/1ps
module tb_fetch_logic;
  import y86_pkg::*;
  word_t pc, next_pc; ibytes_t ibytes; icode_t f_icode; regid_t f_rA, f_rB;
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
  fetch_logic dut (.*);
  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [7:0] b0, b1;
      pc = {$urandom, $urandom};
      if (i < 4) pc = 64'hFFFF_FFFF_FFFF_FFFE + 64'(i);
      b0 = ($urandom_range(0, 1) == 0) ? 8'h60 : 8'($urandom);
      b1 = 8'($urandom);
      ibytes = {$urandom, $urandom, $urandom};
      ibytes[15:0] = {b1, b0};
      #1;
      check("next_pc", next_pc, pc + 2);
      check("icode", f_icode, b0 >> 4);
      check("rA", f_rA, (b0[7:4] == 4'h6) ? b1 >> 4 : 15);
      check("rB", f_rB, (b0[7:4] == 4'h6) ? b1 & 8'h0F : 15);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
