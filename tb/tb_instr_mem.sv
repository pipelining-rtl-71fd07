// tb_instr_mem: fills the memory with random bytes through the write port,
// then reads 10 bytes at every address (including ones that wrap past the
// end) and compares with a reference copy.
`timescale 1ns/1ps
module tb_instr_mem;
  import y86_pkg::*;
  logic clk = 0, we = 0; word_t addr = 0, waddr = 0; logic [7:0] wdata = 0;
  ibytes_t rdata;
  logic [7:0] ref_mem [256];
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
  instr_mem dut (.*);
  always #5 clk = ~clk;
  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 256; i++) begin
        @(negedge clk);
        we = 1; waddr = word_t'(i) + (pass == 1 ? 64'h1000 : 64'h0); wdata = 8'($urandom);
        ref_mem[i] = wdata;
      end
      @(negedge clk); we = 0;
      for (int a = 0; a < 256; a++) begin
        ibytes_t exp;
        addr = word_t'(a);
        for (int k = 0; k < IBYTES; k++) exp[8*k +: 8] = ref_mem[(a + k) % 256];
        #1;
        check($sformatf("read @%0d", a), rdata[63:0], exp[63:0]);
        check($sformatf("read hi @%0d", a), rdata[79:64], exp[79:64]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
