// tb_reg_file: random reads and writes on all ports against a reference
// model. Checks that reads are combinational, that a write becomes visible
// only after the clock edge, that register 0xF reads 0 and is never written,
// and the port priority (dstM over dstE over the load port).
`timescale 1ns/1ps
module tb_reg_file;
  import y86_pkg::*;
  logic clk = 0;
  regid_t srcA = 0, srcB = 0, dstE = 15, dstM = 15, ld_addr = 0, dbg_addr = 0;
  word_t valA, valB, valE = 0, valM = 0, ld_data = 0, dbg_data;
  logic ld_we = 0;
  word_t model [16];
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
  reg_file dut (.*);
  always #5 clk = ~clk;
  initial begin
    // load every register
    for (int r = 0; r < 16; r++) begin
      @(negedge clk);
      ld_we = 1; ld_addr = regid_t'(r); ld_data = {$urandom, $urandom};
      model[r] = (r == 15) ? 0 : ld_data;
    end
    @(negedge clk); ld_we = 0;
    for (int i = 0; i < 3000; i++) begin
      srcA = regid_t'($urandom); srcB = regid_t'($urandom); dbg_addr = regid_t'($urandom);
      dstE = regid_t'($urandom); dstM = ($urandom_range(0, 2) == 0) ? regid_t'($urandom) : 15;
      valE = {$urandom, $urandom}; valM = {$urandom, $urandom};
      ld_we = ($urandom_range(0, 3) == 0); ld_addr = regid_t'($urandom); ld_data = {$urandom, $urandom};
      #1;
      // reads see the values before this cycle's writes
      check("valA", valA, model[srcA]);
      check("valB", valB, model[srcB]);
      check("dbg", dbg_data, model[dbg_addr]);
      if (ld_we && ld_addr != 15) model[ld_addr] = ld_data;
      if (dstE != 15) model[dstE] = valE;
      if (dstM != 15) model[dstM] = valM;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
