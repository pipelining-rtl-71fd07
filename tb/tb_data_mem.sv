// tb_data_mem: random 8-byte writes and reads at any byte address against
// a byte-array reference; reads with re low must return 0.
`timescale 1ns/1ps
module tb_data_mem;
  import y86_pkg::*;
  logic clk = 0, re = 0, we = 0; word_t addr = 0, wdata = 0, rdata;
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
  data_mem dut (.*);
  always #5 clk = ~clk;
  initial begin
    for (int a = 0; a < 256; a += 8) begin
      @(negedge clk); we = 1; addr = a; wdata = {$urandom, $urandom};
      for (int k = 0; k < 8; k++) ref_mem[a + k] = wdata[8*k +: 8];
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      word_t exp;
      addr = {$urandom, $urandom};
      re = $urandom_range(0, 1); we = $urandom_range(0, 1); wdata = {$urandom, $urandom};
      for (int k = 0; k < 8; k++) exp[8*k +: 8] = re ? ref_mem[(addr[7:0] + k) % 256] : 8'h0;
      #1;
      check("rdata", rdata, exp);
      if (we) for (int k = 0; k < 8; k++) ref_mem[(addr[7:0] + k) % 256] = wdata[8*k +: 8];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
