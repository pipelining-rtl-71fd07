// tb_pipe_reg: checks the pipeline register's load, hold (stall), bubble
// and reset behaviour against a reference model, with random controls.
`timescale 1ns/1ps
module tb_pipe_reg;
  import y86_pkg::*;
  logic clk = 0, rst = 1, stall = 0, bubble = 0;
  fD_t d, q, model;
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
  pipe_reg #(.T(fD_t), .INIT(FD_INIT)) dut (.*);
  always #5 clk = ~clk;
  int n_hold = 0, n_bub = 0;
  initial begin
    d = '{rA: 1, rB: 2};
    @(negedge clk);
    check("reset value", q, FD_INIT);
    rst = 0;
    model = FD_INIT;
    for (int i = 0; i < 2000; i++) begin
      d = fD_t'($urandom);
      stall = ($urandom_range(0, 3) == 0);
      bubble = ($urandom_range(0, 5) == 0);
      rst = ($urandom_range(0, 50) == 0);
      if (rst || bubble) model = FD_INIT;
      else if (!stall) model = d;
      if (stall && !bubble && !rst) n_hold++;
      if (bubble && !rst) n_bub++;
      @(negedge clk);
      check($sformatf("cycle %0d", i), q, model);
    end
    check("stall seen", n_hold > 0, 1);
    check("bubble seen", n_bub > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
