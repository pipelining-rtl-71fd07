// tb_times3_pipe: streams one operand per clock (7 and 17 first, then
// random ones) and checks that 3 x A appears exactly three clock edges
// after A is presented, i.e. one result per cycle.
`timescale 1ns/1ps
module tb_times3_pipe;
  logic clk = 0, rst = 1; logic [31:0] a_in = 0, y;
  logic [31:0] sent [$];
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
  times3_pipe dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(negedge clk);
    check("reset", y, 0);
    rst = 0;
    for (int i = 0; i < 1000; i++) begin
      a_in = (i == 0) ? 7 : (i == 1) ? 17 : $urandom;
      sent.push_back(a_in);
      @(negedge clk);
      if (i >= 2) check($sformatf("y for input %0d", i - 2), y, 32'(3 * sent[i - 2]));
      if (i == 1) check("not yet", y, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
