// tb_mem_stage: feeds a random instruction-code stream into fetch, with
// an address and store data entering at execute two cycles later, and
// checks that the memory stage sees each code three cycles after fetch,
// that the read/write enables follow it, and that loads return what earlier
// stores wrote (the loaded value is checked in mW one cycle later).
`timescale 1ns/1ps
module tb_mem_stage;
  import y86_pkg::*;
  logic clk = 0, rst = 1;
  icode_t f_icode = I_NOP; word_t e_valE = 0, e_valA = 0;
  icode_t M_icode, W_icode; logic mem_read, mem_write; word_t W_valM;
  logic [7:0] ref_mem [256];
  icode_t fq [$];
  word_t  addr_of [$], data_of [$], valm_of [$];
  int n_rd = 0, n_wr = 0;
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
  mem_stage dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 256; k++) ref_mem[k] = 0;
    // first clear the memory with stores
    for (int i = 0; i < 600; i++) begin
      icode_t c;
      if (i < 32) c = I_RMMOVQ;
      else c = icode_t'($urandom_range(0, 11));
      fq.push_back(c);
      // address/data for the instruction now entering execute (fetched 2 cycles ago)
      addr_of.push_back(word_t'(((i < 32 ? i : $urandom_range(0, 7)) * 8)));
      data_of.push_back((i < 32) ? 64'h0 : {$urandom, $urandom});
      f_icode = c;
      if (i >= 2) begin e_valE = addr_of[i - 2]; e_valA = data_of[i - 2]; end
      #1;
      if (i >= 3) begin
        icode_t m;
        word_t  exp;
        m = fq[i - 3];
        check($sformatf("M_icode %0d", i), M_icode, m);
        check($sformatf("read %0d", i), mem_read, m inside {I_MRMOVQ, I_POPQ, I_RET});
        check($sformatf("write %0d", i), mem_write, m inside {I_RMMOVQ, I_PUSHQ, I_CALL});
        exp = 0;
        if (m inside {I_MRMOVQ, I_POPQ, I_RET}) begin
          for (int k = 0; k < 8; k++) exp[8*k +: 8] = ref_mem[addr_of[i - 3][7:0] + k];
          n_rd++;
        end
        valm_of.push_back(exp);
        if (m inside {I_RMMOVQ, I_PUSHQ, I_CALL}) begin
          for (int k = 0; k < 8; k++) ref_mem[addr_of[i - 3][7:0] + k] = data_of[i - 3][8*k +: 8];
          n_wr++;
        end
      end
      if (i >= 4) begin
        check($sformatf("W_icode %0d", i), W_icode, fq[i - 4]);
        check($sformatf("W_valM %0d", i), W_valM, valm_of[i - 4]);
      end
      @(negedge clk);
    end
    check("reads seen", n_rd > 20, 1);
    check("writes seen", n_wr > 20, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
