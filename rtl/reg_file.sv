// reg_file: the processor's register file, %rax..%r14 (15 x 64 bits).
//
// Two read ports (srcA -> valA, srcB -> valB) are combinational: a value is
// available as soon as the register number is. Two write ports (dstE/valE
// and dstM/valM, "next R[dstE]" and "next R[dstM]") write at the rising
// clock edge that ends the cycle, so an instruction reading a register in
// the same cycle as another writes it sees the old value. Register number
// 0xF (REG_NONE) reads as 0 and is never written. If both write ports name
// the same register, dstM wins. A third write port (ld_*) and a read port
// (dbg_*) let a host load initial values and inspect results; the pipeline
// ports win over ld_* on the same register. Those two ports, and the dstM
// priority, are this design's choices.
module reg_file
  import y86_pkg::*;
(
  input  logic   clk,
  input  regid_t srcA,
  input  regid_t srcB,
  output word_t  valA,
  output word_t  valB,
  input  regid_t dstE,
  input  word_t  valE,
  input  regid_t dstM,
  input  word_t  valM,
  input  logic   ld_we,
  input  regid_t ld_addr,
  input  word_t  ld_data,
  input  regid_t dbg_addr,
  output word_t  dbg_data
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (ld_we && ld_addr != REG_NONE) regs[ld_addr] <= ld_data;
    if (dstE != REG_NONE)             regs[dstE]    <= valE;
    if (dstM != REG_NONE)             regs[dstM]    <= valM;
  end

  always_comb begin
    valA     = (srcA     == REG_NONE) ? '0 : regs[srcA];
    valB     = (srcB     == REG_NONE) ? '0 : regs[srcB];
    dbg_data = (dbg_addr == REG_NONE) ? '0 : regs[dbg_addr];
  end

endmodule
