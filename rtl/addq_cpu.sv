// addq_cpu: a four-stage pipelined processor for the Y86-64 addq
// instruction, with hardware stalling for data hazards.
//
// Stages and the pipeline registers between them (a register named xY
// receives the values stage x sends and stage Y reads):
//   pP   PC register                 -> fetch/PC update: read 10 instruction
//                                       bytes, split out rA/rB, PC + 2
//   fD   rA, rB                      -> decode: read R[rA], R[rB]; dstE = rB
//   dE   valA, valB, dstE            -> execute: valE = valA + valB
//   eW   valE, dstE                  -> writeback: R[dstE] <= valE
// One instruction is in each stage, so one addq completes per cycle and
// each takes four cycles from fetch to the end of writeback. The register
// file is written at the clock edge ending the writeback cycle, so the
// hazard_unit stalls fetch (holds pP, loads a REG_NONE bubble into fD)
// while the instruction being fetched reads a register that the
// instruction in decode or execute will write. The do-nothing value of fD,
// dE and eW uses REG_NONE register numbers; all four registers load it on
// rst (synchronous, active high), and the PC restarts at 0.
//
// The imem_* and rf_ld_* ports load the program and the initial register
// values while rst is held; rf_dbg_* reads a register. The pipeline
// register contents and the stall signal are outputs for observation. The
// dstM write port of the register file is unused here (tied to REG_NONE).
module addq_cpu
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 256
) (
  input  logic       clk,
  input  logic       rst,
  // program load
  input  logic       imem_we,
  input  word_t      imem_waddr,
  input  logic [7:0] imem_wdata,
  // register file load / inspect
  input  logic       rf_ld_we,
  input  regid_t     rf_ld_addr,
  input  word_t      rf_ld_data,
  input  regid_t     rf_dbg_addr,
  output word_t      rf_dbg_data,
  // observation
  output pP_t        P,
  output fD_t        D,
  output dE_t        E,
  output eW_t        W,
  output logic       stall
);

  // ---------------- fetch / PC update ----------------
  ibytes_t ibytes;
  word_t   f_next_pc;
  regid_t  f_rA, f_rB;
  pP_t     p;
  fD_t     f;
  logic    stall_F, bubble_D;

  instr_mem #(.SIZE(IMEM_BYTES)) u_imem (
    .clk, .addr(P.pc), .rdata(ibytes),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  fetch_logic u_fetch (
    .pc(P.pc), .ibytes, .next_pc(f_next_pc), .f_icode(), .f_rA, .f_rB
  );

  assign p.pc = f_next_pc;
  assign f.rA = f_rA;
  assign f.rB = f_rB;

  pipe_reg #(.T(pP_t), .INIT(PP_INIT)) u_pP (
    .clk, .rst, .stall(stall_F), .bubble(1'b0), .d(p), .q(P)
  );
  pipe_reg #(.T(fD_t), .INIT(FD_INIT)) u_fD (
    .clk, .rst, .stall(1'b0), .bubble(bubble_D), .d(f), .q(D)
  );

  // ---------------- decode ----------------
  dE_t    d;
  word_t  reg_outputA, reg_outputB;

  reg_file u_rf (
    .clk,
    .srcA(D.rA), .srcB(D.rB), .valA(reg_outputA), .valB(reg_outputB),
    .dstE(W.dstE), .valE(W.valE),
    .dstM(REG_NONE), .valM('0),
    .ld_we(rf_ld_we), .ld_addr(rf_ld_addr), .ld_data(rf_ld_data),
    .dbg_addr(rf_dbg_addr), .dbg_data(rf_dbg_data)
  );

  assign d.dstE = D.rB;
  assign d.valA = reg_outputA;
  assign d.valB = reg_outputB;

  hazard_unit u_hz (
    .f_rA, .f_rB, .d_dstE(d.dstE), .E_dstE(E.dstE),
    .stall_F, .bubble_D
  );

  pipe_reg #(.T(dE_t), .INIT(DE_INIT)) u_dE (
    .clk, .rst, .stall(1'b0), .bubble(1'b0), .d(d), .q(E)
  );

  // ---------------- execute ----------------
  eW_t e;

  alu_add u_alu (.valA(E.valA), .valB(E.valB), .valE(e.valE));
  assign e.dstE = E.dstE;

  pipe_reg #(.T(eW_t), .INIT(EW_INIT)) u_eW (
    .clk, .rst, .stall(1'b0), .bubble(1'b0), .d(e), .q(W)
  );

  // ---------------- writeback ----------------
  // W.dstE / W.valE drive the register file's write port above.

  assign stall = stall_F;

endmodule
