// opq_jxx_cpu: the four-stage pipeline of addq_cpu extended with the other
// OPq instructions (subq, andq, xorq), a condition-code register (SF, ZF)
// and conditional jumps, with stalling for control hazards.
//
// Stages and registers are those of addq_cpu: pP -> fetch -> fD -> decode
// -> dE -> execute -> eW -> writeback. fD and dE also carry whether the
// instruction is an OPq and its ALU function. Execute computes valE and, for
// an OPq, writes SF/ZF into the condition-code register at the end of the
// cycle (reset value SF=0, ZF=1). A jXX is resolved entirely in fetch: it
// reads the condition codes and picks the next PC (destination or PC + 9),
// and enters the pipeline as a bubble.
//
// Two hazards stall fetch (hold pP, load a bubble into fD):
//   data    - the fetched OPq reads a register written by the OPq in decode
//             or execute (hazard_unit, as in addq_cpu);
//   control - the fetched jXX is conditional and an OPq is in decode or
//             execute, so the flags it must read are not yet written. The
//             jump waits two cycles behind the OPq just before it.
// A jump after which no OPq is in flight costs nothing; an unconditional
// jmp never waits. The jXX encoding (9 bytes, 8-byte little-endian
// destination), andq/xorq, the 1-byte no-op for other codes, and the
// absence of an overflow flag are choices of this design.
//
// Ports are those of addq_cpu, plus the condition codes as an output.
module opq_jxx_cpu
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 256
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       imem_we,
  input  word_t      imem_waddr,
  input  logic [7:0] imem_wdata,
  input  logic       rf_ld_we,
  input  regid_t     rf_ld_addr,
  input  word_t      rf_ld_data,
  input  regid_t     rf_dbg_addr,
  output word_t      rf_dbg_data,
  output pP_t        P,
  output fDj_t       D,
  output dEj_t       E,
  output eW_t        W,
  output cc_t        CC,
  output logic       stall
);

  // ---------------- fetch / PC update ----------------
  ibytes_t ibytes;
  pP_t     p;
  fDj_t    f;
  logic    cond_jump, taken, data_stall, ctrl_stall, stall_F;

  instr_mem #(.SIZE(IMEM_BYTES)) u_imem (
    .clk, .addr(P.pc), .rdata(ibytes),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  fetch_jxx u_fetch (
    .pc(P.pc), .ibytes, .cc(CC), .f_icode(), .f, .cond_jump, .taken, .next_pc(p.pc)
  );

  hazard_unit u_hz (
    .f_rA(f.rA), .f_rB(f.rB), .d_dstE(D.rB), .E_dstE(E.dstE),
    .stall_F(data_stall), .bubble_D()
  );

  assign ctrl_stall = cond_jump && (D.opq || E.opq);
  assign stall_F    = data_stall || ctrl_stall;

  pipe_reg #(.T(pP_t), .INIT(PP_INIT)) u_pP (
    .clk, .rst, .stall(stall_F), .bubble(1'b0), .d(p), .q(P)
  );
  pipe_reg #(.T(fDj_t), .INIT(FDJ_INIT)) u_fD (
    .clk, .rst, .stall(1'b0), .bubble(stall_F), .d(f), .q(D)
  );

  // ---------------- decode ----------------
  dEj_t d;

  reg_file u_rf (
    .clk,
    .srcA(D.rA), .srcB(D.rB), .valA(d.valA), .valB(d.valB),
    .dstE(W.dstE), .valE(W.valE),
    .dstM(REG_NONE), .valM('0),
    .ld_we(rf_ld_we), .ld_addr(rf_ld_addr), .ld_data(rf_ld_data),
    .dbg_addr(rf_dbg_addr), .dbg_data(rf_dbg_data)
  );

  assign d.opq  = D.opq;
  assign d.fn   = D.fn;
  assign d.dstE = D.rB;

  pipe_reg #(.T(dEj_t), .INIT(DEJ_INIT)) u_dE (
    .clk, .rst, .stall(1'b0), .bubble(1'b0), .d(d), .q(E)
  );

  // ---------------- execute ----------------
  eW_t e;
  cc_t e_cc;

  alu u_alu (.fn(E.fn), .valA(E.valA), .valB(E.valB), .valE(e.valE), .cc(e_cc));
  assign e.dstE = E.dstE;

  always_ff @(posedge clk) begin
    if (rst)        CC <= CC_INIT;
    else if (E.opq) CC <= e_cc;
  end

  pipe_reg #(.T(eW_t), .INIT(EW_INIT)) u_eW (
    .clk, .rst, .stall(1'b0), .bubble(1'b0), .d(e), .q(W)
  );

  assign stall = stall_F;

endmodule
