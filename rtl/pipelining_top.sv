// pipelining_top: the pipelined designs side by side, each with its own
// ports:
//   cpu_*  - addq_cpu, the four-stage Y86-64 addq processor with data-hazard
//            stalling (program/register load ports, observation outputs),
//   br_*   - opq_jxx_cpu, the same pipeline extended with OPq, condition
//            codes and conditional jumps, with control-hazard stalling,
//   mem_*  - mem_stage, the icode-driven memory read/write control of the
//            five-stage pipeline with its data memory,
//   t3_*   - times3_pipe, the two-stage pipelined 3 x A circuit.
// All share only the clock and the synchronous, active-high reset.
module pipelining_top
  import y86_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // addq processor
  input  logic       cpu_imem_we,
  input  word_t      cpu_imem_waddr,
  input  logic [7:0] cpu_imem_wdata,
  input  logic       cpu_rf_ld_we,
  input  regid_t     cpu_rf_ld_addr,
  input  word_t      cpu_rf_ld_data,
  input  regid_t     cpu_rf_dbg_addr,
  output word_t      cpu_rf_dbg_data,
  output pP_t        cpu_P,
  output fD_t        cpu_D,
  output dE_t        cpu_E,
  output eW_t        cpu_W,
  output logic       cpu_stall,
  // OPq + jXX processor
  input  logic       br_imem_we,
  input  word_t      br_imem_waddr,
  input  logic [7:0] br_imem_wdata,
  input  logic       br_rf_ld_we,
  input  regid_t     br_rf_ld_addr,
  input  word_t      br_rf_ld_data,
  input  regid_t     br_rf_dbg_addr,
  output word_t      br_rf_dbg_data,
  output pP_t        br_P,
  output fDj_t       br_D,
  output dEj_t       br_E,
  output eW_t        br_W,
  output cc_t        br_CC,
  output logic       br_stall,
  // memory stage control
  input  icode_t     mem_f_icode,
  input  word_t      mem_e_valE,
  input  word_t      mem_e_valA,
  output icode_t     mem_M_icode,
  output logic       mem_read,
  output logic       mem_write,
  output icode_t     mem_W_icode,
  output word_t      mem_W_valM,
  // times three
  input  logic [31:0] t3_a,
  output logic [31:0] t3_y
);

  addq_cpu u_cpu (
    .clk, .rst,
    .imem_we(cpu_imem_we), .imem_waddr(cpu_imem_waddr), .imem_wdata(cpu_imem_wdata),
    .rf_ld_we(cpu_rf_ld_we), .rf_ld_addr(cpu_rf_ld_addr), .rf_ld_data(cpu_rf_ld_data),
    .rf_dbg_addr(cpu_rf_dbg_addr), .rf_dbg_data(cpu_rf_dbg_data),
    .P(cpu_P), .D(cpu_D), .E(cpu_E), .W(cpu_W), .stall(cpu_stall)
  );

  opq_jxx_cpu u_br (
    .clk, .rst,
    .imem_we(br_imem_we), .imem_waddr(br_imem_waddr), .imem_wdata(br_imem_wdata),
    .rf_ld_we(br_rf_ld_we), .rf_ld_addr(br_rf_ld_addr), .rf_ld_data(br_rf_ld_data),
    .rf_dbg_addr(br_rf_dbg_addr), .rf_dbg_data(br_rf_dbg_data),
    .P(br_P), .D(br_D), .E(br_E), .W(br_W), .CC(br_CC), .stall(br_stall)
  );

  mem_stage u_mem (
    .clk, .rst,
    .f_icode(mem_f_icode), .e_valE(mem_e_valE), .e_valA(mem_e_valA),
    .M_icode(mem_M_icode), .mem_read, .mem_write,
    .W_icode(mem_W_icode), .W_valM(mem_W_valM)
  );

  times3_pipe u_t3 (.clk, .rst, .a_in(t3_a), .y(t3_y));

endmodule
