// mem_stage: how the memory stage of the five-stage Y86 pipeline decides to
// read or write data memory.
//
// The instruction code split out in fetch (f_icode) is not used where it is
// produced: it travels with its instruction through the pipeline registers
// fD, dE, eM and mW (reset/bubble value NOP), and the memory stage decodes
// M_icode, the copy that reaches it three cycles later, into the memory
// read and write enables. The eM register also carries the address (valE)
// and store data (valA) that the execute stage would send; here they enter
// as ports (e_valE, e_valA), since the rest of the datapath is not part of
// this block. A load's data (valM) is passed on in mW. rst is synchronous,
// active high. The carried address and data fields and the memory size are
// this design's choices.
module mem_stage
  import y86_pkg::*;
#(
  parameter int unsigned DMEM_BYTES = 256
) (
  input  logic   clk,
  input  logic   rst,
  input  icode_t f_icode,
  input  word_t  e_valE,
  input  word_t  e_valA,
  output icode_t M_icode,
  output logic   mem_read,
  output logic   mem_write,
  output icode_t W_icode,
  output word_t  W_valM
);

  icode_reg_t f, D, E;
  eM_t        e, M;
  mW_t        m, W;
  word_t      m_valM;

  assign f.icode = f_icode;

  pipe_reg #(.T(icode_reg_t), .INIT(ICODE_INIT)) u_fD (
    .clk, .rst, .stall(1'b0), .bubble(1'b0), .d(f), .q(D)
  );
  // decode: d_icode = D_icode
  pipe_reg #(.T(icode_reg_t), .INIT(ICODE_INIT)) u_dE (
    .clk, .rst, .stall(1'b0), .bubble(1'b0), .d(D), .q(E)
  );
  // execute: e_icode = E_icode
  assign e.icode = E.icode;
  assign e.valE  = e_valE;
  assign e.valA  = e_valA;
  pipe_reg #(.T(eM_t), .INIT(EM_INIT)) u_eM (
    .clk, .rst, .stall(1'b0), .bubble(1'b0), .d(e), .q(M)
  );

  // memory
  mem_rw_ctrl u_ctrl (.icode(M.icode), .mem_read, .mem_write);

  data_mem #(.SIZE(DMEM_BYTES)) u_dmem (
    .clk, .addr(M.valE), .re(mem_read), .we(mem_write),
    .wdata(M.valA), .rdata(m_valM)
  );

  assign m.icode = M.icode;
  assign m.valM  = m_valM;
  pipe_reg #(.T(mW_t), .INIT(MW_INIT)) u_mW (
    .clk, .rst, .stall(1'b0), .bubble(1'b0), .d(m), .q(W)
  );

  assign M_icode = M.icode;
  assign W_icode = W.icode;
  assign W_valM  = W.valM;

endmodule
