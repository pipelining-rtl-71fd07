// fetch_jxx: fetch/PC-update logic of the OPq + jXX processor.
//
// Decodes the instruction bytes at the PC (little-endian, byte 0 in bits
// 7:0; byte 0 = icode:ifun):
//   OPq  (icode 6, 2 bytes)  rA:rB in byte 1; next PC = PC + 2.
//   jXX  (icode 7, 9 bytes)  destination in bytes 1..8; the jump is decided
//        here, in fetch, from the condition-code register: next PC is the
//        destination if the condition holds, PC + 9 otherwise. No registers.
//   any other code           a 1-byte no-op.
// Conditions, from SF and ZF: jmp always, jle SF|ZF, jl SF, je ZF, jne !ZF,
// jge !SF, jg !SF & !ZF (codes 7..15: never). cond_jump flags a jXX whose
// outcome depends on the flags, so the hazard logic can make it wait for an
// older OPq still in flight. Combinational.
module fetch_jxx
  import y86_pkg::*;
(
  input  word_t   pc,
  input  ibytes_t ibytes,
  input  cc_t     cc,
  output icode_t  f_icode,
  output fDj_t    f,          // value for the fD register
  output logic    cond_jump,  // conditional jXX being fetched
  output logic    taken,      // jXX condition true
  output word_t   next_pc
);

  logic [3:0] ifun;
  word_t      valC;

  always_comb begin
    f_icode = icode_t'(ibytes[7:4]);
    ifun    = ibytes[3:0];
    valC    = ibytes[71:8];

    unique case (cond_t'(ifun))
      C_JMP:   taken = 1'b1;
      C_LE:    taken = cc.sf | cc.zf;
      C_L:     taken = cc.sf;
      C_E:     taken = cc.zf;
      C_NE:    taken = ~cc.zf;
      C_GE:    taken = ~cc.sf;
      C_G:     taken = ~cc.sf & ~cc.zf;
      default: taken = 1'b0;
    endcase

    f         = FDJ_INIT;
    cond_jump = 1'b0;
    unique case (f_icode)
      I_OPQ: begin
        f.opq   = 1'b1;
        f.fn    = alufn_t'(ifun);
        f.rA    = ibytes[15:12];
        f.rB    = ibytes[11:8];
        next_pc = pc + word_t'(2);
      end
      I_JXX: begin
        cond_jump = (ifun != C_JMP);
        next_pc   = taken ? valC : pc + word_t'(9);
      end
      default: next_pc = pc + word_t'(1);
    endcase
  end

endmodule
