// alu: the execute-stage ALU of the OPq + jXX processor.
//
// Computes valE = valB op valA for the four Y86-64 OPq functions (addq,
// subq = valB - valA, andq, xorq) and the two condition flags of the result:
// SF (sign, bit 63) and ZF (zero). Only SF and ZF are kept; an overflow
// flag is not produced (a choice of this design, see opq_jxx_cpu).
// Combinational.
module alu
  import y86_pkg::*;
(
  input  alufn_t fn,
  input  word_t  valA,
  input  word_t  valB,
  output word_t  valE,
  output cc_t    cc
);

  always_comb begin
    unique case (fn)
      F_SUB:   valE = valB - valA;
      F_AND:   valE = valB & valA;
      F_XOR:   valE = valB ^ valA;
      default: valE = valB + valA;
    endcase
    cc.sf = valE[WORD_W-1];
    cc.zf = (valE == '0);
  end

endmodule
