// hazard_unit: stalling logic for data hazards in the addq pipeline.
//
// The register file is read in decode and written at the end of writeback,
// so an instruction decoding in cycle t+1 misses the result of an older
// instruction still in decode or execute during cycle t (its write lands
// at the end of cycle t+1 or t+2). The result of an instruction in
// writeback during cycle t is written at the end of t and is read correctly.
// So while the instruction being fetched names a source register (rA or
// rB, not REG_NONE) equal to the destination of the instruction now in
// decode (d_dstE = D_rB) or in execute (E_dstE), the unit:
//   stall_F  - keeps the PC, so the same instruction is fetched again,
//   bubble_D - puts REG_NONE register numbers into fD, a no-op for decode.
// Older instructions keep moving, so at most two stall cycles are needed.
// Combinational.
module hazard_unit
  import y86_pkg::*;
(
  input  regid_t f_rA,
  input  regid_t f_rB,
  input  regid_t d_dstE,
  input  regid_t E_dstE,
  output logic   stall_F,
  output logic   bubble_D
);

  function automatic logic depends(regid_t src, regid_t dst);
    return src != REG_NONE && src == dst;
  endfunction

  always_comb begin
    stall_F  = depends(f_rA, d_dstE) || depends(f_rA, E_dstE) ||
               depends(f_rB, d_dstE) || depends(f_rB, E_dstE);
    bubble_D = stall_F;
  end

endmodule
