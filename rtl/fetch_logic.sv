// fetch_logic: the combinational part of the addq processor's fetch/PC
// update stage: the "add 2" PC incrementer and the "split" that pulls the
// register numbers out of the instruction bytes.
//
// An addq instruction is two bytes: byte 0 holds icode:ifun (0x60), byte 1
// holds rA in its high nibble and rB in its low nibble. With the bytes read
// at the PC packed little-endian into ibytes (byte 0 in bits 7:0), icode is
// bits 7:4, rA bits 15:12 and rB bits 11:8. Every instruction advances the
// PC by 2. This processor executes only addq: a byte sequence whose icode is
// not OPq is fetched as a no-op (rA = rB = REG_NONE), which is this design's
// choice so that unused memory cannot write registers.
// Purely combinational; no clock.
module fetch_logic
  import y86_pkg::*;
(
  input  word_t   pc,       // current PC (from pP)
  input  ibytes_t ibytes,   // instruction bytes at pc
  output word_t   next_pc,  // p_pc = pc + 2
  output icode_t  f_icode,
  output regid_t  f_rA,
  output regid_t  f_rB
);

  always_comb begin
    next_pc = pc + word_t'(2);
    f_icode = icode_t'(ibytes[7:4]);
    if (f_icode == I_OPQ) begin
      f_rA = ibytes[15:12];
      f_rB = ibytes[11:8];
    end else begin
      f_rA = REG_NONE;
      f_rB = REG_NONE;
    end
  end

endmodule
