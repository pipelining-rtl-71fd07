// mem_rw_ctrl: the "is read?" / "is write?" decoders of the memory stage.
//
// From the instruction code of the instruction in the memory stage it
// decides whether the data memory is read or written this cycle. The Y86-64
// instructions that read memory are mrmovq, popq and ret; those that write
// it are rmmovq, pushq and call. Combinational.
module mem_rw_ctrl
  import y86_pkg::*;
(
  input  icode_t icode,
  output logic   mem_read,
  output logic   mem_write
);

  always_comb begin
    mem_read  = icode inside {I_MRMOVQ, I_POPQ, I_RET};
    mem_write = icode inside {I_RMMOVQ, I_PUSHQ, I_CALL};
  end

endmodule
