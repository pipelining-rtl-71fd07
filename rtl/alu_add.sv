// alu_add: the execute stage's ADD unit, valE = valA + valB (64 bits,
// wrapping on overflow). Combinational.
module alu_add
  import y86_pkg::*;
(
  input  word_t valA,
  input  word_t valB,
  output word_t valE
);

  assign valE = valA + valB;

endmodule
