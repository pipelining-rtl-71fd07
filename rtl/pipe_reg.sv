// pipe_reg: one pipeline register, for any packed struct type T.
//
// On each rising clock edge the register takes its next value, so the stage
// after it works on what the stage before it produced one cycle earlier.
// Two controls let the hazard logic change that:
//   stall  - keep the current value (the stage repeats its work),
//   bubble - load INIT, the register's do-nothing value (e.g. REG_NONE
//            register numbers), so the next stage sees a no-op.
// bubble takes priority over stall; rst (synchronous, active high) also
// loads INIT. The reset/bubble value is given per register, as in the
// pipeline register declarations it models (pP, fD, dE, eW).
module pipe_reg #(
  parameter type T    = logic [7:0],
  parameter T    INIT = '0
) (
  input  logic clk,
  input  logic rst,
  input  logic stall,
  input  logic bubble,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk) begin
    if (rst || bubble) q <= INIT;
    else if (!stall)   q <= d;
  end

endmodule
