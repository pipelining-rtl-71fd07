// times3_pipe: a two-stage pipeline computing 3 x A.
//
// Stage 1 adds A to itself (2A); stage 2 adds the stored 2A to a delayed
// copy of A (3A). Registers:
//   a_q   - the input operand A                 (A at t+2)
//   a2_q  - 2A from stage 1, and a1_q, A delayed  (2A and A at t+1)
//   y     - the result 3A                         (3A at t)
// A new operand can enter every cycle. The result for an operand appears on
// y three clock edges after it is presented on a_in (one edge into a_q,
// then two pipeline stages). Results wrap at WIDTH bits. WIDTH and the
// synchronous, active-high reset to 0 are this design's choices.
module times3_pipe #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] a_in,
  output logic [WIDTH-1:0] y
);

  logic [WIDTH-1:0] a_q, a1_q, a2_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q  <= '0;
      a1_q <= '0;
      a2_q <= '0;
      y    <= '0;
    end else begin
      a_q  <= a_in;
      a2_q <= a_q + a_q;
      a1_q <= a_q;
      y    <= a2_q + a1_q;
    end
  end

endmodule
