// data_mem: byte-addressed data memory with 64-bit accesses.
//
// A read (re) returns, combinationally, the eight bytes starting at addr,
// little-endian; when re is low the output is 0. A write (we) stores wdata
// in the eight bytes at addr at the rising clock edge. Addresses wrap
// modulo SIZE. The size, the wrap and the zero output are this design's
// choices.
module data_mem
  import y86_pkg::*;
#(
  parameter int unsigned SIZE = 256            // bytes, power of two
) (
  input  logic  clk,
  input  word_t addr,
  input  logic  re,
  input  logic  we,
  input  word_t wdata,
  output word_t rdata
);

  localparam int unsigned AW = $clog2(SIZE);

  logic [7:0] mem [SIZE];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int i = 0; i < 8; i++) mem[AW'(addr[AW-1:0] + AW'(i))] <= wdata[8*i +: 8];
    end
  end

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      rdata[8*i +: 8] = re ? mem[AW'(addr[AW-1:0] + AW'(i))] : 8'h00;
    end
  end

endmodule
