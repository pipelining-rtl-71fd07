// instr_mem: byte-addressed instruction memory.
//
// Reading is combinational: the IBYTES (10) bytes starting at addr come out
// at once on rdata, little-endian (the byte at addr in bits 7:0), which is
// the longest Y86-64 instruction. Addresses wrap modulo SIZE. The memory is
// loaded one byte per clock through the write port (we, waddr, wdata),
// normally while the processor is held in reset. The size and the load port
// are this design's choices; the processor only needs the read side.
module instr_mem
  import y86_pkg::*;
#(
  parameter int unsigned SIZE = 256            // bytes, power of two
) (
  input  logic    clk,
  input  word_t   addr,
  output ibytes_t rdata,
  input  logic    we,
  input  word_t   waddr,
  input  logic [7:0] wdata
);

  localparam int unsigned AW = $clog2(SIZE);

  logic [7:0] mem [SIZE];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW-1:0]] <= wdata;
  end

  always_comb begin
    for (int i = 0; i < IBYTES; i++) begin
      rdata[8*i +: 8] = mem[AW'(addr[AW-1:0] + AW'(i))];
    end
  end

endmodule
