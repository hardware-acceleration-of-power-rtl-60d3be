// cplx_fmem: on-chip fast memory (FMem) of complex words.
//
// The LU kernel keeps the lower factor L, the upper factor U and, in the
// pipeline-2 schedule, the first column of A in on-chip memory rather than in
// off-chip DRAM, because the matrices are small. This block is one such
// memory: DEPTH complex words, one synchronous write port and two
// asynchronous read ports, so that a kernel tick can fetch both operands it
// needs and see a word written on an earlier tick. A write and a read of the
// same address on the same tick return the old word.
//
// Two read ports and combinational read are this design's choice; the
// original only states that the values sit in on-chip memory and are read
// and written by address.
module cplx_fmem
  import psim_pkg::*;
#(
  parameter int DEPTH = 121,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  cplx_t         wdata,
  input  logic [AW-1:0] raddr0,
  output cplx_t         rdata0,
  input  logic [AW-1:0] raddr1,
  output cplx_t         rdata1
);

  cplx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < DEPTH) mem[waddr] <= wdata;
  end

  assign rdata0 = (int'(raddr0) < DEPTH) ? mem[raddr0] : CPLX_ZERO;
  assign rdata1 = (int'(raddr1) < DEPTH) ? mem[raddr1] : CPLX_ZERO;

endmodule
