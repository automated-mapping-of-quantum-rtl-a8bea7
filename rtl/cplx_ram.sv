// cplx_ram -- one matrix or vector buffer of complex doubles.
//
// DEPTH words of fp64_pkg::cplx_t (128 bits), one write port and one read
// port. The write happens on the rising clock edge when we is high; the read
// is asynchronous, rd_data = mem[rd_addr] in the same cycle, which is what the
// single-cycle compute engines expect. Every buffer of the kernels (layer
// matrices, intermediate products, state vectors) is one instance, so each
// maps to a memory of its own. Contents are not reset.
module cplx_ram
  import fp64_pkg::*;
#(
  parameter int unsigned AW = 14,
  localparam int unsigned DEPTH = 1 << AW
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] wr_addr,
  input  cplx_t         wr_data,
  input  logic [AW-1:0] rd_addr,
  output cplx_t         rd_data
);
  cplx_t mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[wr_addr] <= wr_data;

  assign rd_data = mem[rd_addr];
endmodule
