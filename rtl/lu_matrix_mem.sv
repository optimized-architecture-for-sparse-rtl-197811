// lu_matrix_mem: the matrix store of the LU engine.
//
// Holds all N x N Q8.8 words of the matrix at physical (row, column)
// positions. The input matrix A is written here and is overwritten in place
// by the factors: the strictly lower part holds L (its unit diagonal is not
// stored) and the upper part including the diagonal holds U. Rows never move
// inside the memory; row interchanges are done in the row lookup table.
//
// Interface: one synchronous read port (rdata is valid the cycle after
// re) and one write port, usable in the same cycle. A read of the address
// being written returns the old word. The dense N x N layout, which reserves
// room for every possible fill-in, is this design's choice.
module lu_matrix_mem
  import lu_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  logic clk,
  input  logic re,
  input  idx_t rrow,   // physical row
  input  idx_t rcol,
  output q_t   rdata,
  input  logic we,
  input  idx_t wrow,   // physical row
  input  idx_t wcol,
  input  q_t   wdata
);

  localparam int unsigned DEPTH = N * N;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  q_t mem [DEPTH];

  logic [AW-1:0] raddr, waddr;
  assign raddr = AW'(rrow * N + rcol);
  assign waddr = AW'(wrow * N + wcol);

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end

endmodule
