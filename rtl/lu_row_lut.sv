// lu_row_lut: row pointer lookup table of the LU engine.
//
// map[i] is the physical memory row that currently holds logical row i.
// Partial pivoting interchanges two logical rows by swapping their two
// pointers in one cycle, so no matrix data is moved. After the
// factorization map[i] is also the original row index of output row i,
// which is the permutation P of PA = LU.
//
// Interface: init (or reset) loads the identity; swap_en exchanges
// map[swap_a] and map[swap_b] at the next clock edge. The full table is an
// output so that the memory interface can translate read and write rows in
// the same cycle.
//
// Tracking rows through a pointer table instead of moving them follows the
// published architecture; the one-cycle swap port is this design's own.
module lu_row_lut
  import lu_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  logic clk,
  input  logic reset,
  input  logic init,
  input  logic swap_en,
  input  idx_t swap_a,
  input  idx_t swap_b,
  output idx_t map [N]
);

  always_ff @(posedge clk) begin
    if (reset || init) begin
      for (int unsigned i = 0; i < N; i++) map[i] <= idx_t'(i);
    end else if (swap_en && swap_a != swap_b) begin
      map[swap_a] <= map[swap_b];
      map[swap_b] <= map[swap_a];
    end
  end

endmodule
