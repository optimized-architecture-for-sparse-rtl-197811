// lu_nnz_counter: storage requirement of the L and U factors.
//
// Counts the nonzero entries of L (its unit diagonal included) and of U as
// the factors stream out of the engine, i.e. the number of words a
// compressed store of each factor needs, fill-in included. The counts start
// from zero with the first output element and are valid when nnz_valid is
// high, from the cycle after the last element until the next result starts.
// The count is exact, taken from the numerical result; the engine's own
// matrix memory is dense and reserves room for every fill-in.
module lu_nnz_counter
  import lu_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  logic clk,
  input  logic reset,
  input  logic output_valid,
  input  q_t   L_elem,
  input  q_t   U_elem,
  output logic [15:0] nnz_l,
  output logic [15:0] nnz_u,
  output logic nnz_valid
);

  localparam int unsigned TOTAL = N * N;

  logic [31:0] seen;

  always_ff @(posedge clk) begin
    if (reset) begin
      nnz_l     <= '0;
      nnz_u     <= '0;
      seen      <= '0;
      nnz_valid <= 1'b0;
    end else if (output_valid) begin
      if (seen == 0 || nnz_valid) begin
        // first element of a new result
        nnz_l <= 16'(L_elem != '0);
        nnz_u <= 16'(U_elem != '0);
        seen  <= 32'd1;
        nnz_valid <= (TOTAL == 1);
      end else begin
        nnz_l <= nnz_l + 16'(L_elem != '0);
        nnz_u <= nnz_u + 16'(U_elem != '0);
        seen  <= seen + 32'd1;
        if (seen + 32'd1 == TOTAL) nnz_valid <= 1'b1;
      end
    end
  end

endmodule
