// lu_symbolic: symbolic decomposition of the LU engine.
//
// Estimates, before the numerical factorisation has finished, how many
// nonzero words the L and U factors will need. It works on the nonzero
// pattern of A only (one bit per element, captured from the input stream)
// and computes a static bound for partial pivoting: at step j every row
// with a nonzero in column j may become the pivot row, and row j stays the
// pivot row if the column turns out to be numerically zero. Each candidate
// row therefore takes the union of the candidates' patterns and row j's
// pattern; L column j can be nonzero only in the candidate rows (or only on
// the diagonal if there is none) and U row j only in that union. The results
// are upper bounds on the exact counts that lu_nnz_counter reports afterwards
// (L counts include the unit diagonal).
//
// How it works: the pattern is a table of N row words of N bits. Step j is
// one scan of rows j..N-1 (one row word per cycle) forming the union, the
// candidate count and the first candidate row; one cycle to add the counts;
// and, if column j has a candidate and j < N-1, one merge pass over rows
// j+1..N-1 writing union | pattern into every candidate row. About N*N
// cycles in all; it runs alongside the numerical phases.
//
// Interface: pattern bits are captured on every accepted input element
// (in_valid, row-major); start pulses after the last one; est_valid rises
// with est_l/est_u when the bound is complete and falls at the next start.
// The bound itself and this implementation are choices of this design.
module lu_symbolic
  import lu_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        in_valid,
  input  logic        in_nonzero,
  input  logic        start,
  output logic [15:0] est_l,
  output logic [15:0] est_u,
  output logic        est_valid
);

  typedef logic [N-1:0] row_t;
  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_SUM, S_MERGE} state_e;

  row_t   pat [N];
  state_e state;
  idx_t   ld_r, ld_c, j, i, cnt;
  row_t   uni;
  logic   found;
  row_t   uni_j;
  assign  uni_j = uni | pat[j];

  function automatic logic [15:0] ones(input row_t v);
    logic [15:0] n;
    n = '0;
    for (int unsigned b = 0; b < N; b++) n += 16'(v[b]);
    return n;
  endfunction

  // columns j..N-1
  row_t mask_ge;
  always_comb begin
    for (int unsigned b = 0; b < N; b++) mask_ge[b] = (idx_t'(b) >= j);
  end

  row_t cur;
  assign cur = pat[i];

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= S_IDLE;
      ld_r      <= '0;
      ld_c      <= '0;
      j         <= '0;
      i         <= '0;
      cnt       <= '0;
      uni       <= '0;
      found     <= 1'b0;
      est_l     <= '0;
      est_u     <= '0;
      est_valid <= 1'b0;
      for (int unsigned r = 0; r < N; r++) pat[r] <= '0;
    end else begin
      // pattern capture from the input stream
      if (in_valid) begin
        pat[ld_r][ld_c] <= in_nonzero;
        if (ld_c == idx_t'(N - 1)) begin
          ld_c <= '0;
          ld_r <= (ld_r == idx_t'(N - 1)) ? '0 : ld_r + idx_t'(1);
        end else begin
          ld_c <= ld_c + idx_t'(1);
        end
      end
      unique case (state)
        S_IDLE: if (start) begin
          est_valid <= 1'b0;
          est_l     <= '0;
          est_u     <= '0;
          j         <= '0;
          i         <= '0;
          uni       <= '0;
          cnt       <= '0;
          found     <= 1'b0;
          state     <= S_SCAN;
        end
        S_SCAN: begin
          if (cur[j]) begin
            uni <= uni | cur;
            cnt   <= cnt + idx_t'(1);
            found <= 1'b1;
          end
          if (i == idx_t'(N - 1)) state <= S_SUM;
          else                    i     <= i + idx_t'(1);
        end
        S_SUM: begin
          est_l <= est_l + (found ? 16'(cnt) : 16'd1);
          est_u <= est_u + ones(uni_j & mask_ge);
          uni   <= uni_j;
          i     <= j + idx_t'(1);
          if (!found || j == idx_t'(N - 1)) begin
            if (j == idx_t'(N - 1)) begin
              est_valid <= 1'b1;
              state     <= S_IDLE;
            end else begin
              j     <= j + idx_t'(1);
              i     <= j + idx_t'(1);
              uni   <= '0;
              cnt   <= '0;
              found <= 1'b0;
              state <= S_SCAN;
            end
          end else begin
            state <= S_MERGE;
          end
        end
        S_MERGE: begin
          if (cur[j]) pat[i] <= cur | uni;
          if (i == idx_t'(N - 1)) begin
            j     <= j + idx_t'(1);
            i     <= j + idx_t'(1);
            uni   <= '0;
            cnt   <= '0;
            found <= 1'b0;
            state <= S_SCAN;
          end else begin
            i <= i + idx_t'(1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
