// lu_top: sparse LU decomposition engine with partial pivoting, PA = LU.
//
// An N x N matrix of 4-bit unsigned integers is streamed in, one element
// per input_valid cycle in row-major order. The engine then factorises it
// in place, column by column (right-looking Gaussian elimination):
//   pivot search   (lu_pivot_search)  largest |A(i,j)|, i >= j
//   pivot update   (lu_pivot_update)  row interchange by pointer swap in the
//                                     row lookup table, reciprocal of the
//                                     pivot, nonzero list of the pivot row
//   row update     (lu_row_update)    rows with A(i,j) = 0 are skipped; the
//                                     others get L(i,j) and are updated only
//                                     at the pivot row's nonzero columns
// sequenced by the loop controller (lu_control). All matrix traffic goes
// through the memory interface (lu_mem_if) to one dense matrix memory
// (lu_matrix_mem). Finally L and U are streamed out in row-major order, one
// element of each per output_valid cycle, as signed Q8.8 words (256 = 1.0),
// with perm_idx giving the original row index of the current output row,
// and the nonzero counts of both factors (lu_nnz_counter). While the
// numerical factorisation runs, the symbolic unit (lu_symbolic) computes an
// upper bound of those counts from the nonzero pattern of A alone, the
// storage the factors may need.
//
// The port set clk, reset, input_valid, A_elem[3:0], output_valid,
// L_elem[15:0] and U_elem[15:0] is the engine's published interface;
// input_ready, perm_idx, the nonzero counts and their estimates are
// additions of this design.
// reset is synchronous and active high.
module lu_top
  import lu_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        input_valid,
  input  logic [3:0]  A_elem,
  output logic        input_ready,
  output logic        output_valid,
  output logic [15:0] L_elem,
  output logic [15:0] U_elem,
  output logic [7:0]  perm_idx,
  output logic [15:0] nnz_l,
  output logic [15:0] nnz_u,
  output logic        nnz_valid,
  output logic [15:0] est_l,
  output logic [15:0] est_u,
  output logic        est_valid
);

  phase_e   phase;
  idx_t     j;
  logic     start_piv, start_pupd, start_upd, start_out, lut_init;
  logic     load_done, piv_done, pupd_done, upd_done, out_done;
  mem_req_t piv_req, pupd_req, upd_req;
  q_t       m_rdata, m_wdata, l_q, u_q;
  logic     m_re, m_we;
  idx_t     m_rrow, m_rcol, m_wrow, m_wcol;
  idx_t     map [N];
  logic     swap_en;
  idx_t     swap_a, swap_b;
  idx_t     piv_row;
  q_t       piv_val;
  recip_t   recip;
  q_t       urow_val [N];
  idx_t     urow_col [N];
  idx_t     urow_cnt;
  logic     row_skip, row_upd;

  initial assert (N >= 1 && N <= 256) else $error("lu_top: N must be 1..256");

  lu_control #(.N(N)) u_ctrl (
    .clk, .reset, .load_done, .piv_done, .pupd_done, .upd_done, .out_done,
    .phase, .j, .start_piv, .start_pupd, .start_upd, .start_out, .lut_init
  );

  lu_row_lut #(.N(N)) u_lut (
    .clk, .reset, .init(lut_init), .swap_en, .swap_a, .swap_b, .map
  );

  lu_matrix_mem #(.N(N)) u_mem (
    .clk, .re(m_re), .rrow(m_rrow), .rcol(m_rcol), .rdata(m_rdata),
    .we(m_we), .wrow(m_wrow), .wcol(m_wcol), .wdata(m_wdata)
  );

  lu_mem_if #(.N(N)) u_mif (
    .clk, .reset, .phase,
    .input_valid, .A_elem, .input_ready, .load_done,
    .start_out, .output_valid, .L_elem(l_q), .U_elem(u_q), .perm_idx, .out_done,
    .piv_req, .pupd_req, .upd_req, .map,
    .m_re, .m_rrow, .m_rcol, .m_rdata, .m_we, .m_wrow, .m_wcol, .m_wdata
  );

  lu_pivot_search #(.N(N)) u_piv (
    .clk, .reset, .start(start_piv), .j, .req(piv_req), .rdata(m_rdata),
    .done(piv_done), .piv_row, .piv_val
  );

  lu_pivot_update #(.N(N)) u_pupd (
    .clk, .reset, .start(start_pupd), .j, .piv_row, .piv_val,
    .swap_en, .swap_a, .swap_b, .req(pupd_req), .rdata(m_rdata),
    .done(pupd_done), .recip, .urow_val, .urow_col, .urow_cnt
  );

  lu_row_update #(.N(N)) u_upd (
    .clk, .reset, .start(start_upd), .j, .recip, .urow_val, .urow_col, .urow_cnt,
    .req(upd_req), .rdata(m_rdata), .done(upd_done), .row_skip, .row_upd
  );

  lu_nnz_counter #(.N(N)) u_nnz (
    .clk, .reset, .output_valid, .L_elem(l_q), .U_elem(u_q),
    .nnz_l, .nnz_u, .nnz_valid
  );

  lu_symbolic #(.N(N)) u_sym (
    .clk, .reset, .in_valid(input_valid && input_ready), .in_nonzero(A_elem != 4'd0),
    .start(load_done), .est_l, .est_u, .est_valid
  );

  assign L_elem = l_q;
  assign U_elem = u_q;

endmodule
