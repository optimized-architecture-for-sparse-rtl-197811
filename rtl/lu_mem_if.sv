// lu_mem_if: memory interface logic of the LU engine.
//
// The single point of access to the matrix memory. It
//   - loads the input matrix: in the load phase every input_valid cycle
//     writes one 4-bit unsigned element A_elem, converted to Q8.8, in row-
//     major order; load_done pulses after the N*N-th element;
//   - gives the memory to the unit that owns the current phase (pivot
//     search, pivot update, row update) and translates the logical row of
//     every read and write into a physical row through the row lookup table;
//   - streams the result: after start_out it reads the matrix in logical
//     row-major order and presents, one element per cycle with
//     output_valid, the L element (1.0 on the diagonal, 0 above it) and the
//     U element (0 below the diagonal) of the same position, together with
//     perm_idx, the original row index of the current output row; out_done
//     pulses one cycle after the last element.
// Reads return one cycle after the request (synchronous memory). Inputs
// arriving outside the load phase are ignored; input_ready tells when they
// are taken: from reset or the end of the previous output stream until
// the last element of the matrix.
//
// The published architecture names this block and has all memory traffic go
// through physical addresses looked up per row; the multiplexer, the stream
// order and the output formatting are this design's own.
module lu_mem_if
  import lu_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  logic          clk,
  input  logic          reset,
  input  phase_e        phase,
  // input stream
  input  logic          input_valid,
  input  logic [A_W-1:0] A_elem,
  output logic          input_ready,
  output logic          load_done,
  // output stream
  input  logic          start_out,
  output logic          output_valid,
  output q_t            L_elem,
  output q_t            U_elem,
  output idx_t          perm_idx,
  output logic          out_done,
  // processing units
  input  mem_req_t      piv_req,
  input  mem_req_t      pupd_req,
  input  mem_req_t      upd_req,
  // row lookup table
  input  idx_t          map [N],
  // matrix memory
  output logic          m_re,
  output idx_t          m_rrow,
  output idx_t          m_rcol,
  input  q_t            m_rdata,
  output logic          m_we,
  output idx_t          m_wrow,
  output idx_t          m_wcol,
  output q_t            m_wdata
);

  idx_t     ld_r, ld_c;
  logic     out_issuing, out_vld_d, out_last_d;
  idx_t     out_r, out_c, out_r_d, out_c_d;
  mem_req_t own_req, sel;

  assign input_ready = (phase == PH_LOAD) && !load_done;

  // Requests of the load and output streams.
  always_comb begin
    own_req = '0;
    if (input_ready && input_valid) begin
      own_req.wr_en   = 1'b1;
      own_req.wr_row  = ld_r;
      own_req.wr_col  = ld_c;
      own_req.wr_data = q_t'({{(DATA_W-FRAC_W-A_W){1'b0}}, A_elem, {FRAC_W{1'b0}}});
    end
    if (out_issuing) begin
      own_req.rd_en  = 1'b1;
      own_req.rd_row = out_r;
      own_req.rd_col = out_c;
    end
  end

  // Phase multiplexer and row translation.
  always_comb begin
    unique case (phase)
      PH_PIVOT:  sel = piv_req;
      PH_PUPD:   sel = pupd_req;
      PH_UPDATE: sel = upd_req;
      default:   sel = own_req;
    endcase
    m_re    = sel.rd_en;
    m_rrow  = map[sel.rd_row];
    m_rcol  = sel.rd_col;
    m_we    = sel.wr_en;
    m_wrow  = map[sel.wr_row];
    m_wcol  = sel.wr_col;
    m_wdata = sel.wr_data;
  end

  // Output element formatting.
  always_comb begin
    L_elem = '0;
    U_elem = '0;
    if (out_c_d < out_r_d)       L_elem = m_rdata;
    else if (out_c_d == out_r_d) L_elem = Q_ONE;
    if (out_c_d >= out_r_d)      U_elem = m_rdata;
  end
  assign output_valid = out_vld_d;
  assign perm_idx     = map[out_r_d];

  always_ff @(posedge clk) begin
    if (reset) begin
      ld_r        <= '0;
      ld_c        <= '0;
      load_done   <= 1'b0;
      out_issuing <= 1'b0;
      out_vld_d   <= 1'b0;
      out_last_d  <= 1'b0;
      out_r       <= '0;
      out_c       <= '0;
      out_r_d     <= '0;
      out_c_d     <= '0;
      out_done    <= 1'b0;
    end else begin
      load_done <= 1'b0;
      out_done  <= 1'b0;
      // load counter
      if (input_ready && input_valid) begin
        if (ld_c == idx_t'(N - 1)) begin
          ld_c <= '0;
          if (ld_r == idx_t'(N - 1)) begin
            ld_r      <= '0;
            load_done <= 1'b1;
          end else begin
            ld_r <= ld_r + idx_t'(1);
          end
        end else begin
          ld_c <= ld_c + idx_t'(1);
        end
      end
      // output stream
      out_vld_d  <= out_issuing;
      out_r_d    <= out_r;
      out_c_d    <= out_c;
      out_last_d <= out_issuing && out_r == idx_t'(N - 1) && out_c == idx_t'(N - 1);
      if (start_out) begin
        out_issuing <= 1'b1;
        out_r       <= '0;
        out_c       <= '0;
      end else if (out_issuing) begin
        if (out_c == idx_t'(N - 1)) begin
          out_c <= '0;
          if (out_r == idx_t'(N - 1)) out_issuing <= 1'b0;
          else                        out_r       <= out_r + idx_t'(1);
        end else begin
          out_c <= out_c + idx_t'(1);
        end
      end
      if (out_last_d) out_done <= 1'b1;
    end
  end

endmodule
