// lu_row_update: "update row and column" unit of the LU engine.
//
// For elimination step j it walks the logical rows i = j+1..N-1 below the
// pivot. For each row it first reads A(i,j) and decides whether the row needs
// an update at all: a zero there means the row is left untouched (sparsity
// skip). Otherwise it forms the multiplier L(i,j) = A(i,j) * (1/pivot),
// writes it in place of A(i,j), and then updates only the columns where the
// pivot row holds a nonzero, A(i,k) -= L(i,j) * U(j,k), using the column
// list built by the pivot update unit. The update loop is pipelined: one
// read is issued per cycle and the multiply-subtract result is written when
// the word returns one cycle later.
//
// Timing per row: 2 cycles for a skipped row; 3 + nnz(pivot row) cycles for
// an updated row; done pulses one cycle after the last row. With no row
// below the pivot (j = N-1) done pulses one cycle after start.
// row_skip / row_upd pulse once per skipped / updated row.
//
// Deciding per row whether an update is needed, and updating only nonzero
// positions with a multiplier and an adder, follow the published
// architecture. The arithmetic here is Q8.8 fixed point rather than floating
// point, and there is a single update unit; both are this design's choices.
module lu_row_update
  import lu_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  logic     clk,
  input  logic     reset,
  input  logic     start,
  input  idx_t     j,
  input  recip_t   recip,
  input  q_t       urow_val [N],
  input  idx_t     urow_col [N],
  input  idx_t     urow_cnt,
  output mem_req_t req,
  input  q_t       rdata,
  output logic     done,
  output logic     row_skip,
  output logic     row_upd
);

  typedef enum logic [1:0] {S_IDLE, S_RDCOL, S_CHK, S_ROW} state_e;

  state_e state;
  idx_t   jr, i, p, pd;
  logic   vld_d;
  q_t     l_reg;
  q_t     l_new;

  logic   last_row;
  assign  last_row = (i == idx_t'(N - 1));
  assign  l_new    = mul_recip(rdata, recip);

  always_comb begin
    req      = '0;
    row_skip = 1'b0;
    row_upd  = 1'b0;
    unique case (state)
      S_RDCOL: begin
        req.rd_en  = 1'b1;
        req.rd_row = i;
        req.rd_col = jr;
      end
      S_CHK: begin
        row_skip = (rdata == '0);
        row_upd  = (rdata != '0);
        if (rdata != '0) begin
          req.wr_en   = 1'b1;
          req.wr_row  = i;
          req.wr_col  = jr;
          req.wr_data = l_new;
        end
      end
      S_ROW: begin
        req.rd_en   = (p < urow_cnt);
        req.rd_row  = i;
        req.rd_col  = urow_col[p];
        req.wr_en   = vld_d;
        req.wr_row  = i;
        req.wr_col  = urow_col[pd];
        req.wr_data = mac_sub(rdata, l_reg, urow_val[pd]);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= S_IDLE;
      jr    <= '0;
      i     <= '0;
      p     <= '0;
      pd    <= '0;
      vld_d <= 1'b0;
      l_reg <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          jr <= j;
          i  <= j + idx_t'(1);
          if (32'(j) + 1 < N) state <= S_RDCOL;
          else                done  <= 1'b1;
        end
        S_RDCOL: state <= S_CHK;
        S_CHK: begin
          if (rdata != '0 && urow_cnt != '0) begin
            l_reg <= l_new;
            p     <= '0;
            vld_d <= 1'b0;
            state <= S_ROW;
          end else if (last_row) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            i     <= i + idx_t'(1);
            state <= S_RDCOL;
          end
        end
        S_ROW: begin
          vld_d <= (p < urow_cnt);
          pd    <= p;
          if (p < urow_cnt) p <= p + idx_t'(1);
          if (vld_d && pd == urow_cnt - idx_t'(1)) begin
            vld_d <= 1'b0;
            if (last_row) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              i     <= i + idx_t'(1);
              state <= S_RDCOL;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
