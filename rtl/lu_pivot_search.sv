// lu_pivot_search: pivot operation of the LU engine (partial pivoting).
//
// For elimination step j it reads column j of logical rows j..N-1, one read
// per cycle, and compares each value as it arrives with the largest
// magnitude seen so far, keeping that value and its row index in registers.
// The first entry of largest magnitude wins a tie. A column whose active
// part is all zero returns row j and value 0.
//
// Interface: start pulses with j valid; the unit then drives req (reads
// only) and pulses done with piv_row/piv_val valid. Reads are issued on
// N-j consecutive cycles and done follows the last returned word by one
// cycle, so the search takes N-j+2 cycles after start.
//
// The sequential compare-as-it-arrives search with the winner held in a
// register follows the published architecture; the tie rule and the
// handling of an all-zero column are this design's choices.
module lu_pivot_search
  import lu_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  logic     clk,
  input  logic     reset,
  input  logic     start,
  input  idx_t     j,
  output mem_req_t req,
  input  q_t       rdata,
  output logic     done,
  output idx_t     piv_row,
  output q_t       piv_val
);

  logic            issuing;   // reads in flight
  idx_t            rd_i;      // row being read
  logic            vld_d;     // rdata holds column j of row idx_d
  idx_t            idx_d;
  logic            last_d;
  logic [DATA_W:0] best_mag;

  always_comb begin
    req        = '0;
    req.rd_en  = issuing;
    req.rd_row = rd_i;
    req.rd_col = j;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      issuing  <= 1'b0;
      rd_i     <= '0;
      vld_d    <= 1'b0;
      idx_d    <= '0;
      last_d   <= 1'b0;
      done     <= 1'b0;
      best_mag <= '0;
      piv_row  <= '0;
      piv_val  <= '0;
    end else begin
      done  <= 1'b0;
      vld_d <= issuing;
      idx_d <= rd_i;
      last_d <= issuing && (rd_i == idx_t'(N - 1));
      if (start) begin
        issuing  <= 1'b1;
        rd_i     <= j;
        best_mag <= '0;
        piv_row  <= j;
        piv_val  <= '0;
      end else if (issuing) begin
        if (rd_i == idx_t'(N - 1)) issuing <= 1'b0;
        else                       rd_i    <= rd_i + idx_t'(1);
      end
      if (vld_d) begin
        if (mag_q(rdata) > best_mag) begin
          best_mag <= mag_q(rdata);
          piv_row  <= idx_d;
          piv_val  <= rdata;
        end
        if (last_d) done <= 1'b1;
      end
    end
  end

endmodule
