// lu_pivot_update: "update pivot and interchange rows" unit of the LU engine.
//
// Given the pivot found for step j, it
//   1. interchanges logical rows j and piv_row by a pointer swap in the row
//      lookup table (on the start cycle, so it is in effect one cycle later),
//   2. normalises: starts the reciprocal divider on the pivot value, so the
//      multipliers become products instead of divisions,
//   3. fetches the pivot row U(j, j+1..N-1) and keeps only its nonzero
//      entries, value and column, in a register buffer. The row update unit
//      then visits only these columns.
// The fetch (N-j-1 reads) and the division (about 26 cycles) overlap.
//
// Interface: start pulses with j, piv_row, piv_val valid; done pulses once
// the swap, the reciprocal and the pivot row buffer are all complete. The
// outputs hold until the next start.
//
// Interchange and normalisation before elimination, with the results held in
// registers, follow the published architecture; forming a reciprocal, the
// nonzero list and the overlap of fetch and division are this design's own.
module lu_pivot_update
  import lu_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  logic     clk,
  input  logic     reset,
  input  logic     start,
  input  idx_t     j,
  input  idx_t     piv_row,
  input  q_t       piv_val,
  // row lookup table
  output logic     swap_en,
  output idx_t     swap_a,
  output idx_t     swap_b,
  // matrix memory
  output mem_req_t req,
  input  q_t       rdata,
  // results
  output logic     done,
  output recip_t   recip,
  output q_t       urow_val [N],
  output idx_t     urow_col [N],
  output idx_t     urow_cnt
);

  logic   active, fetching, vld_d, div_done, div_seen;
  idx_t   jr, k, k_d;

  assign swap_en = start;
  assign swap_a  = j;
  assign swap_b  = piv_row;

  lu_recip_div u_div (
    .clk   (clk),
    .reset (reset),
    .start (start),
    .p     (piv_val),
    .done  (div_done),
    .recip (recip)
  );

  always_comb begin
    req        = '0;
    req.rd_en  = fetching;
    req.rd_row = jr;
    req.rd_col = k;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      active   <= 1'b0;
      fetching <= 1'b0;
      vld_d    <= 1'b0;
      div_seen <= 1'b0;
      done     <= 1'b0;
      jr       <= '0;
      k        <= '0;
      k_d      <= '0;
      urow_cnt <= '0;
      for (int unsigned c = 0; c < N; c++) begin
        urow_val[c] <= '0;
        urow_col[c] <= '0;
      end
    end else begin
      done  <= 1'b0;
      vld_d <= fetching;
      k_d   <= k;
      if (start) begin
        active   <= 1'b1;
        div_seen <= 1'b0;
        jr       <= j;
        k        <= j + idx_t'(1);
        fetching <= (32'(j) + 1 < N);
        urow_cnt <= '0;
      end else begin
        if (fetching) begin
          if (k == idx_t'(N - 1)) fetching <= 1'b0;
          else                    k        <= k + idx_t'(1);
        end
        if (div_done) div_seen <= 1'b1;
        if (vld_d && rdata != '0) begin
          urow_val[urow_cnt] <= rdata;
          urow_col[urow_cnt] <= k_d;
          urow_cnt           <= urow_cnt + idx_t'(1);
        end
        if (active && !fetching && !vld_d && (div_seen || div_done)) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

endmodule
