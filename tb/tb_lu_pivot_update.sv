// tb_lu_pivot_update: pivot update unit against a memory model that follows
// its row pointer swaps. For random steps j and pivots (positive, negative,
// zero) it checks the swap request, the reciprocal sign(P)*floor(2^24/|P|),
// the nonzero list of the pivot row (values and columns, in column order),
// that it was read from the row after the interchange, and the cycle count
// max(28, N-j+2) (N-j+2 for a zero pivot with a row to fetch, 2 without).
module tb_lu_pivot_update;
  import lu_pkg::*;
  import lu_ref_pkg::*;
  localparam int N = 10;
  logic clk = 0, reset, start, done, swap_en;
  idx_t j, piv_row, swap_a, swap_b, urow_cnt;
  q_t piv_val, rdata;
  mem_req_t req;
  recip_t recip;
  q_t urow_val [N];
  idx_t urow_col [N];
  int mem [N][N];
  int map [N];
  int checks = 0, failures = 0;
  lu_pivot_update #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (req.rd_en) rdata <= q_t'(mem[map[req.rd_row]][req.rd_col]);
    if (swap_en) begin
      int t;
      t = map[swap_a]; map[swap_a] = map[swap_b]; map[swap_b] = t;
    end
  end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    reset = 1; start = 0; j = 0; piv_row = 0; piv_val = 0;
    for (int i = 0; i < N; i++) map[i] = i;
    repeat (2) @(posedge clk); reset = 0;
    for (int t = 0; t < 300; t++) begin
      int jj, pr, pv, cyc, n, ecyc, pos;
      int ev [$];
      int ec [$];
      ev.delete(); ec.delete();
      jj = $urandom_range(N-1);
      pr = $urandom_range(N-1, jj);
      case ($urandom_range(3))
        0: pv = 0;
        1: pv = -$urandom_range(32768, 1);
        default: pv = $urandom_range(32767, 1);
      endcase
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          mem[r][c] = ($urandom_range(2) == 0) ? $signed($urandom_range(4000)) - 2000 : 0;
      // the row that becomes row jj after the interchange
      for (int c = jj + 1; c < N; c++)
        if (mem[map[pr]][c] != 0) begin ev.push_back(mem[map[pr]][c]); ec.push_back(c); end
      n = N - jj - 1;
      ecyc = (pv == 0) ? ((n == 0) ? 2 : n + 3) : ((n + 3 > 28) ? n + 3 : 28);
      @(negedge clk);
      j = idx_t'(jj); piv_row = idx_t'(pr); piv_val = q_t'(pv); start = 1;
      check(swap_en && int'(swap_a) == jj && int'(swap_b) == pr, "swap request");
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc == ecyc, $sformatf("j=%0d p=%0d took %0d cycles exp %0d", jj, pv, cyc, ecyc));
      check(longint'(recip) == recip_of(pv), $sformatf("recip of %0d = %0d exp %0d", pv, recip, recip_of(pv)));
      check(int'(urow_cnt) == ev.size(), $sformatf("j=%0d count %0d exp %0d", jj, urow_cnt, ev.size()));
      pos = 0;
      foreach (ev[x]) begin
        check(int'(urow_val[x]) == ev[x] && int'(urow_col[x]) == ec[x],
              $sformatf("entry %0d: %0d@%0d exp %0d@%0d", x, urow_val[x], urow_col[x], ev[x], ec[x]));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
