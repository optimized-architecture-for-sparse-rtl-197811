// tb_lu_pivot_search: pivot search on random columns (sparse, with negative
// values, ties and all-zero columns) held in a one-cycle-latency memory
// model. Checks the pivot row, its value and the N-j+2 cycle search time.
module tb_lu_pivot_search;
  import lu_pkg::*;
  localparam int N = 10;
  logic clk = 0, reset, start, done;
  idx_t j, piv_row;
  q_t rdata, piv_val;
  mem_req_t req;
  int mem [N][N];
  int checks = 0, failures = 0;
  lu_pivot_search #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) if (req.rd_en) rdata <= q_t'(mem[req.rd_row][req.rd_col]);
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
    reset = 1; start = 0; j = 0;
    repeat (2) @(posedge clk); reset <= 0; @(posedge clk);
    for (int t = 0; t < 400; t++) begin
      int jj, er, ev, best, cyc, kind;
      jj = $urandom_range(N-1);
      kind = $urandom_range(3);
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          int v;
          v = (kind == 0) ? 0 : ($urandom_range(2) == 0 ? $signed($urandom_range(2000)) - 1000 : 0);
          if (kind == 1) v = ($urandom_range(1) == 0) ? 512 : -512;  // ties
          mem[r][c] = v;
        end
      best = 0; er = jj; ev = 0;
      for (int r = jj; r < N; r++) begin
        int m;
        m = (mem[r][jj] < 0) ? -mem[r][jj] : mem[r][jj];
        if (m > best) begin best = m; er = r; ev = mem[r][jj]; end
      end
      j <= idx_t'(jj); start <= 1;
      @(posedge clk); start <= 0;
      cyc = 1;
      while (!done) begin @(posedge clk); cyc++; end
      check(int'(piv_row) == er && int'(piv_val) == ev,
            $sformatf("j=%0d pivot row %0d val %0d exp %0d %0d", jj, piv_row, piv_val, er, ev));
      check(cyc == N - jj + 3, $sformatf("j=%0d search took %0d cycles", jj, cyc));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
