// tb_lu_row_update: one elimination step of the row update unit on random
// sparse matrices in a one-cycle-latency memory model. The pivot row's
// nonzero list and the reciprocal are prepared by the testbench; the whole
// matrix afterwards is compared with the reference update, and the cycle
// count with 2 per skipped row, 3 + nnz(pivot row) per updated row (2 if
// the pivot row has no nonzero) plus 1.
module tb_lu_row_update;
  import lu_pkg::*;
  import lu_ref_pkg::*;
  localparam int N = 10;
  logic clk = 0, reset, start, done, row_skip, row_upd;
  idx_t j, urow_cnt;
  recip_t recip;
  q_t urow_val [N];
  idx_t urow_col [N];
  q_t rdata;
  mem_req_t req;
  int mem [N][N];
  int checks = 0, failures = 0, n_skip = 0, n_upd = 0;
  lu_row_update #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (req.rd_en) rdata <= q_t'(mem[req.rd_row][req.rd_col]);
    if (req.wr_en) mem[req.wr_row][req.wr_col] = int'(req.wr_data);
    if (row_skip) n_skip++;
    if (row_upd) n_upd++;
  end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int expm [N][N];
    reset = 1; start = 0; j = 0; recip = 0; urow_cnt = 0;
    for (int c = 0; c < N; c++) begin urow_val[c] = 0; urow_col[c] = 0; end
    repeat (2) @(posedge clk); reset = 0;
    for (int t = 0; t < 300; t++) begin
      int jj, cnt, cyc, ecyc, pct, es, eu;
      longint rcp;
      jj = $urandom_range(N-1);
      pct = $urandom_range(80, 10);
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          mem[r][c] = ($urandom_range(99) < pct) ? $signed($urandom_range(8000)) - 4000 : 0;
      if (mem[jj][jj] == 0) mem[jj][jj] = 300;
      rcp = recip_of(mem[jj][jj]);
      cnt = 0;
      for (int c = jj + 1; c < N; c++)
        if (mem[jj][c] != 0) begin
          urow_val[cnt] = q_t'(mem[jj][c]); urow_col[cnt] = idx_t'(c); cnt++;
        end
      expm = mem;
      ecyc = 1; es = 0; eu = 0;
      for (int i = jj + 1; i < N; i++) begin
        if (expm[i][jj] == 0) begin ecyc += 2; es++; end
        else begin
          int l;
          eu++;
          l = sat16((longint'(expm[i][jj]) * rcp) >>> 16);
          expm[i][jj] = l;
          ecyc += (cnt == 0) ? 2 : 3 + cnt;
          for (int c = jj + 1; c < N; c++)
            if (expm[jj][c] != 0)
              expm[i][c] = sat16(longint'(expm[i][c]) - ((longint'(l) * expm[jj][c]) >>> 8));
        end
      end
      n_skip = 0; n_upd = 0;
      @(negedge clk);
      j = idx_t'(jj); recip = recip_t'(rcp); urow_cnt = idx_t'(cnt); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc == ecyc, $sformatf("j=%0d took %0d cycles exp %0d", jj, cyc, ecyc));
      check(n_skip == es && n_upd == eu, $sformatf("skip/upd %0d/%0d exp %0d/%0d", n_skip, n_upd, es, eu));
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          check(mem[r][c] == expm[r][c], $sformatf("j=%0d (%0d,%0d)=%0d exp %0d", jj, r, c, mem[r][c], expm[r][c]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
