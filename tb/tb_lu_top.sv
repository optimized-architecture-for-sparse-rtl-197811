// tb_lu_top: end-to-end test of the LU engine at its default size.
//
// Streams random sparse 4-bit matrices into lu_top (nonzero densities 10 %
// to 50 %, some with a guaranteed nonzero diagonal, some singular), with
// random gaps in input_valid and stray input_valid pulses while the engine
// is busy, then collects the L/U/perm_idx stream and compares every word
// with the reference model in lu_ref_pkg, checks the nonzero counts, their
// symbolic estimates (equal to the model's bound, never below the exact
// count) and the exact number of cycles from the last input to the first output. It also
// counts the engine's mechanisms (row interchange, skipped row, updated row,
// zero pivot, pivot row with zero entries, ignored input) and fails if one
// never happened. For each matrix with a nonzero diagonal it also reports
// the precision loss against a double-precision factorisation with the same
// row order, and requires the L error to stay within +-0.1 (U entries grow
// with the matrix, so their error is only reported).
module tb_lu_top;
  import lu_ref_pkg::*;

  localparam int N = 10;          // the engine's default size
  localparam int NMAT = 12;

  logic        clk = 1'b0;
  logic        reset;
  logic        input_valid;
  logic [3:0]  A_elem;
  logic        input_ready, output_valid, nnz_valid;
  logic [15:0] L_elem, U_elem, nnz_l, nnz_u, est_l, est_u;
  logic        est_valid;
  logic [7:0]  perm_idx;

  int checks = 0, failures = 0;
  longint cycle = 0;

  lu_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters, observed inside the engine
  int ev_swap = 0, ev_skip = 0, ev_upd = 0, ev_zpiv = 0, ev_sparse = 0, ev_ignored = 0;
  always @(posedge clk) if (!reset) begin
    if (dut.swap_en && dut.swap_a != dut.swap_b) ev_swap++;
    if (dut.row_skip) ev_skip++;
    if (dut.row_upd)  ev_upd++;
    if (dut.start_pupd && dut.piv_val == 0) ev_zpiv++;
    if (dut.pupd_done && 32'(dut.urow_cnt) < N - 1 - 32'(dut.j)) ev_sparse++;
    if (input_valid && !input_ready) ev_ignored++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a[], ref_a[], perm[];
    int rs = 0, rk = 0, ru = 0, rz = 0, rp = 0;
    input_valid = 0;
    A_elem = 0;
    reset = 1;
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    for (int m = 0; m < NMAT; m++) begin
      int pct, exp_nl, exp_nu, got, sym_l, sym_u;
      bit diag;
      longint exp_cyc, t_last, t_first;
      pct  = 10 + 10 * (m % 5);
      diag = (m % 3 != 2);
      gen_matrix(N, pct, diag, a);
      ref_a = new[N*N];
      foreach (a[x]) ref_a[x] = a[x] * 256;
      symbolic(N, a, sym_l, sym_u);
      exp_cyc = factor(N, ref_a, perm, rs, rk, ru, rz, rp);
      // load
      for (int x = 0; x < N*N; x++) begin
        while ($urandom_range(3) == 0) begin
          input_valid <= 0;
          @(posedge clk);
        end
        input_valid <= 1;
        A_elem <= 4'(a[x]);
        @(posedge clk);
      end
      t_last = cycle;
      // stray inputs while busy must be ignored
      input_valid <= 1;
      A_elem <= 4'hF;
      repeat (4) @(posedge clk);
      input_valid <= 0;
      // collect
      exp_nl = 0; exp_nu = 0;
      for (int x = 0; x < N*N; x++) begin
        int r, c, el, eu;
        r = x / N;
        c = x % N;
        do @(posedge clk); while (!output_valid);
        if (x == 0) begin
          t_first = cycle;
          check(t_first - t_last == exp_cyc + 4,
                $sformatf("matrix %0d latency %0d expected %0d", m, t_first - t_last, exp_cyc + 4));
        end
        el = (c < r) ? ref_a[x] : (c == r ? 256 : 0);
        eu = (c >= r) ? ref_a[x] : 0;
        exp_nl += (el != 0); exp_nu += (eu != 0);
        check($signed(L_elem) == el, $sformatf("m%0d L(%0d,%0d)=%0d exp %0d", m, r, c, $signed(L_elem), el));
        check($signed(U_elem) == eu, $sformatf("m%0d U(%0d,%0d)=%0d exp %0d", m, r, c, $signed(U_elem), eu));
        if (c == 0) check(int'(perm_idx) == perm[r], $sformatf("m%0d perm(%0d)=%0d exp %0d", m, r, perm_idx, perm[r]));
      end
      @(posedge clk);
      got = 0;
      while (!nnz_valid && got < 4) begin @(posedge clk); got++; end
      check(est_valid && int'(est_l) == sym_l && int'(est_u) == sym_u,
            $sformatf("m%0d estimate L %0d/%0d U %0d/%0d", m, est_l, sym_l, est_u, sym_u));
      check(sym_l >= exp_nl && sym_u >= exp_nu, $sformatf("m%0d estimate below the exact count", m));
      check(nnz_valid && int'(nnz_l) == exp_nl && int'(nnz_u) == exp_nu,
            $sformatf("m%0d nnz L %0d/%0d U %0d/%0d", m, nnz_l, exp_nl, nnz_u, exp_nu));
      if (diag) begin
        real lmin, lmax, umin, umax;
        precision(N, a, perm, ref_a, lmin, lmax, umin, umax);
        $display("matrix %0d: error range L %f .. %f, U %f .. %f", m, lmin, lmax, umin, umax);
        check(lmin > -0.1 && lmax < 0.1,
              $sformatf("m%0d precision loss too large", m));
      end
      $display("matrix %0d: density %0d%%, %0d cycles factorisation to output, nnz L=%0d U=%0d (estimated %0d %0d)",
               m, pct, t_first - t_last, exp_nl, exp_nu, sym_l, sym_u);
      repeat (3) @(posedge clk);
    end
    check(ev_swap == rs, $sformatf("row interchanges %0d exp %0d", ev_swap, rs));
    check(ev_skip == rk, $sformatf("skipped rows %0d exp %0d", ev_skip, rk));
    check(ev_upd == ru, $sformatf("updated rows %0d exp %0d", ev_upd, ru));
    check(ev_zpiv == rz, $sformatf("zero pivots %0d exp %0d", ev_zpiv, rz));
    check(ev_sparse == rp, $sformatf("sparse pivot rows %0d exp %0d", ev_sparse, rp));
    $display("mechanisms: interchange=%0d skipped_row=%0d updated_row=%0d zero_pivot=%0d sparse_pivot_row=%0d ignored_input=%0d",
             ev_swap, ev_skip, ev_upd, ev_zpiv, ev_sparse, ev_ignored);
    check(ev_swap > 0, "no row interchange happened");
    check(ev_skip > 0, "no row was skipped");
    check(ev_upd > 0, "no row was updated");
    check(ev_zpiv > 0, "no zero pivot happened");
    check(ev_sparse > 0, "no sparse pivot row happened");
    check(ev_ignored > 0, "no input was ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
