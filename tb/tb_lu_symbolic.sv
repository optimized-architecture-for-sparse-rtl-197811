// tb_lu_symbolic: the symbolic unit on random patterns of many densities,
// including empty columns (zero pivots) and zero diagonals.
// Each pattern is streamed in with gaps, then the estimates are compared
// with the static bound of the reference model, checked never to fall below
// the exact counts of the numerical model, and the run time is checked
// against the schedule: per step (N-j) scan cycles, one summing cycle and,
// when column j has a candidate and j < N-1, N-j-1 merge cycles.
module tb_lu_symbolic;
  import lu_pkg::*;
  import lu_ref_pkg::*;
  localparam int N = 10;
  logic clk = 0, reset, in_valid, in_nonzero, start, est_valid;
  logic [15:0] est_l, est_u;
  int checks = 0, failures = 0;
  lu_symbolic #(.N(N)) dut (.*);
  always #5 clk = ~clk;
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
    int a[], q[], perm[];
    reset = 1; in_valid = 0; in_nonzero = 0; start = 0;
    repeat (2) @(negedge clk); reset = 0;
    for (int t = 0; t < 200; t++) begin
      int el, eu, nl, nu, d0, d1, d2, d3, d4, cyc, ecyc;
      gen_matrix(N, $urandom_range(60, 5), $urandom_range(1), a);
      if ($urandom_range(3) == 0) for (int r = 0; r < N; r++) a[r*N + $urandom_range(N-1)] = 0;
      symbolic(N, a, el, eu);
      // exact counts from the numerical model
      q = new[N*N];
      foreach (a[x]) q[x] = a[x] * 256;
      void'(factor(N, q, perm, d0, d1, d2, d3, d4));
      nl = 0; nu = 0;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          if (c < r && q[r*N+c] != 0) nl++;
          if (c == r) nl++;
          if (c >= r && q[r*N+c] != 0) nu++;
        end
      // schedule, from the pattern as the unit updates it
      ecyc = 0;
      begin
        bit p[N][N];
        for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) p[r][c] = (a[r*N+c] != 0);
        for (int j = 0; j < N; j++) begin
          bit any;
          any = 0;
          for (int i = j; i < N; i++) any |= p[i][j];
          ecyc += (N - j) + 1 + ((any && j < N-1) ? N - j - 1 : 0);
          if (any) begin
            bit u[N];
            for (int c = 0; c < N; c++) u[c] = p[j][c];
            for (int i = j; i < N; i++) if (p[i][j])
              for (int c = 0; c < N; c++) u[c] |= p[i][c];
            for (int i = j+1; i < N; i++) if (p[i][j]) for (int c = 0; c < N; c++) p[i][c] |= u[c];
          end
        end
      end
      for (int x = 0; x < N*N; x++) begin
        while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_nonzero = (a[x] != 0);
        @(negedge clk);
      end
      in_valid = 0;
      start = 1;
      @(negedge clk); start = 0;
      cyc = 0;
      while (!est_valid) begin @(negedge clk); cyc++; end
      check(int'(est_l) == el && int'(est_u) == eu,
            $sformatf("t=%0d estimate L %0d exp %0d, U %0d exp %0d", t, est_l, el, est_u, eu));
      check(el >= nl && eu >= nu, $sformatf("t=%0d bound below exact count", t));
      check(cyc == ecyc, $sformatf("t=%0d took %0d cycles exp %0d", t, cyc, ecyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
