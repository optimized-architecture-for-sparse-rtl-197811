// lu_ref_pkg: reference model of the LU engine for the testbenches.
//
// A plain software model of partial-pivoting LU on Q8.8 integers with the
// engine's number rules: reciprocal sign(P)*floor(2^24/|P|), multiplier
// (a*recip) >>> 16, update a - ((l*u) >>> 8), each result saturated to
// 16 bits, first maximum wins the pivot search. It also predicts the
// engine's cycle count from its schedule. Matrices are flat arrays,
// element (r,c) at index r*n+c.
package lu_ref_pkg;

  function automatic int sat16(longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic longint recip_of(int p);
    longint m;
    if (p == 0) return 0;
    m = (p < 0) ? -p : p;
    return (p < 0) ? -((64'sd1 << 24) / m) : ((64'sd1 << 24) / m);
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  // Fill a random n x n matrix of 4-bit values; each entry is nonzero with
  // probability pct/100; with diag set the diagonal is always nonzero.
  function automatic void gen_matrix(int n, int pct, bit diag, ref int a[]);
    a = new[n*n];
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        if ((diag && r == c) || ($urandom_range(99) < pct))
          a[r*n+c] = $urandom_range(15, 1);
        else
          a[r*n+c] = 0;
      end
  endfunction

  // In-place factorisation of a (Q8.8 words); perm[i] = original row of
  // row i. Returns the expected cycles from the start of the first pivot
  // search to the start of the output stream (see the engine's timing).
  // Also counts the events the engine should show.
  function automatic longint factor(int n, ref int a[], ref int perm[],
                                    ref int n_swap, ref int n_skip,
                                    ref int n_upd, ref int n_zpiv,
                                    ref int n_sparse_row);
    longint cyc = 0;
    perm = new[n];
    for (int i = 0; i < n; i++) perm[i] = i;
    for (int j = 0; j < n; j++) begin
      int p, best, cnt, t;
      longint rcp, upd;
      p = j; best = 0; cnt = 0;
      for (int i = j; i < n; i++)
        if (iabs(a[i*n+j]) > best) begin best = iabs(a[i*n+j]); p = i; end
      if (p != j) begin
        n_swap++;
        for (int c = 0; c < n; c++) begin
          t = a[j*n+c]; a[j*n+c] = a[p*n+c]; a[p*n+c] = t;
        end
        t = perm[j]; perm[j] = perm[p]; perm[p] = t;
      end
      if (a[j*n+j] == 0) n_zpiv++;
      rcp = recip_of(a[j*n+j]);
      for (int k = j+1; k < n; k++) if (a[j*n+k] != 0) cnt++;
      if (cnt < n-j-1) n_sparse_row++;
      // schedule: pivot search, pivot update, row update, controller hops
      cyc += (n - j) + 2;                                  // search
      // pivot update: pivot row fetch overlapped with the 26-cycle divider
      // (no division for a zero pivot)
      if (a[j*n+j] == 0) cyc += (n-j-1 == 0) ? 2 : (n-j-1) + 3;
      else               cyc += (n-j-1 + 3 > 28) ? (n-j-1) + 3 : 28;
      upd = 0;
      for (int i = j+1; i < n; i++) begin
        if (a[i*n+j] == 0) begin
          n_skip++;
          upd += 2;
        end else begin
          int l;
          l = sat16((longint'(a[i*n+j]) * rcp) >>> 16);
          n_upd++;
          a[i*n+j] = l;
          upd += (cnt == 0) ? 2 : 3 + cnt;
          for (int k = j+1; k < n; k++)
            if (a[j*n+k] != 0)
              a[i*n+k] = sat16(longint'(a[i*n+k]) -
                               ((longint'(l) * longint'(a[j*n+k])) >>> 8));
        end
      end
      cyc += upd + 1;
      cyc += 3;                                            // handshakes
    end
    return cyc;
  endfunction

  // Static nonzero bound of L and U under partial pivoting, from the
  // pattern of a alone: at each step every row with a nonzero in the pivot
  // column may become the pivot row, so all of them get the union of their
  // patterns and of row j (which stays pivot row if the column cancels to
  // zero). L counts include the unit diagonal.
  function automatic void symbolic(int n, ref int a[], ref int est_l, ref int est_u);
    bit p[][];
    p = new[n];
    for (int r = 0; r < n; r++) begin
      p[r] = new[n];
      for (int c = 0; c < n; c++) p[r][c] = (a[r*n+c] != 0);
    end
    est_l = 0; est_u = 0;
    for (int j = 0; j < n; j++) begin
      int cand [$];
      bit u [];
      u = new[n];
      for (int i = j; i < n; i++) if (p[i][j]) cand.push_back(i);
      for (int c = 0; c < n; c++) u[c] = p[j][c];
      foreach (cand[x]) for (int c = 0; c < n; c++) u[c] |= p[cand[x]][c];
      est_l += (cand.size() == 0) ? 1 : cand.size();
      for (int c = j; c < n; c++) est_u += u[c];
      for (int i = j+1; i < n; i++)
        if (p[i][j])
          for (int c = 0; c < n; c++) p[i][c] |= u[c];
    end
  endfunction

  // Precision loss: factorise the rows of a (integer matrix) in the order
  // perm in double precision without further pivoting, and return the
  // smallest and largest differences hardware - double of L and U, where hw
  // holds the engine's combined L-I+U in Q8.8 words.
  function automatic void precision(int n, ref int a[], ref int perm[], ref int hw[],
                                    ref real lmin, ref real lmax,
                                    ref real umin, ref real umax);
    real f[];
    f = new[n*n];
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) f[r*n+c] = real'(a[perm[r]*n+c]);
    for (int j = 0; j < n; j++)
      for (int i = j+1; i < n; i++)
        if (f[j*n+j] != 0.0 && f[i*n+j] != 0.0) begin
          f[i*n+j] = f[i*n+j] / f[j*n+j];
          for (int k = j+1; k < n; k++) f[i*n+k] -= f[i*n+j] * f[j*n+k];
        end
    lmin = 0.0; lmax = 0.0; umin = 0.0; umax = 0.0;
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        real e;
        e = real'(hw[r*n+c]) / 256.0 - f[r*n+c];
        if (c < r) begin
          if (e < lmin) lmin = e;
          if (e > lmax) lmax = e;
        end else begin
          if (e < umin) umin = e;
          if (e > umax) umax = e;
        end
      end
  endfunction

endpackage
