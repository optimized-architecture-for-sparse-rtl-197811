// tb_lu_mem_if: the memory interface with a memory model on its memory
// port. Checks (1) the load stream: element order, Q8.8 conversion, gaps in
// input_valid, load_done and input_ready; (2) the phase multiplexer with a
// random row permutation in the lookup table: each phase passes exactly its
// unit's requests, rows translated; (3) the output stream: L with unit
// diagonal, U with zeros below it, perm_idx, one element per cycle, and
// out_done.
module tb_lu_mem_if;
  import lu_pkg::*;
  localparam int N = 10;
  logic clk = 0, reset;
  phase_e phase;
  logic input_valid, input_ready, load_done, start_out, output_valid, out_done;
  logic [A_W-1:0] A_elem;
  q_t L_elem, U_elem;
  idx_t perm_idx;
  mem_req_t piv_req, pupd_req, upd_req;
  idx_t map [N];
  logic m_re, m_we;
  idx_t m_rrow, m_rcol, m_wrow, m_wcol;
  q_t m_rdata, m_wdata;
  int mem [N][N];
  int checks = 0, failures = 0;
  lu_mem_if #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (m_re) m_rdata <= q_t'(mem[m_rrow][m_rcol]);
    if (m_we) mem[m_wrow][m_wcol] = int'(m_wdata);
  end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  function automatic mem_req_t rnd_req();
    mem_req_t r;
    r.rd_en = 1'($urandom_range(1)); r.rd_row = idx_t'($urandom_range(N-1)); r.rd_col = idx_t'($urandom_range(N-1));
    r.wr_en = 1'($urandom_range(1)); r.wr_row = idx_t'($urandom_range(N-1)); r.wr_col = idx_t'($urandom_range(N-1));
    r.wr_data = q_t'($urandom_range(65535));
    return r;
  endfunction
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int a [N*N];
    int cnt;
    reset = 1; phase = PH_LOAD; input_valid = 0; A_elem = 0; start_out = 0;
    piv_req = '0; pupd_req = '0; upd_req = '0;
    for (int i = 0; i < N; i++) map[i] = idx_t'(i);
    repeat (2) @(negedge clk); reset = 0;
    // (1) load
    cnt = 0;
    while (cnt < N*N) begin
      @(negedge clk);
      check(input_ready, "input_ready low during load");
      input_valid = 1'($urandom_range(2) != 0);
      A_elem = 4'($urandom_range(15));
      #1;
      if (input_valid) begin
        check(m_we && int'(m_wrow) == cnt / N && int'(m_wcol) == cnt % N &&
              int'(m_wdata) == int'(A_elem) * 256,
              $sformatf("load element %0d", cnt));
        a[cnt] = int'(A_elem) * 256;
        cnt++;
      end else check(!m_we, "write without input_valid");
      @(posedge clk); #1;
      check(load_done == (input_valid && cnt == N*N), "load_done");
    end
    input_valid = 1;
    #1 check(!input_ready && !m_we, "input taken after the last element");
    @(negedge clk); input_valid = 0;
    // (2) multiplexer with a permuted table
    for (int i = N-1; i > 0; i--) begin
      int k; idx_t t;
      k = $urandom_range(i);
      t = map[i]; map[i] = map[k]; map[k] = t;
    end
    for (int t = 0; t < 200; t++) begin
      mem_req_t e;
      phase_e ph;
      @(negedge clk);
      piv_req = rnd_req(); pupd_req = rnd_req(); upd_req = rnd_req();
      piv_req.wr_en = 0; pupd_req.wr_en = 0;  // only the row update writes
      ph = phase_e'($urandom_range(3, 1));
      phase = ph;
      e = (ph == PH_PIVOT) ? piv_req : (ph == PH_PUPD) ? pupd_req : upd_req;
      #1;
      check(m_re == e.rd_en && (!e.rd_en || (m_rrow == map[e.rd_row] && m_rcol == e.rd_col)) &&
            m_we == e.wr_en && (!e.wr_en || (m_wrow == map[e.wr_row] && m_wcol == e.wr_col &&
            m_wdata == e.wr_data)), $sformatf("mux phase %0d", ph));
      if (e.wr_en) a[e.wr_row * N + e.wr_col] = int'(e.wr_data);  // logical view
    end
    @(negedge clk);
    piv_req = '0; pupd_req = '0; upd_req = '0;
    // (3) output stream
    phase = PH_OUTPUT;
    start_out = 1;
    @(negedge clk); start_out = 0;
    for (int x = 0; x < N*N; x++) begin
      int r, c, el, eu, v;
      r = x / N; c = x % N;
      @(negedge clk);
      v = int'(q_t'(mem[map[r]][c]));
      el = (c < r) ? v : (c == r) ? 256 : 0;
      eu = (c >= r) ? v : 0;
      check(output_valid && int'(L_elem) == el && int'(U_elem) == eu && perm_idx == map[r],
            $sformatf("out (%0d,%0d): v=%0b L=%0d U=%0d exp %0d %0d", r, c, output_valid, L_elem, U_elem, el, eu));
      check(!out_done, "out_done early");
    end
    @(negedge clk);
    check(out_done && !output_valid, "out_done after the last element");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
