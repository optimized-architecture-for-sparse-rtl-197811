// tb_lu_nnz_counter: random L/U streams of N*N elements, with gaps in
// output_valid, and several results back to back; checks both nonzero
// counts and that nnz_valid rises only after the last element.
module tb_lu_nnz_counter;
  import lu_pkg::*;
  localparam int N = 10;
  logic clk = 0, reset, output_valid, nnz_valid;
  q_t L_elem, U_elem;
  logic [15:0] nnz_l, nnz_u;
  int checks = 0, failures = 0;
  lu_nnz_counter #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    reset = 1; output_valid = 0; L_elem = 0; U_elem = 0;
    repeat (2) @(negedge clk); reset = 0;
    for (int run = 0; run < 20; run++) begin
      int el, eu, pct;
      el = 0; eu = 0;
      pct = $urandom_range(100);
      for (int x = 0; x < N*N; x++) begin
        while ($urandom_range(3) == 0) begin @(negedge clk); output_valid = 0; end
        output_valid = 1;
        L_elem = ($urandom_range(99) < pct) ? q_t'($urandom_range(65535, 1)) : '0;
        U_elem = ($urandom_range(99) < pct) ? q_t'($urandom_range(65535, 1)) : '0;
        el += (L_elem != 0); eu += (U_elem != 0);
        if (x > 0) check(!nnz_valid, "nnz_valid during the stream");
        @(negedge clk);
        output_valid = 0;
      end
      check(nnz_valid && int'(nnz_l) == el && int'(nnz_u) == eu,
            $sformatf("run %0d: L %0d exp %0d, U %0d exp %0d", run, nnz_l, el, nnz_u, eu));
      repeat ($urandom_range(3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
