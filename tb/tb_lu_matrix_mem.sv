// tb_lu_matrix_mem: random writes and reads of the matrix memory against an
// array model, with read-during-write of the same address returning the old
// word and one cycle of read latency.
module tb_lu_matrix_mem;
  import lu_pkg::*;
  localparam int N = 10;
  logic clk = 0, re, we;
  idx_t rrow, rcol, wrow, wcol;
  q_t rdata, wdata;
  int checks = 0, failures = 0;
  int model [N*N];
  lu_matrix_mem #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int exp_d;
    re = 0; we = 0; rrow = 0; rcol = 0; wrow = 0; wcol = 0; wdata = 0;
    // fill
    for (int x = 0; x < N*N; x++) begin
      we <= 1; wrow <= idx_t'(x / N); wcol <= idx_t'(x % N);
      model[x] = $urandom_range(65535); wdata <= q_t'(model[x]);
      @(posedge clk);
    end
    we <= 0;
    for (int t = 0; t < 2000; t++) begin
      int ra, wa, nv;
      bit dow;
      ra = $urandom_range(N*N-1);
      wa = ($urandom_range(3) == 0) ? ra : $urandom_range(N*N-1);
      dow = $urandom_range(1);
      nv = $urandom_range(65535);
      re <= 1; rrow <= idx_t'(ra / N); rcol <= idx_t'(ra % N);
      we <= dow; wrow <= idx_t'(wa / N); wcol <= idx_t'(wa % N); wdata <= q_t'(nv);
      exp_d = model[ra];
      if (dow) model[wa] = nv;
      @(posedge clk);
      re <= 0; we <= 0;
      #1;
      checks++;
      if (rdata != q_t'(exp_d)) begin
        failures++;
        if (failures < 10) $display("FAIL: addr %0d read %0h exp %0h", ra, rdata, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
