// tb_lu_row_lut: the row pointer table starts as the identity, follows a
// random sequence of pointer swaps (including swaps of a row with itself)
// and returns to the identity on init.
module tb_lu_row_lut;
  import lu_pkg::*;
  localparam int N = 10;
  logic clk = 0, reset, init, swap_en;
  idx_t swap_a, swap_b;
  idx_t map [N];
  int model [N];
  int checks = 0, failures = 0;
  lu_row_lut #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  task automatic compare(string when);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(map[i]) != model[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s: map[%0d]=%0d exp %0d", when, i, map[i], model[i]);
      end
    end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    reset = 1; init = 0; swap_en = 0; swap_a = 0; swap_b = 0;
    @(posedge clk); reset <= 0; @(posedge clk); #1;
    for (int i = 0; i < N; i++) model[i] = i;
    compare("reset");
    for (int t = 0; t < 300; t++) begin
      int a, b, tmp;
      a = $urandom_range(N-1); b = $urandom_range(N-1);
      @(negedge clk);
      swap_en = 1; swap_a = idx_t'(a); swap_b = idx_t'(b);
      @(posedge clk); #1;
      tmp = model[a]; model[a] = model[b]; model[b] = tmp;
      swap_en = 0;
      compare("swap");
      if (t == 150) begin
        @(negedge clk); init = 1; @(posedge clk); #1; init = 0;
        for (int i = 0; i < N; i++) model[i] = i;
        compare("init");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
