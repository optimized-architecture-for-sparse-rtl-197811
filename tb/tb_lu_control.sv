// tb_lu_control: the loop controller driven by unit models that answer each
// start pulse with a done pulse after a random delay. Checks the complete
// phase sequence LOAD, then PIVOT/PUPD/UPDATE for j = 0..N-1, then OUTPUT
// and back to LOAD with a table re-initialisation, the step index seen with
// every start, and that no start comes without its predecessor's done.
module tb_lu_control;
  import lu_pkg::*;
  localparam int N = 10;
  logic clk = 0, reset;
  logic load_done, piv_done, pupd_done, upd_done, out_done;
  phase_e phase;
  idx_t j;
  logic start_piv, start_pupd, start_upd, start_out, lut_init;
  int checks = 0, failures = 0;
  lu_control #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  // done pulse after a random delay; the phase must not move meanwhile
  task automatic answer(ref logic d, input phase_e ph);
    int w;
    w = $urandom_range(5);
    repeat (w) begin
      @(negedge clk);
      check(phase == ph, $sformatf("phase %0d left early, expected %0d", phase, ph));
    end
    @(negedge clk); d = 1;
    @(negedge clk); d = 0;
  endtask
  task automatic expect_start(ref logic s, input phase_e ph, input int jj, input string name);
    check(s === 1'b1 && phase == ph && int'(j) == jj,
          $sformatf("%s: start=%0b phase=%0d j=%0d exp j=%0d", name, s, phase, j, jj));
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    reset = 1; load_done = 0; piv_done = 0; pupd_done = 0; upd_done = 0; out_done = 0;
    repeat (2) @(negedge clk); reset = 0;
    for (int run = 0; run < 3; run++) begin
      check(phase == PH_LOAD, "not in load phase");
      answer(load_done, PH_LOAD);
      for (int jj = 0; jj < N; jj++) begin
        expect_start(start_piv, PH_PIVOT, jj, "pivot start");
        answer(piv_done, PH_PIVOT);
        expect_start(start_pupd, PH_PUPD, jj, "pivot update start");
        answer(pupd_done, PH_PUPD);
        expect_start(start_upd, PH_UPDATE, jj, "row update start");
        answer(upd_done, PH_UPDATE);
      end
      expect_start(start_out, PH_OUTPUT, N-1, "output start");
      answer(out_done, PH_OUTPUT);
      check(lut_init && phase == PH_LOAD, "no table init on return to load");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
