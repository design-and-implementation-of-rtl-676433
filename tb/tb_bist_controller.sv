// tb_bist_controller: checks the sequencer: one init clock, exactly
// TEST_LEN run clocks with pattern_idx counting 0..TEST_LEN-1, done
// TEST_LEN+2 clocks after bist_on is sampled, accept following the fail
// input, no restart while bist_on stays high, and a second test after
// bist_on falls.
module tb_bist_controller;
  import bist_pkg::*;

  localparam int unsigned N = 31;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic bist_on = 1'b0, fail = 1'b0;
  bist_state_t state;
  logic init, run, done, accept;
  logic [4:0] pattern_idx;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bist_controller #(.TEST_LEN(N)) u_dut (.clk, .rst_n, .bist_on, .fail, .state, .init, .run,
                                         .pattern_idx, .done, .accept);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(state == ST_IDLE && !init && !run && !done, "idle after reset");
    for (int test = 0; test < 2; test++) begin
      int inits, runs, cycles;
      inits = 0; runs = 0; cycles = 0;
      bist_on = 1'b1;
      fail = 1'b0;
      while (!done && cycles < 100) begin
        @(negedge clk);
        cycles++;
        if (init) inits++;
        if (run) begin
          check(pattern_idx == 5'(runs), $sformatf("pattern_idx %0d at run %0d", pattern_idx, runs));
          runs++;
          if (test == 1 && runs == 7) fail = 1'b1;
        end
        check(int'(init) + int'(run) + int'(done) <= 1, "one phase at a time");
      end
      check(cycles == N + 2, $sformatf("done after %0d clocks, expected %0d", cycles, N + 2));
      check(inits == 1, "one init clock");
      check(runs == N, $sformatf("%0d run clocks", runs));
      check(accept == (test == 0), "accept follows fail");
      repeat (5) @(negedge clk);
      check(done && !run && !init, "no restart while bist_on stays high");
      bist_on = 1'b0;
      @(negedge clk);
      check(state == ST_IDLE && !done, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
