// tb_lfsr_bist_top: end-to-end test of the three self-tests in the top,
// all parameters at their defaults.
// The three tests run concurrently, first fault free, then with faults
// injected: 50 stuck-at faults spread over all the nets of c432, all 34
// of s27 and all 22 of c17. Each run is checked against the reference
// models: the clock count from start to done, the verdict, the number of
// failing patterns, the first failing pattern and the signature. It counts
// how often each mechanism happened (accepted and rejected runs per
// circuit; bus A, B and C winning in c432; state-dependent s27 responses)
// and counts a failure for any that never did.
module tb_lfsr_bist_top;
  import bist_pkg::*;
  import bist_model_pkg::*;

  localparam int N432 = 4096, N27 = 30, N17 = 31;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic c432_bist_on = 1'b0, s27_bist_on = 1'b0, c17_bist_on = 1'b0;
  fault_t c432_fault = NO_FAULT, s27_fault = NO_FAULT, c17_fault = NO_FAULT;
  logic c432_done, c432_accept, c432_fail, c432_mismatch;
  logic s27_done, s27_accept, s27_fail, s27_mismatch;
  logic c17_done, c17_accept, c17_fail, c17_mismatch;
  logic [12:0] c432_fail_count, c432_first_fail;
  logic [4:0]  s27_fail_count, s27_first_fail;
  logic [4:0]  c17_fail_count, c17_first_fail;
  logic [15:0] c432_signature, s27_signature, c17_signature;
  logic [35:0] c432_pattern;
  logic [3:0]  s27_pattern;
  logic [4:0]  c17_pattern;
  logic [6:0]  c432_response;
  logic [0:0]  s27_response;
  logic [1:0]  c17_response;

  int checks = 0, failures = 0;
  int accepted[3] = '{0, 0, 0}, rejected[3] = '{0, 0, 0};
  int bus_won[3] = '{0, 0, 0};
  int s27_state_effect = 0;

  always #5 clk = ~clk;

  lfsr_bist_top u_top (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic test_c432(input bit fen, input int site, input bit fval);
    logic [63:0] l, m;
    int cnt, first, cycles;
    c432_fault = '{enable: fen, site: FAULT_SITE_W'(site), value: fval};
    l = 64'hF_FFFF_FFFF; m = '0; cnt = 0; first = -1; cycles = 0;
    c432_bist_on = 1'b1;
    while (!c432_done && cycles < N432 + 10) begin
      @(negedge clk);
      cycles++;
      if (cycles >= 2 && cycles <= N432 + 1) begin
        logic [35:0] p;
        logic [6:0] exp, good;
        p = 36'(phase_shift(l, 36));
        exp = c432_fault_model(p, fen, site, fval);
        good = c432_model(p[8:0], p[17:9], p[26:18], p[35:27]);
        if (exp != good) begin
          cnt++;
          if (first < 0) first = cycles - 2;
        end
        if (!fen) for (int k = 0; k < 3; k++) if (good[6-k]) bus_won[k]++;
        m = misr_next(m, 64'(exp), 16);
        l = lfsr_next(l, 36);
      end
    end
    check(cycles == N432 + 2, $sformatf("c432 done after %0d clocks", cycles));
    check(c432_fail == (cnt > 0) && c432_accept == (cnt == 0), "c432 verdict");
    check(c432_fail_count == 13'(cnt), "c432 failing pattern count");
    if (cnt > 0) check(c432_first_fail == 13'(first), "c432 first failing pattern");
    check(c432_signature == m[15:0], "c432 signature");
    if (c432_accept) accepted[0]++; else rejected[0]++;
    c432_bist_on = 1'b0;
    @(negedge clk);
  endtask

  task automatic test_s27(input bit fen, input int site, input bit fval);
    logic [63:0] l, m;
    logic [2:0] st, st_good;
    int cnt, first, cycles;
    s27_fault = '{enable: fen, site: FAULT_SITE_W'(site), value: fval};
    l = 64'hF; m = '0; cnt = 0; first = -1; cycles = 0; st = '0; st_good = '0;
    s27_bist_on = 1'b1;
    while (!s27_done && cycles < N27 + 10) begin
      @(negedge clk);
      cycles++;
      if (cycles >= 2 && cycles <= N27 + 1) begin
        logic [3:0] p;
        logic exp, good;
        logic [2:0] st_zero;
        p = 4'(phase_shift(l, 4));
        exp = s27_model(p, st, fen, site, fval);
        st_zero = '0;
        if (!fen && s27_model(p, st_zero, 0, 0, 0) != s27_model(p, st_good, 0, 0, 0))
          s27_state_effect++;
        good = s27_model(p, st_good, 0, 0, 0);
        if (exp != good) begin
          cnt++;
          if (first < 0) first = cycles - 2;
        end
        m = misr_next(m, 64'(exp), 16);
        l = lfsr_next(l, 4);
      end
    end
    check(cycles == N27 + 2, $sformatf("s27 done after %0d clocks", cycles));
    check(s27_fail == (cnt > 0) && s27_accept == (cnt == 0), "s27 verdict");
    check(s27_fail_count == 5'(cnt), "s27 failing pattern count");
    if (cnt > 0) check(s27_first_fail == 5'(first), "s27 first failing pattern");
    check(s27_signature == m[15:0], "s27 signature");
    if (s27_accept) accepted[1]++; else rejected[1]++;
    s27_bist_on = 1'b0;
    @(negedge clk);
  endtask

  task automatic test_c17(input bit fen, input int site, input bit fval);
    logic [63:0] l, m;
    int cnt, first, cycles;
    c17_fault = '{enable: fen, site: FAULT_SITE_W'(site), value: fval};
    l = 64'h1F; m = '0; cnt = 0; first = -1; cycles = 0;
    c17_bist_on = 1'b1;
    while (!c17_done && cycles < N17 + 10) begin
      @(negedge clk);
      cycles++;
      if (cycles >= 2 && cycles <= N17 + 1) begin
        logic [4:0] p;
        logic [1:0] exp;
        p = 5'(phase_shift(l, 5));
        exp = c17_model(p, fen, site, fval);
        if (exp != c17_model(p, 0, 0, 0)) begin
          cnt++;
          if (first < 0) first = cycles - 2;
        end
        m = misr_next(m, 64'(exp), 16);
        l = lfsr_next(l, 5);
      end
    end
    check(cycles == N17 + 2, $sformatf("c17 done after %0d clocks", cycles));
    check(c17_fail == (cnt > 0) && c17_accept == (cnt == 0), "c17 verdict");
    check(c17_fail_count == 5'(cnt), "c17 failing pattern count");
    if (cnt > 0) check(c17_first_fail == 5'(first), "c17 first failing pattern");
    check(c17_signature == m[15:0], "c17 signature");
    if (c17_accept) accepted[2]++; else rejected[2]++;
    c17_bist_on = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    int det432;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Fault free, all three at once.
    fork
      test_c432(0, 0, 0);
      test_s27(0, 0, 0);
      test_c17(0, 0, 0);
    join
    check(accepted[0] == 1 && accepted[1] == 1 && accepted[2] == 1,
          "all fault-free circuits accepted");
    // With faults: c432 runs 50 faults while the small circuits cycle
    // through all of theirs.
    fork
      for (int k = 0; k < 50; k++) test_c432(1, (k * 7) % 70, 1'(k % 2));
      for (int site = 0; site < 17; site++)
        for (int v = 0; v < 2; v++) test_s27(1, site, 1'(v));
      for (int site = 0; site < 11; site++)
        for (int v = 0; v < 2; v++) test_c17(1, site, 1'(v));
    join
    det432 = rejected[0];
    $display("c432: %0d of 50 injected faults detected", det432);
    $display("s27: %0d of 34 faults detected, c17: %0d of 22 faults detected",
             rejected[1], rejected[2]);
    $display("c432 bus wins in the fault-free test: A %0d B %0d C %0d",
             bus_won[0], bus_won[1], bus_won[2]);
    $display("s27 responses that depended on the stored state: %0d", s27_state_effect);
    check(det432 == 50, "all 50 c432 faults detected");
    check(rejected[2] == 22, "all c17 faults detected");
    for (int k = 0; k < 3; k++) begin
      check(accepted[k] > 0, $sformatf("circuit %0d never accepted", k));
      check(rejected[k] > 0, $sformatf("circuit %0d never rejected", k));
      check(bus_won[k] > 0, $sformatf("bus %0d never won", k));
    end
    check(s27_state_effect > 0, "s27 state never mattered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
