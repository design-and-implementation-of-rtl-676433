// tb_bist_c432: runs the complete c432 self-test at its default length
// (4096 patterns), fault free and with every one of the 140 single
// stuck-at faults on the numbered nets injected in turn. For every run it
// checks, against the reference models (for both sources of the expected
// responses, the response memory and a fault-free CUT copy): every applied pattern (LFSR +
// phase shifter), every CUT response, the clock count from start to done
// (TEST_LEN + 2), the verdict, the number of failing patterns, the first
// failing pattern and the final signature. It reports the fault coverage
// and requires all 140 faults to be detected.
module tb_bist_c432;
  import bist_pkg::*;
  import bist_model_pkg::*;

  localparam int N = 4096;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic bist_on = 1'b0;
  fault_t fault = NO_FAULT;
  logic done, accept, fail, mismatch;
  logic [12:0] fail_count, first_fail;
  logic [15:0] signature;
  logic [35:0] pattern;
  logic [6:0] response;
  int checks = 0, failures = 0;
  int latest_first = 0;

  always #5 clk = ~clk;

  bist_c432 u_dut (.clk, .rst_n, .bist_on, .fault, .done, .accept, .fail, .mismatch, .fail_count,
                  .first_fail, .signature, .pattern, .response);

  // The same test with a fault-free reference copy as the source of the
  // expected responses; its results must equal those of u_dut.
  logic done_r, accept_r, fail_r, mismatch_r;
  logic [12:0] fail_count_r, first_fail_r;
  logic [15:0] signature_r;
  logic [$bits(pattern)-1:0] pattern_r;
  logic [$bits(response)-1:0] response_r;

  bist_c432 #(.STORED_RESPONSES(1'b0)) u_copy (
    .clk, .rst_n, .bist_on, .fault, .done(done_r), .accept(accept_r), .fail(fail_r),
    .mismatch(mismatch_r), .fail_count(fail_count_r), .first_fail(first_fail_r),
    .signature(signature_r), .pattern(pattern_r), .response(response_r));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One self-test; returns 1 when the hardware reported a fault.
  task automatic run_test(input bit fen, input int site, input bit fval, output bit detected);
    logic [63:0] l, m;
    int cnt, first, cycles, t;
    logic [6:0] exp;
    fault = '{enable: fen, site: FAULT_SITE_W'(site), value: fval};
    l = 64'hF_FFFF_FFFF; m = '0; cnt = 0; first = -1; cycles = 0; t = 0;
    bist_on = 1'b1;
    while (!done && cycles < N + 10) begin
      @(negedge clk);
      cycles++;
      if (cycles >= 2 && cycles <= N + 1) begin
        logic [35:0] p;
        p = 36'(phase_shift(l, 36));
        exp = c432_fault_model(p, fen, site, fval);
        check(pattern == p, $sformatf("pattern %0d: %b vs %b", t, pattern, p));
        check(response == exp, $sformatf("response %0d", t));
        if (exp != c432_model(p[8:0], p[17:9], p[26:18], p[35:27])) begin
          cnt++;
          if (first < 0) first = t;
        end
        m = misr_next(m, 64'(exp), 16);
        l = lfsr_next(l, 36);
        t++;
      end
    end
    check(cycles == N + 2, $sformatf("done after %0d clocks", cycles));
    check(t == N, "pattern count");
    check(accept == (cnt == 0) && fail == (cnt > 0), $sformatf("verdict, fault %0d/%0d", site, fval));
    check(fail_count == 13'(cnt), "failing pattern count");
    if (cnt > 0) check(first_fail == 13'(first), "first failing pattern");
    if (first > latest_first) latest_first = first;
    check(signature == m[15:0], "signature");
    check(done_r && accept_r == accept && fail_count_r == fail_count &&
          first_fail_r == first_fail && signature_r == signature,
          "reference-copy variant agrees with the stored-response variant");
    detected = fail;
    bist_on = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    bit det;
    int found;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_test(0, 0, 0, det);
    check(!det, "fault-free circuit accepted");
    found = 0;
    for (int site = 0; site < 70; site++)
      for (int val = 0; val < 2; val++) begin
        run_test(1, site, 1'(val), det);
        if (det) found++;
      end
    $display("c432 fault coverage: %0d of 140 stuck-at faults", found);
    $display("latest first detection at pattern %0d", latest_first);
    check(found == 140, "100% fault coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
