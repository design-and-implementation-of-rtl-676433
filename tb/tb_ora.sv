// tb_ora: checks the response analyser on random response streams with
// mismatches injected at random clocks: the per-clock mismatch, the sticky
// fail flag, the count of failing patterns, the number of the first
// failing pattern, en low ignoring differences, and clear.
module tb_ora;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0, en = 1'b0;
  logic [15:0] idx = '0;
  logic [6:0] cut_out = '0, ref_out = '0;
  logic mismatch, fail;
  logic [15:0] fail_count, first_fail;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ora u_dut (.clk, .rst_n, .clear, .en, .pattern_idx(idx), .cut_out, .ref_out,
             .mismatch, .fail, .fail_count, .first_fail);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 5; run++) begin
      int cnt, first;
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      check(!fail && fail_count == 0 && first_fail == 0, "clear");
      cnt = 0; first = -1;
      for (int t = 0; t < 100; t++) begin
        bit bad;
        idx = 16'(t);
        ref_out = 7'($urandom);
        bad = (run != 0) && ($urandom % 10 == 0);
        cut_out = bad ? ref_out ^ 7'(1 << ($urandom % 7)) : ref_out;
        en = (t % 13 != 5);
        #1;
        check(mismatch == bad, $sformatf("run %0d clock %0d mismatch", run, t));
        if (bad && en) begin
          cnt++;
          if (first < 0) first = t;
        end
        @(negedge clk);
        check(fail == (cnt > 0), $sformatf("run %0d clock %0d fail flag", run, t));
        check(fail_count == 16'(cnt), $sformatf("run %0d clock %0d count %0d vs %0d", run, t,
                                                fail_count, cnt));
        if (cnt > 0) check(first_fail == 16'(first), $sformatf("run %0d first fail", run));
      end
      en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
