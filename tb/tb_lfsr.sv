// tb_lfsr: checks the pattern generator.
// Instances of 4, 5 and 36 stages (the widths the self-tests use) are
// stepped against the reference model; the 4- and 5-stage registers must
// visit every non-zero state exactly once per period of 2**W-1 clocks.
// Also checks that en low holds the state and load restarts at the seed.
module tb_lfsr;
  import bist_model_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load = 1'b0, en = 1'b0;
  logic [3:0]  s4;
  logic [4:0]  s5;
  logic [35:0] s36;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr #(.WIDTH(4))  u4  (.clk, .rst_n, .load, .en, .state(s4));
  lfsr #(.WIDTH(5))  u5  (.clk, .rst_n, .load, .en, .state(s5));
  lfsr               u36 (.clk, .rst_n, .load, .en, .state(s36));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] m4, m5, m36;
    bit seen4[16], seen5[32];
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(s4 == 4'hF && s5 == 5'h1F && s36 == '1, "reset to seed");
    m4 = 64'hF; m5 = 64'h1F; m36 = {28'd0, 36'hF_FFFF_FFFF};
    en = 1'b1;
    for (int t = 0; t < 200; t++) begin
      if (t < 15) begin
        check(!seen4[s4], $sformatf("4-stage repeat at step %0d", t));
        seen4[s4] = 1'b1;
      end
      if (t < 31) begin
        check(!seen5[s5], $sformatf("5-stage repeat at step %0d", t));
        seen5[s5] = 1'b1;
      end
      check(s4 == m4[3:0], $sformatf("4-stage step %0d", t));
      check(s5 == m5[4:0], $sformatf("5-stage step %0d", t));
      check(s36 == m36[35:0], $sformatf("36-stage step %0d: %h vs %h", t, s36, m36[35:0]));
      if (t == 15) check(s4 == 4'hF, "4-stage period 15");
      if (t == 31) check(s5 == 5'h1F, "5-stage period 31");
      @(negedge clk);
      m4 = lfsr_next(m4, 4); m5 = lfsr_next(m5, 5); m36 = lfsr_next(m36, 36);
    end
    // Hold.
    en = 1'b0;
    begin
      logic [35:0] held;
      held = s36;
      repeat (3) @(negedge clk);
      check(s36 == held, "en low holds the state");
    end
    // Load beats en.
    en = 1'b1; load = 1'b1;
    @(negedge clk);
    check(s36 == '1 && s5 == 5'h1F && s4 == 4'hF, "load restarts at the seed");
    load = 1'b0;
    @(negedge clk);
    check(s36 == 36'(lfsr_next({28'd0, 36'hF_FFFF_FFFF}, 36)), "first step after load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
