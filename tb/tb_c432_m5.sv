// tb_c432_m5: checks M5 on all 512 request vectors: Chan must be the lowest
// set bit position, all ones for an empty vector.
module tb_c432_m5;
  logic [8:0] sel;
  logic [3:0] Chan;
  int checks = 0, failures = 0;

  c432_m5 u_dut (.sel, .Chan);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int exp;
      sel = 9'(v);
      #1;
      exp = 15;
      for (int i = 0; i < 9; i++) if (v % (1 << (i + 1)) != 0 && exp == 15) exp = i;
      check(Chan == 4'(exp), $sformatf("sel=%b Chan=%0d exp %0d", sel, Chan, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
