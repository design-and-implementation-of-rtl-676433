// tb_c432_m1: checks M1 on random and directed buses: X1 must mark the
// channels both requested and enabled, PA must be high when any is.
module tb_c432_m1;
  logic [8:0] E, A, X1;
  logic PA;
  int checks = 0, failures = 0;

  c432_m1 u_dut (.E, .A, .PA, .X1);

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
    for (int t = 0; t < 2000; t++) begin
      bit any;
      E = (t < 9) ? 9'(1 << t) : 9'($urandom);
      A = (t < 9) ? 9'(1 << t) : 9'($urandom) & 9'($urandom);
      #1;
      any = 0;
      for (int i = 0; i < 9; i++) begin
        check(X1[i] == (E[i] && A[i]), $sformatf("X1[%0d] E=%h A=%h", i, E, A));
        if (E[i] && A[i]) any = 1;
      end
      check(PA == any, $sformatf("PA E=%h A=%h", E, A));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
