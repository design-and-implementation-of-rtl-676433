// tb_c432_m2: checks M2: X2 marks the enabled bus-B requests; PB is high only
// when one exists and X1 (bus A) is empty.
module tb_c432_m2;
  logic [8:0] X1, E, B, X2;
  logic PB;
  int checks = 0, failures = 0;

  c432_m2 u_dut (.X1, .E, .B, .PB, .X2);

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
      int nb;
      X1 = (t % 3 == 0) ? 9'($urandom) : '0;
      E = 9'($urandom);
      B = 9'($urandom) & 9'($urandom);
      #1;
      nb = 0;
      for (int i = 0; i < 9; i++) begin
        check(X2[i] == (E[i] && B[i]), $sformatf("X2[%0d]", i));
        nb += int'(E[i] && B[i]);
      end
      check(PB == (nb > 0 && X1 == 0), $sformatf("PB X1=%h E=%h B=%h", X1, E, B));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
