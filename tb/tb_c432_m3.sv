// tb_c432_m3: checks M3: PC is high only when an enabled bus-C request exists
// and neither X1 nor X2 holds a request.
module tb_c432_m3;
  logic [8:0] X2, X1, E, C;
  logic PC;
  int checks = 0, failures = 0;

  c432_m3 u_dut (.X2, .X1, .E, .C, .PC);

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
    for (int t = 0; t < 3000; t++) begin
      int nc;
      X1 = (t % 4 == 1) ? 9'(1 << ($urandom % 9)) : '0;
      X2 = (t % 4 == 2) ? 9'(1 << ($urandom % 9)) : '0;
      E = 9'($urandom);
      C = 9'($urandom) & 9'($urandom);
      #1;
      nc = 0;
      for (int i = 0; i < 9; i++) nc += int'(E[i] && C[i]);
      check(PC == (nc > 0 && X1 == 0 && X2 == 0),
            $sformatf("PC X1=%h X2=%h E=%h C=%h", X1, X2, E, C));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
