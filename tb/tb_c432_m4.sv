// tb_c432_m4: checks M4: for each winner (none, A, B, C) the output must be the
// enabled request vector of that bus.
module tb_c432_m4;
  logic PA, PB, PC;
  logic [8:0] E, A, B, C, sel;
  int checks = 0, failures = 0;

  c432_m4 u_dut (.PA, .PB, .PC, .E, .A, .B, .C, .sel);

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
      int w;
      logic [8:0] exp;
      w = t % 4;
      {PA, PB, PC} = (w == 0) ? 3'b000 : 3'(4 >> (w - 1));
      E = 9'($urandom); A = 9'($urandom); B = 9'($urandom); C = 9'($urandom);
      #1;
      for (int i = 0; i < 9; i++) begin
        case (w)
          0: exp[i] = 1'b0;
          1: exp[i] = E[i] && A[i];
          2: exp[i] = E[i] && B[i];
          default: exp[i] = E[i] && C[i];
        endcase
      end
      check(sel == exp, $sformatf("winner %0d E=%h A=%h B=%h C=%h", w, E, A, B, C));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
