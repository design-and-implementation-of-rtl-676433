// tb_s27: checks the sequential benchmark against the gate-level model:
// random input sequences, fault free and under each of the 34 single
// stuck-at faults, comparing the output every clock. Also checks clear
// and that en low freezes the state.
module tb_s27;
  import bist_pkg::*;
  import bist_model_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0, en = 1'b0;
  logic [3:0] in = '0;
  fault_t fault = NO_FAULT;
  logic out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  s27 u_dut (.clk, .rst_n, .clear, .en, .in, .fault, .out);

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

  // Runs n random clocks from the cleared state and compares with the model.
  task automatic run_seq(input bit fen, input int site, input bit fval, input int n);
    logic [2:0] st;
    logic exp;
    fault = '{enable: fen, site: FAULT_SITE_W'(site), value: fval};
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    en = 1'b1;
    st = '0;
    for (int t = 0; t < n; t++) begin
      in = 4'($urandom);
      #1;
      exp = s27_model(in, st, fen, site, fval);
      check(out == exp, $sformatf("fault %0d/%0d/%0d clock %0d input %b", fen, site, fval, t, in));
      @(negedge clk);
    end
    en = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_seq(0, 0, 0, 200);
    for (int site = 0; site < 17; site++)
      for (int val = 0; val < 2; val++) run_seq(1, site, 1'(val), 40);
    // en low freezes the state: output for a fixed input stays put.
    fault = NO_FAULT;
    begin
      logic [2:0] st;
      logic o1, o2;
      st = '0;
      clear = 1'b1; @(negedge clk); clear = 1'b0;
      en = 1'b1;
      in = 4'b0110; #1; o1 = s27_model(in, st, 0, 0, 0); @(negedge clk);
      in = 4'b1001; #1; o1 = s27_model(in, st, 0, 0, 0); @(negedge clk);
      en = 1'b0;
      in = 4'b0000;
      #1;
      o1 = out;
      repeat (3) @(negedge clk);
      o2 = out;
      check(o1 == o2, "en low freezes the state");
      begin
        logic [2:0] st2;
        st2 = st;
        check(o2 == s27_model(in, st2, 0, 0, 0), "frozen state matches the model");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
