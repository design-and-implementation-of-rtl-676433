// tb_misr: checks the signature register against the reference step for
// a random response stream, the hold when en is low, clear, and that a
// single flipped response bit changes the final signature.
module tb_misr;
  import bist_model_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0, en = 1'b0;
  logic [6:0]  d = '0;
  logic [15:0] sig;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  misr u_dut (.clk, .rst_n, .clear, .en, .data_in(d), .sig);

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
    logic [63:0] m;
    logic [6:0] stream[200];
    logic [15:0] good_sig;
    for (int i = 0; i < 200; i++) stream[i] = 7'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(sig == '0, "reset to zero");
    for (int pass = 0; pass < 2; pass++) begin
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      check(sig == '0, "clear");
      m = '0;
      en = 1'b1;
      for (int i = 0; i < 200; i++) begin
        d = stream[i];
        if (pass == 1 && i == 117) d[3] = ~d[3];
        @(negedge clk);
        m = misr_next(m, 64'(d), 16);
        check(sig == m[15:0], $sformatf("pass %0d step %0d: %h vs %h", pass, i, sig, m[15:0]));
      end
      en = 1'b0;
      d = 7'h55;
      @(negedge clk);
      check(sig == m[15:0], "en low holds");
      if (pass == 0) good_sig = sig;
      else check(sig != good_sig, "one flipped bit changes the signature");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
