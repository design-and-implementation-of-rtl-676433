// tb_c17: checks c17 exhaustively: all 32 input combinations against the
// truth of the NAND network, fault free and under each of the 22 single
// stuck-at faults; and that every fault changes the output for at least
// one input (all are detectable).
module tb_c17;
  import bist_pkg::*;
  import bist_model_pkg::*;

  logic [4:0] in;
  fault_t fault;
  logic F, G;
  int checks = 0, failures = 0;

  c17 u_dut (.a(in[0]), .b(in[1]), .c(in[2]), .d(in[3]), .e(in[4]), .fault, .F, .G);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Fault free: F = (a & b) | (c & ~(b & d)), G = (c & ~(b & d)) | (e & ~(b & d)) ... via NAND.
    fault = NO_FAULT;
    for (int v = 0; v < 32; v++) begin
      bit a, b, c, d, e, expF, expG;
      {e, d, c, b, a} = 5'(v);
      expF = (a & b) | (c & !(b & d));
      expG = (c & !(b & d)) | (e & !(b & d));
      in = 5'(v);
      #1;
      check({F, G} == {expF, expG}, $sformatf("fault free, input %b", in));
    end
    for (int site = 0; site < 11; site++)
      for (int val = 0; val < 2; val++) begin
        bit detected = 0;
        fault = '{enable: 1'b1, site: FAULT_SITE_W'(site), value: 1'(val)};
        for (int v = 0; v < 32; v++) begin
          logic [1:0] exp;
          in = 5'(v);
          exp = c17_model(5'(v), 1, site, 1'(val));
          #1;
          check({F, G} == exp, $sformatf("site %0d s-a-%0d input %b", site, val, in));
          if (exp != c17_model(5'(v), 0, 0, 0)) detected = 1;
        end
        check(detected, $sformatf("site %0d s-a-%0d undetectable", site, val));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
