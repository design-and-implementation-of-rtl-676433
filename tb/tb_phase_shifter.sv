// tb_phase_shifter: checks the XOR network against the reference map for
// random 36-bit inputs, and that the 5-bit instance maps the 32 inputs to
// 32 different outputs (the map is invertible).
module tb_phase_shifter;
  import bist_model_pkg::*;

  logic [35:0] in36, out36;
  logic [4:0]  in5, out5;
  int checks = 0, failures = 0;

  phase_shifter              u36 (.in(in36), .out(out36));
  phase_shifter #(.WIDTH(5)) u5  (.in(in5), .out(out5));

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
    bit seen[32];
    for (int t = 0; t < 500; t++) begin
      in36 = {$urandom, $urandom} & 36'hF_FFFF_FFFF;
      #1;
      check(out36 == 36'(phase_shift({28'd0, in36}, 36)),
            $sformatf("36-bit map of %h gave %h", in36, out36));
    end
    for (int v = 0; v < 32; v++) begin
      in5 = 5'(v);
      #1;
      check(out5 == 5'(phase_shift(64'(v), 5)), $sformatf("5-bit map of %0d", v));
      check(!seen[out5], $sformatf("5-bit map not one-to-one at %0d", v));
      seen[out5] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
