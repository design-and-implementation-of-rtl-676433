// tb_response_rom: fills a 100-word, 7-bit memory with a known formula
// (word k = (k * 37 + 5) mod 128) and reads every address, plus addresses
// beyond the end, which must read as zero.
module tb_response_rom;
  localparam int D = 100;

  function automatic logic [D*7-1:0] fill();
    logic [D*7-1:0] q;
    for (int k = 0; k < D; k++) q[k*7 +: 7] = 7'((k * 37 + 5) % 128);
    return q;
  endfunction

  logic [6:0] addr;
  logic [6:0] data;
  int checks = 0, failures = 0;

  response_rom #(.DEPTH(D), .W(7), .IDX_W(7), .CONTENTS(fill())) u_dut (.addr, .data);

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
    #1;
    for (int k = 0; k < 128; k++) begin
      addr = 7'(k);
      #1;
      if (k < D) check(data == 7'((k * 37 + 5) % 128), $sformatf("word %0d = %0d", k, data));
      else       check(data == '0, $sformatf("address %0d beyond the end", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
