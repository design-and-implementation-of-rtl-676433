// tb_c432: checks the interrupt controller.
// Fault free: random patterns with a biased enable (so every bus wins
// often) plus directed cases (single requests on every channel of every
// bus, disabled requests, nothing requesting), against a model that scans
// bus A, then B, then C for the lowest enabled channel. Under faults:
// every one of the 140 single stuck-at faults against the fault model.
module tb_c432;
  import bist_pkg::*;
  import bist_model_pkg::*;

  logic [8:0] E, A, B, C;
  fault_t fault;
  logic PA, PB, PC;
  logic [3:0] Chan;
  int checks = 0, failures = 0;
  int won[3] = '{0, 0, 0};

  c432 u_dut (.E, .A, .B, .C, .fault, .PA, .PB, .PC, .Chan);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [8:0] e, a, b, c, input string tag);
    logic [6:0] exp;
    E = e; A = a; B = b; C = c;
    #1;
    exp = c432_model(e, a, b, c);
    check({PA, PB, PC, Chan} == exp,
          $sformatf("%s E=%h A=%h B=%h C=%h got %b exp %b", tag, e, a, b, c,
                    {PA, PB, PC, Chan}, exp));
    if (PA) won[0]++;
    if (PB) won[1]++;
    if (PC) won[2]++;
  endtask

  initial begin
    fault = NO_FAULT;
    apply('0, '0, '0, '0, "idle");
    check(Chan == 4'hF && !PA && !PB && !PC, "idle code");
    apply(9'h1FF, '0, '0, '0, "enabled, no requests");
    apply('0, 9'h1FF, 9'h1FF, 9'h1FF, "all requests disabled");
    for (int i = 0; i < 9; i++) begin
      apply(9'h1FF, 9'(1 << i), '0, '0, "single A");
      check(PA && Chan == 4'(i), "single A channel");
      apply(9'h1FF, '0, 9'(1 << i), '0, "single B");
      check(PB && Chan == 4'(i), "single B channel");
      apply(9'h1FF, '0, '0, 9'(1 << i), "single C");
      check(PC && Chan == 4'(i), "single C channel");
      apply(~9'(1 << i), 9'(1 << i), '0, 9'(1 << i), "masked A, C wins");
      apply(9'h1FF, 9'(1 << i), 9'h1FF, 9'h1FF, "A beats B and C");
    end
    for (int t = 0; t < 3000; t++) begin
      logic [8:0] e;
      e = 9'($urandom) & 9'($urandom) & 9'($urandom);
      apply(e, 9'($urandom) & 9'($urandom), 9'($urandom), 9'($urandom), "random");
    end
    check(won[0] > 100 && won[1] > 100 && won[2] > 100, "every bus won often");
    for (int site = 0; site < 70; site++)
      for (int val = 0; val < 2; val++) begin
        fault = '{enable: 1'b1, site: FAULT_SITE_W'(site), value: 1'(val)};
        for (int t = 0; t < 60; t++) begin
          logic [35:0] p;
          logic [6:0] exp;
          p = {$urandom, $urandom} & 36'hF_FFFF_FFFF;
          if (t % 2 == 0) p[8:0] = p[8:0] & 9'($urandom) & 9'($urandom);
          {C, B, A, E} = p;
          #1;
          exp = c432_fault_model(p, 1, site, 1'(val));
          check({PA, PB, PC, Chan} == exp,
                $sformatf("site %0d s-a-%0d pattern %h got %b exp %b", site, val, p,
                          {PA, PB, PC, Chan}, exp));
        end
      end
    $display("bus wins: A %0d B %0d C %0d", won[0], won[1], won[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
