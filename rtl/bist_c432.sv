// bist_c432: complete LFSR-based self-test of the c432 interrupt controller.
//
// Data path: a 36-stage LFSR generates one pattern per clock; the phase
// shifter spreads it over the 36 CUT inputs, E = bits 8:0, A = 17:9,
// B = 26:18, C = 35:27. The pattern drives the circuit under test, which
// may carry an injected stuck-at fault. The response analyser compares its
// seven outputs {PA, PB, PC, Chan[3:0]} with the expected ones every clock, and a 16-bit MISR compacts the CUT's
// responses into a signature. The controller runs TEST_LEN patterns
// (default 4096; exhaustive testing of 36 inputs is out of reach).
//
// Interface:  bist_on        start a test (hold high until done).
//             fault          stuck-at fault to inject into the CUT
//                            (bist_pkg::fault_t, net numbers in c432).
//             done, accept   test finished; accept = no mismatch seen.
//             mismatch       CUT and expected response differ this clock.
//             fail_count, first_fail, signature   diagnostic data.
//             pattern, response   the pattern applied and the CUT's
//                            response {PA, PB, PC, Chan} this clock.
// Timing: done rises TEST_LEN + 2 clocks after bist_on is first sampled
// high (see bist_controller).
//
// Expected responses (STORED_RESPONSES): by default they are read from a
// response memory (response_rom) filled at elaboration with the fault-free
// response to every pattern of the test, addressed by the pattern number.
// With STORED_RESPONSES = 0 a fault-free reference copy of the CUT, driven
// by the same patterns, supplies them instead. Both give the same verdict.
//
// The chain LFSR -> CUT -> comparator with stored expected outputs, and the
// alternative of comparing against a fault-free copy, follow the document;
// the phase shifter and MISR come from its general self-test architecture;
// sizes, pattern count and bit assignment are this design's choices.
module bist_c432
  import bist_pkg::*;
#(
  parameter int unsigned TEST_LEN = 4096,
  parameter int unsigned MISR_W   = 16,
  parameter int unsigned IDX_W    = $clog2(TEST_LEN + 1),
  parameter bit          STORED_RESPONSES = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bist_on,
  input  fault_t            fault,
  output logic              done,
  output logic              accept,
  output logic              fail,
  output logic              mismatch,
  output logic [IDX_W-1:0]  fail_count,
  output logic [IDX_W-1:0]  first_fail,
  output logic [MISR_W-1:0] signature,
  output logic [35:0]       pattern,
  output logic [6:0]        response
);

  localparam int unsigned NIN = 36, NOUT = 7;

  bist_state_t      state;
  logic             init, run;
  logic [IDX_W-1:0] pattern_idx;
  logic [NIN-1:0]   lfsr_q;
  logic [NOUT-1:0]  ref_resp;

  bist_controller #(.TEST_LEN(TEST_LEN), .IDX_W(IDX_W)) u_ctrl (
    .clk, .rst_n, .bist_on, .fail, .state, .init, .run, .pattern_idx, .done, .accept
  );

  lfsr #(.WIDTH(NIN)) u_lfsr (.clk, .rst_n, .load(init), .en(run), .state(lfsr_q));

  phase_shifter #(.WIDTH(NIN)) u_ps (.in(lfsr_q), .out(pattern));

  c432 u_cut (.E(pattern[8:0]), .A(pattern[17:9]), .B(pattern[26:18]), .C(pattern[35:27]),
              .fault(fault), .PA(response[6]), .PB(response[5]), .PC(response[4]),
              .Chan(response[3:0]));

  // Fault-free response {PA, PB, PC, Chan} to every pattern of the test,
  // word k = pattern k: the first bus (A, B, C) with an enabled request
  // wins, and within it the lowest channel.
  function automatic logic [TEST_LEN*NOUT-1:0] expected_responses();
    logic [TEST_LEN*NOUT-1:0] r;
    logic [63:0] s, p;
    logic [8:0] e, req [3];
    logic [6:0] v;
    s = 64'hF_FFFF_FFFF;
    for (int unsigned k = 0; k < TEST_LEN; k++) begin
      p = phase_map(s, NIN);
      e = p[8:0];
      req[0] = p[17:9] & e;
      req[1] = p[26:18] & e;
      req[2] = p[35:27] & e;
      v = {3'b000, 4'hF};
      for (int b = 2; b >= 0; b--)
        if (req[b] != '0) begin
          v[6:4] = 3'(3'b100 >> b);
          for (int i = 8; i >= 0; i--) if (req[b][i]) v[3:0] = 4'(i);
        end
      r[k*NOUT +: NOUT] = v;
      s = lfsr_step(s, NIN);
    end
    return r;
  endfunction

  generate
    if (STORED_RESPONSES) begin : g_stored
      response_rom #(.DEPTH(TEST_LEN), .W(NOUT), .IDX_W(IDX_W),
                     .CONTENTS(expected_responses())) u_rom (
        .addr(pattern_idx), .data(ref_resp)
      );
    end else begin : g_reference
      c432 u_ref (.E(pattern[8:0]), .A(pattern[17:9]), .B(pattern[26:18]), .C(pattern[35:27]),
                  .fault(NO_FAULT), .PA(ref_resp[6]), .PB(ref_resp[5]), .PC(ref_resp[4]),
                  .Chan(ref_resp[3:0]));
    end
  endgenerate

  ora #(.W(NOUT), .IDX_W(IDX_W)) u_ora (
    .clk, .rst_n, .clear(init), .en(run), .pattern_idx,
    .cut_out(response), .ref_out(ref_resp), .mismatch, .fail, .fail_count, .first_fail
  );

  misr #(.WIDTH(MISR_W), .IN_W(NOUT)) u_misr (
    .clk, .rst_n, .clear(init), .en(run), .data_in(response), .sig(signature)
  );

endmodule
