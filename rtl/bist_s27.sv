// bist_s27: complete LFSR-based self-test of the s27 benchmark circuit.
//
// Data path: a 4-stage LFSR generates one pattern per clock; the phase
// shifter spreads it over the four CUT inputs in[3:0]. The pattern
// drives the sequential circuit under test, which may carry an injected
// stuck-at fault; it clears its three flip-flops when the test starts and
// clocks them once per pattern, so a fault that corrupts the state shows up
// in later responses too. The response analyser compares its output with
// the expected one every clock, and a 16-bit MISR
// compacts the CUT's output stream into a signature. The controller runs
// TEST_LEN patterns; the default 30 is two full LFSR periods, so every
// non-zero input pattern is applied twice, each time after a different
// input history.
//
// Interface:  bist_on        start a test (hold high until done).
//             fault          stuck-at fault to inject into the CUT
//                            (bist_pkg::fault_t, net numbers in s27).
//             done, accept   test finished; accept = no mismatch seen.
//             mismatch       CUT and expected response differ this clock.
//             fail_count, first_fail, signature   diagnostic data.
//             pattern, response   the pattern applied and the CUT's
//                            output this clock.
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
module bist_s27
  import bist_pkg::*;
#(
  parameter int unsigned TEST_LEN = 30,
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
  output logic [3:0]        pattern,
  output logic [0:0]        response
);

  localparam int unsigned NIN = 4, NOUT = 1;

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

  s27 u_cut (.clk, .rst_n, .clear(init), .en(run), .in(pattern), .fault(fault),
             .out(response[0]));

  // Fault-free output for every pattern of the test, starting from the
  // cleared state, word k = pattern k.
  function automatic logic [TEST_LEN*NOUT-1:0] expected_responses();
    logic [TEST_LEN*NOUT-1:0] r;
    logic [63:0] s, p;
    logic q5, q6, q7, g8, g9, g10, g11, g12, g13, g14, g15, g16;
    s = 64'((1 << NIN) - 1);
    {q5, q6, q7} = '0;
    for (int unsigned k = 0; k < TEST_LEN; k++) begin
      p   = phase_map(s, NIN);
      g14 = ~p[0];
      g8  = g14 & q6;
      g12 = ~(p[1] | q7);
      g13 = ~(p[2] | g12);
      g15 = g12 | g8;
      g16 = p[3] | g8;
      g9  = ~(g16 & g15);
      g11 = ~(q5 | g9);
      g10 = ~(g14 | g11);
      r[k*NOUT +: NOUT] = ~g11;
      q5 = g10;
      q6 = g11;
      q7 = g13;
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
      s27 u_ref (.clk, .rst_n, .clear(init), .en(run), .in(pattern), .fault(NO_FAULT),
                 .out(ref_resp[0]));
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
