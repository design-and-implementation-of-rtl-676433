// lfsr_bist_top: three LFSR-based built-in self-tests side by side.
//
// Each of the three benchmark circuits c432 (a 27-channel interrupt
// controller, 36 inputs, 7 outputs), s27 (a sequential circuit with three
// flip-flops, 4 inputs, 1 output) and c17 (six NAND gates, 5 inputs,
// 2 outputs) has its own complete self-test: pattern-generating LFSR,
// phase shifter, circuit under test with a fault-injection port, fault-free
// reference copy, response comparator, signature register and controller.
// The three share only the clock and the reset; each has its own start
// input, fault request and results, so they can run alone or together.
//
// Per self-test X in {c432, s27, c17}:
//     X_bist_on     start the test, hold high until X_done.
//     X_fault       stuck-at fault to inject (bist_pkg::fault_t).
//     X_done, X_accept, X_fail, X_mismatch   verdict and per-clock compare.
//     X_fail_count, X_first_fail, X_signature   diagnostic data.
//     X_pattern, X_response   pattern applied and CUT response.
// Each test takes its pattern count plus two clocks from start to done
// (4098, 32 and 33 clocks with the default pattern counts).
//
// The three circuits and their LFSR-driven tests are the document's; that
// they sit in one top with separate controls is this design's choice.
module lfsr_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned C432_TEST_LEN = 4096,
  parameter int unsigned S27_TEST_LEN  = 30,
  parameter int unsigned C17_TEST_LEN  = 31,
  parameter int unsigned MISR_W        = 16,
  parameter int unsigned C432_IDX_W    = $clog2(C432_TEST_LEN + 1),
  parameter int unsigned S27_IDX_W     = $clog2(S27_TEST_LEN + 1),
  parameter int unsigned C17_IDX_W     = $clog2(C17_TEST_LEN + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // c432 self-test
  input  logic                  c432_bist_on,
  input  fault_t                c432_fault,
  output logic                  c432_done,
  output logic                  c432_accept,
  output logic                  c432_fail,
  output logic                  c432_mismatch,
  output logic [C432_IDX_W-1:0] c432_fail_count,
  output logic [C432_IDX_W-1:0] c432_first_fail,
  output logic [MISR_W-1:0]     c432_signature,
  output logic [35:0]           c432_pattern,
  output logic [6:0]            c432_response,
  // s27 self-test
  input  logic                  s27_bist_on,
  input  fault_t                s27_fault,
  output logic                  s27_done,
  output logic                  s27_accept,
  output logic                  s27_fail,
  output logic                  s27_mismatch,
  output logic [S27_IDX_W-1:0]  s27_fail_count,
  output logic [S27_IDX_W-1:0]  s27_first_fail,
  output logic [MISR_W-1:0]     s27_signature,
  output logic [3:0]            s27_pattern,
  output logic [0:0]            s27_response,
  // c17 self-test
  input  logic                  c17_bist_on,
  input  fault_t                c17_fault,
  output logic                  c17_done,
  output logic                  c17_accept,
  output logic                  c17_fail,
  output logic                  c17_mismatch,
  output logic [C17_IDX_W-1:0]  c17_fail_count,
  output logic [C17_IDX_W-1:0]  c17_first_fail,
  output logic [MISR_W-1:0]     c17_signature,
  output logic [4:0]            c17_pattern,
  output logic [1:0]            c17_response
);

  bist_c432 #(.TEST_LEN(C432_TEST_LEN), .MISR_W(MISR_W), .IDX_W(C432_IDX_W)) u_c432 (
    .clk, .rst_n, .bist_on(c432_bist_on), .fault(c432_fault),
    .done(c432_done), .accept(c432_accept), .fail(c432_fail), .mismatch(c432_mismatch),
    .fail_count(c432_fail_count), .first_fail(c432_first_fail),
    .signature(c432_signature), .pattern(c432_pattern), .response(c432_response)
  );

  bist_s27 #(.TEST_LEN(S27_TEST_LEN), .MISR_W(MISR_W), .IDX_W(S27_IDX_W)) u_s27 (
    .clk, .rst_n, .bist_on(s27_bist_on), .fault(s27_fault),
    .done(s27_done), .accept(s27_accept), .fail(s27_fail), .mismatch(s27_mismatch),
    .fail_count(s27_fail_count), .first_fail(s27_first_fail),
    .signature(s27_signature), .pattern(s27_pattern), .response(s27_response)
  );

  bist_c17 #(.TEST_LEN(C17_TEST_LEN), .MISR_W(MISR_W), .IDX_W(C17_IDX_W)) u_c17 (
    .clk, .rst_n, .bist_on(c17_bist_on), .fault(c17_fault),
    .done(c17_done), .accept(c17_accept), .fail(c17_fail), .mismatch(c17_mismatch),
    .fail_count(c17_fail_count), .first_fail(c17_first_fail),
    .signature(c17_signature), .pattern(c17_pattern), .response(c17_response)
  );

endmodule
