// ora: output response analyser, the comparator of the self-test.
//
// Each clock of a test the CUT's response is compared bit by bit with the
// expected response (an XOR per output, OR-reduced). The expected response
// comes from a fault-free copy of the CUT driven by the same patterns. Any
// difference makes the result `fail` high until the next clear; the
// analyser also counts the failing patterns and keeps the number of the
// first one, the diagnostic data of the test.
//
// Interface:  clear        zero the verdict and the counters (next clock).
//             en           compare this clock's responses.
//             pattern_idx  number of the pattern being compared.
//             cut_out, ref_out   responses of the CUT and of the reference.
//             mismatch     combinational, this clock's comparison.
//             fail, fail_count, first_fail   registered, updated at the
//                          end of each compared clock.
// rst_n is an asynchronous active-low reset. fail_count saturates.
//
// The document compares the CUT output with the fault-free output by XOR
// and calls the circuit faulty on any difference; the counters are this
// design's form of the diagnostic data its self-test reports.
module ora #(
  parameter int unsigned W     = 7,
  parameter int unsigned IDX_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [IDX_W-1:0] pattern_idx,
  input  logic [W-1:0]     cut_out,
  input  logic [W-1:0]     ref_out,
  output logic             mismatch,
  output logic             fail,
  output logic [IDX_W-1:0] fail_count,
  output logic [IDX_W-1:0] first_fail
);

  always_comb mismatch = |(cut_out ^ ref_out);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fail       <= 1'b0;
      fail_count <= '0;
      first_fail <= '0;
    end else if (clear) begin
      fail       <= 1'b0;
      fail_count <= '0;
      first_fail <= '0;
    end else if (en && mismatch) begin
      fail <= 1'b1;
      if (!fail) first_fail <= pattern_idx;
      if (fail_count != '1) fail_count <= fail_count + 1'b1;
    end
  end

  // The verdict is sticky: once set, only clear (or reset) removes it.
  assert property (@(posedge clk) disable iff (!rst_n) fail && !clear |=> fail);

endmodule
