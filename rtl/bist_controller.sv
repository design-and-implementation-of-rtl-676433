// bist_controller: sequencer of one LFSR-based self-test.
//
// A four-state machine (bist_pkg::bist_state_t):
//     IDLE  waits for bist_on.
//     INIT  one clock: init is high, so the LFSR loads its seed and the
//           CUT state, the analyser and the signature register clear.
//     RUN   TEST_LEN clocks: run is high, one pattern per clock, and
//           pattern_idx counts 0 .. TEST_LEN-1.
//     DONE  done is high and accept = ~fail (the analyser's verdict) until
//           bist_on falls; then back to IDLE. Holding bist_on high does not
//           restart the test.
// Timing: with bist_on sampled high at clock edge 0, init is high in the
// following cycle, the RUN cycles follow, and done rises TEST_LEN + 2 clock
// edges after edge 0.
// rst_n is an asynchronous active-low reset to IDLE.
//
// The document lists the controller as one of the four parts of a
// self-test and draws it with a start input and an accept/reject output;
// the states and the timing are this design's choices.
module bist_controller
  import bist_pkg::*;
#(
  parameter int unsigned TEST_LEN = 31,
  parameter int unsigned IDX_W    = $clog2(TEST_LEN + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bist_on,
  input  logic             fail,
  output bist_state_t      state,
  output logic             init,
  output logic             run,
  output logic [IDX_W-1:0] pattern_idx,
  output logic             done,
  output logic             accept
);

  localparam logic [IDX_W-1:0] LAST = IDX_W'(TEST_LEN - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_IDLE;
      pattern_idx <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (bist_on) state <= ST_INIT;
        ST_INIT: begin
          state       <= ST_RUN;
          pattern_idx <= '0;
        end
        ST_RUN: begin
          if (pattern_idx == LAST) state <= ST_DONE;
          else                     pattern_idx <= pattern_idx + 1'b1;
        end
        ST_DONE: if (!bist_on) state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    init   = (state == ST_INIT);
    run    = (state == ST_RUN);
    done   = (state == ST_DONE);
    accept = done && !fail;
  end

  // Protocol rules: one phase at a time, INIT is always followed by RUN,
  // and DONE is only entered from the last RUN clock.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0({init, run, done}));
  assert property (@(posedge clk) disable iff (!rst_n) init |=> run && pattern_idx == '0);
  assert property (@(posedge clk) disable iff (!rst_n)
                   $rose(done) |-> $past(run) && $past(pattern_idx) == LAST);

  initial assert (TEST_LEN >= 1 && TEST_LEN < (1 << IDX_W))
    else $error("bist_controller: TEST_LEN does not fit IDX_W");

endmodule
