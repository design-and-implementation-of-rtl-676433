// lfsr: linear feedback shift register used as the test pattern generator.
//
// A Fibonacci LFSR of WIDTH stages. On every enabled clock the register
// shifts one place towards its top bit and the new bit 0 is the XOR of the
// stages selected by TAPS. With the default taps from bist_pkg::lfsr_taps()
// the feedback polynomial is primitive, so the register visits all
// 2**WIDTH-1 non-zero states before it repeats; the all-zero state is never
// reached from a non-zero seed. One new pattern per clock.
//
// Interface:  load  (priority over en) puts SEED into the register on the
//                    next clock edge; the controller uses it to start a test.
//             en    advances the register by one step.
//             state the current pattern, registered (no combinational path
//                    from any input).
// rst_n is an asynchronous active-low reset to SEED.
//
// The document makes the LFSR the pattern source of each self-test, with
// as many stages as the CUT has inputs; the polynomial, seed and reset are
// this design's choices (see bist_pkg).
module lfsr
  import bist_pkg::*;
#(
  parameter int unsigned     WIDTH = 36,
  parameter logic [WIDTH-1:0] TAPS = WIDTH'(lfsr_taps(WIDTH)),
  parameter logic [WIDTH-1:0] SEED = '1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             en,
  output logic [WIDTH-1:0] state
);

  logic feedback;

  always_comb feedback = ^(state & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (load) state <= SEED;
    else if (en)   state <= {state[WIDTH-2:0], feedback};
  end

  initial begin
    assert (WIDTH >= 2) else $error("lfsr: WIDTH must be at least 2");
    assert (SEED != '0) else $error("lfsr: an all-zero seed locks the register");
  end

endmodule
