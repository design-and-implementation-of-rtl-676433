// misr: multiple input signature register compacting the CUT responses.
//
// A WIDTH-stage LFSR with parallel inputs: on every enabled clock
//     sig <= {sig[WIDTH-2:0], ^(sig & TAPS)} ^ {zero-extended data_in}
// so after a test the register holds a signature of the whole response
// stream. A fault that changes any response changes the signature except
// with aliasing probability about 2**-WIDTH.
//
// Interface:  clear  sets the signature to zero on the next clock (priority).
//             en     folds data_in (IN_W bits, IN_W <= WIDTH) into it.
//             sig    the registered signature.
// rst_n is an asynchronous active-low reset to zero.
//
// The document compacts the CUT output with a MISR and compares the result
// with a fault-free signature; the width, polynomial and clear are this
// design's choices.
module misr
  import bist_pkg::*;
#(
  parameter int unsigned     WIDTH = 16,
  parameter int unsigned     IN_W  = 7,
  parameter logic [WIDTH-1:0] TAPS = WIDTH'(lfsr_taps(WIDTH))
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [IN_W-1:0]  data_in,
  output logic [WIDTH-1:0] sig
);

  logic [WIDTH-1:0] shifted;

  always_comb shifted = {sig[WIDTH-2:0], ^(sig & TAPS)} ^ WIDTH'(data_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (clear) sig <= '0;
    else if (en)    sig <= shifted;
  end

  initial assert (IN_W <= WIDTH) else $error("misr: IN_W must not exceed WIDTH");

endmodule
