// phase_shifter: XOR network between the LFSR and the circuit under test.
//
// Successive states of a Fibonacci LFSR are shifted copies of one another,
// so neighbouring CUT inputs would see the same bit stream one clock apart.
// The phase shifter XORs each stage with its upper neighbour,
//     out[i] = in[i] ^ in[i+1]   for i < WIDTH-1,   out[WIDTH-1] = in[WIDTH-1],
// which gives every output a sequence of its own phase. The map is upper
// triangular with ones on the diagonal, hence invertible: it never maps two
// LFSR states to the same pattern, so an exhaustive LFSR sequence stays
// exhaustive after it.
//
// Purely combinational, no clock. The document says the phase shifter sits
// between the LFSR and the CUT and is built of XOR gates; which stages are
// XORed together is this design's choice.
module phase_shifter #(
  parameter int unsigned WIDTH = 36
) (
  input  logic [WIDTH-1:0] in,
  output logic [WIDTH-1:0] out
);

  always_comb begin
    for (int unsigned i = 0; i < WIDTH - 1; i++) out[i] = in[i] ^ in[i+1];
    out[WIDTH-1] = in[WIDTH-1];
  end

endmodule
