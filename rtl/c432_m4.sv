// c432_m4: winning-bus selector (module M4 of the c432 interrupt
// controller).
//
// Passes on the enabled request vector of the bus that won arbitration:
// E & A when PA, E & B when PB, E & C when PC, zero when no bus requests.
// At most one of PA, PB, PC is high, so the selection is an AND-OR.
// Combinational.
//
// The ports (PC, PB, PA, E, A, B, C in; a 9-bit vector out) are the
// document's; the selection rule is this design's reading of it.
module c432_m4 #(
  parameter int unsigned CH = 9
) (
  input  logic          PA,
  input  logic          PB,
  input  logic          PC,
  input  logic [CH-1:0] E,
  input  logic [CH-1:0] A,
  input  logic [CH-1:0] B,
  input  logic [CH-1:0] C,
  output logic [CH-1:0] sel
);

  always_comb sel = ({CH{PA}} & E & A) | ({CH{PB}} & E & B) | ({CH{PC}} & E & C);

endmodule
