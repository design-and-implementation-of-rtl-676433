// c432_m2: bus B request stage (module M2 of the c432 interrupt controller).
//
// X2 = E & B marks the enabled requests on bus B. PB is high when bus B
// has an enabled request and bus A has none (X1, from M1, all zero):
// bus B yields to bus A. Combinational.
//
// The ports (X1, E, B in; PB, X2 out) are the document's; the priority rule
// is this design's reading of it.
module c432_m2 #(
  parameter int unsigned CH = 9
) (
  input  logic [CH-1:0] X1,
  input  logic [CH-1:0] E,
  input  logic [CH-1:0] B,
  output logic          PB,
  output logic [CH-1:0] X2
);

  always_comb begin
    X2 = E & B;
    PB = (|X2) & ~(|X1);
  end

endmodule
