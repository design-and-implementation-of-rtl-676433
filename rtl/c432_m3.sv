// c432_m3: bus C request stage (module M3 of the c432 interrupt controller).
//
// PC is high when bus C has an enabled request (E & C) and neither bus A
// (X1) nor bus B (X2) has one: bus C has the lowest priority.
// Combinational.
//
// The ports (X2, X1, E, C in; PC out) are the document's; the priority
// rule is this design's reading of it.
module c432_m3 #(
  parameter int unsigned CH = 9
) (
  input  logic [CH-1:0] X2,
  input  logic [CH-1:0] X1,
  input  logic [CH-1:0] E,
  input  logic [CH-1:0] C,
  output logic          PC
);

  always_comb PC = (|(E & C)) & ~(|X1) & ~(|X2);

endmodule
