// c432_m1: bus A request stage (module M1 of the c432 interrupt controller).
//
// X1 = E & A marks the enabled requests on bus A; PA is high when bus A
// has any enabled request. Bus A has the highest priority of the three
// buses, so PA needs no masking. Combinational.
//
// The ports (E, A in; PA, X1 out; widths 9, 9, 1, 9) are the document's;
// the logic inside is this design's reading of "enabled request".
module c432_m1 #(
  parameter int unsigned CH = 9
) (
  input  logic [CH-1:0] E,
  input  logic [CH-1:0] A,
  output logic          PA,
  output logic [CH-1:0] X1
);

  always_comb begin
    X1 = E & A;
    PA = |X1;
  end

endmodule
