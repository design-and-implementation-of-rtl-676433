// c432_m5: channel encoder (module M5 of the c432 interrupt controller).
//
// A priority encoder from the selected request vector to the 4-bit channel
// number Chan: the lowest-numbered set bit wins (bit 0 has the highest
// priority inside a bus). When no bit is set Chan is all ones, a value no
// channel has. Combinational.
//
// The 9-bit input and the 4-bit Chan output are the document's; which bit
// position wins and the idle code are this design's choices.
module c432_m5 #(
  parameter int unsigned CH = 9,
  parameter int unsigned CW = 4
) (
  input  logic [CH-1:0] sel,
  output logic [CW-1:0] Chan
);

  always_comb begin
    Chan = '1;
    for (int i = CH - 1; i >= 0; i--) begin
      if (sel[i]) Chan = CW'(i);
    end
  end

endmodule
