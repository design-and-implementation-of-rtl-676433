// c17: the ISCAS-85 benchmark c17, a circuit under test of six NAND gates.
//
// Five inputs a..e, two outputs F and G:
//     n1 = ~(a & b)    n2 = ~(b & d)    n3 = ~(c & n2)    n4 = ~(n2 & e)
//     F  = ~(n1 & n3)  G  = ~(n3 & n4)
// Purely combinational.
//
// Stuck-at fault injection (fault port, see bist_pkg::fault_t). Net numbers:
//     0 a   1 b   2 c   3 d   4 e   5 n1   6 n2   7 n3   8 n4   9 F   10 G
// A fault on an input net affects every gate that input feeds (a stem
// fault). Tie fault to bist_pkg::NO_FAULT for the fault-free circuit.
//
// The gate count, the gate type and the input/output names follow the
// document; the wiring is that of the standard c17 netlist, which matches
// the document's drawing. Fault injection is this design's means of making
// the faulty circuits the document tests.
module c17
  import bist_pkg::*;
(
  input  logic   a,
  input  logic   b,
  input  logic   c,
  input  logic   d,
  input  logic   e,
  input  fault_t fault,
  output logic   F,
  output logic   G
);

  logic fa, fb, fc, fd, fe, n1, n2, n3, n4;

  always_comb begin
    fa = fault_net(fault, 0, a);
    fb = fault_net(fault, 1, b);
    fc = fault_net(fault, 2, c);
    fd = fault_net(fault, 3, d);
    fe = fault_net(fault, 4, e);
    n1 = fault_net(fault, 5, ~(fa & fb));
    n2 = fault_net(fault, 6, ~(fb & fd));
    n3 = fault_net(fault, 7, ~(fc & n2));
    n4 = fault_net(fault, 8, ~(n2 & fe));
    F  = fault_net(fault, 9, ~(n1 & n3));
    G  = fault_net(fault, 10, ~(n3 & n4));
  end

endmodule
