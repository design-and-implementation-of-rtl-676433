// s27: the ISCAS-89 benchmark s27, a small sequential circuit under test.
//
// Four inputs in[3:0], one output out, three D flip-flops q5, q6, q7 and
// ten gates (one NAND, one AND, two OR, four NOR, two NOT):
//     g14 = ~in[0]          g8  = g14 & q6        g12 = ~(in[1] | q7)
//     g13 = ~(in[2] | g12)  g15 = g12 | g8        g16 = in[3] | g8
//     g9  = ~(g16 & g15)    g11 = ~(q5 | g9)      g10 = ~(g14 | g11)
//     out = ~g11
//     next state: q5 <= g10, q6 <= g11, q7 <= g13
// The output is a Mealy output of the current state and inputs.
//
// Timing: the flip-flops load on the rising clock edge when en is high;
// clear (synchronous, priority) and rst_n (asynchronous, active low) set
// them to zero, so a test always starts from a known state.
//
// Stuck-at fault injection (fault port, see bist_pkg::fault_t). Net numbers:
//     0..3 in[0..3]   4 q5   5 q6   6 q7   7 g8   8 g9   9 g10   10 g11
//     11 g12  12 g13  13 g14  14 g15  15 g16  16 out
//
// The gate and flip-flop counts and the four-input, one-output interface
// follow the document; the wiring is that of the standard s27 netlist,
// which matches the document's drawing. The reset, clear and enable of the
// flip-flops are this design's choices.
module s27
  import bist_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       en,
  input  logic [3:0] in,
  input  fault_t     fault,
  output logic       out
);

  logic q5, q6, q7;
  logic [3:0] fin;
  logic fq5, fq6, fq7, g8, g9, g10, g11, g12, g13, g14, g15, g16;

  always_comb begin
    for (int unsigned i = 0; i < 4; i++) fin[i] = fault_net(fault, i, in[i]);
    fq5 = fault_net(fault, 4, q5);
    fq6 = fault_net(fault, 5, q6);
    fq7 = fault_net(fault, 6, q7);
    g14 = fault_net(fault, 13, ~fin[0]);
    g8  = fault_net(fault, 7,  g14 & fq6);
    g12 = fault_net(fault, 11, ~(fin[1] | fq7));
    g13 = fault_net(fault, 12, ~(fin[2] | g12));
    g15 = fault_net(fault, 14, g12 | g8);
    g16 = fault_net(fault, 15, fin[3] | g8);
    g9  = fault_net(fault, 8,  ~(g16 & g15));
    g11 = fault_net(fault, 10, ~(fq5 | g9));
    g10 = fault_net(fault, 9,  ~(g14 | g11));
    out = fault_net(fault, 16, ~g11);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {q5, q6, q7} <= '0;
    end else if (clear) begin
      {q5, q6, q7} <= '0;
    end else if (en) begin
      q5 <= g10;
      q6 <= g11;
      q7 <= g13;
    end
  end

endmodule
