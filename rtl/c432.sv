// c432: the ISCAS-85 benchmark c432, a 27-channel interrupt controller.
//
// 27 interrupt requests arrive on three 9-bit buses A, B and C; a 9-bit
// enable bus E masks channel i of all three buses at once. 36 inputs and
// 7 outputs. The controller reports which bus holds the winning request
// (PA, PB, PC, at most one high; bus A beats B beats C) and the number of
// the winning channel on that bus (Chan, 0..8, lowest bit number first;
// all ones when nothing requests). Purely combinational.
//
// Structure, as five sub-modules wired like the document's block diagram:
//     M1 (E, A)                 -> PA, X1      enabled bus-A requests
//     M2 (X1, E, B)             -> PB, X2      enabled bus-B requests
//     M3 (X2, X1, E, C)         -> PC
//     M4 (PA, PB, PC, E, A, B, C) -> sel       requests of the winning bus
//     M5 (sel)                  -> Chan        priority encoder
//
// Stuck-at fault injection (fault port, see bist_pkg::fault_t) acts on the
// nets between the sub-modules. Net numbers:
//     0..8 E[0..8]     9..17 A[0..8]    18..26 B[0..8]   27..35 C[0..8]
//     36..44 X1[0..8]  45..53 X2[0..8]  54..62 sel[0..8]
//     63 PA  64 PB  65 PC  66..69 Chan[0..3]
//
// The function, the bus names and widths, the split into M1..M5 and their
// connections follow the document; it does not give the gate netlist, so
// each sub-module is written at register-transfer level and the priority
// order inside a bus and the idle channel code are this design's choices.
module c432
  import bist_pkg::*;
#(
  parameter int unsigned CH = 9,
  parameter int unsigned CW = 4
) (
  input  logic [CH-1:0] E,
  input  logic [CH-1:0] A,
  input  logic [CH-1:0] B,
  input  logic [CH-1:0] C,
  input  fault_t        fault,
  output logic          PA,
  output logic          PB,
  output logic          PC,
  output logic [CW-1:0] Chan
);

  localparam int unsigned S_E = 0, S_A = CH, S_B = 2*CH, S_C = 3*CH;
  localparam int unsigned S_X1 = 4*CH, S_X2 = 5*CH, S_SEL = 6*CH;
  localparam int unsigned S_PA = 7*CH, S_PB = 7*CH + 1, S_PC = 7*CH + 2;
  localparam int unsigned S_CHAN = 7*CH + 3;

  // Raw sub-module outputs and the (possibly faulty) nets they drive.
  logic [CH-1:0] fE, fA, fB, fC;
  logic [CH-1:0] x1_raw, x2_raw, sel_raw, fX1, fX2, fSel;
  logic          pa_raw, pb_raw, pc_raw, fPA, fPB, fPC;
  logic [CW-1:0] chan_raw;

  always_comb begin
    for (int unsigned i = 0; i < CH; i++) begin
      fE[i] = fault_net(fault, S_E + i, E[i]);
      fA[i] = fault_net(fault, S_A + i, A[i]);
      fB[i] = fault_net(fault, S_B + i, B[i]);
      fC[i] = fault_net(fault, S_C + i, C[i]);
    end
  end

  always_comb
    for (int unsigned i = 0; i < CH; i++) fX1[i] = fault_net(fault, S_X1 + i, x1_raw[i]);

  always_comb
    for (int unsigned i = 0; i < CH; i++) fX2[i] = fault_net(fault, S_X2 + i, x2_raw[i]);

  always_comb
    for (int unsigned i = 0; i < CH; i++) fSel[i] = fault_net(fault, S_SEL + i, sel_raw[i]);

  always_comb fPA = fault_net(fault, S_PA, pa_raw);
  always_comb fPB = fault_net(fault, S_PB, pb_raw);
  always_comb fPC = fault_net(fault, S_PC, pc_raw);

  always_comb
    for (int unsigned i = 0; i < CW; i++) Chan[i] = fault_net(fault, S_CHAN + i, chan_raw[i]);

  always_comb begin
    PA = fPA;
    PB = fPB;
    PC = fPC;
  end

  c432_m1 #(.CH(CH)) u_m1 (.E(fE), .A(fA), .PA(pa_raw), .X1(x1_raw));
  c432_m2 #(.CH(CH)) u_m2 (.X1(fX1), .E(fE), .B(fB), .PB(pb_raw), .X2(x2_raw));
  c432_m3 #(.CH(CH)) u_m3 (.X2(fX2), .X1(fX1), .E(fE), .C(fC), .PC(pc_raw));
  c432_m4 #(.CH(CH)) u_m4 (.PA(fPA), .PB(fPB), .PC(fPC), .E(fE), .A(fA), .B(fB), .C(fC),
                           .sel(sel_raw));
  c432_m5 #(.CH(CH), .CW(CW)) u_m5 (.sel(fSel), .Chan(chan_raw));

endmodule
