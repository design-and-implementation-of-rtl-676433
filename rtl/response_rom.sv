// response_rom: memory of the expected (fault-free) CUT responses.
//
// Holds one W-bit response per pattern of a test, DEPTH patterns in all.
// The word for pattern k is read with addr = k; the read is combinational
// so the expected value is available in the same clock as the CUT's
// response. Addresses at or beyond DEPTH read as zero.
//
// The contents come in as one packed parameter, word k in bits
// [k*W +: W]. The self-test modules compute it at elaboration from the
// pattern sequence and the CUT's function, so the memory always matches
// the LFSR seed, polynomial and test length in use; no data file is read.
// Synthesis maps it to a ROM (DEPTH x W bits).
//
// The document stores the expected outputs for every test vector in the
// response analyser; the memory organisation is this design's choice.
module response_rom #(
  parameter int unsigned          DEPTH    = 31,
  parameter int unsigned          W        = 2,
  parameter int unsigned          IDX_W    = $clog2(DEPTH + 1),
  parameter logic [DEPTH*W-1:0]   CONTENTS = '0
) (
  input  logic [IDX_W-1:0] addr,
  output logic [W-1:0]     data
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0] mem [DEPTH];

  // ROM initialisation from the parameter; nothing writes mem afterwards.
  initial
    for (int unsigned k = 0; k < DEPTH; k++) mem[k] = CONTENTS[k*W +: W];

  always_comb data = (32'(addr) < DEPTH) ? mem[AW'(addr)] : '0;

endmodule
