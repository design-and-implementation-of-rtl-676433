// bist_model_pkg: reference models for the self-test testbenches.
//
// Written separately from the RTL and in a different style, so that the
// testbenches compare the hardware with an independent expectation:
//   * lfsr_next / phase_shift / misr_next: one step of the pattern
//     generator, the phase-shifter map and one signature-register step,
//     with the feedback polynomials listed as tap positions.
//   * c17_model / s27_model: gate-level models that keep every net in an
//     array indexed by the fault-site number, so a stuck-at fault is
//     applied by overwriting one array entry right after it is computed.
//   * c432_model: the interrupt controller, fault free, written as a
//     search over buses and channels; c432_fault_model: the same with the
//     fault sites of the RTL overridden.
package bist_model_pkg;

  // Tap positions (1-based stage numbers) of the feedback polynomials.
  function automatic logic [63:0] tap_mask(input int w);
    int taps[$];
    logic [63:0] m;
    case (w)
      4:  taps = '{4, 3};
      5:  taps = '{5, 3};
      8:  taps = '{8, 6, 5, 4};
      9:  taps = '{9, 5};
      16: taps = '{16, 15, 13, 4};
      36: taps = '{36, 25};
      default: taps = '{w, w - 1, 1};
    endcase
    m = '0;
    foreach (taps[k]) m[taps[k]-1] = 1'b1;
    return m;
  endfunction

  function automatic logic [63:0] lfsr_next(input logic [63:0] s, input int w);
    logic fb;
    logic [63:0] m;
    m  = tap_mask(w);
    fb = 1'b0;
    for (int i = 0; i < w; i++) if (m[i]) fb ^= s[i];
    s = s << 1;
    s[0] = fb;
    for (int i = w; i < 64; i++) s[i] = 1'b0;
    return s;
  endfunction

  function automatic logic [63:0] phase_shift(input logic [63:0] s, input int w);
    logic [63:0] o;
    o = '0;
    for (int i = 0; i < w; i++) o[i] = (i == w - 1) ? s[i] : (s[i] ^ s[i+1]);
    return o;
  endfunction

  function automatic logic [63:0] misr_next(input logic [63:0] s, input logic [63:0] d,
                                            input int w);
    logic [63:0] n;
    n = lfsr_next(s, w);
    for (int i = 0; i < w; i++) n[i] ^= d[i];
    return n;
  endfunction

  // c17: in = {e,d,c,b,a}; returns {F,G}.
  function automatic logic [1:0] c17_model(input logic [4:0] in, input bit fen,
                                           input int site, input bit fval);
    logic n[11];
    for (int i = 0; i < 5; i++) begin
      n[i] = in[i];
      if (fen && site == i) n[i] = fval;
    end
    n[5]  = !(n[0] && n[1]); if (fen && site == 5)  n[5]  = fval;
    n[6]  = !(n[1] && n[3]); if (fen && site == 6)  n[6]  = fval;
    n[7]  = !(n[2] && n[6]); if (fen && site == 7)  n[7]  = fval;
    n[8]  = !(n[6] && n[4]); if (fen && site == 8)  n[8]  = fval;
    n[9]  = !(n[5] && n[7]); if (fen && site == 9)  n[9]  = fval;
    n[10] = !(n[7] && n[8]); if (fen && site == 10) n[10] = fval;
    return {n[9], n[10]};
  endfunction

  // s27: one clock. st = {q7,q6,q5}; returns the output, updates st.
  function automatic logic s27_model(input logic [3:0] in, inout logic [2:0] st,
                                     input bit fen, input int site, input bit fval);
    logic n[17];
    for (int i = 0; i < 4; i++) n[i] = in[i];
    n[4] = st[0]; n[5] = st[1]; n[6] = st[2];
    for (int i = 0; i < 7; i++) if (fen && site == i) n[i] = fval;
    n[13] = !n[0];              if (fen && site == 13) n[13] = fval;
    n[7]  = n[13] && n[5];      if (fen && site == 7)  n[7]  = fval;
    n[11] = !(n[1] || n[6]);    if (fen && site == 11) n[11] = fval;
    n[12] = !(n[2] || n[11]);   if (fen && site == 12) n[12] = fval;
    n[14] = n[11] || n[7];      if (fen && site == 14) n[14] = fval;
    n[15] = n[3] || n[7];       if (fen && site == 15) n[15] = fval;
    n[8]  = !(n[15] && n[14]);  if (fen && site == 8)  n[8]  = fval;
    n[10] = !(n[4] || n[8]);    if (fen && site == 10) n[10] = fval;
    n[9]  = !(n[13] || n[10]);  if (fen && site == 9)  n[9]  = fval;
    n[16] = !n[10];             if (fen && site == 16) n[16] = fval;
    st = {n[12], n[10], n[9]};
    return n[16];
  endfunction

  // c432 fault free: returns {PA,PB,PC,Chan[3:0]}.
  function automatic logic [6:0] c432_model(input logic [8:0] e, input logic [8:0] a,
                                            input logic [8:0] b, input logic [8:0] c);
    logic [8:0] bus[3];
    bus[0] = a; bus[1] = b; bus[2] = c;
    for (int k = 0; k < 3; k++)
      for (int i = 0; i < 9; i++)
        if (e[i] && bus[k][i]) begin
          logic [2:0] p;
          p = 3'b100 >> k;
          return {p, 4'(i)};
        end
    return {3'b000, 4'hF};
  endfunction

  // c432 with one stuck-at fault on the RTL's numbered nets.
  function automatic logic [6:0] c432_fault_model(input logic [35:0] in, input bit fen,
                                                  input int site, input bit fval);
    logic [69:0] n;
    logic [8:0] e, a, b, c, x1, x2, sel;
    logic pa, pb, pc;
    logic [3:0] ch;
    n = '0;
    n[35:0] = in;
    if (fen && site < 36) n[site] = fval;
    e = n[8:0]; a = n[17:9]; b = n[26:18]; c = n[35:27];
    // PA and PB come from inside M1 and M2, ahead of the X1/X2 fault sites.
    x1 = e & a;
    x2 = e & b;
    pa = (x1 != 0);
    pb = (x2 != 0);
    for (int i = 0; i < 9; i++) if (fen && site == 36 + i) x1[i] = fval;
    for (int i = 0; i < 9; i++) if (fen && site == 45 + i) x2[i] = fval;
    pb = pb && (x1 == 0);                      if (fen && site == 64) pb = fval;
    if (fen && site == 63) pa = fval;
    pc = ((e & c) != 0) && x1 == 0 && x2 == 0; if (fen && site == 65) pc = fval;
    sel = '0;
    if (pa) sel |= e & a;
    if (pb) sel |= e & b;
    if (pc) sel |= e & c;
    for (int i = 0; i < 9; i++) if (fen && site == 54 + i) sel[i] = fval;
    ch = 4'hF;
    for (int i = 8; i >= 0; i--) if (sel[i]) ch = 4'(i);
    for (int i = 0; i < 4; i++) if (fen && site == 66 + i) ch[i] = fval;
    return {pa, pb, pc, ch};
  endfunction

endpackage
