// bist_pkg: types and constants shared by the LFSR-based built-in self-test.
//
// The self-test applies pseudo-random patterns from a linear feedback shift
// register to a circuit under test (CUT) and checks the responses. This
// package holds what several modules need:
//   * fault_t, the stuck-at fault request every CUT model accepts. A CUT
//     forces the net numbered `site` to `value` while `enable` is high. The
//     reference copy of a CUT gets NO_FAULT. Net numbering is given in each
//     CUT's header comment.
//   * fault_net(), the value of one CUT net under a fault request.
//   * lfsr_taps(), the second feedback tap of a maximal-length two-tap
//     Fibonacci LFSR for a given width (the first tap is always the top
//     bit). The polynomials are the usual primitive trinomials /
//     pentanomials; widths not in the table fall back to a 4-tap form.
//   * lfsr_step(), phase_map(): the pattern sequence as functions, used at
//     elaboration to fill the expected-response memories.
//   * bist_state_t, the states of the self-test controller.
// The LFSR polynomials, the fault encoding and the state set are this
// design's own choices; the document names the LFSR as pattern source but
// gives no polynomial.
package bist_pkg;

  // Largest net index any CUT model uses (c432 has 70 nets).
  localparam int unsigned FAULT_SITE_W = 7;

  typedef struct packed {
    logic                    enable;  // inject the fault
    logic [FAULT_SITE_W-1:0] site;    // net number inside the CUT
    logic                    value;   // stuck-at value
  } fault_t;

  localparam fault_t NO_FAULT = '{enable: 1'b0, site: '0, value: 1'b0};

  // Value of net `site` in a CUT: the fault-free value `good`, or the
  // stuck-at value when the fault request targets this net.
  function automatic logic fault_net(input fault_t f, input int unsigned site,
                                     input logic good);
    return (f.enable && (32'(f.site) == site)) ? f.value : good;
  endfunction

  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,   // waiting for bist_on
    ST_INIT = 2'd1,   // seed the LFSR, clear CUT state, ORA and MISR
    ST_RUN  = 2'd2,   // one pattern per clock
    ST_DONE = 2'd3    // verdict valid until bist_on falls
  } bist_state_t;

  // Feedback taps, as a bit mask over the register (bit i = stage i+1).
  // Mask values are taps of primitive polynomials x^W + ... + 1.
  function automatic logic [63:0] lfsr_taps(input int unsigned width);
    logic [63:0] m;
    m = '0;
    case (width)
      2:  m = (64'd1 << 1)  | (64'd1 << 0);
      3:  m = (64'd1 << 2)  | (64'd1 << 1);
      4:  m = (64'd1 << 3)  | (64'd1 << 2);
      5:  m = (64'd1 << 4)  | (64'd1 << 2);
      6:  m = (64'd1 << 5)  | (64'd1 << 4);
      7:  m = (64'd1 << 6)  | (64'd1 << 5);
      8:  m = (64'd1 << 7)  | (64'd1 << 5) | (64'd1 << 4) | (64'd1 << 3);
      9:  m = (64'd1 << 8)  | (64'd1 << 4);
      10: m = (64'd1 << 9)  | (64'd1 << 6);
      16: m = (64'd1 << 15) | (64'd1 << 14) | (64'd1 << 12) | (64'd1 << 3);
      32: m = (64'd1 << 31) | (64'd1 << 21) | (64'd1 << 1)  | (64'd1 << 0);
      36: m = (64'd1 << 35) | (64'd1 << 24);
      default: m = (64'd1 << (width - 1)) | (64'd1 << (width - 2)) | 64'd1;
    endcase
    return m;
  endfunction

  // One step of the Fibonacci LFSR of `width` stages held in the low bits
  // of s (the same step the lfsr module takes). Used at elaboration to work
  // out the stored expected responses.
  function automatic logic [63:0] lfsr_step(input logic [63:0] s, input int unsigned width);
    logic [63:0] m, n;
    m = lfsr_taps(width);
    n = '0;
    for (int unsigned i = 1; i < width; i++) n[i] = s[i-1];
    n[0] = ^(s & m);
    return n;
  endfunction

  // The phase-shifter map (see phase_shifter) on the low `width` bits.
  function automatic logic [63:0] phase_map(input logic [63:0] s, input int unsigned width);
    logic [63:0] o;
    o = '0;
    for (int unsigned i = 0; i + 1 < width; i++) o[i] = s[i] ^ s[i+1];
    o[width-1] = s[width-1];
    return o;
  endfunction

endpackage
