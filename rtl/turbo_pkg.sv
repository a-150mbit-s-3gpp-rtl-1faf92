// turbo_pkg: types, sizes and trellis helpers shared by the LTE turbo decoder.
//
// The sizes follow the decoder parameter table of the design: 6-bit channel
// values, 7-bit extrinsic values, 11-bit state metrics, an XMAP window of 32
// bits, 96 acquisition steps, folding factor 4 and 8 LLRs per clock cycle.
// The trellis is the 8-state LTE constituent code with feedback polynomial
// g0 = 1 + D^2 + D^3 and parity polynomial g1 = 1 + D + D^3 (taken from the
// LTE standard; the design text only says "recursive convolutional
// encoder"). State s = {a(k-1), a(k-2), a(k-3)}, i.e. bit 2 is the most
// recent register. Metrics use the max convention of Max-Log-MAP with an LLR
// defined as ln(P(0)/P(1)), so a positive LLR means bit 0.
package turbo_pkg;
  parameter int N      = 8;     // LLRs per clock cycle (parallel lanes)
  parameter int H      = 4;     // recursion operations folded on one unit
  parameter int WL     = 32;    // XMAP window length = N*H
  parameter int AL     = 96;    // acquisition length
  parameter int CHW    = 6;     // channel value width
  parameter int EXW    = 7;     // extrinsic value width
  parameter int SMW    = 11;    // state metric width
  parameter int S      = 8;     // trellis states
  parameter int BL_MAX = 6144;  // largest LTE block
  parameter int BLW    = 13;    // width of a block length / position
  parameter int GW     = 10;    // width of a group index (BL_MAX/N)
  parameter int WW     = 8;     // width of a window index (BL_MAX/WL)

  typedef logic signed [CHW-1:0] ch_t;
  typedef logic signed [EXW-1:0] ex_t;
  typedef logic signed [SMW-1:0] sm_t;
  typedef sm_t [S-1:0]           smv_t;   // one state metric per state

  // Inputs of one trellis step: systematic, parity and a-priori value.
  typedef struct packed {
    ch_t sys;
    ch_t par;
    ex_t apr;
  } cv_t;

  localparam int SM_MIN  = -(1 << (SMW-1));
  localparam int SM_KNOWN_OFF = -(1 << (SMW-2));  // metric of "impossible" states at block start

  function automatic logic [2:0] next_state(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return {a, s[2], s[1]};
  endfunction

  function automatic logic parity_bit(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return a ^ s[2] ^ s[0];
  endfunction

  // Branch metric of the transition leaving state s with input u.
  function automatic int gamma(input logic [2:0] s, input logic u, input cv_t cv);
    int g;
    g = 0;
    if (!u) g = g + int'(cv.sys) + int'(cv.apr);
    if (!parity_bit(s, u)) g = g + int'(cv.par);
    return g;
  endfunction

  // Parity-only part of the branch metric, used for the extrinsic value.
  function automatic int gamma_par(input logic [2:0] s, input logic u, input ch_t par);
    return parity_bit(s, u) ? 0 : int'(par);
  endfunction

  function automatic sm_t sat_sm(input int x);
    if (x < SM_MIN) return sm_t'(SM_MIN);
    return sm_t'(x);
  endfunction

  function automatic ex_t sat_ex(input int x);
    if (x > (1 << (EXW-1)) - 1) return ex_t'((1 << (EXW-1)) - 1);
    if (x < -(1 << (EXW-1)) + 1) return ex_t'(-(1 << (EXW-1)) + 1);
    return ex_t'(x);
  endfunction

  // Metric vector of a trellis known to be in state 0.
  function automatic smv_t known_start();
    smv_t v;
    for (int i = 0; i < S; i++) v[i] = (i == 0) ? sm_t'(0) : sm_t'(SM_KNOWN_OFF);
    return v;
  endfunction
endpackage
