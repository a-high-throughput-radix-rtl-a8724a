// map_pkg: types, fixed-point formats and trellis functions shared by the
// radix-4 log-MAP decoder.
//
// Fixed-point formats (q total bits, f = 2 fractional bits, two's complement):
//   receiver input (5,2), a-priori/extrinsic input (6,2), radix-2 branch
//   metric (7,2) and state metric (9,2).  These are the decoder's quantisation
//   scheme.  State metrics are never normalised: they wrap modulo 2^SMW and are
//   only ever compared through their wrapped difference, which is exact while
//   the spread of the metrics being compared stays below 2^(SMW-1).  Wrapping
//   arithmetic is this design's choice; nothing else here rescales metrics.
//
// Trellis: the 16-state recursive systematic code of the CCSDS turbo code,
// feedback 1+D^3+D^4, parity 1+D+D^3+D^4.  State s = {r1,r2,r3,r4}, r1 being
// the most recent register bit.  For input bit u the feedback bit is
// a = u ^ r3 ^ r4, the parity is p = a ^ r1 ^ r3 ^ r4 and the next state is
// {a, r1, r2, r3}.
//
// The correction term of max* is lut(d) = round(4 * ln(1 + exp(-|d|/4)))
// quarter units for a difference of d quarter units, which gives
// 3 for |d| = 0, 2 for 1..3, 1 for 4..8 and 0 beyond.
package map_pkg;

  localparam int unsigned NS   = 16;  // trellis states
  localparam int unsigned YW   = 5;   // receiver input (5,2)
  localparam int unsigned LAW  = 6;   // a-priori / extrinsic input (6,2)
  localparam int unsigned BMW  = 7;   // radix-2 branch metric (7,2)
  localparam int unsigned SMW  = 9;   // state metric (9,2)
  localparam int unsigned LUTW = 2;   // width of one correction term

  typedef logic [SMW-1:0]  sm_t;      // wrapped state metric
  typedef logic [LUTW-1:0] lut_t;

  // Soft input of one trellis step: systematic, parity and a-priori value.
  typedef struct packed {
    logic signed [YW-1:0]  ys;
    logic signed [YW-1:0]  yp;
    logic signed [LAW-1:0] la;
  } sym_t;

  // Soft input of one radix-4 step: bit k+1 in s0, bit k+2 in s1.
  typedef struct packed {
    sym_t s1;
    sym_t s0;
  } sym2_t;

  function automatic logic [3:0] next_state(input logic [3:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return {a, s[3:1]};
  endfunction

  function automatic logic parity_bit(input logic [3:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return a ^ s[3] ^ s[1] ^ s[0];
  endfunction

  // Correction term for a difference d (two's complement, wrapped).
  function automatic lut_t lut_corr(input sm_t d);
    sm_t m;
    m = d[SMW-1] ? sm_t'(-d) : d;
    if (m == '0)       return lut_t'(3);
    else if (m <= 3)   return lut_t'(2);
    else if (m <= 8)   return lut_t'(1);
    else               return lut_t'(0);
  endfunction

  // Two-input max* on wrapped metrics: larger of the two plus correction.
  function automatic sm_t maxstar2(input sm_t x, input sm_t y);
    sm_t d;
    d = x - y;
    return (d[SMW-1] ? y : x) + sm_t'(lut_corr(d));
  endfunction

endpackage
