// sse_pkg: types and constants shared by the multiplier block, the channel
// filters and the channelizer top.
//
// The multiplier block multiplies the input sample x1 by six fixed constants,
// the input itself, two 2-bit common subexpressions (CS) and three
// super-subexpressions (SS) built from them:
//
//   x2 = x1 + x1>>2            CSD [1 0 1]             = 5/4   * x1
//   x3 = x1 - x1>>2            CSD [1 0 -1]            = 3/4   * x1
//   x4 = x2 - x1>>4            CSD [1 0 1 0 -1]        = 19/16 * x1
//   x5 = x2 + x3>>5            CSD [1 0 1 0 0 1 0 -1]  = 163/128 * x1
//   x6 = -x3 + x2>>4           CSD [-1 0 1 0 1 0 1]    = -43/64 * x1
//
// Every output is kept as an integer at its own scale, xs_i = x_i * 2^SS_EXP(i),
// so the adders that build it stay narrow (additions first, shifts later).
//
// A filter tap is described by up to MAX_TERMS terms. Each term names one
// multiplier-block output, a right shift (its CSD digit position) and a sign.
// The tap's partial product is the sum of its terms, so the tap costs
// (terms - 1) adders. EX_TERMS is the 8-tap, 16-bit example filter: the
// terms of its four distinct (symmetric) taps are the decomposition
//   h(0) = x4>>1 + x5>>8         h(1) = x1>>2 + x6>>4 + x4>>12
//   h(2) = x5>>2 + x3>>13        h(3) = x6>>1 + x5>>9
// and h(7-k) = h(k).
package sse_pkg;

  typedef enum logic [2:0] {
    SRC_X1 = 3'd0,
    SRC_X2 = 3'd1,
    SRC_X3 = 3'd2,
    SRC_X4 = 3'd3,
    SRC_X5 = 3'd4,
    SRC_X6 = 3'd5
  } ss_src_e;

  localparam int NUM_SS    = 6;
  // Extra bits, over the input width, of the widest multiplier-block output
  // (|x5| * 2^7 = 163 * |x1|, under 2^8 * |x1|) plus one.
  localparam int SS_GUARD  = 9;
  localparam int MAX_TERMS = 3;

  // Scale exponent of each multiplier-block output.
  function automatic int ss_exp(ss_src_e s);
    case (s)
      SRC_X1:  return 0;
      SRC_X2:  return 2;
      SRC_X3:  return 2;
      SRC_X4:  return 4;
      SRC_X5:  return 7;
      SRC_X6:  return 6;
      default: return 0;
    endcase
  endfunction

  typedef struct packed {
    logic    used;   // term present
    logic    neg;    // subtract instead of add
    ss_src_e src;    // which multiplier-block output
    logic [5:0] shift; // right shift = CSD position of the term's leading digit
  } term_t;

  typedef term_t [MAX_TERMS-1:0] tap_terms_t;

  function automatic term_t mk_term(ss_src_e src, logic [5:0] shift, logic neg = 1'b0);
    term_t t;
    t.used  = 1'b1;
    t.neg   = neg;
    t.src   = src;
    t.shift = shift;
    return t;
  endfunction

  localparam term_t NO_TERM = '0;

  localparam int EX_TAPS = 8;

  // Distinct taps h(0)..h(3) of the example filter, index k = tap k.
  localparam tap_terms_t [EX_TAPS/2-1:0] EX_TERMS = '{
    3: '{2: NO_TERM,                0: mk_term(SRC_X6, 1),  1: mk_term(SRC_X5, 9)},
    2: '{2: NO_TERM,                0: mk_term(SRC_X5, 2),  1: mk_term(SRC_X3, 13)},
    1: '{2: mk_term(SRC_X4, 12),    0: mk_term(SRC_X1, 2),  1: mk_term(SRC_X6, 4)},
    0: '{2: NO_TERM,                0: mk_term(SRC_X4, 1),  1: mk_term(SRC_X5, 8)}
  };

endpackage
