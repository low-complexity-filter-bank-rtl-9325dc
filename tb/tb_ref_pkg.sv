// tb_ref_pkg: reference values for the filter testbenches, worked out
// independently of the RTL's shift arithmetic.
//
// EX_CSD holds the example filter's 16-bit CSD coefficients digit by digit
// (weights 2^-1 .. 2^-16, '+', '-' or '0'); csd_value() turns a row into an
// integer scaled by 2^16. term_value() gives the value, scaled by 2^16, of
// one term of a tap decomposition from the constant each multiplier-block
// output stands for (1, 5/4, 3/4, 19/16, 163/128, -43/64).
package tb_ref_pkg;
  import sse_pkg::*;

  localparam string EX_CSD [8] = '{
    "+0+0-00+0+00+0-0",   // h(0)
    "0+0-0+0+0+0+0+0-",   // h(1)
    "0+0+00+0-000+0-0",   // h(2)
    "-0+0+0+0+0+00+0-",   // h(3)
    "-0+0+0+0+0+00+0-",   // h(4)
    "0+0+00+0-000+0-0",   // h(5)
    "0+0-0+0+0+0+0+0-",   // h(6)
    "+0+0-00+0+00+0-0"    // h(7)
  };

  function automatic longint csd_value(string s);
    longint v = 0;
    for (int j = 0; j < 16; j++) begin
      if (s[j] == "+") v += longint'(1) << (15 - j);
      else if (s[j] == "-") v -= longint'(1) << (15 - j);
    end
    return v;
  endfunction

  // Constant k_i = NUM/DEN of output x_i relative to x1.
  function automatic longint ss_num(ss_src_e s);
    case (s)
      SRC_X1: return 1;    SRC_X2: return 5;    SRC_X3: return 3;
      SRC_X4: return 19;   SRC_X5: return 163;  SRC_X6: return -43;
      default: return 0;
    endcase
  endfunction

  function automatic int ss_log2den(ss_src_e s);
    case (s)
      SRC_X1: return 0;  SRC_X2: return 2;  SRC_X3: return 2;
      SRC_X4: return 4;  SRC_X5: return 7;  SRC_X6: return 6;
      default: return 0;
    endcase
  endfunction

  // Value of a term scaled by 2^F: +-k_i * 2^(F - shift).
  function automatic longint term_value(term_t t, int F);
    longint v;
    if (!t.used) return 0;
    v = (ss_num(t.src) <<< F) >>> (int'(t.shift) + ss_log2den(t.src));
    return t.neg ? -v : v;
  endfunction

  function automatic longint tap_value(tap_terms_t tt, int F);
    longint v = 0;
    for (int i = 0; i < MAX_TERMS; i++) v += term_value(tt[i], F);
    return v;
  endfunction

  // A second, made-up 6-tap decomposition used to exercise other sources,
  // signs and shifts: h(0) = -x2>>3 + x1>>9, h(1) = x3>>1 - x6>>5 + x4>>10,
  // h(2) = -x5>>1 - x1>>12 - x2>>14.
  localparam tap_terms_t [2:0] ALT_TERMS = '{
    2: '{2: mk_term(SRC_X2, 14, 1'b1), 1: mk_term(SRC_X1, 12, 1'b1), 0: mk_term(SRC_X5, 1, 1'b1)},
    1: '{2: mk_term(SRC_X4, 10),       1: mk_term(SRC_X6, 5, 1'b1),  0: mk_term(SRC_X3, 1)},
    0: '{2: NO_TERM,                   1: mk_term(SRC_X1, 9),        0: mk_term(SRC_X2, 3, 1'b1)}
  };

  // A made-up 8-tap decomposition for a second channel of the bank:
  // h(0) = x6>>3, h(1) = -x3>>2 + x5>>9, h(2) = x2>>1 - x4>>6 - x1>>15,
  // h(3) = x1>>1 + x3>>4.
  localparam tap_terms_t [3:0] ALT8_TERMS = '{
    3: '{2: NO_TERM,                   1: mk_term(SRC_X3, 4),        0: mk_term(SRC_X1, 1)},
    2: '{2: mk_term(SRC_X1, 15, 1'b1), 1: mk_term(SRC_X4, 6, 1'b1),  0: mk_term(SRC_X2, 1)},
    1: '{2: NO_TERM,                   1: mk_term(SRC_X5, 9),        0: mk_term(SRC_X3, 2, 1'b1)},
    0: '{2: NO_TERM,                   1: NO_TERM,                   0: mk_term(SRC_X6, 3)}
  };
endpackage
