// prpg_pkg: constants and the characteristic-polynomial table shared by the
// variable-length pseudorandom pattern generator (PRPG).
//
// The generator is a Fibonacci LFSR of DEGREE flip-flops (3..15) whose
// feedback polynomial is picked at run time from four polynomials of that
// degree by a 2-bit pattern selector. Each polynomial is written here as its
// set of middle terms: bit k of a term set is 1 when x^k (0 < k < DEGREE)
// appears in x^DEGREE + ... + 1.
//
// Tap convention (fixed by the published degree-5 sequences): the register
// shifts from q[DEGREE-1] towards q[0], the feedback enters q[DEGREE-1], and
// the feedback is the XNOR of q[0] (the x^DEGREE term) and of q[DEGREE-k] for
// every middle term x^k. tap_mask() turns a term set into that bit mask.
//
// Most polynomials are the published ones. A few published entries do not
// give the published pattern count under this convention; for those this
// table holds the nearest polynomial that does (degree 3 selectors 1 and 3,
// all of degree 10, degree 12 selector 1, degree 14 selectors 1 and 2,
// degree 15 selectors 0, 2 and 3), and degree 13 selector 1 is this design's
// choice (x^13+x^6+1, 7665 patterns). The pattern counts from the all-zero
// start are listed next to each entry.
package prpg_pkg;

  localparam int unsigned MIN_DEGREE = 3;
  localparam int unsigned MAX_DEGREE = 15;
  localparam int unsigned NUM_POLY   = 4;
  localparam int unsigned SEL_W      = $clog2(NUM_POLY);

  typedef logic [SEL_W-1:0]      pattern_sel_t;
  typedef logic [MAX_DEGREE-1:0] term_set_t;

  // One middle term x^k.
  function automatic term_set_t x(input int unsigned k);
    return term_set_t'(1) << k;
  endfunction

  // Middle terms of polynomial `sel` of degree `degree` (0 outside 3..15).
  function automatic term_set_t poly_terms(input int unsigned degree,
                                           input int unsigned sel);
    term_set_t t [NUM_POLY];
    case (degree)
      3:  t = '{x(2) | x(1),                x(2),  x(1),  x(2)};                 // 4, 7, 7, 7
      4:  t = '{x(2),                       x(3) | x(1),  x(3),  x(1)};          // 6, 12, 15, 15
      5:  t = '{x(4),                       x(3),  x(2),  x(1)};                 // 21, 31, 31, 21
      6:  t = '{x(4),                       x(2),  x(5),  x(1)};                 // 14, 14, 63, 63
      7:  t = '{x(2),                       x(3),  x(3),  x(1)};                 // 93, 127, 127, 127
      8:  t = '{x(4),                       x(1),  x(7),  x(6) | x(5) | x(1)};   // 12, 63, 63, 255
      9:  t = '{x(8),                       x(1),  x(4),  x(5)};                 // 73, 73, 511, 511
      10: t = '{x(5),                       x(9),  x(3),  x(7)};                 // 15, 889, 1023, 1023
      11: t = '{x(10),                      x(7),  x(4),  x(2)};                 // 1533, 1533, 1533, 2047
      12: t = '{x(8),                       x(5),  x(11), x(7) | x(4) | x(3)};   // 28, 819, 3255, 4095
      13: t = '{x(9),                       x(6),  x(12), x(4) | x(3) | x(1)};   // 7161, 7665, 7905, 8191
      14: t = '{x(2),                       x(5),  x(1),  x(12) | x(11) | x(1)}; // 254, 5461, 11811, 16383
      15: t = '{x(5),                       x(9),  x(11), x(4)};                 // 35, 93, 32767, 32767
      default: t = '{default: '0};
    endcase
    return (sel < NUM_POLY) ? t[sel] : '0;
  endfunction

  // Register bits tapped by polynomial `sel`: q[0] for x^degree, q[degree-k]
  // for each middle term x^k.
  function automatic term_set_t tap_mask(input int unsigned degree,
                                         input int unsigned sel);
    term_set_t terms = poly_terms(degree, sel);
    term_set_t mask  = '0;
    mask[0] = 1'b1;
    for (int unsigned k = 1; k < MAX_DEGREE; k++)
      if (terms[k] && k < degree) mask[degree-k] = 1'b1;
    return mask;
  endfunction

endpackage
