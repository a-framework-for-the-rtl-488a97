// fir_pkg: types and elaboration-time helpers shared by the multiplier-less
// FIR filter.
//
// Every coefficient of the filter is restricted to the sum or difference of
// at most two signed power-of-two terms, c = s1*2^k1 + s2*2^k2. A tap then
// needs no multiplier: each term is the input sample shifted left by k and,
// for a negative term, inverted with a +1 carry injected at bit 0. The
// function pot_decompose() turns an integer coefficient into that form at
// elaboration time, so the filter is parameterised with plain integer taps.
// Restricting coefficients this way follows the document; the search order
// (fewest terms first, then the smallest shifts) is this design's choice.
package fir_pkg;

  // One signed power-of-two term: value = en ? (neg ? -2^shift : 2^shift) : 0
  typedef struct packed {
    logic       en;
    logic       neg;
    logic [5:0] shift;
  } pot_term_t;

  // A coefficient as two terms; valid is clear if no decomposition exists.
  typedef struct packed {
    logic      valid;
    pot_term_t t1;
    pot_term_t t2;
  } pot_coef_t;

  // Largest shift the search tries (supports coefficients up to |2^20|).
  localparam int unsigned MAX_SHIFT = 20;

  function automatic longint pot_term_value(pot_term_t t);
    longint v;
    v = longint'(1) << t.shift;
    if (!t.en) return 0;
    return t.neg ? -v : v;
  endfunction

  // Split an integer coefficient into at most two signed power-of-two terms.
  function automatic pot_coef_t pot_decompose(longint c);
    pot_coef_t r;
    longint    v1, v2;
    r = '0;
    if (c == 0) begin
      r.valid = 1'b1;
      return r;
    end
    // one term
    for (int k = 0; k <= int'(MAX_SHIFT); k++) begin
      v1 = longint'(1) << k;
      if (c == v1 || c == -v1) begin
        r.valid    = 1'b1;
        r.t1.en    = 1'b1;
        r.t1.neg   = (c < 0);
        r.t1.shift = 6'(k);
        return r;
      end
    end
    // two terms, t1 the larger one
    for (int k1 = 1; k1 <= int'(MAX_SHIFT); k1++) begin
      for (int k2 = 0; k2 < k1; k2++) begin
        for (int s = 0; s < 4; s++) begin
          v1 = longint'(1) << k1;
          v2 = longint'(1) << k2;
          if (s[1]) v1 = -v1;
          if (s[0]) v2 = -v2;
          if (v1 + v2 == c) begin
            r.valid    = 1'b1;
            r.t1.en    = 1'b1;
            r.t1.neg   = s[1];
            r.t1.shift = 6'(k1);
            r.t2.en    = 1'b1;
            r.t2.neg   = s[0];
            r.t2.shift = 6'(k2);
            return r;
          end
        end
      end
    end
    return r;
  endfunction

endpackage
