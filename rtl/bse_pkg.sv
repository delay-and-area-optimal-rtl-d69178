// bse_pkg: types, default constants and elaboration-time helper functions
// shared by the binary-subexpression (BSE) multiplier block and the FIR filter.
//
// A "symbol" S is an odd binary number without leading zeros (e.g. 1001 = 9).
// A "fragment" F(S, i) is a symbol shifted left by i bits. A "match" for a
// coefficient C is a set of fragments whose sum is C and whose non-zero bits
// add up to exactly NZB(C), i.e. every 1 of C is covered by exactly one
// fragment bit. The RTL receives the alphabet and the matches as parameters;
// choosing them (the delay/area optimisation) is done before elaboration.
//
// The package also holds the unit cost model used to rate a plan: a
// carry-save adder (CSA) costs one unit of area and delay, a carry-propagate
// adder (CPA) costs CPA_RATIO units of both. Adding k operands takes k-2 CSAs
// arranged as a Wallace tree plus one CPA. These numbers are exposed by the
// filter as localparams so a plan can be compared with its estimate.
package bse_pkg;

  // One fragment of a match: coefficient it belongs to, symbol value, shift.
  typedef struct packed {
    int unsigned coef;   // index of the coefficient this fragment builds
    int unsigned sym;    // symbol value (odd), e.g. 9 for binary 1001
    int unsigned shift;  // left shift in bits
  } frag_t;

  // Number of non-zero bits of a value.
  function automatic int unsigned nzb(input int unsigned v);
    int unsigned n = 0;
    for (int b = 0; b < 32; b++) if (v[b]) n++;
    return n;
  endfunction

  // Bit position of the k-th set bit of v, counting from the LSB (k from 0).
  function automatic int unsigned set_bit_pos(input int unsigned v, input int unsigned k);
    int unsigned n = 0;
    for (int b = 0; b < 32; b++) begin
      if (v[b]) begin
        if (n == k) return b;
        n++;
      end
    end
    return 0;
  endfunction

  // Number of 3:2 carry-save levels a Wallace tree needs to bring k operands
  // down to two (9 -> 6 -> 4 -> 3 -> 2 gives 4).
  function automatic int unsigned csa_levels(input int unsigned k);
    int unsigned n = k;
    int unsigned lv = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + (n % 3);
      lv++;
    end
    return lv;
  endfunction

  // Unit area of adding k operands: (k-2) CSAs and one CPA; one operand is free.
  function automatic int unsigned sum_area(input int unsigned k, input int unsigned cpa_ratio);
    return (k <= 1) ? 0 : (k - 2) + cpa_ratio;
  endfunction

  // Unit delay of adding k operands: Wallace levels plus one CPA.
  function automatic int unsigned sum_delay(input int unsigned k, input int unsigned cpa_ratio);
    return (k <= 1) ? 0 : csa_levels(k) + cpa_ratio;
  endfunction

  // Area(S) and the delay from x to x*S in the alphabet generation unit.
  function automatic int unsigned sym_area(input int unsigned s, input int unsigned cpa_ratio);
    return sum_area(nzb(s), cpa_ratio);
  endfunction

  function automatic int unsigned sym_delay(input int unsigned s, input int unsigned cpa_ratio);
    return sum_delay(nzb(s), cpa_ratio);
  endfunction

  // Number of bits needed to hold v (0 for v == 0).
  function automatic int unsigned bit_len(input int unsigned v);
    int unsigned n = 0;
    for (int b = 0; b < 32; b++) if (v[b]) n = b + 1;
    return n;
  endfunction

endpackage
