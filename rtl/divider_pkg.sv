// divider_pkg: constants and helper functions shared by the divider modules.
//
// rem_bits(D) gives m, the width of a remainder (and of a carry-in) for the
// divisor D: m = floor(log2(D-1)) + 1, which equals ceil(log2(D)) for D >= 2.
// A remainder is always below D, so m bits hold every value 0 .. D-1.
// For D = 2 the result is 1. D below 2 is not a meaningful divisor for the
// look-up table architecture and is rejected by the modules that use it.
package divider_pkg;

  // Width of a remainder / carry word for divisor d (d >= 2).
  function automatic int unsigned rem_bits(input int unsigned d);
    int unsigned w;
    w = 0;
    while ((64'(1) << w) < 64'(d)) w++;
    return (w == 0) ? 1 : w;
  endfunction

  // Number of n-bit blocks that cover a k-bit dividend (ceil(k / n)).
  function automatic int unsigned num_blocks(input int unsigned k, input int unsigned n);
    return (k + n - 1) / n;
  endfunction

endpackage
