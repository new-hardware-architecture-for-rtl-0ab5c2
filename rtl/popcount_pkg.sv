// popcount_pkg: constants and helper functions shared by the bit-counting
// modules.
//
// The counter tree is built from half adders, full adders and OR gates. Every
// stage produces a binary count that is one bit wider than the counts it
// merges, so the width of a count follows from the number of bits it covers:
// a count of N bits spans 0..N and needs ceil(log2(N+1)) bits. The helper
// below computes that width at elaboration time; it has no timing of its own.
package popcount_pkg;

  // Number of bits needed to hold a count of 0..n set bits.
  function automatic int unsigned count_width(input int unsigned n);
    return $clog2(n + 1);
  endfunction

  // True when n is a power of two and at least 4, the word sizes the
  // duplication scheme of the counter tree can build.
  function automatic bit legal_width(input int unsigned n);
    return (n >= 4) && ((n & (n - 1)) == 0);
  endfunction

endpackage
