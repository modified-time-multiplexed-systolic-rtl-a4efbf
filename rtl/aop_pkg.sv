// Shared constants for the GF(2^m) multipliers over an irreducible all-one
// polynomial (AOP) Q(z) = 1 + z + ... + z^m.
//
// Field elements enter and leave the multipliers in polynomial basis, m bits,
// bit i holding the coefficient of z^i. Inside, the datapath works on m+1
// bits modulo z^(m+1) + 1 = (z + 1) Q(z), where a multiplication by z is a
// one-bit cyclic left shift; the output reduction cell brings the m+1-bit
// result back to m bits. The defaults are the example field of the design,
// m = 28 (m + 1 = 29 is prime and 2 is primitive modulo 29, so the AOP of
// degree 28 is irreducible), split into rows of l = 7 bits, s = 4 rows.
package aop_pkg;

  // Field degree m.
  localparam int unsigned AOP_M = 28;
  // Bits of B handled per row of the dependence graph (l).
  localparam int unsigned AOP_L = 7;
  // Rows processed in parallel by the time-multiplexed multiplier (TM-n).
  localparam int unsigned AOP_N = 4;

  // ceil(a / b) for positive b.
  function automatic int unsigned ceil_div(int unsigned a, int unsigned b);
    return (a + b - 1) / b;
  endfunction

  // Number of registered stages of an adder tree over k words: ceil(log2 k).
  function automatic int unsigned tree_stages(int unsigned k);
    return (k <= 1) ? 0 : $clog2(k);
  endfunction

endpackage
