// gf_aop_pkg -- constants and elaboration-time helpers shared by the
// all-one-polynomial (AOP) GF(2^m) multipliers and their error-control
// wrappers.
//
// An AOP f(x) = 1 + x + ... + x^m is irreducible over GF(2) exactly when
// m+1 is prime and 2 is a primitive root modulo m+1 (m = 2, 4, 10, 12, 18,
// 28, 36, 52, 58, 60, 66, 82, 100 below 101).  aop_irreducible() evaluates
// that rule so that modules can reject an unusable field size when they are
// elaborated.  M_DEFAULT is the 4-bit field GF(2^4) that the whole design is
// built for; the Hamming-protected multiplier exists only for that size.
package gf_aop_pkg;

  // Field degree used throughout (4-bit operands).
  localparam int unsigned M_DEFAULT = 4;

  // Hamming (7,4) code around the 4-bit product: 3 check bits.
  localparam int unsigned HAM_DATA   = M_DEFAULT;
  localparam int unsigned HAM_CHECKS = 3;

  // A GF(2^4) element (bit k = coefficient of alpha^k) and a check word.
  typedef logic [HAM_DATA-1:0]   gf4_t;
  typedef logic [HAM_CHECKS-1:0] ham_chk_t;

  // True when 1 + x + ... + x^m is irreducible: m+1 prime and the
  // multiplicative order of 2 modulo m+1 equal to m.
  function automatic bit aop_irreducible(input int unsigned m);
    int unsigned p;
    int unsigned r;
    int unsigned ord;
    p = m + 1;
    if (m < 2) return 1'b0;
    for (int unsigned d = 2; d * d <= p; d++)
      if (p % d == 0) return 1'b0;
    r   = 2 % p;
    ord = 1;
    while (r != 1 && ord <= m) begin
      r   = (r * 2) % p;
      ord = ord + 1;
    end
    return (ord == m);
  endfunction

endpackage
