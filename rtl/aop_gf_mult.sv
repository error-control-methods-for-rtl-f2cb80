// aop_gf_mult -- bit-parallel multiplier over GF(2^M) for the irreducible
// all-one polynomial f(x) = 1 + x + ... + x^M.
//
// Because alpha^(M+1) = 1 for a root alpha of f, the product is first formed
// in the extended basis {1, alpha, ..., alpha^M} as a cyclic convolution,
//     C_k = XOR over i+j = k (mod M+1) of a_i & b_j ,  k = 0..M,
// and then folded back to the polynomial basis with c_k = C_k xor C_M
// (k = 0..M-1), using alpha^M = 1 + alpha + ... + alpha^(M-1).  The inputs are
// in the polynomial basis, so their extended coefficient a_M, b_M is zero.
// This is the published AOP multiplier algorithm; the AND/XOR array is
// written as loops and left to synthesis to flatten.
//
// Interface: a, b multiplicands, c = a*b mod f, bit k = coefficient of
// alpha^k.  Purely combinational, no clock; result valid one logic delay
// after the operands.  M must make f irreducible (checked at elaboration).
module aop_gf_mult #(
  parameter int unsigned M = gf_aop_pkg::M_DEFAULT
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] c
);

  if (!gf_aop_pkg::aop_irreducible(M)) begin : g_bad_m
    $error("aop_gf_mult: 1+x+...+x^%0d is not irreducible", M);
  end

  // Product in the extended basis (M+1 coefficients).
  logic [M:0] cx;

  always_comb begin
    cx = '0;
    for (int unsigned i = 0; i < M; i++)
      for (int unsigned j = 0; j < M; j++)
        cx[(i + j) % (M + 1)] ^= a[i] & b[j];
    for (int unsigned k = 0; k < M; k++)
      c[k] = cx[k] ^ cx[M];
  end

endmodule
