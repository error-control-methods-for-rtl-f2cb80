// parity_predictor -- predicts the three Hamming check bits of the GF(2^4)
// AOP product directly from the operands, independently of aop_gf_mult.
//
// A poly_mult forms the 7-bit unreduced product, named d0..d3 (coefficients
// of x^0..x^3) and e0..e2 (x^4..x^6).  With f = 1+x+x^2+x^3+x^4 one has
// x^4 = 1+x+x^2+x^3, x^5 = 1, x^6 = x, so the reduced product is
//     c[0] = d0^e0^e1   c[1] = d1^e0^e2   c[2] = d2^e0   c[3] = d3^e0 .
// The Hamming (7,4) code protects the data bits in the order
//     c1 = c[0], c2 = c[2], c3 = c[1], c4 = c[3]
// with checks p0 = c1^c3^c4, p1 = c1^c2^c4, p2 = c2^c3^c4.  Each check is
// the overall parity ps of the product minus one data bit, so
//     ps = d0^d1^d2^d3^e1^e2          (e0 appears in all four bits, cancels)
//     p0 = ps^d2^e0   p1 = ps^d1^e0^e2   p2 = ps^d0^e0^e1 .
// The check equations and p0, p1 are the published ones; ps without e0 and
// the e0 term in p2 are derived here so that the prediction agrees with the
// AOP reduction above (the all-seven-bit ps and e0-free p2 do not).
//
// Interface: a, b 4-bit operands; p[2:0] = {p2, p1, p0}.  Purely combinational, in parallel with the
// multiplier.
module parity_predictor (
  input  gf_aop_pkg::gf4_t  a,
  input  gf_aop_pkg::gf4_t  b,
  output logic [2:0] p
);

  logic [6:0] prod;
  logic d0, d1, d2, d3, e0, e1, e2, ps;

  poly_mult #(.M(4)) u_pm (.a(a), .b(b), .prod(prod));

  always_comb begin
    {e2, e1, e0, d3, d2, d1, d0} = prod;
    ps   = d0 ^ d1 ^ d2 ^ d3 ^ e1 ^ e2;
    p[0] = ps ^ d2 ^ e0;
    p[1] = ps ^ d1 ^ e0 ^ e2;
    p[2] = ps ^ d0 ^ e0 ^ e1;
  end

endmodule
