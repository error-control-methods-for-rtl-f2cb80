// hamming_block -- syndrome and error-location decoder of the
// Hamming-protected AOP multiplier.
//
// The syndrome s = p ^ pp compares the predicted check bits p with those
// recomputed from the multiplier output, pp.  A zero syndrome means no
// error.  Otherwise the pattern names the faulty data bit:
//     h1 = s0 & s1 & ~s2   (c1 = c[0])    h2 = ~s0 & s1 & s2   (c2 = c[2])
//     h3 = s0 & ~s1 & s2   (c3 = c[1])    h4 = s0 & s1 & s2    (c4 = c[3])
// h3 and h4 are the published terms; h1 and h2 are the minterms that the
// parity-check equations imply.  A syndrome with a single one points at a
// check bit, not a data bit, and raises no h, so a fault in the parity path
// is reported but never miscorrects the product.
//
// Interface: p, pp check bits {2,1,0}; syndrome = {s2,s1,s0}; h correction
// vector in product bit order (h[k] flips c[k]); err = syndrome non-zero.
// Purely combinational.
module hamming_block (
  input  gf_aop_pkg::ham_chk_t p,
  input  gf_aop_pkg::ham_chk_t pp,
  output logic [2:0] syndrome,
  output logic [3:0] h,
  output logic       err
);

  logic s0, s1, s2;

  always_comb begin
    syndrome = p ^ pp;
    {s2, s1, s0} = syndrome;
    h[0] =  s0 &  s1 & ~s2;   // h1
    h[2] = ~s0 &  s1 &  s2;   // h2
    h[1] =  s0 & ~s1 &  s2;   // h3
    h[3] =  s0 &  s1 &  s2;   // h4
    err  = |syndrome;
  end

endmodule
